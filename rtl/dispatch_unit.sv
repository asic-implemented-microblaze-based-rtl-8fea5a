// dispatch_unit: dispatch unit (DU) between the host and the coprocessor.
//
// Maps the host processor interface onto the coprocessor's internal
// streams. The MicroBlaze programs two DMA-like engines over AXI4-Lite:
//   * HTRDE, the host-to-coprocessor read engine, reads LEN 64-bit words
//     from consecutive host addresses and hands each to one HTI_RDX client;
//   * HTWRE, the coprocessor-to-host write engine, takes LEN words from one
//     HTI_WRX client and writes them to consecutive host addresses.
// The stream router is the client selection: the MicroBlaze names the client
// of each transfer, which is how host data is split into commands and
// tuples. Client numbering used by the top: read clients 0 = command FIFO,
// 1 = read stripe pipe (tuples); write clients 0 = response FIFO, 1 = write
// stripe pipe (result tuples).
//
// Registers (byte offsets, 32-bit):
//   0x00 RD_ADDR  [24:0] first host word address of the read transfer
//   0x04 RD_CTRL  [15:0] LEN (words), [16] CLIENT, [31] START (write 1 to
//                 start; reads 1 while the transfer runs)
//   0x08 RD_MASK  [7:0] byte mask sent with every read request
//   0x10 WR_ADDR  [24:0] first host word address of the write transfer
//   0x14 WR_CTRL  [15:0] LEN, [16] CLIENT, [31] START / busy
//   0x18 WR_MASK  [7:0] byte mask sent with every write request
//   0x20 RD_DONE  words delivered to read clients since reset
//   0x24 WR_DONE  words written to the host since reset
// A START written while the engine is busy is ignored.
//
// Host side: a read request (DISP_RD_REQ with address and mask) is taken in
// a cycle where DISP_RD_WAIT is low; its data comes back later with
// DISP_RD_VALID. The read engine keeps one request outstanding and issues it
// only when the client has room, so a returned word can always be delivered.
// A write request (DISP_WR_REQ with address, mask, data) is taken in a cycle
// where DISP_WR_WAIT is low; the client word is popped in that cycle.
// Clients are first-word-fall-through FIFOs (push/full, pop/data/empty).
//
// From the source design: the host interface signal names and widths, the
// two engines, the stream router, the AXI4-Lite port to the MicroBlaze and
// the split of host data into commands and tuples. The register map, the
// word addressing, the one-outstanding-read policy and client numbering are
// this design's choices; the source names these parts without describing
// their insides.
module dispatch_unit
  import scu_pkg::*;
#(
  parameter int unsigned NRDX = 2,  // HTI_RDX clients
  parameter int unsigned NWRX = 2   // HTI_WRX clients
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // MicroBlaze
  input  axil_req_t        axi_i,
  output axil_rsp_t        axi_o,
  // host processor interface
  input  logic [63:0]      disp_rd_data_i,
  input  logic             disp_rd_valid_i,
  input  logic             disp_rd_wait_i,
  input  logic             disp_wr_wait_i,
  output logic             disp_rd_req_o,
  output logic [24:0]      disp_rd_addr_o,
  output logic [7:0]       disp_rd_mask_o,
  output logic             disp_wr_req_o,
  output logic [24:0]      disp_wr_addr_o,
  output logic [7:0]       disp_wr_mask_o,
  output logic [63:0]      disp_wr_data_o,
  // HTI_RDX clients (host to coprocessor)
  output logic [NRDX-1:0]  rdx_push_o,
  output logic [63:0]      rdx_data_o,
  input  logic [NRDX-1:0]  rdx_full_i,
  // HTI_WRX clients (coprocessor to host)
  output logic [NWRX-1:0]  wrx_pop_o,
  input  logic [63:0]      wrx_data_i [NWRX],
  input  logic [NWRX-1:0]  wrx_empty_i
);
  localparam int unsigned RCW = (NRDX > 1) ? $clog2(NRDX) : 1;
  localparam int unsigned WCW = (NWRX > 1) ? $clog2(NWRX) : 1;

  logic               wr_en, rd_en;
  logic [AXIL_AW-1:0] wr_addr, rd_addr;
  logic [AXIL_DW-1:0] wr_data, rd_data;
  logic [3:0]         wr_strb;

  axil_regport u_axil (
    .clk_i, .rst_ni, .axi_i, .axi_o,
    .wr_en_o(wr_en), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .wr_strb_o(wr_strb),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data)
  );

  // read engine (HTRDE)
  logic [24:0]    r_addr_q;
  logic [15:0]    r_left_q;
  logic [RCW-1:0] r_client_q;
  logic [7:0]     r_mask_q;
  logic           r_busy_q, r_out_q;
  logic [31:0]    r_done_q;
  logic           r_take;
  // write engine (HTWRE)
  logic [24:0]    w_addr_q;
  logic [15:0]    w_left_q;
  logic [WCW-1:0] w_client_q;
  logic [7:0]     w_mask_q;
  logic           w_busy_q;
  logic [31:0]    w_done_q;
  logic           w_take;

  // ---------------------------------------------------------- stream router
  assign disp_rd_req_o  = r_busy_q && !r_out_q && (r_left_q != 0) && !rdx_full_i[r_client_q];
  assign disp_rd_addr_o = r_addr_q;
  assign disp_rd_mask_o = r_mask_q;
  assign r_take         = disp_rd_req_o && !disp_rd_wait_i;

  always_comb begin
    rdx_push_o = '0;
    rdx_push_o[r_client_q] = r_out_q && disp_rd_valid_i;
  end
  assign rdx_data_o = disp_rd_data_i;

  assign disp_wr_req_o  = w_busy_q && (w_left_q != 0) && !wrx_empty_i[w_client_q];
  assign disp_wr_addr_o = w_addr_q;
  assign disp_wr_mask_o = w_mask_q;
  assign disp_wr_data_o = wrx_data_i[w_client_q];
  assign w_take         = disp_wr_req_o && !disp_wr_wait_i;

  always_comb begin
    wrx_pop_o = '0;
    wrx_pop_o[w_client_q] = w_take;
  end

  // ---------------------------------------------------------- engines
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      r_addr_q <= '0; r_left_q <= '0; r_client_q <= '0; r_mask_q <= '0;
      r_busy_q <= 1'b0; r_out_q <= 1'b0; r_done_q <= '0;
      w_addr_q <= '0; w_left_q <= '0; w_client_q <= '0; w_mask_q <= '0;
      w_busy_q <= 1'b0; w_done_q <= '0;
    end else begin
      // read engine
      if (r_take) begin
        r_out_q  <= 1'b1;
        r_addr_q <= r_addr_q + 25'd1;
        r_left_q <= r_left_q - 16'd1;
      end
      if (r_out_q && disp_rd_valid_i) begin
        r_out_q  <= 1'b0;
        r_done_q <= r_done_q + 32'd1;
      end
      if (r_busy_q && r_left_q == 0 && !r_out_q) r_busy_q <= 1'b0;
      // write engine
      if (w_take) begin
        w_addr_q <= w_addr_q + 25'd1;
        w_left_q <= w_left_q - 16'd1;
        w_done_q <= w_done_q + 32'd1;
      end
      if (w_busy_q && w_left_q == 0) w_busy_q <= 1'b0;
      // registers
      if (wr_en) begin
        unique case (wr_addr)
          12'h000: if (!r_busy_q) r_addr_q <= wr_data[24:0];
          12'h004: if (!r_busy_q && wr_data[31]) begin
            r_left_q   <= wr_data[15:0];
            r_client_q <= wr_data[16 +: RCW];
            r_busy_q   <= 1'b1;
          end
          12'h008: r_mask_q <= wr_data[7:0];
          12'h010: if (!w_busy_q) w_addr_q <= wr_data[24:0];
          12'h014: if (!w_busy_q && wr_data[31]) begin
            w_left_q   <= wr_data[15:0];
            w_client_q <= wr_data[16 +: WCW];
            w_busy_q   <= 1'b1;
          end
          12'h018: w_mask_q <= wr_data[7:0];
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      12'h000: rd_data = {7'd0, r_addr_q};
      12'h004: rd_data = {r_busy_q, 14'd0, 1'(r_client_q), r_left_q};
      12'h008: rd_data = {24'd0, r_mask_q};
      12'h010: rd_data = {7'd0, w_addr_q};
      12'h014: rd_data = {w_busy_q, 14'd0, 1'(w_client_q), w_left_q};
      12'h018: rd_data = {24'd0, w_mask_q};
      12'h020: rd_data = r_done_q;
      12'h024: rd_data = w_done_q;
      default: rd_data = '0;
    endcase
  end

  // a read is delivered only to a client that had room when it was requested
  always_ff @(posedge clk_i)
    if (r_out_q && disp_rd_valid_i)
      assert (!rdx_full_i[r_client_q]) else $error("read client overflow");
endmodule
