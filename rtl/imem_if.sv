// imem_if: instruction memory interface (IMEM_IF).
//
// Lets the MicroBlaze drive the instruction memory's request/response
// transaction link through AXI4-Lite registers. The MicroBlaze writes the
// request data and then the control register with a transaction ID, a
// command and TXVALID; the interface sends the request as soon as the
// memory's request buffer is not full. Responses wait in the memory; the
// MicroBlaze checks TXACK in the status register and writes RD_EN, which
// takes the response out of the memory and stores its ID and data in this
// interface's response registers.
//
// Registers (byte offsets):
//   0x00 IMEM-REQ-CNTRL [0] TXVALID (reads 1 until the request is sent),
//                       [1] RD_EN (reads 1 until a response was taken),
//                       [15:8] REQ_WR_TXID, [23:16] REQ_WR_TXCMD
//   0x04/0x08 request data, low/high word
//   0x0C IMEM-RESP-STAT [0] REQ_FULL, [1] RESP_FULL, [2] TXACK (a response
//                       is waiting), [15:8] RESP_RD_TXID (ID of the last
//                       response taken)
//   0x10/0x14 response data of the last response taken, low/high word
// Reserved bits read 0. Byte strobes are honoured on IMEM-REQ-CNTRL, so RD_EN
// can be written alone (byte 0) without touching the ID and command of a
// request that is still pending.
//
// The register fields and bit positions of IMEM-REQ-CNTRL and
// IMEM-RESP-STAT and the memory-side signals follow the source design. Its
// register drawing marks REQ_WR_TXCMD read-only; here it is writable, since
// the command has to come from the MicroBlaze. The register offsets, the
// data registers and the "bit stays set until done" behaviour of TXVALID and
// RD_EN are this design's choices.
module imem_if
  import scu_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  axil_req_t   axi_i,
  output axil_rsp_t   axi_o,
  // instruction memory side
  input  logic        imem_reqbuf_full_i,
  input  logic        imem_respbuf_full_i,
  input  logic        imem_resp_txack_i,
  input  logic [7:0]  imem_resp_txid_i,
  input  logic [63:0] imem_resp_txdata_i,
  output logic        imem_req_txvalid_o,
  output logic [7:0]  imem_req_txid_o,
  output logic [7:0]  imem_req_txcmd_o,
  output logic [63:0] imem_req_txdata_o,
  output logic        imem_rd_en_o
);
  logic               wr_en, rd_en;
  logic [AXIL_AW-1:0] wr_addr, rd_addr;
  logic [AXIL_DW-1:0] wr_data, rd_data;
  logic [3:0]         wr_strb;

  axil_regport u_axil (
    .clk_i, .rst_ni, .axi_i, .axi_o,
    .wr_en_o(wr_en), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .wr_strb_o(wr_strb),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data)
  );

  logic        txvalid_q, rden_q;
  logic [7:0]  txid_q, txcmd_q, resp_id_q;
  logic [63:0] txdata_q, resp_data_q;

  assign imem_req_txvalid_o = txvalid_q && !imem_reqbuf_full_i;
  assign imem_req_txid_o    = txid_q;
  assign imem_req_txcmd_o   = txcmd_q;
  assign imem_req_txdata_o  = txdata_q;
  assign imem_rd_en_o       = rden_q && imem_resp_txack_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      txvalid_q   <= 1'b0;
      rden_q      <= 1'b0;
      txid_q      <= '0;
      txcmd_q     <= '0;
      txdata_q    <= '0;
      resp_id_q   <= '0;
      resp_data_q <= '0;
    end else begin
      if (imem_req_txvalid_o) txvalid_q <= 1'b0;
      if (imem_rd_en_o) begin
        rden_q      <= 1'b0;
        resp_id_q   <= imem_resp_txid_i;
        resp_data_q <= imem_resp_txdata_i;
      end
      if (wr_en) begin
        unique case (wr_addr)
          12'h000: begin
            if (wr_strb[0] && wr_data[0]) txvalid_q <= 1'b1;
            if (wr_strb[0] && wr_data[1]) rden_q    <= 1'b1;
            if (wr_strb[1]) txid_q  <= wr_data[15:8];
            if (wr_strb[2]) txcmd_q <= wr_data[23:16];
          end
          12'h004: txdata_q[31:0]  <= wr_data;
          12'h008: txdata_q[63:32] <= wr_data;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      12'h000: rd_data = {8'd0, txcmd_q, txid_q, 6'd0, rden_q, txvalid_q};
      12'h004: rd_data = txdata_q[31:0];
      12'h008: rd_data = txdata_q[63:32];
      12'h00C: rd_data = {16'd0, resp_id_q, 5'd0, imem_resp_txack_i, imem_respbuf_full_i,
                          imem_reqbuf_full_i};
      12'h010: rd_data = resp_data_q[31:0];
      12'h014: rd_data = resp_data_q[63:32];
      default: rd_data = '0;
    endcase
  end
endmodule
