// crfifo_if: command/response FIFO interface (CRFIFO_IF).
//
// Connects the MicroBlaze to the command FIFO (host to coprocessor) and the
// response FIFO (coprocessor to host). Host commands are 64 bits wide; the
// interface takes one from the command FIFO and splits it into two 32-bit
// registers for the MicroBlaze. In the other direction the MicroBlaze writes
// two 32-bit response words, which the interface joins and writes into the
// response FIFO as one 64-bit response.
//
// Registers (byte offsets):
//   0x00/0x04 command taken from the command FIFO, low/high word (read only)
//   0x08/0x0C response to send, low/high word
//   0x10 FIFO-CNFG-STAT [0] RD_FIFO (write 1: take the next command; reads 1
//        until one was taken), [1] FIFO_WR_EN (write 1: send the response;
//        reads 1 until the response FIFO accepted it), [2] INT_EN,
//        [24] FIFO_CAN_ACPT (response FIFO has room, read only)
// CMD Interrupt (cmd_irq_o) is high while INT_EN is set and a command waits
// in the command FIFO.
//
// Command FIFO side: fifo_cmd_valid_i / fifo_cmd_i show the head command,
// fifo_cmd_accepted_o pulses for one cycle when it is taken. Response side:
// fifo_write_en_o pulses with fifo_write_data_o while fifo_can_accept_i.
//
// The signals, the splitting and joining of 64-bit words, the FIFO-CNFG-STAT
// register at offset 10h and its bit positions follow the source design. The
// other offsets, the low/high word order and the "bit stays set until done"
// behaviour are this design's choices.
module crfifo_if
  import scu_pkg::*;
(
  input  logic        clk_i,
  input  logic        rst_ni,
  input  axil_req_t   axi_i,
  output axil_rsp_t   axi_o,
  output logic        cmd_irq_o,
  // command/response FIFO side
  input  logic        fifo_cmd_valid_i,
  input  logic        fifo_can_accept_i,
  input  logic [63:0] fifo_cmd_i,
  output logic        fifo_cmd_accepted_o,
  output logic        fifo_write_en_o,
  output logic [63:0] fifo_write_data_o
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

  logic [63:0] cmd_q, resp_q;
  logic        rd_fifo_q, wr_en_q, int_en_q;

  assign fifo_cmd_accepted_o = rd_fifo_q && fifo_cmd_valid_i;
  assign fifo_write_en_o     = wr_en_q && fifo_can_accept_i;
  assign fifo_write_data_o   = resp_q;
  assign cmd_irq_o           = int_en_q && fifo_cmd_valid_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cmd_q     <= '0;
      resp_q    <= '0;
      rd_fifo_q <= 1'b0;
      wr_en_q   <= 1'b0;
      int_en_q  <= 1'b0;
    end else begin
      if (fifo_cmd_accepted_o) begin
        cmd_q     <= fifo_cmd_i;
        rd_fifo_q <= 1'b0;
      end
      if (fifo_write_en_o) wr_en_q <= 1'b0;
      if (wr_en) begin
        unique case (wr_addr)
          12'h008: resp_q[31:0]  <= wr_data;
          12'h00C: resp_q[63:32] <= wr_data;
          12'h010: begin
            if (wr_data[0]) rd_fifo_q <= 1'b1;
            if (wr_data[1]) wr_en_q   <= 1'b1;
            int_en_q <= wr_data[2];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (rd_addr)
      12'h000: rd_data = cmd_q[31:0];
      12'h004: rd_data = cmd_q[63:32];
      12'h008: rd_data = resp_q[31:0];
      12'h00C: rd_data = resp_q[63:32];
      12'h010: rd_data = {7'd0, fifo_can_accept_i, 21'd0, int_en_q, wr_en_q, rd_fifo_q};
      default: rd_data = '0;
    endcase
  end
endmodule
