// krm_if: kernel run monitor interface (KRM_IF).
//
// The MicroBlaze prepares kernels in this block's memory and starts them
// through its configuration registers; a state machine then talks to the
// kernel run monitor over the request/response transaction link.
//
// Memory (AXI4-Lite, 64-bit entries as low/high 32-bit words):
//   0x100 + 8*id  KDR[id]   kernel descriptor file, NKERN kernels
//   0x180 + 8*id  AMEM[id]  kernel argument word of each kernel
//   0x200 + 8*j   SDR[j]    stream descriptor file: input 1, input 2,
//                           output 1, output 2, output 3
//   0x240 + 8*j   ORF[j]    offset register file, 5 entries
// Configuration registers:
//   0x000 CTRL    [0] RUN_KERNEL (write 1: run kernel KERNEL_ID, reads 1
//                 until the state machine has taken it), [1] INT_EN,
//                 [15:8] KERNEL_ID
//   0x004 STATUS  [4:0] state machine state, [8] busy, [9] RESULT (results
//                 of the last kernel collected; write 1 to clear),
//                 [23:16] KRM_STATE
//   0x008/0x00C   kernel execution time, low/high word
//   0x010 + 8*k   output stream descriptor k as read back after the kernel
// KRM Interrupt (irq_o) = RESULT & INT_EN.
//
// State machine: from IDLE, a raised KRM_INT takes priority and runs the
// read-back sequence: read kernel execution time, read the SDR of output
// streams 1, 2 and 3, release the execution unit, back to IDLE (RESULT set).
// Otherwise a pending RUN_KERNEL runs the launch sequence: send KDR, send
// AMEM, send SDR I/P 1, I/P 2, O/P 1, O/P 2, O/P 3, send the five ORF
// entries, send Run Kernel, back to IDLE. Each step sends one request with a
// fresh transaction ID and waits for the acknowledgement carrying that ID.
//
// Following the source design: the three register files KDR, SDR and ORF,
// the ports towards the kernel run monitor (TXVALID, TXID, TXCMD, TXDATA,
// TXACK, KRM_INT, KRM_STATE) and the order of the states. This design's own
// choices: one AXI4-Lite port for both registers and memory (the source
// reaches the memory over a separate AXI4 port), the address map, register
// fields, file sizes and command codes, the per-kernel AMEM word, and
// reading the five ORF steps as ORF entries 0 to 4.
module krm_if
  import scu_pkg::*;
#(
  parameter int unsigned NKERN = 16
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // MicroBlaze side
  input  axil_req_t   axi_i,
  output axil_rsp_t   axi_o,
  output logic        irq_o,
  // kernel run monitor side
  output logic        krm_req_txvalid_o,
  output logic [7:0]  krm_req_txid_o,
  output logic [7:0]  krm_req_txcmd_o,
  output logic [63:0] krm_req_txdata_o,
  input  logic        krm_resp_txack_i,
  input  logic [7:0]  krm_resp_txid_i,
  input  logic [63:0] krm_resp_txdata_i,
  input  logic        krm_int_i,
  input  logic [7:0]  krm_state_i
);
  localparam int unsigned NSDR = N_IPF + N_OPF;
  localparam int unsigned KW   = $clog2(NKERN);

  typedef enum logic [4:0] {
    F_IDLE, F_SEND_KDR, F_SEND_AMEM,
    F_SEND_SDR_IP1, F_SEND_SDR_IP2, F_SEND_SDR_OP1, F_SEND_SDR_OP2, F_SEND_SDR_OP3,
    F_SEND_ORF0, F_SEND_ORF1, F_SEND_ORF2, F_SEND_ORF3, F_SEND_ORF4, F_SEND_RUN,
    F_READ_TIME, F_READ_SDR_OP1, F_READ_SDR_OP2, F_READ_SDR_OP3, F_RELEASE
  } fsm_e;

  // register side of the AXI4-Lite port
  logic               wr_en, rd_en;
  logic [AXIL_AW-1:0] wr_addr, rd_addr;
  logic [AXIL_DW-1:0] wr_data, rd_data;
  logic [3:0]         wr_strb;

  axil_regport u_axil (
    .clk_i, .rst_ni, .axi_i, .axi_o,
    .wr_en_o(wr_en), .wr_addr_o(wr_addr), .wr_data_o(wr_data), .wr_strb_o(wr_strb),
    .rd_en_o(rd_en), .rd_addr_o(rd_addr), .rd_data_i(rd_data)
  );

  logic [63:0] kdr  [NKERN];
  logic [63:0] amem [NKERN];
  logic [63:0] sdr  [NSDR];
  logic [63:0] orf  [N_ORF];
  logic [63:0] time_q;
  logic [63:0] sdr_rb [N_OPF];
  logic        run_pend_q, int_en_q, result_q;
  logic [KW-1:0] kid_q, kid_run_q;
  fsm_e        st_q;
  logic        sent_q;
  logic [7:0]  txid_q;
  logic [7:0]  cmd;
  logic [63:0] data;

  // ----------------------------------------------------------- registers
  function automatic logic [63:0] merge(logic [63:0] old, logic hi, logic [31:0] d, logic [3:0] strb);
    logic [63:0] r;
    r = old;
    for (int b = 0; b < 4; b++)
      if (strb[b]) begin
        if (hi) r[32 + 8*b +: 8] = d[8*b +: 8];
        else    r[8*b +: 8]      = d[8*b +: 8];
      end
    return r;
  endfunction

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NKERN; i++) begin kdr[i] <= '0; amem[i] <= '0; end
      for (int i = 0; i < NSDR; i++)  sdr[i] <= '0;
      for (int i = 0; i < N_ORF; i++) orf[i] <= '0;
      run_pend_q <= 1'b0;
      int_en_q   <= 1'b0;
      kid_q      <= '0;
    end else begin
      if (wr_en) begin
        if (wr_addr[11:7] == 5'b00010)                               // 0x100
          kdr[wr_addr[KW+2:3]]  <= merge(kdr[wr_addr[KW+2:3]],  wr_addr[2], wr_data, wr_strb);
        else if (wr_addr[11:7] == 5'b00011)                          // 0x180
          amem[wr_addr[KW+2:3]] <= merge(amem[wr_addr[KW+2:3]], wr_addr[2], wr_data, wr_strb);
        else if (wr_addr[11:6] == 6'b001000 && int'(wr_addr[5:3]) < NSDR)  // 0x200
          sdr[wr_addr[5:3]] <= merge(sdr[wr_addr[5:3]], wr_addr[2], wr_data, wr_strb);
        else if (wr_addr[11:6] == 6'b001001 && int'(wr_addr[5:3]) < N_ORF) // 0x240
          orf[wr_addr[5:3]] <= merge(orf[wr_addr[5:3]], wr_addr[2], wr_data, wr_strb);
        else if (wr_addr == 12'h000) begin
          if (wr_data[0]) run_pend_q <= 1'b1;
          int_en_q <= wr_data[1];
          kid_q    <= wr_data[8 +: KW];
        end
      end
      if (st_q == F_IDLE && !krm_int_i && run_pend_q) run_pend_q <= 1'b0;
    end
  end

  always_comb begin
    rd_data = '0;
    if (rd_addr[11:7] == 5'b00010)
      rd_data = rd_addr[2] ? kdr[rd_addr[KW+2:3]][63:32] : kdr[rd_addr[KW+2:3]][31:0];
    else if (rd_addr[11:7] == 5'b00011)
      rd_data = rd_addr[2] ? amem[rd_addr[KW+2:3]][63:32] : amem[rd_addr[KW+2:3]][31:0];
    else if (rd_addr[11:6] == 6'b001000 && int'(rd_addr[5:3]) < NSDR)
      rd_data = rd_addr[2] ? sdr[rd_addr[5:3]][63:32] : sdr[rd_addr[5:3]][31:0];
    else if (rd_addr[11:6] == 6'b001001 && int'(rd_addr[5:3]) < N_ORF)
      rd_data = rd_addr[2] ? orf[rd_addr[5:3]][63:32] : orf[rd_addr[5:3]][31:0];
    else begin
      unique case (rd_addr)
        12'h000: rd_data = {16'd0, 8'(kid_q), 6'd0, int_en_q, run_pend_q};
        12'h004: rd_data = {8'd0, krm_state_i, 6'd0, result_q, (st_q != F_IDLE), 3'd0, st_q};
        12'h008: rd_data = time_q[31:0];
        12'h00C: rd_data = time_q[63:32];
        12'h010: rd_data = sdr_rb[0][31:0];
        12'h014: rd_data = sdr_rb[0][63:32];
        12'h018: rd_data = sdr_rb[1][31:0];
        12'h01C: rd_data = sdr_rb[1][63:32];
        12'h020: rd_data = sdr_rb[2][31:0];
        12'h024: rd_data = sdr_rb[2][63:32];
        default: rd_data = '0;
      endcase
    end
  end

  // --------------------------------------------------------- state machine
  always_comb begin
    cmd  = '0;
    data = '0;
    unique case (st_q)
      F_SEND_KDR:     begin cmd = KRM_CMD_KDR;         data = kdr[kid_run_q];  end
      F_SEND_AMEM:    begin cmd = KRM_CMD_AMEM;        data = amem[kid_run_q]; end
      F_SEND_SDR_IP1: begin cmd = KRM_CMD_SDR_IN;      data = sdr[0]; end
      F_SEND_SDR_IP2: begin cmd = KRM_CMD_SDR_IN + 1;  data = sdr[1]; end
      F_SEND_SDR_OP1: begin cmd = KRM_CMD_SDR_OUT;     data = sdr[2]; end
      F_SEND_SDR_OP2: begin cmd = KRM_CMD_SDR_OUT + 1; data = sdr[3]; end
      F_SEND_SDR_OP3: begin cmd = KRM_CMD_SDR_OUT + 2; data = sdr[4]; end
      F_SEND_ORF0:    begin cmd = KRM_CMD_ORF;         data = orf[0]; end
      F_SEND_ORF1:    begin cmd = KRM_CMD_ORF + 1;     data = orf[1]; end
      F_SEND_ORF2:    begin cmd = KRM_CMD_ORF + 2;     data = orf[2]; end
      F_SEND_ORF3:    begin cmd = KRM_CMD_ORF + 3;     data = orf[3]; end
      F_SEND_ORF4:    begin cmd = KRM_CMD_ORF + 4;     data = orf[4]; end
      F_SEND_RUN:     cmd = KRM_CMD_RUN;
      F_READ_TIME:    cmd = KRM_CMD_RD_TIME;
      F_READ_SDR_OP1: cmd = KRM_CMD_RD_SDR;
      F_READ_SDR_OP2: cmd = KRM_CMD_RD_SDR + 1;
      F_READ_SDR_OP3: cmd = KRM_CMD_RD_SDR + 2;
      F_RELEASE:      cmd = KRM_CMD_RELEASE;
      default: ;
    endcase
  end

  assign krm_req_txvalid_o = (st_q != F_IDLE) && !sent_q;
  assign krm_req_txid_o    = txid_q;
  assign krm_req_txcmd_o   = cmd;
  assign krm_req_txdata_o  = data;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q      <= F_IDLE;
      sent_q    <= 1'b0;
      txid_q    <= '0;
      kid_run_q <= '0;
      result_q  <= 1'b0;
      time_q    <= '0;
      for (int i = 0; i < N_OPF; i++) sdr_rb[i] <= '0;
    end else begin
      if (wr_en && wr_addr == 12'h004 && wr_data[9]) result_q <= 1'b0;
      if (st_q == F_IDLE) begin
        sent_q <= 1'b0;
        if (krm_int_i) begin
          st_q <= F_READ_TIME;
        end else if (run_pend_q) begin
          st_q      <= F_SEND_KDR;
          kid_run_q <= kid_q;
          result_q  <= 1'b0;
        end
      end else if (!sent_q) begin
        sent_q <= 1'b1;
      end else if (krm_resp_txack_i && krm_resp_txid_i == txid_q) begin
        sent_q <= 1'b0;
        txid_q <= txid_q + 8'd1;
        unique case (st_q)
          F_READ_TIME:    time_q    <= krm_resp_txdata_i;
          F_READ_SDR_OP1: sdr_rb[0] <= krm_resp_txdata_i;
          F_READ_SDR_OP2: sdr_rb[1] <= krm_resp_txdata_i;
          F_READ_SDR_OP3: sdr_rb[2] <= krm_resp_txdata_i;
          default: ;
        endcase
        if (st_q == F_SEND_RUN) st_q <= F_IDLE;
        else if (st_q == F_RELEASE) begin
          st_q     <= F_IDLE;
          result_q <= 1'b1;
        end else st_q <= fsm_e'(st_q + 5'd1);
      end
    end
  end

  assign irq_o = result_q && int_en_q;
endmodule
