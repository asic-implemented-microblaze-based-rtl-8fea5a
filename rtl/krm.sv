// krm: kernel run monitor.
//
// Sits between the kernel run monitor interface (management side) and the
// execution unit. It takes a kernel's configuration as request/response
// transactions (kernel descriptor, argument word, two input and three output
// stream descriptors, five offset registers), starts the execution unit on a
// RUN command at the start address held in the kernel descriptor, counts the
// kernel's execution time in clock cycles and the tuples written to each
// output pipe, and raises KRM_INT when the kernel has finished. The
// management side then reads the execution time and the updated output
// stream descriptors and releases the execution unit, which clears KRM_INT.
//
// Transactions: a request (req_txvalid_i with ID, command, data) is
// answered in the next cycle by a one-cycle resp_txack_o with the same ID and
// response data (read data for RD_TIME / RD_SDR, zero otherwise; all ones for
// a RUN refused because a kernel is running or finished and not released).
// Stream descriptor format (this design's choice): bits 63:32 base, 31:0
// length in tuples. An output descriptor read back carries its base and, in
// the length field, the number of tuples the kernel pushed to that pipe.
// Kernel descriptor: bits AW-1:0 start address of the kernel.
// The descriptors, argument word and offset registers are presented on
// sdr_*_o / amem_o / orf_o for the stream register file side.
// state_o reports IDLE, CONFIG (configuration received), RUNNING or DONE.
//
// The transaction signals, KRM_INT and KRM_STATE follow the source design's
// interface; the command set, formats and counters are this design's own.
module krm
  import scu_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  // request/response link from the interface
  input  logic             req_txvalid_i,
  input  logic [7:0]       req_txid_i,
  input  logic [7:0]       req_txcmd_i,
  input  logic [63:0]      req_txdata_i,
  output logic             resp_txack_o,
  output logic [7:0]       resp_txid_o,
  output logic [63:0]      resp_txdata_o,
  output logic             int_o,
  output logic [7:0]       state_o,
  // execution unit
  output logic             eu_run_o,
  output logic [AW-1:0]    eu_start_pc_o,
  input  logic             eu_done_i,
  input  logic [N_OPF-1:0] opf_push_i,
  // configuration towards the stream register file side
  output logic [63:0]      kdr_o,
  output logic [63:0]      amem_o,
  output logic [63:0]      sdr_in_o  [N_IPF],
  output logic [63:0]      sdr_out_o [N_OPF],
  output logic [63:0]      orf_o     [N_ORF]
);
  krm_state_e  st_q;
  logic [63:0] time_q;
  logic [31:0] produced_q [N_OPF];
  logic        run_ok;
  // table index carried by the low bits of an indexed command
  logic [$clog2(N_IPF)-1:0] in_idx;
  logic [$clog2(N_OPF)-1:0] out_idx, rd_idx;
  logic [$clog2(N_ORF)-1:0] orf_idx;

  assign in_idx  = $bits(in_idx)'(req_txcmd_i - KRM_CMD_SDR_IN);
  assign out_idx = $bits(out_idx)'(req_txcmd_i - KRM_CMD_SDR_OUT);
  assign rd_idx  = $bits(rd_idx)'(req_txcmd_i - KRM_CMD_RD_SDR);
  assign orf_idx = $bits(orf_idx)'(req_txcmd_i - KRM_CMD_ORF);

  assign run_ok = (st_q == KRM_ST_IDLE) || (st_q == KRM_ST_CONFIG);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q          <= KRM_ST_IDLE;
      time_q        <= '0;
      resp_txack_o  <= 1'b0;
      resp_txid_o   <= '0;
      resp_txdata_o <= '0;
      eu_run_o      <= 1'b0;
      kdr_o         <= '0;
      amem_o        <= '0;
      for (int i = 0; i < N_IPF; i++) sdr_in_o[i] <= '0;
      for (int i = 0; i < N_OPF; i++) begin sdr_out_o[i] <= '0; produced_q[i] <= '0; end
      for (int i = 0; i < N_ORF; i++) orf_o[i] <= '0;
    end else begin
      resp_txack_o <= 1'b0;
      eu_run_o     <= 1'b0;

      if (st_q == KRM_ST_RUNNING) begin
        time_q <= time_q + 64'd1;
        for (int i = 0; i < N_OPF; i++)
          if (opf_push_i[i]) produced_q[i] <= produced_q[i] + 32'd1;
        if (eu_done_i) st_q <= KRM_ST_DONE;
      end

      if (req_txvalid_i) begin
        resp_txack_o  <= 1'b1;
        resp_txid_o   <= req_txid_i;
        resp_txdata_o <= '0;
        if (req_txcmd_i == KRM_CMD_KDR) begin
          kdr_o <= req_txdata_i;
          if (run_ok) st_q <= KRM_ST_CONFIG;
        end else if (req_txcmd_i == KRM_CMD_AMEM) begin
          amem_o <= req_txdata_i;
        end else if (req_txcmd_i >= KRM_CMD_SDR_IN && req_txcmd_i < KRM_CMD_SDR_IN + 8'(N_IPF)) begin
          sdr_in_o[in_idx] <= req_txdata_i;
        end else if (req_txcmd_i >= KRM_CMD_SDR_OUT && req_txcmd_i < KRM_CMD_SDR_OUT + 8'(N_OPF)) begin
          sdr_out_o[out_idx] <= req_txdata_i;
        end else if (req_txcmd_i >= KRM_CMD_ORF && req_txcmd_i < KRM_CMD_ORF + 8'(N_ORF)) begin
          orf_o[orf_idx] <= req_txdata_i;
        end else if (req_txcmd_i == KRM_CMD_RUN) begin
          if (run_ok) begin
            st_q     <= KRM_ST_RUNNING;
            eu_run_o <= 1'b1;
            time_q   <= '0;
            for (int i = 0; i < N_OPF; i++) produced_q[i] <= '0;
          end else begin
            resp_txdata_o <= '1;
          end
        end else if (req_txcmd_i == KRM_CMD_RD_TIME) begin
          resp_txdata_o <= time_q;
        end else if (req_txcmd_i >= KRM_CMD_RD_SDR && req_txcmd_i < KRM_CMD_RD_SDR + 8'(N_OPF)) begin
          resp_txdata_o <= {sdr_out_o[rd_idx][63:32],
                            produced_q[rd_idx]};
        end else if (req_txcmd_i == KRM_CMD_RELEASE) begin
          if (st_q == KRM_ST_DONE) st_q <= KRM_ST_IDLE;
        end
      end
    end
  end

  assign int_o         = (st_q == KRM_ST_DONE);
  assign state_o       = st_q;
  assign eu_start_pc_o = kdr_o[AW-1:0];
endmodule
