// tb_krm: self-checking testbench of the kernel run monitor.
//
// Drives the request/response link the way the kernel run monitor interface
// does and stands in for the execution unit with a small model: after the
// run pulse it pushes random tuples into the three output pipes for a random
// number of cycles and then signals done. The test configures a kernel,
// checks every acknowledgement (next cycle, same transaction ID), the
// configuration outputs, the state sequence IDLE -> CONFIG -> RUNNING ->
// DONE -> IDLE, KRM_INT, the refusal of RUN while a kernel is active, the
// execution time (cycles from the first cycle the run pulse is seen to the
// cycle done is seen) and the per-pipe tuple counts read back.
module tb_krm;
  import scu_pkg::*;
  localparam int AW = 8;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        txvalid = 1'b0;
  logic [7:0]  txid = '0, txcmd = '0;
  logic [63:0] txdata = '0;
  logic        ack, irq;
  logic [7:0]  rid, state;
  logic [63:0] rdata;
  logic        eu_run, eu_done = 1'b0;
  logic [AW-1:0] eu_pc;
  logic [N_OPF-1:0] opf_push = '0;
  logic [63:0] kdr, amem, sdr_in [N_IPF], sdr_out [N_OPF], orf [N_ORF];
  int checks = 0, failures = 0;
  logic [7:0]  next_id = 8'd0;
  logic [63:0] resp;

  // independent reference of time and pipe counts
  logic        active = 1'b0;
  longint      cyc = 0, exp_time = 0;
  int          exp_prod [N_OPF];
  int          n_runs = 0;
  logic [AW-1:0] run_pc;

  krm #(.AW(AW)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .req_txvalid_i(txvalid), .req_txid_i(txid), .req_txcmd_i(txcmd), .req_txdata_i(txdata),
    .resp_txack_o(ack), .resp_txid_o(rid), .resp_txdata_o(rdata),
    .int_o(irq), .state_o(state),
    .eu_run_o(eu_run), .eu_start_pc_o(eu_pc), .eu_done_i(eu_done), .opf_push_i(opf_push),
    .kdr_o(kdr), .amem_o(amem), .sdr_in_o(sdr_in), .sdr_out_o(sdr_out), .orf_o(orf)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (eu_run) begin
      active <= 1'b1; cyc <= 1; n_runs <= n_runs + 1; run_pc <= eu_pc;
    end else if (active) begin
      cyc <= cyc + 1;
      if (eu_done) begin active <= 1'b0; exp_time <= cyc + 1; end
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one transaction; returns the response data
  task automatic send(input logic [7:0] cmd, input logic [63:0] data, output logic [63:0] r);
    @(negedge clk);
    txvalid = 1'b1; txid = next_id; txcmd = cmd; txdata = data;
    @(negedge clk);
    txvalid = 1'b0;
    check(ack && rid == next_id, $sformatf("ack for cmd %h id %0d (ack %b id %0d)", cmd, next_id, ack, rid));
    r = rdata;
    next_id++;
    @(negedge clk);
    check(!ack, "acknowledge lasts one cycle");
  endtask

  task automatic run_kernel(input logic [63:0] kdr_v, input int len);
    logic [63:0] sdr_v [N_OPF];
    logic [63:0] v;
    int runs0 = n_runs;
    send(KRM_CMD_KDR, kdr_v, v);
    check(v == 0 && kdr == kdr_v && state == KRM_ST_CONFIG, "KDR taken, state CONFIG");
    v = {$urandom, $urandom}; send(KRM_CMD_AMEM, v, resp);
    check(amem == v, "AMEM");
    for (int i = 0; i < N_IPF; i++) begin
      v = {$urandom, $urandom}; send(KRM_CMD_SDR_IN + 8'(i), v, resp);
      check(sdr_in[i] == v, $sformatf("input SDR %0d", i));
    end
    for (int i = 0; i < N_OPF; i++) begin
      sdr_v[i] = {$urandom, $urandom}; send(KRM_CMD_SDR_OUT + 8'(i), sdr_v[i], resp);
      check(sdr_out[i] == sdr_v[i], $sformatf("output SDR %0d", i));
    end
    for (int i = 0; i < N_ORF; i++) begin
      v = {$urandom, $urandom}; send(KRM_CMD_ORF + 8'(i), v, resp);
      check(orf[i] == v, $sformatf("ORF %0d", i));
    end
    check(!irq, "no interrupt before the run");
    send(KRM_CMD_RUN, 0, resp);
    check(resp == 0 && state == KRM_ST_RUNNING, "RUN accepted, state RUNNING");
    for (int i = 0; i < N_OPF; i++) exp_prod[i] = 0;
    fork
      begin  // execution unit model
        wait (n_runs == runs0 + 1);
        check(run_pc == kdr_v[AW-1:0], "start address from the kernel descriptor");
        for (int c = 0; c < len; c++) begin
          @(negedge clk);
          opf_push = N_OPF'($urandom);
          for (int i = 0; i < N_OPF; i++) exp_prod[i] += int'(opf_push[i]);
        end
        @(negedge clk);
        opf_push = '0; eu_done = 1'b1;
        @(negedge clk);
        eu_done = 1'b0;
      end
      begin  // requests refused or ignored while the kernel runs
        send(KRM_CMD_RUN, 0, resp);
        check(resp == '1, "second RUN refused while running");
        send(KRM_CMD_RELEASE, 0, resp);
        check(state == KRM_ST_RUNNING && !irq, "RELEASE ignored while running");
      end
    join
    @(negedge clk);
    check(state == KRM_ST_DONE && irq, "DONE and KRM_INT after the kernel ends");
    send(KRM_CMD_RUN, 0, resp);
    check(resp == '1 && state == KRM_ST_DONE, "RUN refused before release");
    send(KRM_CMD_RD_TIME, 0, resp);
    check(resp == 64'(exp_time), $sformatf("execution time %0d, expected %0d", resp, exp_time));
    for (int i = 0; i < N_OPF; i++) begin
      send(KRM_CMD_RD_SDR + 8'(i), 0, resp);
      check(resp == {sdr_v[i][63:32], 32'(exp_prod[i])},
            $sformatf("output SDR %0d read back %h, expected count %0d", i, resp, exp_prod[i]));
    end
    send(KRM_CMD_RELEASE, 0, resp);
    check(state == KRM_ST_IDLE && !irq, "released: IDLE, interrupt cleared");
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    check(state == KRM_ST_IDLE && !irq && !eu_run, "reset state");
    run_kernel(64'h0000_0000_0000_0040, 20);
    run_kernel(64'h1234_0000_0000_0007, 57);
    run_kernel(64'h0000_0000_0000_0000, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
