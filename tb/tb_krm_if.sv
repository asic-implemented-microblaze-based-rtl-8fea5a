// tb_krm_if: self-checking testbench of the kernel run monitor interface.
//
// A bus-functional AXI4-Lite master writes the kernel descriptor, argument,
// stream descriptor and offset register files, reads them back, and starts
// kernels through CTRL. A model of the kernel run monitor answers every
// request after a random delay, sometimes first with a stale transaction ID
// that must be ignored, and logs the commands it receives. The test checks:
//   * the launch sequence: KDR, AMEM, SDR input 1-2, output 1-3, ORF 0-4,
//     Run Kernel, with the selected kernel's KDR/AMEM and consecutive IDs;
//   * on KRM_INT the read-back sequence: execution time, output SDR 1-3,
//     release; the values read back appear in the registers, RESULT is set
//     and the interrupt follows RESULT & INT_EN, cleared by writing 1;
//   * a raised KRM_INT is served before a pending run request;
//   * byte strobes on memory writes and KRM_STATE in STATUS.
module tb_krm_if;
  import scu_pkg::*;
  localparam int NKERN = 16;
  logic        clk = 1'b0, rst_n = 1'b1;
  axil_req_t   req = '0;
  axil_rsp_t   rsp;
  logic        irq;
  logic        txvalid, ack = 1'b0, krm_int = 1'b0;
  logic [7:0]  txid, txcmd, rid = '0, kstate = 8'h5A;
  logic [63:0] txdata, rdata = '0;
  int checks = 0, failures = 0;

  logic [63:0] kdr_m [NKERN], amem_m [NKERN], sdr_m [5], orf_m [5];
  logic [63:0] time_v, sdr_rb_v [3];
  // command log of the run monitor model
  logic [7:0]  log_cmd [$];
  logic [63:0] log_data [$];
  logic [7:0]  log_id [$];
  logic [7:0]  log_id_next = 8'd0;  // ID the next request must carry

  krm_if #(.NKERN(NKERN)) dut (
    .clk_i(clk), .rst_ni(rst_n), .axi_i(req), .axi_o(rsp), .irq_o(irq),
    .krm_req_txvalid_o(txvalid), .krm_req_txid_o(txid), .krm_req_txcmd_o(txcmd),
    .krm_req_txdata_o(txdata), .krm_resp_txack_i(ack), .krm_resp_txid_i(rid),
    .krm_resp_txdata_i(rdata), .krm_int_i(krm_int), .krm_state_i(kstate)
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // -------------------------------------------------- AXI4-Lite master
  task automatic axw(input logic [11:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    req.awaddr = a; req.awvalid = 1'b1; req.wdata = d; req.wstrb = s; req.wvalid = 1'b1;
    req.bready = 1'b1;
    #1 while (!rsp.awready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.awvalid = 1'b0; req.wvalid = 1'b0;
    while (!rsp.bvalid) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic axr(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    req.araddr = a; req.arvalid = 1'b1; req.rready = 1'b1;
    #1 while (!rsp.arready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.arvalid = 1'b0;
    while (!rsp.rvalid) @(negedge clk);
    d = rsp.rdata;
    @(posedge clk);
  endtask

  task automatic axw64(input logic [11:0] a, input logic [63:0] d);
    axw(a, d[31:0]); axw(a + 12'd4, d[63:32]);
  endtask

  task automatic axr64(input logic [11:0] a, output logic [63:0] d);
    logic [31:0] lo, hi;
    axr(a, lo); axr(a + 12'd4, hi); d = {hi, lo};
  endtask

  // -------------------------------------------------- run monitor model
  // Answers each request after 0-3 idle cycles; one time in four a stale
  // acknowledgement with another ID comes first. RELEASE drops KRM_INT.
  initial begin
    forever begin
      @(posedge clk);
      if (txvalid) begin
        automatic logic [7:0]  id = txid, c = txcmd;
        automatic logic [63:0] r = '0;
        log_cmd.push_back(c); log_data.push_back(txdata); log_id.push_back(id);
        if (c == KRM_CMD_RD_TIME) r = time_v;
        else if (c >= KRM_CMD_RD_SDR && c < KRM_CMD_RD_SDR + 3) r = sdr_rb_v[c - KRM_CMD_RD_SDR];
        repeat ($urandom % 4) @(posedge clk);
        if ($urandom % 4 == 0) begin
          #1 ack = 1'b1; rid = id + 8'd77; rdata = ~r;
          @(posedge clk);
        end
        #1 ack = 1'b1; rid = id; rdata = r;
        if (c == KRM_CMD_RELEASE) krm_int = 1'b0;
        @(posedge clk);
        #1 ack = 1'b0;
      end
    end
  end

  task automatic wait_idle();
    logic [31:0] st;
    int n = 0;
    do begin axr(12'h004, st); n++; end while (st[8] && n < 200);
    check(!st[8], "state machine returns to idle");
  endtask

  // expect the launch sequence of kernel k in the log
  task automatic expect_launch(input int k);
    logic [7:0]  ec [14];
    logic [63:0] ed [14];
    ec[0] = KRM_CMD_KDR;  ed[0] = kdr_m[k];
    ec[1] = KRM_CMD_AMEM; ed[1] = amem_m[k];
    for (int i = 0; i < 2; i++) begin ec[2+i] = KRM_CMD_SDR_IN + 8'(i);  ed[2+i] = sdr_m[i];   end
    for (int i = 0; i < 3; i++) begin ec[4+i] = KRM_CMD_SDR_OUT + 8'(i); ed[4+i] = sdr_m[2+i]; end
    for (int i = 0; i < 5; i++) begin ec[7+i] = KRM_CMD_ORF + 8'(i);     ed[7+i] = orf_m[i];   end
    ec[12] = KRM_CMD_RUN; ed[12] = '0;
    check(log_cmd.size() == 13, $sformatf("launch sends 13 requests (got %0d)", log_cmd.size()));
    for (int i = 0; i < 13 && log_cmd.size() > 0; i++) begin
      automatic logic [7:0] c = log_cmd.pop_front(), id = log_id.pop_front();
      automatic logic [63:0] d = log_data.pop_front();
      check(c == ec[i] && (i == 12 || d == ed[i]),
            $sformatf("launch step %0d: cmd %h data %h, expected %h %h", i, c, d, ec[i], ed[i]));
      check(id == log_id_next, $sformatf("launch step %0d id %0d", i, id));
      log_id_next = id + 8'd1;
    end
  endtask

  task automatic expect_readback();
    logic [7:0] ec [5] = '{KRM_CMD_RD_TIME, KRM_CMD_RD_SDR, KRM_CMD_RD_SDR + 8'd1,
                           KRM_CMD_RD_SDR + 8'd2, KRM_CMD_RELEASE};
    check(log_cmd.size() == 5, $sformatf("read-back sends 5 requests (got %0d)", log_cmd.size()));
    for (int i = 0; i < 5 && log_cmd.size() > 0; i++) begin
      automatic logic [7:0] c = log_cmd.pop_front(), id = log_id.pop_front();
      void'(log_data.pop_front());
      check(c == ec[i], $sformatf("read-back step %0d: cmd %h, expected %h", i, c, ec[i]));
      check(id == log_id_next, $sformatf("read-back step %0d id %0d", i, id));
      log_id_next = id + 8'd1;
    end
  endtask

  task automatic check_results(input logic int_en);
    logic [63:0] v;
    logic [31:0] st;
    axr64(12'h008, v);
    check(v == time_v, "execution time register");
    for (int k = 0; k < 3; k++) begin
      axr64(12'h010 + 12'(8 * k), v);
      check(v == sdr_rb_v[k], $sformatf("output SDR %0d read back", k));
    end
    axr(12'h004, st);
    check(st[9] && st[23:16] == kstate, "RESULT set, KRM_STATE shown");
    check(irq == int_en, "interrupt follows RESULT and INT_EN");
    axw(12'h004, 32'h200);
    axr(12'h004, st);
    check(!st[9] && !irq, "RESULT cleared by writing 1");
  endtask

  initial begin
    logic [63:0] v;
    logic [31:0] w;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    check(!txvalid && !irq, "quiet after reset");
    // fill the files
    for (int k = 0; k < NKERN; k++) begin
      kdr_m[k] = {$urandom, $urandom}; amem_m[k] = {$urandom, $urandom};
      axw64(12'h100 + 12'(8 * k), kdr_m[k]);
      axw64(12'h180 + 12'(8 * k), amem_m[k]);
    end
    for (int j = 0; j < 5; j++) begin
      sdr_m[j] = {$urandom, $urandom}; orf_m[j] = {$urandom, $urandom};
      axw64(12'h200 + 12'(8 * j), sdr_m[j]);
      axw64(12'h240 + 12'(8 * j), orf_m[j]);
    end
    // byte strobes: change byte 2 of KDR[3] low word only
    axw(12'h118, 32'hAABBCCDD, 4'b0100);
    kdr_m[3][23:16] = 8'hBB;
    for (int k = 0; k < NKERN; k++) begin
      axr64(12'h100 + 12'(8 * k), v); check(v == kdr_m[k], $sformatf("KDR %0d read back", k));
      axr64(12'h180 + 12'(8 * k), v); check(v == amem_m[k], $sformatf("AMEM %0d read back", k));
    end
    for (int j = 0; j < 5; j++) begin
      axr64(12'h200 + 12'(8 * j), v); check(v == sdr_m[j], $sformatf("SDR %0d read back", j));
      axr64(12'h240 + 12'(8 * j), v); check(v == orf_m[j], $sformatf("ORF %0d read back", j));
    end
    check(log_cmd.size() == 0, "no request before a run");

    // kernel 3 with interrupts enabled
    axw(12'h000, 32'h0000_0303);
    wait_idle();
    expect_launch(3);
    time_v = {$urandom, $urandom};
    for (int k = 0; k < 3; k++) sdr_rb_v[k] = {$urandom, $urandom};
    krm_int = 1'b1;
    wait_idle();
    expect_readback();
    check_results(1'b1);

    // kernel 11 with interrupts disabled
    kstate = 8'h21;
    axw(12'h000, 32'h0000_0B01);
    wait_idle();
    expect_launch(11);
    time_v = {$urandom, $urandom};
    for (int k = 0; k < 3; k++) sdr_rb_v[k] = {$urandom, $urandom};
    krm_int = 1'b1;
    wait_idle();
    expect_readback();
    check_results(1'b0);

    // KRM_INT raised together with a pending run: read-back first
    time_v = {$urandom, $urandom};
    for (int k = 0; k < 3; k++) sdr_rb_v[k] = {$urandom, $urandom};
    @(negedge clk) krm_int = 1'b1;
    axw(12'h000, 32'h0000_0703);
    repeat (3) @(posedge clk);
    check(log_cmd.size() > 0 && log_cmd[0] == KRM_CMD_RD_TIME, "interrupt served before run");
    while (log_cmd.size() < 5) @(posedge clk);
    expect_readback();
    while (log_cmd.size() < 13) @(posedge clk);
    wait_idle();
    expect_launch(7);
    axr(12'h000, w);
    check(!w[0], "run request taken");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
