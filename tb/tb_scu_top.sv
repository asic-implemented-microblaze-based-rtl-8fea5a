// tb_scu_top: end-to-end testbench of the stream coprocessor, at the
// default sizes.
//
// The testbench plays the parties around the coprocessor:
//   * the host: a memory model holding the commands ("run kernel K over N
//     tuples"), the input tuples and areas for responses and results; it
//     answers the dispatch unit's reads after a random latency and stalls
//     reads and writes at random with DISP_RD_WAIT / DISP_WR_WAIT;
//   * the MicroBlaze, as a bus-functional AXI4-Lite master on the four
//     ports: it loads the kernels into the instruction memory through
//     IMEM_IF, has the dispatch unit fetch each command into the command
//     FIFO, takes it on CMD Interrupt, has the dispatch unit fetch the
//     tuples towards the read stripe pipe, fills the descriptor files of
//     KRM_IF and starts the kernel; on KRM Interrupt it reads the execution
//     time and the output stream descriptors back, sends the tuple counts as
//     the response and has the dispatch unit write the response and the
//     result tuples of output pipe 0 back to host memory;
//   * the stripe pipes and stream register file: tuples arriving from the
//     dispatch unit feed the input pipes at a random rate (the first word of
//     each stream, the tuple count, to input pipe 1, the tuples to input
//     pipe 0); output pipes are drained at random rates and the tuples of
//     output pipe 0 go back through the write stripe pipe.
// The kernel is a selection: tuples below 100 go, multiplied by 4, to output
// pipe 0, the others, divided by 3, to output pipe 1, and their sum to
// output pipe 2. The same code is loaded at two addresses and both copies
// run, selected through the kernel descriptor. Output streams, counts read
// back through the kernel run monitor, responses and execution times are
// checked against values computed here, and so is host memory at the end.
// Each mechanism of the design is counted and must occur at least once:
// stall of a word on a pipe, multiply on the shift path, division in the
// serial divider, input pipe full, output pipe full, host wait on the
// dispatch unit, CMD and KRM interrupts, operand registers clock-gated (AND-type gate) and divider
// registers held (OR-type gate).
module tb_scu_top;
  import scu_pkg::*;
  localparam int NCMD = 3;

  logic      clk = 1'b0, rst_n = 1'b1;
  axil_req_t du_req = '0, crf_req = '0, im_req = '0, krm_req = '0;
  axil_rsp_t du_rsp, crf_rsp, im_rsp, krm_rsp;
  logic      cmd_irq, krm_irq;
  logic [63:0]      rd_data = '0, wr_data;
  logic             rd_valid = 1'b0, rd_wait = 1'b0, wr_wait = 1'b0, rd_req, wr_req;
  logic [24:0]      rd_addr, wr_addr;
  logic [7:0]       rd_mask, wr_mask;
  logic             rsp_push, wsp_pop, wsp_empty;
  logic [63:0]      rsp_data, wsp_data;
  logic [N_IPF-1:0] ipf_push = '0, ipf_full;
  word_t            ipf_din [N_IPF];
  logic [N_OPF-1:0] opf_pop = '0, opf_empty;
  word_t            opf_dout [N_OPF];
  logic [63:0]      kdr, amem, sdr_in [N_IPF], sdr_out [N_OPF], orf [N_ORF];
  logic             eu_busy;
  eu_perf_t         perf;

  int checks = 0, failures = 0;
  word_t in_q [N_IPF][$];
  word_t exp_q [N_OPF][$];
  int    feed_pct = 90;   // input pipe feed rate, percent of cycles
  int    drain_pct = 30;  // output pipe drain rate, per mille of cycles
  // mechanism counters
  int n_stall = 0, n_shift = 0, n_serial = 0, n_ipf_full = 0, n_opf_full = 0;
  int n_host_wait = 0;
  int n_cmd_irq = 0, n_krm_irq = 0, n_acg_gated = 0, n_ocg_held = 0;
  int busy_cycles = 0, acg_edges = 0, ocg_edges = 0;

  scu_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .axi_du_i(du_req), .axi_du_o(du_rsp),
    .axi_crf_i(crf_req), .axi_crf_o(crf_rsp),
    .axi_imem_i(im_req), .axi_imem_o(im_rsp),
    .axi_krm_i(krm_req), .axi_krm_o(krm_rsp),
    .cmd_irq_o(cmd_irq), .krm_irq_o(krm_irq),
    .disp_rd_data_i(rd_data), .disp_rd_valid_i(rd_valid), .disp_rd_wait_i(rd_wait),
    .disp_wr_wait_i(wr_wait), .disp_rd_req_o(rd_req), .disp_rd_addr_o(rd_addr),
    .disp_rd_mask_o(rd_mask), .disp_wr_req_o(wr_req), .disp_wr_addr_o(wr_addr),
    .disp_wr_mask_o(wr_mask), .disp_wr_data_o(wr_data),
    .rsp_push_o(rsp_push), .rsp_data_o(rsp_data), .rsp_full_i(1'b0),
    .wsp_pop_o(wsp_pop), .wsp_data_i(wsp_data), .wsp_empty_i(wsp_empty),
    .srf_ipf_push_i(ipf_push), .srf_ipf_data_i(ipf_din), .srf_ipf_full_o(ipf_full),
    .srf_opf_pop_i(opf_pop), .srf_opf_data_o(opf_dout), .srf_opf_empty_o(opf_empty),
    .kdr_o(kdr), .amem_o(amem), .sdr_in_o(sdr_in), .sdr_out_o(sdr_out), .orf_o(orf),
    .eu_busy_o(eu_busy), .eu_perf_o(perf)
  );

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ clock-gate observation
  always @(posedge clk) if (eu_busy) busy_cycles++;
  always @(posedge dut.u_eu.g_slot[0].u_iso.u_acg.gclk_o) if (eu_busy) acg_edges++;
  always @(posedge dut.u_eu.g_slot[0].u_fu.u_md.u_ocg.gclk_o) if (eu_busy) ocg_edges++;

  // ------------------------------------------------ stream register file
  always @(negedge clk) begin
    n_opf_full += int'(dut.g_opf[0].u_opf.full_o) + int'(dut.g_opf[1].u_opf.full_o)
                + int'(dut.g_opf[2].u_opf.full_o);
    for (int p = 0; p < N_IPF; p++) begin
      ipf_push[p] = 1'b0;
      if (ipf_full[p] && in_q[p].size() > 0) n_ipf_full++;
      if (!ipf_full[p] && in_q[p].size() > 0 && ($urandom % 100) < feed_pct) begin
        ipf_push[p] = 1'b1;
        ipf_din[p]  = in_q[p].pop_front();
      end
    end
    for (int p = 0; p < N_OPF; p++) begin
      opf_pop[p] = 1'b0;
      if (!opf_empty[p] && ($urandom % 1000) < drain_pct) begin
        opf_pop[p] = 1'b1;
        checks++;
        if (exp_q[p].size() == 0) begin
          failures++; $display("FAIL unexpected tuple %h on output pipe %0d", opf_dout[p], p);
        end else begin
          word_t e;
          e = exp_q[p].pop_front();
          if (p == 0) wsp_q.push_back(opf_dout[p]);
          if (opf_dout[p] !== e) begin
            failures++; $display("FAIL output pipe %0d: %h, expected %h", p, opf_dout[p], e);
          end
        end
      end
    end
  end

  // ------------------------------------------------ host memory
  // word map: commands at CMD_A, tuple streams at TUP_A + 256*c, responses
  // at RESP_A, result tuples of output pipe 0 at RES_A
  localparam int HW = 4096, CMD_A = 16, TUP_A = 1024, RESP_A = 64, RES_A = 2048;
  logic [63:0] hmem [HW];
  logic [63:0] pend_data;
  int          pend_lat = -1;
  word_t       wsp_q [$];
  int          rsp_left = 0;  // tuples still to come in the current stream

  always_comb begin
    wsp_empty = (wsp_q.size() == 0);
    wsp_data  = wsp_empty ? '0 : wsp_q[0];
  end

  always @(posedge clk) begin
    automatic logic take_rd = rd_req && !rd_wait;
    automatic logic take_wr = wr_req && !wr_wait;
    automatic logic [24:0] ra = rd_addr, wa = wr_addr;
    automatic logic [63:0] wd = wr_data;
    automatic logic [7:0]  wm = wr_mask;
    automatic logic        wpop = wsp_pop;
    automatic logic        rpush = rsp_push;
    automatic logic [63:0] rword = rsp_data;
    if ((rd_req && rd_wait) || (wr_req && wr_wait)) n_host_wait++;
    if (take_wr)
      for (int b = 0; b < 8; b++) if (wm[b]) hmem[wa][8*b +: 8] = wd[8*b +: 8];
    if (take_rd) check(rd_mask == 8'hFF, "host read mask");
    // read stripe pipe: count word to input pipe 1, tuples to input pipe 0
    if (rpush) begin
      if (rsp_left == 0) begin in_q[1].push_back(rword); rsp_left = int'(rword); end
      else begin in_q[0].push_back(rword); rsp_left--; end
    end
    #1;
    if (wpop) void'(wsp_q.pop_front());
    rd_valid = 1'b0;
    if (pend_lat == 0) begin rd_valid = 1'b1; rd_data = pend_data; pend_lat = -1; end
    else if (pend_lat > 0) pend_lat--;
    if (take_rd) begin
      pend_data = hmem[ra];
      pend_lat  = $urandom % 4;
      if (pend_lat == 0) begin rd_valid = 1'b1; rd_data = pend_data; pend_lat = -1; end
      else pend_lat--;
    end
    rd_wait = ($urandom % 4 == 0);
    wr_wait = ($urandom % 4 == 0);
  end

  // ------------------------------------------------ AXI4-Lite master
  // One master per port; each port is used by the MicroBlaze thread only.
  task automatic axw(ref axil_req_t rq, ref axil_rsp_t rs,
                     input logic [11:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF);
    @(negedge clk);
    rq.awaddr = a; rq.awvalid = 1'b1; rq.wdata = d; rq.wstrb = s; rq.wvalid = 1'b1;
    rq.bready = 1'b1;
    #1 while (!rs.awready) begin @(negedge clk); #1; end
    @(negedge clk);
    rq.awvalid = 1'b0; rq.wvalid = 1'b0;
    while (!rs.bvalid) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic axr(ref axil_req_t rq, ref axil_rsp_t rs,
                     input logic [11:0] a, output logic [31:0] d);
    @(negedge clk);
    rq.araddr = a; rq.arvalid = 1'b1; rq.rready = 1'b1;
    #1 while (!rs.arready) begin @(negedge clk); #1; end
    @(negedge clk);
    rq.arvalid = 1'b0;
    while (!rs.rvalid) @(negedge clk);
    d = rs.rdata;
    @(posedge clk);
  endtask

  // ------------------------------------------------ kernel image
  function automatic slot_t S(op_e op, int rd = 0, int rs1 = 0, int rs2 = 0, int imm = 0);
    slot_t s;
    s.op = op; s.rd = RAW'(rd); s.rs1 = RAW'(rs1); s.rs2 = RAW'(rs2); s.imm = IMMW'(imm);
    return s;
  endfunction

  // selection kernel placed at address b (branch targets relative to b)
  function automatic iword_t kword(int b, int i);
    case (i)
      0:  return {S(OP_LI, 2, 0, 0, 0),    S(OP_POP, 1, 0, 0, 1)};
      1:  return {S(OP_LI, 4, 0, 0, 4),    S(OP_LI, 3, 0, 0, 100)};
      2:  return {S(OP_NOP),               S(OP_LI, 5, 0, 0, 3)};
      3:  return {S(OP_NOP),               S(OP_BZ, 0, 1, 0, b + 10)};
      4:  return {S(OP_ADDI, 1, 1, 0, -1), S(OP_POP, 6, 0, 0, 0)};
      5:  return {S(OP_ADD, 2, 2, 6),      S(OP_CLT, 7, 6, 3)};
      6:  return {S(OP_MUL, 8, 6, 4),      S(OP_BZ, 0, 7, 0, b + 8)};
      7:  return {S(OP_JMP, 0, 0, 0, b + 3), S(OP_PUSH, 0, 8, 0, 0)};
      8:  return {S(OP_NOP),               S(OP_DIV, 9, 6, 5)};
      9:  return {S(OP_JMP, 0, 0, 0, b + 3), S(OP_PUSH, 0, 9, 0, 1)};
      default: return {S(OP_HALT),         S(OP_PUSH, 0, 2, 0, 2)};
    endcase
  endfunction
  localparam int KLEN = 11;
  localparam int KBASE [2] = '{0, 200};

  // ------------------------------------------------ MicroBlaze: IMEM_IF
  logic [7:0] im_id = 8'd1;
  task automatic imem_req(input logic [7:0] cmd, input logic [63:0] d);
    logic [31:0] st;
    axw(im_req, im_rsp, 12'h004, d[31:0]);
    axw(im_req, im_rsp, 12'h008, d[63:32]);
    axw(im_req, im_rsp, 12'h000, {8'd0, cmd, im_id, 8'h01});
    do axr(im_req, im_rsp, 12'h00C, st); while (!st[2]);
    axw(im_req, im_rsp, 12'h000, 32'h2, 4'b0001);
    axr(im_req, im_rsp, 12'h00C, st);
    check(st[15:8] == im_id, "instruction memory response ID");
    im_id++;
  endtask

  task automatic load_kernels();
    for (int k = 0; k < 2; k++) begin
      imem_req(IMEM_CMD_SETADDR, 64'(KBASE[k]));
      for (int i = 0; i < KLEN; i++) imem_req(IMEM_CMD_WRITE, kword(KBASE[k], i));
    end
    // read one word back
    imem_req(IMEM_CMD_SETADDR, 64'(KBASE[1] + 6));
    imem_req(IMEM_CMD_READ, '0);
    begin
      logic [31:0] lo, hi;
      axr(im_req, im_rsp, 12'h010, lo);
      axr(im_req, im_rsp, 12'h014, hi);
      check({hi, lo} == kword(KBASE[1], 6), "instruction read back through IMEM_IF");
    end
  endtask

  // dispatch unit transfers; wait for the engine to finish
  task automatic du_read(input int addr, input int len, input int client);
    logic [31:0] st;
    axw(du_req, du_rsp, 12'h000, 32'(addr));
    axw(du_req, du_rsp, 12'h008, 32'hFF);
    axw(du_req, du_rsp, 12'h004, 32'h8000_0000 | (32'(client) << 16) | 32'(len));
    do axr(du_req, du_rsp, 12'h004, st); while (st[31]);
  endtask

  task automatic du_write(input int addr, input int len, input int client);
    logic [31:0] st;
    axw(du_req, du_rsp, 12'h010, 32'(addr));
    axw(du_req, du_rsp, 12'h018, 32'hFF);
    axw(du_req, du_rsp, 12'h014, 32'h8000_0000 | (32'(client) << 16) | 32'(len));
    do axr(du_req, du_rsp, 12'h014, st); while (st[31]);
  endtask

  task automatic krm_w64(input logic [11:0] a, input logic [63:0] d);
    axw(krm_req, krm_rsp, a, d[31:0]);
    axw(krm_req, krm_rsp, a + 12'd4, d[63:32]);
  endtask

  task automatic krm_r64(input logic [11:0] a, output logic [63:0] d);
    logic [31:0] lo, hi;
    axr(krm_req, krm_rsp, a, lo);
    axr(krm_req, krm_rsp, a + 12'd4, hi);
    d = {hi, lo};
  endtask

  // ------------------------------------------------ host
  int exp_counts [NCMD][N_OPF];
  int cmd_kernel [NCMD] = '{0, 1, 1};
  int cmd_n      [NCMD] = '{70, 45, 30};
  word_t exp_res [$];  // expected result tuples of output pipe 0, in order
  int    res_base [NCMD];

  // host memory contents and expected results, made before the run
  initial begin
    int nres;
    nres = 0;
    for (int i = 0; i < HW; i++) hmem[i] = '0;
    for (int c = 0; c < NCMD; c++) begin
      int n_small, n_big;
      word_t sum, t;
      n_small = 0; n_big = 0; sum = '0;
      hmem[CMD_A + c] = {32'(cmd_kernel[c]), 32'(cmd_n[c])};
      hmem[TUP_A + 256 * c] = word_t'(cmd_n[c]);
      for (int i = 0; i < cmd_n[c]; i++) begin
        t = word_t'($urandom % 200);
        hmem[TUP_A + 256 * c + 1 + i] = t;
        sum += t;
        if (t < 100) begin exp_q[0].push_back(t * 4); exp_res.push_back(t * 4); n_small++; end
        else begin exp_q[1].push_back(t / 3); n_big++; end
      end
      exp_q[2].push_back(sum);
      exp_counts[c] = '{n_small, n_big, 1};
      res_base[c] = RES_A + nres;
      nres += n_small;
    end
  end

  // ------------------------------------------------ MicroBlaze main loop
  initial begin
    logic [31:0] lo, hi, st;
    logic [63:0] v, tm;
    int k, n, n_small, n_big, busy0;
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    load_kernels();
    for (int j = 0; j < 2; j++) krm_w64(12'h100 + 12'(8 * j), 64'(KBASE[j]));
    for (int c = 0; c < NCMD; c++) begin
      // command from the host, fetched by the dispatch unit
      du_read(CMD_A + c, 1, 0);
      axw(crf_req, crf_rsp, 12'h010, 32'h4);
      while (!cmd_irq) @(posedge clk);
      n_cmd_irq++;
      axw(crf_req, crf_rsp, 12'h010, 32'h5);
      do axr(crf_req, crf_rsp, 12'h010, st); while (st[0]);
      axr(crf_req, crf_rsp, 12'h000, lo);
      axr(crf_req, crf_rsp, 12'h004, hi);
      k = int'(hi); n = int'(lo);
      check(k == cmd_kernel[c] && n == cmd_n[c], $sformatf("command %0d received", c));
      // first command: slow output so the output pipes fill; last command:
      // slow input so the kernel waits for tuples
      drain_pct = (c == 0) ? 5 : 600;
      feed_pct  = (c == NCMD - 1) ? 2 : 90;
      n_small = exp_counts[c][0]; n_big = exp_counts[c][1];
      // the stream: count and tuples, through the dispatch unit
      du_read(TUP_A + 256 * c, n + 1, 1);
      // stream descriptors: base = pipe number << 20, length = tuples
      krm_w64(12'h200, {32'h0000_0000, 32'(n)});
      krm_w64(12'h208, {32'h0010_0000, 32'd1});
      for (int p = 0; p < N_OPF; p++) krm_w64(12'h210 + 12'(8 * p), {32'(p + 2) << 20, 32'd0});
      for (int r = 0; r < N_ORF; r++) krm_w64(12'h240 + 12'(8 * r), 64'(r * 16 + c));
      krm_w64(12'h180 + 12'(8 * k), 64'(c));
      busy0 = busy_cycles;
      axw(krm_req, krm_rsp, 12'h000, {16'd0, 8'(k), 8'h03});
      while (!krm_irq) @(posedge clk);
      n_krm_irq++;
      check(kdr == 64'(KBASE[k]) && amem == 64'(c) && orf[4] == 64'(64 + c),
            "kernel descriptor, argument and offset registers reached the monitor");
      krm_r64(12'h008, tm);
      check(tm >= 64'(busy_cycles - busy0) && tm <= 64'(busy_cycles - busy0 + 2),
            $sformatf("execution time %0d against %0d busy cycles", tm, busy_cycles - busy0));
      for (int p = 0; p < N_OPF; p++) begin
        krm_r64(12'h010 + 12'(8 * p), v);
        check(v == {32'(p + 2) << 20, 32'(exp_counts[c][p])},
              $sformatf("output stream %0d read back %h, expected %0d tuples", p, v, exp_counts[c][p]));
      end
      axr(krm_req, krm_rsp, 12'h004, st);
      check(st[9] && st[23:16] == KRM_ST_IDLE && !st[8], "results collected, run monitor idle");
      axw(krm_req, krm_rsp, 12'h004, 32'h200);
      check(!krm_irq, "KRM interrupt cleared");
      // response to the host: tuple counts of output pipes 0 and 1
      axw(crf_req, crf_rsp, 12'h008, 32'(exp_counts[c][0]));
      axw(crf_req, crf_rsp, 12'h00C, 32'(exp_counts[c][1]));
      axw(crf_req, crf_rsp, 12'h010, 32'h2);
      do axr(crf_req, crf_rsp, 12'h010, st); while (st[1]);
      du_write(RESP_A + c, 1, 0);
      check(hmem[RESP_A + c] == {32'(exp_counts[c][1]), 32'(exp_counts[c][0])},
            "response in host memory");
      // mechanisms seen by the execution unit's counters
      $display("kernel %0d: %0d words, %0d stall cycles, time %0d", c, perf.words, perf.pipe_stalls, tm);
      n_stall  += int'(perf.pipe_stalls);
      n_shift  += int'(perf.shift_ops);
      n_serial += int'(perf.serial_ops);
      check(perf.shift_ops == 32'(n) && perf.serial_ops == 32'(n_big),
            "shift-path and serial-divider operation counts");
      // result tuples of output pipe 0 back to the host
      du_write(res_base[c], n_small, 1);
    end
    for (int i = 0; i < exp_res.size(); i++)
      if (hmem[RES_A + i] != exp_res[i])
        check(1'b0, $sformatf("result tuple %0d in host memory: %h, expected %h", i, hmem[RES_A + i], exp_res[i]));
    check(1'b1, "result tuples in host memory compared");
    n_acg_gated = busy_cycles - acg_edges;
    n_ocg_held  = busy_cycles - ocg_edges;

    $display("mechanisms: stall %0d, shift %0d, serial %0d, ipf full %0d, opf full %0d,",
             n_stall, n_shift, n_serial, n_ipf_full, n_opf_full);
    $display("            host wait %0d, cmd irq %0d, krm irq %0d, acg gated %0d, ocg held %0d",
             n_host_wait, n_cmd_irq, n_krm_irq, n_acg_gated, n_ocg_held);
    check(n_stall > 0,    "a word stalled on a pipe");
    check(n_shift > 0,    "a multiply went through the shift path");
    check(n_serial > 0,   "a division went through the serial divider");
    check(n_ipf_full > 0, "an input pipe was full");
    check(n_opf_full > 0, "an output pipe was full");
    check(n_host_wait > 0, "the host stalled the dispatch unit");
    check(n_cmd_irq == NCMD, "CMD interrupts");
    check(n_krm_irq == NCMD, "KRM interrupts");
    check(n_acg_gated > 0, "operand registers clock-gated");
    check(n_ocg_held > 0 && ocg_edges > 0, "divider registers held and clocked");
    check(wsp_empty && !cmd_irq && exp_q[0].size() + exp_q[1].size() + exp_q[2].size() == 0,
          "nothing left over");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
