// tb_execution_unit: self-checking testbench of the VLIW execution unit.
//
// The unit is surrounded by a behavioural instruction memory, two input pipes
// and three output pipes (stream_fifo, four entries deep so that they fill).
// The testbench feeds the input pipes at a random rate and drains the output
// pipes at a random rate, so words stall on empty input pipes and on full
// output pipes. Two kernels run:
//   * a selection kernel: for each tuple of input pipe 0 (count taken from
//     input pipe 1) tuples below 100 go, multiplied by 4, to output pipe 0,
//     the others, divided by 3, to output pipe 1; the sum of all tuples goes
//     to output pipe 2 at the end;
//   * an operation sweep: pairs popped from both input pipes go through every
//     arithmetic, logic, shift, compare, min/max and multiply/divide
//     operation, results to output pipes 0 and 1.
// Output streams are compared with values computed here from the inputs.
// The retired-word count, the number of shift-path and serial-divider
// operations and the cycle count (3 cycles per word, +1 per word with a
// product or shift-path division, +65 per word with a serial division,
// plus stall cycles) are checked against the kernel structure.
module tb_execution_unit;
  import scu_pkg::*;
  localparam int AW = 8;
  localparam int FD = 4;

  logic clk = 1'b0, rst_n = 1'b1;
  logic run = 1'b0;
  logic [AW-1:0] start_pc = '0;
  logic busy, done;
  eu_perf_t perf;
  logic fetch_en;
  logic [AW-1:0] fetch_addr;
  logic [63:0] fetch_data;
  logic [63:0] prog [2**AW];

  word_t            ipf_data [N_IPF];
  logic [N_IPF-1:0] ipf_empty, ipf_pop, ipf_full, ipf_push;
  word_t            ipf_din [N_IPF];
  word_t            opf_data [N_OPF], opf_dout [N_OPF];
  logic [N_OPF-1:0] opf_push, opf_full, opf_empty, opf_pop;

  int checks = 0, failures = 0;
  word_t in_q [N_IPF][$];
  word_t exp_q [N_OPF][$];
  int    drain_pct = 50, feed_pct = 50;
  longint cycles = 0;

  execution_unit #(.AW(AW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .run_i(run), .start_pc_i(start_pc), .busy_o(busy),
    .done_o(done), .perf_o(perf), .fetch_en_o(fetch_en), .fetch_addr_o(fetch_addr),
    .fetch_data_i(fetch_data), .ipf_data_i(ipf_data), .ipf_empty_i(ipf_empty),
    .ipf_pop_o(ipf_pop), .opf_data_o(opf_data), .opf_push_o(opf_push), .opf_full_i(opf_full)
  );

  for (genvar p = 0; p < N_IPF; p++) begin : g_ipf
    stream_fifo #(.W(64), .DEPTH(FD)) u_f (
      .clk_i(clk), .rst_ni(rst_n), .push_i(ipf_push[p]), .din_i(ipf_din[p]), .full_o(ipf_full[p]),
      .pop_i(ipf_pop[p]), .dout_o(ipf_data[p]), .empty_o(ipf_empty[p]), .count_o()
    );
  end
  for (genvar p = 0; p < N_OPF; p++) begin : g_opf
    stream_fifo #(.W(64), .DEPTH(FD)) u_f (
      .clk_i(clk), .rst_ni(rst_n), .push_i(opf_push[p]), .din_i(opf_data[p]), .full_o(opf_full[p]),
      .pop_i(opf_pop[p]), .dout_o(opf_dout[p]), .empty_o(opf_empty[p]), .count_o()
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (busy) cycles++;

  always @(posedge clk) if (fetch_en) fetch_data <= prog[fetch_addr];

  // feeder and drainer, driven just after the rising edge
  always @(posedge clk) begin
    #1;
    for (int p = 0; p < N_IPF; p++) begin
      ipf_push[p] = 1'b0;
      if (in_q[p].size() > 0 && !ipf_full[p] && int'($urandom % 100) < feed_pct) begin
        ipf_push[p] = 1'b1;
        ipf_din[p]  = in_q[p].pop_front();
      end
    end
    for (int p = 0; p < N_OPF; p++) begin
      opf_pop[p] = !opf_empty[p] && int'($urandom % 100) < drain_pct;
      if (opf_pop[p]) begin
        checks++;
        if (exp_q[p].size() == 0) begin
          failures++; $display("FAIL unexpected output on pipe %0d: %h", p, opf_dout[p]);
        end else begin
          word_t e;
          e = exp_q[p].pop_front();
          if (opf_dout[p] !== e) begin
            failures++; $display("FAIL pipe %0d got %h expected %h", p, opf_dout[p], e);
          end
        end
      end
    end
  end

  function automatic slot_t S(op_e op, int rd = 0, int rs1 = 0, int rs2 = 0, int imm = 0);
    slot_t s;
    s.op = op; s.rd = RAW'(rd); s.rs1 = RAW'(rs1); s.rs2 = RAW'(rs2); s.imm = IMMW'(imm);
    return s;
  endfunction

  task automatic put(int addr, slot_t s0, slot_t s1);
    prog[addr] = {s1, s0};
  endtask

  task automatic run_kernel(int pc, output longint cyc);
    @(posedge clk);
    #1 run = 1'b1; start_pc = AW'(pc);
    @(posedge clk);
    #1 run = 1'b0;
    cycles = 0;
    while (!done) @(posedge clk);
    cyc = cycles;
    // let the drainer empty the output pipes
    repeat (200) @(posedge clk);
  endtask

  task automatic expect_count(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
    else $display("%s = %0d", what, got);
  endtask

  initial begin
    longint cyc;
    int n, n_small, n_big, words, shift_ops, serial_ops, extra;
    word_t sum;
    int pair_n;
    op_e lop [8] = '{OP_ADD, OP_AND, OP_XOR, OP_SHR, OP_CLT, OP_MAX, OP_MUL, OP_REM};
    op_e rop [8] = '{OP_SUB, OP_OR,  OP_SHL, OP_CEQ, OP_CLTU, OP_MIN, OP_DIV, OP_ADDI};
    for (int i = 0; i < 2**AW; i++) prog[i] = '0;
    ipf_push = '0; opf_pop = '0;
    for (int p = 0; p < N_IPF; p++) ipf_din[p] = '0;

    // ---- selection kernel at 0
    put(0,  S(OP_POP, 1, 0, 0, 1),  S(OP_LI, 2, 0, 0, 0));
    put(1,  S(OP_LI, 3, 0, 0, 100), S(OP_LI, 4, 0, 0, 4));
    put(2,  S(OP_LI, 5, 0, 0, 3),   S(OP_NOP));
    put(3,  S(OP_BZ, 0, 1, 0, 10),  S(OP_NOP));
    put(4,  S(OP_POP, 6, 0, 0, 0),  S(OP_ADDI, 1, 1, 0, -1));
    put(5,  S(OP_CLT, 7, 6, 3),     S(OP_ADD, 2, 2, 6));
    put(6,  S(OP_BZ, 0, 7, 0, 8),   S(OP_MUL, 8, 6, 4));
    put(7,  S(OP_PUSH, 0, 8, 0, 0), S(OP_JMP, 0, 0, 0, 3));
    put(8,  S(OP_DIV, 9, 6, 5),     S(OP_NOP));
    put(9,  S(OP_PUSH, 0, 9, 0, 1), S(OP_JMP, 0, 0, 0, 3));
    put(10, S(OP_PUSH, 0, 2, 0, 2), S(OP_HALT));

    // ---- operation sweep at 64: r1 counter, r2/r3 operands
    pair_n = 24;
    put(64, S(OP_LI, 1, 0, 0, pair_n), S(OP_NOP));
    put(65, S(OP_BZ, 0, 1, 0, 100),    S(OP_NOP));
    put(66, S(OP_POP, 2, 0, 0, 0),     S(OP_POP, 3, 0, 0, 1));
    for (int k = 0; k < 8; k++) begin
      put(67 + 2*k, S(lop[k], 4, 2, 3), S(rop[k], 5, 2, 3, (rop[k] == OP_ADDI) ? 5 : 0));
      put(68 + 2*k, S(OP_PUSH, 0, 4, 0, 0), S(OP_PUSH, 0, 5, 0, 1));
    end
    put(83, S(OP_ADDI, 1, 1, 0, -1), S(OP_JMP, 0, 0, 0, 65));
    put(100, S(OP_HALT), S(OP_NOP));

    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;

    // ======== selection kernel, slow input, slow output
    n = 40; n_small = 0; n_big = 0; sum = '0;
    in_q[1].push_back(word_t'(n));
    for (int i = 0; i < n; i++) begin
      word_t t;
      t = word_t'($urandom % 200);
      in_q[0].push_back(t);
      sum += t;
      if ($signed(t) < 100) begin exp_q[0].push_back(t * 4); n_small++; end
      else begin exp_q[1].push_back(t / 3); n_big++; end
    end
    exp_q[2].push_back(sum);
    feed_pct = 3; drain_pct = 1;
    run_kernel(0, cyc);
    words = 3 + 5 * n_small + 6 * n_big + 2;
    shift_ops = n; serial_ops = n_big;
    expect_count("selection: words retired", perf.words, words);
    expect_count("selection: shift-path operations", perf.shift_ops, shift_ops);
    expect_count("selection: serial divisions", perf.serial_ops, serial_ops);
    expect_count("selection: cycles", cyc, 3 * words + n + 65 * n_big + perf.pipe_stalls);
    checks++;
    if (perf.pipe_stalls == 0) begin failures++; $display("FAIL no pipe stall happened"); end
    $display("selection: pipe stalls = %0d", perf.pipe_stalls);

    // ======== operation sweep, fast pipes
    extra = 0; shift_ops = 0; serial_ops = 0;
    for (int i = 0; i < pair_n; i++) begin
      word_t a, b;
      logic pow2;
      a = {32'($urandom), 32'($urandom)};
      unique case (i % 6)
        0: b = word_t'(1) << ($urandom % 64);
        1: b = '0;
        2: b = a;
        3: b = word_t'($urandom % 1000) + 1;
        4: b = -word_t'($urandom % 1000);
        default: b = {32'($urandom), 32'($urandom)};
      endcase
      in_q[0].push_back(a); in_q[1].push_back(b);
      pow2 = (b != 0) && ((b & (b - 1)) == 0);
      exp_q[0].push_back(a + b);                    exp_q[1].push_back(a - b);
      exp_q[0].push_back(a & b);                    exp_q[1].push_back(a | b);
      exp_q[0].push_back(a ^ b);                    exp_q[1].push_back(a << b[5:0]);
      exp_q[0].push_back(a >> b[5:0]);              exp_q[1].push_back(word_t'(a == b));
      exp_q[0].push_back(word_t'($signed(a) < $signed(b))); exp_q[1].push_back(word_t'(a < b));
      exp_q[0].push_back(($signed(a) < $signed(b)) ? b : a);
      exp_q[1].push_back(($signed(a) < $signed(b)) ? a : b);
      exp_q[0].push_back(a * b);                    exp_q[1].push_back((b == 0) ? '1 : a / b);
      exp_q[0].push_back((b == 0) ? a : a % b);     exp_q[1].push_back(a + 5);
      // MUL, DIV and REM words: word MUL|DIV and word REM|ADDI
      if (pow2) begin shift_ops += 3; extra += 2; end
      else if (b == 0) begin extra += 2; end
      else begin serial_ops += 2; extra += 130; end
    end
    feed_pct = 100; drain_pct = 100;
    run_kernel(64, cyc);
    words = 1 + pair_n * (2 + 16 + 1) + 1 + 1;
    expect_count("sweep: words retired", perf.words, words);
    expect_count("sweep: shift-path operations", perf.shift_ops, shift_ops);
    expect_count("sweep: serial divisions", perf.serial_ops, serial_ops);
    expect_count("sweep: cycles", cyc, 3 * words + extra + perf.pipe_stalls);

    for (int p = 0; p < N_OPF; p++) begin
      checks++;
      if (exp_q[p].size() != 0) begin failures++; $display("FAIL pipe %0d missing %0d outputs", p, exp_q[p].size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
