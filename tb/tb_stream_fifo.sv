// tb_stream_fifo: self-checking testbench of the first-word-fall-through FIFO.
//
// Random pushes and pops (never into a full or out of an empty FIFO) are
// mirrored in a queue. Each cycle the head, the fill level and the full and
// empty flags are compared with the queue. The FIFO must reach both full and
// empty, and simultaneous push and pop must occur.
module tb_stream_fifo;
  localparam int W = 64, DEPTH = 16;
  logic                   clk = 1'b0, rst_n = 1'b1;
  logic                   push = 1'b0, pop = 1'b0;
  logic [W-1:0]           din = '0, dout;
  logic                   full, empty;
  logic [$clog2(DEPTH):0] count;
  logic [W-1:0]           q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, n_both = 0;

  stream_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .clk_i(clk), .rst_ni(rst_n), .push_i(push), .din_i(din), .full_o(full),
    .pop_i(pop), .dout_o(dout), .empty_o(empty), .count_o(count)
  );

  always #5 clk = ~clk;

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      @(negedge clk);
      // compare state
      checks += 3;
      if (count != q.size()) begin failures++; $display("FAIL count %0d vs %0d", count, q.size()); end
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++; $display("FAIL flags empty=%b full=%b size=%0d", empty, full, q.size());
      end
      if (q.size() > 0 && dout !== q[0]) begin failures++; $display("FAIL head %h vs %h", dout, q[0]); end
      if (full) n_full++;
      if (empty) n_empty++;
      // phases that fill and drain
      bias = ((i / 300) % 2 == 0) ? 70 : 30;
      push = (int'($urandom % 100) < bias) && !full;
      pop  = (int'($urandom % 100) >= bias) && !empty;
      if ($urandom % 5 == 0) begin push = !full; pop = !empty; end
      din  = {32'($urandom), 32'($urandom)};
      if (push && pop) n_both++;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks++;
    if (n_full == 0 || n_empty == 0 || n_both == 0) begin failures++; $display("FAIL coverage"); end
    $display("full=%0d empty=%0d push+pop=%0d", n_full, n_empty, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
