// tb_operand_isolation: self-checking testbench of the operand registers.
//
// Operands change every cycle, and at random times several times within a
// cycle, while the load enable is random. The held operands must equal the
// operands present at the last enabled rising edge and must not move on
// disabled cycles nor between edges. Reset must clear them.
module tb_operand_isolation;
  localparam int W = 32;
  logic         clk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic [W-1:0] a = '0, b = '0, a_o, b_o;
  logic [W-1:0] exp_a = '0, exp_b = '0;
  int           checks = 0, failures = 0, loads = 0, holds = 0;

  operand_isolation #(.W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .a_i(a), .b_i(b), .a_o(a_o), .b_o(b_o)
  );

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (a_o !== exp_a || b_o !== exp_b) begin
      failures++;
      $display("FAIL %s at %0t: %h/%h expected %h/%h", what, $time, a_o, b_o, exp_a, exp_b);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #11 check("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      // inputs settle in the low phase, glitching a few times first
      @(negedge clk);
      repeat ($urandom % 3) begin a = $urandom; b = $urandom; #1; check("glitching inputs"); end
      a = $urandom; b = $urandom; en = 1'($urandom);
      @(posedge clk);
      if (en) begin exp_a = a; exp_b = b; loads++; end else holds++;
      #1 check("after edge");
      a = $urandom; b = $urandom;   // change in the high phase
      #1 check("high phase");
    end
    checks++;
    if (loads == 0 || holds == 0) begin failures++; $display("FAIL coverage"); end
    $display("loads=%0d holds=%0d", loads, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
