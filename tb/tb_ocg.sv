// tb_ocg: self-checking testbench of the OR-type clock gate.
//
// The clock has a 10-unit period, high in the first half. The gating input
// (hold) is moved at random inside both phases; a reference latch, updated
// only while the clock is high, predicts the gated clock: high throughout the
// high phase, and during the low phase low only if hold was low at the end of
// the high phase. A change of hold during the low phase must not reach the
// output. Also counted: passed and suppressed pulses, and the width of every
// low pulse of the gated clock (it must be a full half period).
module tb_ocg;
  logic clk  = 1'b1;
  logic hold = 1'b0;
  logic gclk;
  int   checks = 0, failures = 0;
  int   pulses = 0, gated = 0, low_changes = 0;
  logic ref_lat = 1'b0;
  int   fall_t = 0;
  logic seen_fall = 1'b0;

  ocg dut (.clk_i(clk), .hold_i(hold), .gclk_o(gclk));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s at %0t: gclk=%b expected %b", what, $time, gclk, exp);
    end
  endtask

  always @(negedge gclk) begin fall_t = int'($time); seen_fall = 1'b1; end
  always @(posedge gclk) if (seen_fall) begin
    checks++;
    if (int'($time) - fall_t != 5) begin
      failures++;
      $display("FAIL clipped low pulse of width %0d at %0t", int'($time) - fall_t, $time);
    end
  end

  initial begin
    for (int cyc = 0; cyc < 400; cyc++) begin
      // high phase: times 0..5 of the period
      #1 hold = 1'($urandom);
      #1 ref_lat = hold; check(1'b1, "high phase");
      #1 hold = 1'($urandom);
      #1 ref_lat = hold; check(1'b1, "high phase");
      // low phase: times 5..10
      #2 check(ref_lat, "low phase start");
      if (!ref_lat) pulses++; else gated++;
      #1 begin
        logic nv;
        nv = 1'($urandom);
        if (nv != hold) low_changes++;
        hold = nv;
      end
      #1 check(ref_lat, "after hold change in low phase");
      #2;
    end
    checks++;
    if (pulses == 0 || gated == 0 || low_changes == 0) begin
      failures++;
      $display("FAIL coverage pulses=%0d gated=%0d low_changes=%0d", pulses, gated, low_changes);
    end
    $display("pulses=%0d gated=%0d low-phase hold changes=%0d", pulses, gated, low_changes);
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
