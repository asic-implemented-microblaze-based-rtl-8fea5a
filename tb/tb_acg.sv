// tb_acg: self-checking testbench of the AND-type clock gate.
//
// The clock has a 10-unit period, low in the first half. The enable is moved
// at random to new values at points inside both the low and the high phase;
// a reference latch, updated only while the clock is low, predicts the gated
// clock, which is checked at points in both phases. A change of the enable
// during the high phase must not reach the output before the next low phase.
// Also counted: enabled and suppressed clock pulses, and the width of every
// gated pulse (it must be a full half period).
module tb_acg;
  logic clk = 1'b0;
  logic en  = 1'b0;
  logic gclk;
  int   checks = 0, failures = 0;
  int   pulses = 0, gated = 0, high_changes = 0;
  logic ref_lat = 1'b0;
  int   rise_t = 0;

  acg dut (.clk_i(clk), .en_i(en), .gclk_o(gclk));

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (gclk !== exp) begin
      failures++;
      $display("FAIL %s at %0t: gclk=%b expected %b", what, $time, gclk, exp);
    end
  endtask

  // pulse width of the gated clock
  logic seen_rise = 1'b0;
  always @(posedge gclk) begin rise_t = int'($time); seen_rise = 1'b1; end
  always @(negedge gclk) if (seen_rise) begin
    checks++;
    if (int'($time) - rise_t != 5) begin
      failures++;
      $display("FAIL clipped pulse of width %0d at %0t", int'($time) - rise_t, $time);
    end
  end

  initial begin
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: times 0..5 of the period
      #1 en = 1'($urandom);
      #1 ref_lat = en; check(1'b0, "low phase");
      #1 en = 1'($urandom);
      #1 ref_lat = en; check(1'b0, "low phase");
      // high phase: times 5..10
      #2 check(ref_lat, "high phase start");
      if (ref_lat) pulses++; else gated++;
      #1 begin
        logic nv;
        nv = 1'($urandom);
        if (nv != en) high_changes++;
        en = nv;
      end
      #1 check(ref_lat, "after enable change in high phase");
      #2;
    end
    checks++;
    if (pulses == 0 || gated == 0 || high_changes == 0) begin
      failures++;
      $display("FAIL coverage pulses=%0d gated=%0d high_changes=%0d", pulses, gated, high_changes);
    end
    $display("pulses=%0d gated=%0d high-phase enable changes=%0d", pulses, gated, high_changes);
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
