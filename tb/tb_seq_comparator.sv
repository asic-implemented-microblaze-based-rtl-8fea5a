// tb_seq_comparator: self-checking testbench of the MSB-first comparator.
//
// Random operand pairs, a third equal, a third differing in the MSB and a
// third sharing the MSB, are compared both unsigned and signed against the
// simulator's own operators. When the MSBs differ the test also checks that
// the lower operand bits seen by the lower XOR gates are forced to ones (the
// blocking that saves the switching) and counts those MSB-decided cases.
module tb_seq_comparator;
  localparam int W = 32;
  logic [W-1:0] a, b;
  logic         sgn;
  logic         neq, eq, lt;
  int           checks = 0, failures = 0, msb_decided = 0, lower_decided = 0;

  seq_comparator #(.W(W)) dut (
    .a_i(a), .b_i(b), .signed_i(sgn), .neq_o(neq), .eq_o(eq), .lt_o(lt)
  );

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h signed=%b got %b expected %b", what, a, b, sgn, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 6000; i++) begin
      a = $urandom;
      unique case (i % 3)
        0: b = a;
        1: b = {~a[W-1], W'($urandom) >> 1};
        default: b = {a[W-1], W'($urandom) >> 1};
      endcase
      if (i % 7 == 0) b = a ^ (W'(1) << ($urandom % W));  // single-bit difference
      sgn = 1'($urandom);
      #1;
      expect_eq(neq, a != b, "neq");
      expect_eq(eq,  a == b, "eq");
      expect_eq(lt,  sgn ? ($signed(a) < $signed(b)) : (a < b), "lt");
      if (a[W-1] != b[W-1]) begin
        msb_decided++;
        checks++;
        if (dut.a_lo != '1 || dut.b_lo != '1) begin
          failures++;
          $display("FAIL lower bits not blocked a=%h b=%h", a, b);
        end
      end else if (a != b) begin
        lower_decided++;
      end
    end
    checks++;
    if (msb_decided == 0 || lower_decided == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("msb-decided=%0d lower-decided=%0d", msb_decided, lower_decided);
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
