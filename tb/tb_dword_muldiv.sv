// tb_dword_muldiv: self-checking testbench of the double-word
// multiplier/divider.
//
// Runs products, quotients and remainders with random 64-bit operands whose
// second operand is a power of two, zero or anything else, and compares each
// result with the simulator's own operators. It also checks which path
// produced the result (shift_o) and the latency: one cycle for products,
// power-of-two divisions and division by zero, W+1 cycles for the serial
// divider. Each path must be exercised.
module tb_dword_muldiv;
  import scu_pkg::*;
  localparam int W = 64;
  logic         clk = 1'b0, rst_n = 1'b1;
  logic         start = 1'b0;
  md_op_e       op = MD_MUL;
  logic [W-1:0] a = '0, b = '0;
  logic         busy, done, shift;
  logic [W-1:0] res;
  int           checks = 0, failures = 0;
  int           n_shift_mul = 0, n_shift_div = 0, n_mul = 0, n_serial = 0, n_zero = 0;

  dword_muldiv #(.W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .op_i(op), .a_i(a), .b_i(b),
    .busy_o(busy), .done_o(done), .shift_o(shift), .result_o(res)
  );

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rnd64();
    return {32'($urandom), 32'($urandom)};
  endfunction

  task automatic run_one(input md_op_e o, input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] exp;
    logic         exp_shift, pow2;
    int           exp_lat, lat;
    pow2 = (y != 0) && ((y & (y - 1)) == 0);
    unique case (o)
      MD_MUL:  exp = x * y;
      MD_DIV:  exp = (y == 0) ? '1 : x / y;
      default: exp = (y == 0) ? x : x % y;
    endcase
    exp_shift = pow2;
    exp_lat   = (o == MD_MUL || pow2 || y == 0) ? 1 : W + 1;
    if (o == MD_MUL && pow2) n_shift_mul++;
    else if (o == MD_MUL) n_mul++;
    else if (pow2) n_shift_div++;
    else if (y == 0) n_zero++;
    else n_serial++;
    // inputs launched just after a rising edge, as from a flop
    @(posedge clk);
    #1 op = o; a = x; b = y; start = 1'b1;
    lat = 0;
    do begin
      @(posedge clk); lat++;
      #1 start = 1'b0;
      a = rnd64(); b = rnd64();   // operands may move once taken
    end while (!done && lat < 4 * W);
    checks += 3;
    if (res !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h expected %h", o.name(), x, y, res, exp);
    end
    if (shift !== exp_shift) begin
      failures++;
      $display("FAIL shift flag op=%s b=%h got %b", o.name(), y, shift);
    end
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL latency op=%s b=%h got %0d expected %0d", o.name(), y, lat, exp_lat);
    end
    @(posedge clk);
    #1 checks++;
    if (done || busy) begin failures++; $display("FAIL done/busy not cleared"); end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      md_op_e o;
      logic [W-1:0] y;
      int           kind;
      o = md_op_e'($urandom % 3);
      kind = $urandom % 4;
      unique case (kind)
        0, 1: y = W'(1) << ($urandom % W);
        2:    y = (i % 10 == 0) ? '0 : (rnd64() >> ($urandom % W));
        default: y = rnd64();
      endcase
      run_one(o, rnd64(), y);
    end
    run_one(MD_DIV, 64'd100, 64'd7);
    run_one(MD_REM, 64'd100, 64'd7);
    run_one(MD_MUL, 64'd12345, 64'd3);
    run_one(MD_DIV, 64'd100, 64'd0);
    checks++;
    if (n_shift_mul == 0 || n_shift_div == 0 || n_mul == 0 || n_serial == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("shift-mul=%0d shift-div=%0d parallel-mul=%0d serial-div=%0d div-by-zero=%0d",
             n_shift_mul, n_shift_div, n_mul, n_serial, n_zero);
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
