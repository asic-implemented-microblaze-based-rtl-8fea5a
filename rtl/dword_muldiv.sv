// dword_muldiv: double-word (64-bit) multiplier/divider with a shift path.
//
// Multiplying by 2^k is a left shift by k and dividing by 2^k a right shift
// by k. A shifter has no XOR gates, so it toggles far less logic than an
// array multiplier or a divider. This unit therefore checks the second
// operand (multiplier or divisor) first: if it is a power of two the result
// comes from the shifter, otherwise from a conventional unit, which is a
// parallel multiplier for products and a bit-serial restoring divider for
// quotients and remainders.
//
// Interface: start_i (one cycle, ignored while busy_o) with op_i, a_i, b_i
// launches an operation; done_o pulses for one cycle when result_o is valid,
// and result_o holds its value until the next result. shift_o tells, together
// with done_o, that the shift path produced the result.
// Timing: products and power-of-two divisions (and division by zero) finish
// one cycle after start_i; any other division or remainder takes W+1 cycles,
// with busy_o high meanwhile.
// Unsigned division; x / 0 gives all ones and x % 0 gives x.
// start_i, op_i, a_i and b_i must be launched from rising-edge flops (change
// only early in the clock's high phase): the OR-type gate of the divider
// registers latches its gating input during the high phase.
//
// The power-of-two test steering between a shifter and a conventional
// multiplier/divider, and the 64-bit operands, follow the source design.
// The divider algorithm, the latencies, the division-by-zero results and the
// OR-type clock gate (ocg) that stops the divider's registers when it is idle
// are this design's choices.
module dword_muldiv
  import scu_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  md_op_e       op_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic         busy_o,
  output logic         done_o,
  output logic         shift_o,
  output logic [W-1:0] result_o
);
  localparam int unsigned SW = $clog2(W);

  // ---------------------------------------------------- power-of-two detect
  logic          b_pow2;
  logic [SW-1:0] b_log2;

  assign b_pow2 = (b_i != '0) && ((b_i & (b_i - W'(1))) == '0);

  always_comb begin
    b_log2 = '0;
    for (int unsigned i = 0; i < W; i++)
      if (b_i[i]) b_log2 = b_log2 | SW'(i);
  end

  // ------------------------------------------------ single-cycle results
  logic         fast;       // result available without the serial divider
  logic [W-1:0] fast_res;
  logic         fast_shift;

  always_comb begin
    fast       = 1'b1;
    fast_shift = 1'b0;
    fast_res   = '0;
    unique case (op_i)
      MD_MUL: begin
        if (b_pow2) begin
          fast_res   = a_i << b_log2;
          fast_shift = 1'b1;
        end else begin
          fast_res   = a_i * b_i;
        end
      end
      MD_DIV, MD_REM: begin
        if (b_i == '0) begin
          fast_res = (op_i == MD_DIV) ? '1 : a_i;
        end else if (b_pow2) begin
          fast_res   = (op_i == MD_DIV) ? (a_i >> b_log2) : (a_i & (b_i - W'(1)));
          fast_shift = 1'b1;
        end else begin
          fast = 1'b0;
        end
      end
      default: fast_res = '0;
    endcase
  end

  // ------------------------------------------------------ serial divider
  logic          busy_q;
  logic          launch_slow;
  logic          div_gclk;
  logic [W-1:0]  rem_q, quo_q, dvs_q;
  logic [SW:0]   cnt_q;
  md_op_e        dop_q;
  logic [W:0]    rem_sh;
  logic [W-1:0]  rem_nx, quo_nx;
  logic          last_step;

  assign launch_slow = start_i && !busy_q && !fast;

  // Divider registers only see clock edges while they have work.
  ocg u_ocg (
    .clk_i  (clk_i),
    .hold_i (!(launch_slow || busy_q)),
    .gclk_o (div_gclk)
  );

  always_comb begin
    rem_sh = {rem_q, quo_q[W-1]};
    quo_nx = {quo_q[W-2:0], 1'b0};
    rem_nx = rem_sh[W-1:0];
    if (rem_sh >= {1'b0, dvs_q}) begin
      rem_nx    = W'(rem_sh - {1'b0, dvs_q});
      quo_nx[0] = 1'b1;
    end
  end

  assign last_step = busy_q && (cnt_q == (SW+1)'(1));

  always_ff @(posedge div_gclk or negedge rst_ni) begin
    if (!rst_ni) begin
      rem_q <= '0;
      quo_q <= '0;
      dvs_q <= '0;
      cnt_q <= '0;
      dop_q <= MD_DIV;
    end else if (launch_slow) begin
      rem_q <= '0;
      quo_q <= a_i;
      dvs_q <= b_i;
      cnt_q <= (SW+1)'(W);
      dop_q <= op_i;
    end else begin
      rem_q <= rem_nx;
      quo_q <= quo_nx;
      cnt_q <= cnt_q - (SW+1)'(1);
    end
  end

  // ------------------------------------------------------------- results
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q   <= 1'b0;
      done_o   <= 1'b0;
      shift_o  <= 1'b0;
      result_o <= '0;
    end else begin
      done_o <= 1'b0;
      if (start_i && !busy_q && fast) begin
        result_o <= fast_res;
        shift_o  <= fast_shift;
        done_o   <= 1'b1;
      end else if (launch_slow) begin
        busy_q  <= 1'b1;
      end else if (last_step) begin
        busy_q   <= 1'b0;
        done_o   <= 1'b1;
        shift_o  <= 1'b0;
        result_o <= (dop_q == MD_REM) ? rem_nx : quo_nx;
      end
    end
  end

  assign busy_o = busy_q;
endmodule
