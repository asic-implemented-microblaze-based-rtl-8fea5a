// operand_isolation: operand registers in front of a functional unit.
//
// The operand bits of an arithmetic unit arrive at different times through
// different logic paths, and a unit fed directly re-evaluates on every
// arrival, burning power on intermediate results nobody uses. This block
// parks both operands in registers and hands them to the unit together, only
// when the unit is actually given work: the registers are clocked through an
// AND-type clock gate (acg) whose enable is en_i, so on idle cycles neither
// the registers nor the unit behind them switch.
//
// Interface: clk_i free-running clock, rst_ni asynchronous active-low reset
// (clears the held operands), en_i load enable, a_i/b_i operands from the
// operand network, a_o/b_o the held operands towards the unit.
// Timing: a_i/b_i present with en_i before a rising edge appear on a_o/b_o
// after that edge and stay there until the next enabled edge (one cycle of
// added latency, as in the source design).
//
// Registers in front of the unit's inputs follow the source design (32-bit
// operands in its example, which is the default width here); gating their
// clock with the acg cell and the asynchronous reset are this design's
// choices.
module operand_isolation #(
  parameter int unsigned W = 32
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] a_o,
  output logic [W-1:0] b_o
);
  logic gclk;

  acg u_acg (
    .clk_i  (clk_i),
    .en_i   (en_i),
    .gclk_o (gclk)
  );

  always_ff @(posedge gclk or negedge rst_ni) begin
    if (!rst_ni) begin
      a_o <= '0;
      b_o <= '0;
    end else begin
      a_o <= a_i;
      b_o <= b_i;
    end
  end
endmodule
