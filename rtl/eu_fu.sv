// eu_fu: one functional unit (slot) of the execution unit.
//
// Computes the result of one operation from the two operands held in front
// of it by the operand isolation registers. Simple integer operations are
// combinational. Comparisons, minimum and maximum use the MSB-first
// sequential comparator. Multiplication, division and remainder go to the
// double-word multiplier/divider, which takes the shift path for
// power-of-two multipliers and divisors.
//
// Interface: op_i is the slot's operation, a_i/b_i its operands (b_i already
// replaced by the immediate for LI/ADDI, a_i by the popped pipe word for POP).
// md_start_i launches a multiply/divide; md_done_o pulses when its result is
// on result_o, md_shift_o tells it came from the shifter, md_busy_o is high
// while the serial divider runs. For all other operations result_o is valid
// in the same cycle as the operands.
//
// The comparator and the multiplier/divider are the blocks of the source
// design; the operation set is this design's choice.
module eu_fu
  import scu_pkg::*;
(
  input  logic  clk_i,
  input  logic  rst_ni,
  input  op_e   op_i,
  input  word_t a_i,
  input  word_t b_i,
  input  logic  md_start_i,
  output word_t result_o,
  output logic  md_busy_o,
  output logic  md_done_o,
  output logic  md_shift_o
);
  logic   eq, neq, lt;
  md_op_e md_op;
  word_t  md_res;

  seq_comparator #(.W(XLEN)) u_cmp (
    .a_i      (a_i),
    .b_i      (b_i),
    .signed_i (op_i != OP_CLTU),
    .neq_o    (neq),
    .eq_o     (eq),
    .lt_o     (lt)
  );

  always_comb begin
    unique case (op_i)
      OP_DIV:  md_op = MD_DIV;
      OP_REM:  md_op = MD_REM;
      default: md_op = MD_MUL;
    endcase
  end

  dword_muldiv #(.W(XLEN)) u_md (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .start_i  (md_start_i),
    .op_i     (md_op),
    .a_i      (a_i),
    .b_i      (b_i),
    .busy_o   (md_busy_o),
    .done_o   (md_done_o),
    .shift_o  (md_shift_o),
    .result_o (md_res)
  );

  always_comb begin
    unique case (op_i)
      OP_ADD, OP_ADDI:       result_o = a_i + b_i;
      OP_SUB:                result_o = a_i - b_i;
      OP_AND:                result_o = a_i & b_i;
      OP_OR:                 result_o = a_i | b_i;
      OP_XOR:                result_o = a_i ^ b_i;
      OP_SHL:                result_o = a_i << b_i[5:0];
      OP_SHR:                result_o = a_i >> b_i[5:0];
      OP_CEQ:                result_o = word_t'(eq);
      OP_CLT, OP_CLTU:       result_o = word_t'(lt);
      OP_MAX:                result_o = lt ? b_i : a_i;
      OP_MIN:                result_o = lt ? a_i : b_i;
      OP_LI:                 result_o = b_i;
      OP_POP, OP_PUSH:       result_o = a_i;
      OP_MUL, OP_DIV, OP_REM: result_o = md_res;
      default:               result_o = '0;
    endcase
  end

  logic unused_neq;
  assign unused_neq = neq;
endmodule
