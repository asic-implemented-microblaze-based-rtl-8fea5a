// bsu: branch and stall unit of the execution unit.
//
// For the long instruction word being issued it decides whether the word may
// go ahead: every input pipe that one of its slots pops must hold data and
// every output pipe that one of its slots pushes must have room; otherwise the
// word stalls. For the word being retired it computes the next instruction
// address: a taken branch or jump (BNZ, BZ, JMP) in the lowest-numbered slot
// that has one wins, otherwise the address advances by one; HALT in any slot
// ends the kernel.
//
// Interface (combinational): issue_i is the word at the issue stage with the
// pipe status ipf_empty_i / opf_full_i, giving stall_o. retire_i is the word
// being retired, rs1_i the first operand each slot read, pc_i its address,
// giving next_pc_o, taken_o and halt_o.
//
// The source architecture names a branch and stall unit next to the
// instruction memory; what it stalls on, the branch rules and the slot
// priority here are this design's choices.
module bsu
  import scu_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  iword_t              issue_i,
  input  logic [N_IPF-1:0]    ipf_empty_i,
  input  logic [N_OPF-1:0]    opf_full_i,
  output logic                stall_o,

  input  iword_t              retire_i,
  input  word_t               rs1_i [NSLOTS],
  input  logic [AW-1:0]       pc_i,
  output logic [AW-1:0]       next_pc_o,
  output logic                taken_o,
  output logic                halt_o
);
  always_comb begin
    stall_o = 1'b0;
    for (int unsigned s = 0; s < NSLOTS; s++) begin
      if (issue_i[s].op == OP_POP &&
          ipf_empty_i[issue_i[s].imm[$clog2(N_IPF)-1:0]])
        stall_o = 1'b1;
      if (issue_i[s].op == OP_PUSH &&
          (int'(issue_i[s].imm[1:0]) >= N_OPF || opf_full_i[issue_i[s].imm[1:0]]))
        stall_o = 1'b1;
    end
  end

  always_comb begin
    next_pc_o = pc_i + AW'(1);
    taken_o   = 1'b0;
    halt_o    = 1'b0;
    for (int s = NSLOTS - 1; s >= 0; s--) begin
      unique case (retire_i[s].op)
        OP_BNZ:  if (rs1_i[s] != '0) begin taken_o = 1'b1; next_pc_o = retire_i[s].imm[AW-1:0]; end
        OP_BZ:   if (rs1_i[s] == '0) begin taken_o = 1'b1; next_pc_o = retire_i[s].imm[AW-1:0]; end
        OP_JMP:  begin taken_o = 1'b1; next_pc_o = retire_i[s].imm[AW-1:0]; end
        OP_HALT: halt_o = 1'b1;
        default: ;
      endcase
    end
  end
endmodule
