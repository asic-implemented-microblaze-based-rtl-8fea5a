// tb_bsu: self-checking testbench of the branch and stall unit.
//
// Random long instruction words with random pipe states and operand values
// are applied; the stall decision, next address, taken flag and halt flag are
// compared with a reference written here from the rules: a word stalls if it
// pops an empty input pipe or pushes a full (or non-existent) output pipe;
// the lowest slot holding a taken branch or a jump supplies the next
// address, otherwise the address advances by one; any HALT halts.
module tb_bsu;
  import scu_pkg::*;
  localparam int AW = 8;
  iword_t             issue, retire;
  logic [N_IPF-1:0]   ipf_empty;
  logic [N_OPF-1:0]   opf_full;
  word_t              rs1 [NSLOTS];
  logic [AW-1:0]      pc, next_pc;
  logic               stall, taken, halt;
  int checks = 0, failures = 0, n_stall = 0, n_taken = 0, n_halt = 0, n_seq = 0;

  bsu #(.AW(AW)) dut (
    .issue_i(issue), .ipf_empty_i(ipf_empty), .opf_full_i(opf_full), .stall_o(stall),
    .retire_i(retire), .rs1_i(rs1), .pc_i(pc), .next_pc_o(next_pc),
    .taken_o(taken), .halt_o(halt)
  );

  function automatic op_e rnd_op();
    op_e ops [8] = '{OP_POP, OP_PUSH, OP_BNZ, OP_BZ, OP_JMP, OP_HALT, OP_ADD, OP_NOP};
    return ops[$urandom % 8];
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic          e_stall, e_taken, e_halt, found;
      logic [AW-1:0] e_pc;
      for (int s = 0; s < NSLOTS; s++) begin
        issue[s]     = slot_t'($urandom);
        issue[s].op  = rnd_op();
        retire[s]    = slot_t'($urandom);
        retire[s].op = rnd_op();
        rs1[s]       = ($urandom % 2) ? '0 : word_t'($urandom);
      end
      ipf_empty = N_IPF'($urandom);
      opf_full  = N_OPF'($urandom);
      pc        = AW'($urandom);
      #1;
      e_stall = 1'b0;
      for (int s = 0; s < NSLOTS; s++) begin
        if (issue[s].op == OP_POP && ipf_empty[issue[s].imm % N_IPF]) e_stall = 1'b1;
        if (issue[s].op == OP_PUSH && ((issue[s].imm % 4) >= N_OPF || opf_full[issue[s].imm % 4]))
          e_stall = 1'b1;
      end
      e_taken = 1'b0; e_halt = 1'b0; found = 1'b0; e_pc = pc + 1;
      for (int s = 0; s < NSLOTS; s++) begin
        logic t;
        t = (retire[s].op == OP_JMP) || (retire[s].op == OP_BNZ && rs1[s] != 0) ||
            (retire[s].op == OP_BZ && rs1[s] == 0);
        if (t && !found) begin found = 1'b1; e_taken = 1'b1; e_pc = retire[s].imm[AW-1:0]; end
        if (retire[s].op == OP_HALT) e_halt = 1'b1;
      end
      checks += 4;
      if (stall !== e_stall) begin failures++; $display("FAIL stall %b vs %b", stall, e_stall); end
      if (taken !== e_taken) begin failures++; $display("FAIL taken %b vs %b", taken, e_taken); end
      if (halt  !== e_halt)  begin failures++; $display("FAIL halt %b vs %b", halt, e_halt); end
      if (next_pc !== e_pc)  begin failures++; $display("FAIL next pc %h vs %h", next_pc, e_pc); end
      if (e_stall) n_stall++;
      if (e_taken) n_taken++; else n_seq++;
      if (e_halt) n_halt++;
    end
    checks++;
    if (n_stall == 0 || n_taken == 0 || n_halt == 0 || n_seq == 0) begin failures++; $display("FAIL coverage"); end
    $display("stalls=%0d taken=%0d sequential=%0d halts=%0d", n_stall, n_taken, n_seq, n_halt);
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
