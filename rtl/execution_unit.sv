// execution_unit: VLIW execution unit of the stream coprocessor.
//
// A kernel is a sequence of 64-bit long instruction words, each holding one
// operation for each of the NSLOTS functional units. The unit fetches a word
// from the instruction memory, issues it, executes all its operations side by
// side and retires it, one word at a time:
//   FETCH  the word at pc is read from the instruction memory;
//   ISSUE  the branch and stall unit holds the word until every input pipe it
//          pops has data and every output pipe it pushes has room; then each
//          active slot's operands (registers, immediate or the popped pipe
//          word) are loaded into that slot's operand isolation registers and
//          the popped pipes advance. Idle slots keep their operand registers
//          and so their functional units still;
//   EXEC   the functional units compute; multiply/divide slots start their
//          multiplier/divider and the word waits until all have finished;
//          then results are written to the register file, pushes go to the
//          output pipes and the branch and stall unit picks the next pc.
// A HALT operation ends the kernel and pulses done_o.
//
// Interface: run_i (in idle) starts a kernel at start_pc_i; busy_o is high
// until done_o. fetch_* is the instruction memory read port (data one cycle
// after fetch_en_o). ipf_* are the first-word-fall-through heads and pop
// strobes of the input pipes, opf_* the push strobes, data and full flags of
// the output pipes. perf_o counts retired words, pipe stall cycles and the
// multiply/divide operations that took the shift path or the serial divider.
// Timing: a word without multiply/divide takes 3 cycles (fetch, issue,
// execute) plus pipe stalls; with a product or power-of-two division one
// cycle more; with any other division or remainder XLEN+1 more.
//
// Following the source design: a VLIW unit with several functional units,
// a multi-ported register file, operand isolation registers in front of the
// functional units, the MSB-first comparator, the double-word
// multiplier/divider with shift path, clock gating, 64-bit data, two input
// and three output pipes and a branch and stall unit. This design's own
// choices: the instruction set and encoding (scu_pkg), two slots, sixteen
// registers, the unpipelined fetch/issue/execute sequence, and the rules
// that a word pops or pushes each pipe at most once and that a branch in a
// lower slot wins over one in a higher slot. The SIMD sub-word behaviour of
// the original unit is not modelled: each slot works on whole 64-bit words.
module execution_unit
  import scu_pkg::*;
#(
  parameter int unsigned AW = 8   // instruction address width
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // kernel control
  input  logic               run_i,
  input  logic [AW-1:0]      start_pc_i,
  output logic               busy_o,
  output logic               done_o,
  output eu_perf_t           perf_o,
  // instruction memory
  output logic               fetch_en_o,
  output logic [AW-1:0]      fetch_addr_o,
  input  logic [IWORDW-1:0]  fetch_data_i,
  // input pipes
  input  word_t              ipf_data_i  [N_IPF],
  input  logic [N_IPF-1:0]   ipf_empty_i,
  output logic [N_IPF-1:0]   ipf_pop_o,
  // output pipes
  output word_t              opf_data_o  [N_OPF],
  output logic [N_OPF-1:0]   opf_push_o,
  input  logic [N_OPF-1:0]   opf_full_i
);
  localparam int unsigned IPW = $clog2(N_IPF);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_ISSUE, S_EXEC} state_e;

  state_e        state_q;
  logic [AW-1:0] pc_q;
  iword_t        ir_in, ir_q;
  logic          stall, issue_go, retire;
  logic [AW-1:0] next_pc;
  logic          taken, halt;

  // register file: two reads and one write per slot
  logic [RAW-1:0] rf_raddr [2*NSLOTS];
  word_t          rf_rdata [2*NSLOTS];
  logic           rf_we    [NSLOTS];
  logic [RAW-1:0] rf_waddr [NSLOTS];
  word_t          rf_wdata [NSLOTS];

  // per-slot operand network, isolation registers and functional units
  word_t op_a [NSLOTS], op_b [NSLOTS];
  word_t iso_a [NSLOTS], iso_b [NSLOTS];
  logic  iso_en [NSLOTS];
  word_t fu_res [NSLOTS];
  logic  md_start [NSLOTS], md_busy [NSLOTS], md_done [NSLOTS], md_shift [NSLOTS];
  logic  md_seen_q [NSLOTS];
  logic  md_started_q;
  logic  md_busy_q [NSLOTS];
  logic  slot_ready [NSLOTS];

  assign ir_in = iword_t'(fetch_data_i);

  function automatic logic writes_rd(op_e op);
    return !(op inside {OP_NOP, OP_PUSH, OP_BNZ, OP_BZ, OP_JMP, OP_HALT});
  endfunction

  function automatic word_t sext_imm(logic [IMMW-1:0] imm);
    return word_t'(signed'(imm));
  endfunction

  // ------------------------------------------------------------ issue side
  always_comb begin
    for (int unsigned s = 0; s < NSLOTS; s++) begin
      rf_raddr[2*s]   = ir_in[s].rs1;
      rf_raddr[2*s+1] = ir_in[s].rs2;
      op_a[s] = (ir_in[s].op == OP_POP) ? ipf_data_i[ir_in[s].imm[IPW-1:0]]
                                        : rf_rdata[2*s];
      op_b[s] = (ir_in[s].op inside {OP_LI, OP_ADDI}) ? sext_imm(ir_in[s].imm)
                                                      : rf_rdata[2*s+1];
    end
  end

  assign issue_go = (state_q == S_ISSUE) && !stall;

  always_comb begin
    ipf_pop_o = '0;
    for (int unsigned s = 0; s < NSLOTS; s++) begin
      iso_en[s] = issue_go && (ir_in[s].op != OP_NOP);
      if (issue_go && ir_in[s].op == OP_POP) ipf_pop_o[ir_in[s].imm[IPW-1:0]] = 1'b1;
    end
  end

  eu_regfile #(.W(XLEN), .NREG(NREGS), .NRD(2*NSLOTS), .NWR(NSLOTS)) u_rf (
    .clk_i   (clk_i),
    .rst_ni  (rst_ni),
    .raddr_i (rf_raddr),
    .rdata_o (rf_rdata),
    .we_i    (rf_we),
    .waddr_i (rf_waddr),
    .wdata_i (rf_wdata)
  );

  for (genvar s = 0; s < NSLOTS; s++) begin : g_slot
    operand_isolation #(.W(XLEN)) u_iso (
      .clk_i  (clk_i),
      .rst_ni (rst_ni),
      .en_i   (iso_en[s]),
      .a_i    (op_a[s]),
      .b_i    (op_b[s]),
      .a_o    (iso_a[s]),
      .b_o    (iso_b[s])
    );

    eu_fu u_fu (
      .clk_i      (clk_i),
      .rst_ni     (rst_ni),
      .op_i       (ir_q[s].op),
      .a_i        (iso_a[s]),
      .b_i        (iso_b[s]),
      .md_start_i (md_start[s]),
      .result_o   (fu_res[s]),
      .md_busy_o  (md_busy[s]),
      .md_done_o  (md_done[s]),
      .md_shift_o (md_shift[s])
    );
  end

  bsu #(.AW(AW)) u_bsu (
    .issue_i     (ir_in),
    .ipf_empty_i (ipf_empty_i),
    .opf_full_i  (opf_full_i),
    .stall_o     (stall),
    .retire_i    (ir_q),
    .rs1_i       (iso_a),
    .pc_i        (pc_q),
    .next_pc_o   (next_pc),
    .taken_o     (taken),
    .halt_o      (halt)
  );

  // ---------------------------------------------------------- execute side
  always_comb begin
    retire = (state_q == S_EXEC);
    for (int unsigned s = 0; s < NSLOTS; s++) begin
      md_start[s]   = (state_q == S_EXEC) && !md_started_q && op_is_muldiv(ir_q[s].op);
      slot_ready[s] = !op_is_muldiv(ir_q[s].op) || md_seen_q[s] || md_done[s];
      if (!slot_ready[s]) retire = 1'b0;
    end
  end

  always_comb begin
    opf_push_o = '0;
    for (int unsigned p = 0; p < N_OPF; p++) opf_data_o[p] = '0;
    for (int unsigned s = 0; s < NSLOTS; s++) begin
      rf_we[s]    = retire && writes_rd(ir_q[s].op);
      rf_waddr[s] = ir_q[s].rd;
      rf_wdata[s] = fu_res[s];
      if (retire && ir_q[s].op == OP_PUSH && int'(ir_q[s].imm[1:0]) < N_OPF) begin
        opf_push_o[ir_q[s].imm[1:0]] = 1'b1;
        opf_data_o[ir_q[s].imm[1:0]] = iso_a[s];
      end
    end
  end

  // ------------------------------------------------------------- sequencer
  logic [31:0] n_shift_evt, n_serial_evt;

  always_comb begin
    n_shift_evt  = '0;
    n_serial_evt = '0;
    for (int unsigned s = 0; s < NSLOTS; s++) begin
      if (md_done[s] && md_shift[s])   n_shift_evt  = n_shift_evt + 32'd1;
      if (md_busy[s] && !md_busy_q[s]) n_serial_evt = n_serial_evt + 32'd1;
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q      <= S_IDLE;
      pc_q         <= '0;
      ir_q         <= '0;
      md_started_q <= 1'b0;
      done_o       <= 1'b0;
      perf_o       <= '0;
      for (int unsigned s = 0; s < NSLOTS; s++) begin
        md_seen_q[s] <= 1'b0;
        md_busy_q[s] <= 1'b0;
      end
    end else begin
      done_o <= 1'b0;
      for (int unsigned s = 0; s < NSLOTS; s++) md_busy_q[s] <= md_busy[s];
      perf_o.shift_ops  <= perf_o.shift_ops + n_shift_evt;
      perf_o.serial_ops <= perf_o.serial_ops + n_serial_evt;
      unique case (state_q)
        S_IDLE: if (run_i) begin
          pc_q    <= start_pc_i;
          perf_o  <= '0;
          state_q <= S_FETCH;
        end
        S_FETCH: state_q <= S_ISSUE;
        S_ISSUE: begin
          if (stall) begin
            perf_o.pipe_stalls <= perf_o.pipe_stalls + 32'd1;
          end else begin
            ir_q    <= ir_in;
            state_q <= S_EXEC;
          end
        end
        S_EXEC: begin
          md_started_q <= 1'b1;
          for (int unsigned s = 0; s < NSLOTS; s++)
            if (md_done[s]) md_seen_q[s] <= 1'b1;
          if (retire) begin
            md_started_q <= 1'b0;
            for (int unsigned s = 0; s < NSLOTS; s++) md_seen_q[s] <= 1'b0;
            perf_o.words <= perf_o.words + 32'd1;
            pc_q <= next_pc;
            if (halt) begin
              state_q <= S_IDLE;
              done_o  <= 1'b1;
            end else begin
              state_q <= S_FETCH;
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o       = (state_q != S_IDLE);
  assign fetch_en_o   = (state_q == S_FETCH);
  assign fetch_addr_o = pc_q;

  // A word may pop or push each pipe at most once.
  always_ff @(posedge clk_i) begin
    if (state_q == S_ISSUE && NSLOTS > 1) begin
      for (int unsigned s = 1; s < NSLOTS; s++) begin
        assert (!(ir_in[s].op == OP_POP && ir_in[0].op == OP_POP &&
                  ir_in[s].imm[IPW-1:0] == ir_in[0].imm[IPW-1:0]))
          else $error("execution_unit: two pops of one input pipe in a word");
        assert (!(ir_in[s].op == OP_PUSH && ir_in[0].op == OP_PUSH &&
                  ir_in[s].imm[1:0] == ir_in[0].imm[1:0]))
          else $error("execution_unit: two pushes to one output pipe in a word");
      end
    end
  end

  logic unused_taken;
  assign unused_taken = taken;
endmodule
