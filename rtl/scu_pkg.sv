// scu_pkg: types and constants shared by the stream coprocessor blocks.
//
// The coprocessor is split into a stream processing unit (a VLIW execution
// unit fed by input pipes and draining into output pipes) and a management
// side (interfaces that a MicroBlaze controller reaches over AXI4-Lite).
// This package holds:
//   * the execution unit's instruction set: a 64-bit long instruction word
//     made of two 32-bit operation slots, one per functional unit;
//   * the AXI4-Lite request/response structs used by every register port;
//   * the transaction command codes spoken on the request/response links
//     between the interfaces and the instruction memory / kernel run monitor.
// Widths that follow the source architecture: 64-bit data words and 64-bit
// transaction data, 8-bit transaction IDs and commands, two input pipes and
// three output pipes. The instruction encoding, register count, command codes
// and AXI4-Lite address width are this design's own choices.
package scu_pkg;

  // ---------------------------------------------------------------- datapath
  localparam int unsigned XLEN     = 64;  // data word (double word)
  localparam int unsigned NREGS    = 16;  // execution unit registers
  localparam int unsigned RAW      = $clog2(NREGS);
  localparam int unsigned NSLOTS   = 2;   // operations per long instruction
  localparam int unsigned SLOTW    = 32;  // bits per operation slot
  localparam int unsigned IWORDW   = NSLOTS * SLOTW;  // = 64, one IMEM word
  localparam int unsigned N_IPF    = 2;   // input pipes  IPF0..IPF1
  localparam int unsigned N_OPF    = 3;   // output pipes OPF0..OPF2
  localparam int unsigned IMMW     = SLOTW - 5 - 3 * RAW;  // = 15

  typedef logic [XLEN-1:0] word_t;

  // Operation codes of one slot.
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,   // nothing
    OP_ADD  = 5'd1,   // rd = rs1 + rs2
    OP_SUB  = 5'd2,   // rd = rs1 - rs2
    OP_AND  = 5'd3,   // rd = rs1 & rs2
    OP_OR   = 5'd4,   // rd = rs1 | rs2
    OP_XOR  = 5'd5,   // rd = rs1 ^ rs2
    OP_SHL  = 5'd6,   // rd = rs1 << rs2[5:0]
    OP_SHR  = 5'd7,   // rd = rs1 >> rs2[5:0]  (logical)
    OP_MUL  = 5'd8,   // rd = low 64 bits of rs1 * rs2
    OP_DIV  = 5'd9,   // rd = rs1 / rs2        (unsigned)
    OP_CEQ  = 5'd10,  // rd = (rs1 == rs2)
    OP_CLT  = 5'd11,  // rd = (rs1 <  rs2)     (signed)
    OP_CLTU = 5'd12,  // rd = (rs1 <  rs2)     (unsigned)
    OP_LI   = 5'd13,  // rd = sign-extended imm
    OP_ADDI = 5'd14,  // rd = rs1 + sign-extended imm
    OP_POP  = 5'd15,  // rd = head of input pipe imm[0]; pipe advances
    OP_PUSH = 5'd16,  // output pipe imm[1:0] <= rs1
    OP_BNZ  = 5'd17,  // if (rs1 != 0) pc = imm
    OP_BZ   = 5'd18,  // if (rs1 == 0) pc = imm
    OP_JMP  = 5'd19,  // pc = imm
    OP_HALT = 5'd20,  // end of kernel
    OP_REM  = 5'd21,  // rd = rs1 % rs2        (unsigned)
    OP_MAX  = 5'd22,  // rd = signed max(rs1, rs2)
    OP_MIN  = 5'd23   // rd = signed min(rs1, rs2)
  } op_e;

  typedef struct packed {
    op_e             op;
    logic [RAW-1:0]  rd;
    logic [RAW-1:0]  rs1;
    logic [RAW-1:0]  rs2;
    logic [IMMW-1:0] imm;
  } slot_t;

  typedef slot_t [NSLOTS-1:0] iword_t;  // slot 0 in bits 31:0

  // Which operations go to the shared multiplier/divider of a slot.
  function automatic logic op_is_muldiv(op_e op);
    return op inside {OP_MUL, OP_DIV, OP_REM};
  endfunction

  // Event counters of the execution unit, cleared when a kernel starts.
  typedef struct packed {
    logic [31:0] words;        // long instruction words retired
    logic [31:0] pipe_stalls;  // cycles a word waited for a pipe
    logic [31:0] shift_ops;    // multiply/divide done by the shifter
    logic [31:0] serial_ops;   // divisions done by the serial divider
  } eu_perf_t;

  // Operations of the double-word multiplier/divider.
  typedef enum logic [1:0] {
    MD_MUL = 2'd0,  // product, low word
    MD_DIV = 2'd1,  // unsigned quotient
    MD_REM = 2'd2   // unsigned remainder
  } md_op_e;

  // ---------------------------------------------------------------- AXI4-Lite
  localparam int unsigned AXIL_AW = 12;
  localparam int unsigned AXIL_DW = 32;

  typedef struct packed {
    logic [AXIL_AW-1:0] awaddr;
    logic               awvalid;
    logic [AXIL_DW-1:0] wdata;
    logic [3:0]         wstrb;
    logic               wvalid;
    logic               bready;
    logic [AXIL_AW-1:0] araddr;
    logic               arvalid;
    logic               rready;
  } axil_req_t;

  typedef struct packed {
    logic               awready;
    logic               wready;
    logic [1:0]         bresp;
    logic               bvalid;
    logic               arready;
    logic [AXIL_DW-1:0] rdata;
    logic [1:0]         rresp;
    logic               rvalid;
  } axil_rsp_t;

  // ------------------------------------------------ request/response links
  // Commands accepted by the instruction memory.
  localparam logic [7:0] IMEM_CMD_SETADDR = 8'h01;  // address = txdata
  localparam logic [7:0] IMEM_CMD_WRITE   = 8'h02;  // mem[address++] = txdata
  localparam logic [7:0] IMEM_CMD_READ    = 8'h03;  // respond mem[address++]

  // Commands accepted by the kernel run monitor.
  localparam logic [7:0] KRM_CMD_KDR      = 8'h01;  // kernel descriptor
  localparam logic [7:0] KRM_CMD_AMEM     = 8'h02;  // kernel argument word
  localparam logic [7:0] KRM_CMD_SDR_IN   = 8'h10;  // +0..+1 input stream descr.
  localparam logic [7:0] KRM_CMD_SDR_OUT  = 8'h12;  // +0..+2 output stream descr.
  localparam logic [7:0] KRM_CMD_ORF      = 8'h20;  // +0..+4 offset registers
  localparam logic [7:0] KRM_CMD_RUN      = 8'h30;  // start the kernel
  localparam logic [7:0] KRM_CMD_RD_TIME  = 8'h40;  // read execution time
  localparam logic [7:0] KRM_CMD_RD_SDR   = 8'h41;  // +0..+2 read output SDR
  localparam logic [7:0] KRM_CMD_RELEASE  = 8'h50;  // release execution unit

  localparam int unsigned N_ORF = 5;

  // Kernel run monitor states reported on KRM_STATE.
  typedef enum logic [7:0] {
    KRM_ST_IDLE    = 8'd0,
    KRM_ST_CONFIG  = 8'd1,
    KRM_ST_RUNNING = 8'd2,
    KRM_ST_DONE    = 8'd3
  } krm_state_e;

endpackage
