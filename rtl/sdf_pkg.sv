// sdf_pkg: types and constants shared by the Scheduled Dataflow (SDF) processor.
//
// The processor runs nonblocking threads. A thread is described by a continuation
// <FP, IP, RS, SC>: frame pointer, instruction pointer, register set and
// synchronization count. This package defines the continuation record moved
// between the Scheduling Unit (SU), the Synchronization Pipeline (SP) and the
// Execution Pipeline (EP), and the 32-bit instruction encoding of both pipelines.
//
// The continuation tuple and the instruction names (ADD, SUB, MULT, DIV, LOAD,
// STORE, FALLOC, FFREE, FORKEP, FORKSP) follow the SDF description. Field widths,
// opcode numbers, the remaining instructions and all sizes are this design's own.
//
// Instruction formats (bit 31 on the left):
//   ALU  : op[31:26] rs[25:21] rd1[20:16] rd2[15:11] d2v[10] imm[9:0]
//          Dyadic ops read the register pair R[rs], R[rs+1] (the "RR" operand);
//          ADDI/MOVI use R[rs] and the sign-extended immediate.
//          The result goes to rd1, and also to rd2 when d2v is set.
//   BR   : op[31:26] rs[25:21] target[15:0]    (BEQZ, BNEZ test R[rs]; JMP ignores rs)
//   FORK : op[31:26] target[15:0]              (FORKSP on EP, FORKEP on SP)
//   LD/ST: op[31:26] rb[25:21] rv[20:16] ro[15:11] m[10] imm[9:0]
//          address = R[rb] + (m ? R[ro] : sign-extended imm), i.e. "Rfp|offset".
//          LOAD writes rv, STORE writes R[rv] to memory.
//   FALLOC: op[31:26] rd[25:21] sc[20:16] ip[15:0]  (new frame pointer into rd)
//   FFREE : op[31:26] rb[25:21]                     (release frame whose FP is R[rb])
//   STOP  : op[31:26]                               (end of poststore code)
package sdf_pkg;

  parameter int unsigned XLEN     = 32;   // data word width
  parameter int unsigned NREGS    = 32;   // registers per register set
  parameter int unsigned RIDX_W   = $clog2(NREGS);
  parameter int unsigned IP_W     = 16;   // instruction address width
  parameter int unsigned SC_W     = 5;    // synchronization count width
  parameter int unsigned FORK_CYCLES  = 4; // FORKEP / FORKSP latency
  parameter int unsigned ALLOC_CYCLES = 2; // FALLOC / FFREE latency

  parameter int unsigned DADDR_W = 16;  // frame-memory word address width (FP width)
  parameter int unsigned RS_W    = 4;   // register-set index width (up to 16 sets)

  // A continuation as it travels through the PLC, EXC and PSC queues.
  typedef struct packed {
    logic [DADDR_W-1:0] fp;
    logic [IP_W-1:0]    ip;
    logic [RS_W-1:0]    rs;
  } cont_t;

  // Register R1 of every register set receives the thread's frame pointer
  // (RFP) when preload starts. R0 always reads as zero.
  parameter logic [RIDX_W-1:0] RFP = RIDX_W'(1);

  typedef enum logic [5:0] {
    OP_NOP    = 6'h00,
    // EP arithmetic
    OP_ADD    = 6'h01,
    OP_SUB    = 6'h02,
    OP_MULT   = 6'h03,
    OP_DIV    = 6'h04,
    OP_AND    = 6'h05,
    OP_OR     = 6'h06,
    OP_XOR    = 6'h07,
    OP_SLT    = 6'h08,
    OP_SHL    = 6'h09,
    OP_SHR    = 6'h0A,
    OP_ADDI   = 6'h0B,
    OP_MOVI   = 6'h0C,
    OP_MOV    = 6'h0D,
    // EP control
    OP_BEQZ   = 6'h10,
    OP_BNEZ   = 6'h11,
    OP_JMP    = 6'h12,
    OP_FORKSP = 6'h13,
    // SP
    OP_LOAD   = 6'h20,
    OP_STORE  = 6'h21,
    OP_FALLOC = 6'h22,
    OP_FFREE  = 6'h23,
    OP_FORKEP = 6'h24,
    OP_STOP   = 6'h25
  } opcode_e;

  // ALU operation selected by the EP decoder.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_MUL, ALU_DIV, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SLT, ALU_SHL, ALU_SHR, ALU_PASSA, ALU_PASSB
  } alu_op_e;

  // Helpers for building instruction words (used by testbenches and programs).
  function automatic logic [31:0] enc_alu(opcode_e op, int rs, int rd1, int rd2 = 0,
                                          bit d2v = 1'b0, int imm = 0);
    return {op, 5'(rs), 5'(rd1), 5'(rd2), d2v, 10'(imm)};
  endfunction

  function automatic logic [31:0] enc_br(opcode_e op, int rs, int target);
    return {op, 5'(rs), 5'd0, 16'(target)};
  endfunction

  function automatic logic [31:0] enc_ldst(opcode_e op, int rb, int rv, int ro = 0,
                                           bit m = 1'b0, int imm = 0);
    return {op, 5'(rb), 5'(rv), 5'(ro), m, 10'(imm)};
  endfunction

  function automatic logic [31:0] enc_falloc(int rd, int sc, int ip);
    return {OP_FALLOC, 5'(rd), 5'(sc), 16'(ip)};
  endfunction

endpackage
