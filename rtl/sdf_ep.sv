// sdf_ep: Execution Pipeline (EP) of the SDF processor.
//
// The EP runs the body of one thread at a time using only its register set; it
// never touches data memory, so it has no cache-miss stalls. Four stages, as in
// the SDF description:
//   IF  fetch the instruction at PC (synchronous instruction memory),
//   DE  decode and read the source register pair RR(rs) = R[rs], R[rs+1],
//   EX  one-cycle arithmetic in sdf_alu,
//   WB  write the result to rd1 and, optionally, rd2 (two write ports).
// A thread starts when the EP is free and the EXC queue is not empty: the
// continuation's IP becomes PC and its register set is used by every stage.
// FORKSP ends the thread: fetch stops, and after FORK_CYCLES cycles (four, from
// the SDF description) the continuation <-, poststore IP, RS, -> is pushed into
// the PSC queue; if that queue is full the EP waits (fork stall).
//
// This design's own choices: the instruction encoding (sdf_pkg), a bypass from
// the EX and WB stages into DE so that any dependence distance gives the right
// value (the description leaves ordering to the compiler), and branches
// (BEQZ, BNEZ, JMP) resolved in DE without prediction, costing one bubble when
// taken.
module sdf_ep
  import sdf_pkg::*;
#(
  parameter int unsigned NUM_RS = 16,
  localparam int unsigned RW = $clog2(NUM_RS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // EXC queue
  input  logic              exc_valid,
  input  cont_t             exc_head,
  output logic              exc_pop,
  // instruction memory port
  output logic              if_en,
  output logic [IP_W-1:0]   if_addr,
  input  logic [31:0]       if_data,
  // register sets
  output logic [RW-1:0]     rf_rrs,
  output logic [RIDX_W-1:0] rf_ra,
  output logic [RIDX_W-1:0] rf_rb,
  input  logic [XLEN-1:0]   rf_da,
  input  logic [XLEN-1:0]   rf_db,
  output logic [RW-1:0]     rf_wrs,
  output logic              rf_we1,
  output logic [RIDX_W-1:0] rf_wa1,
  output logic [XLEN-1:0]   rf_wd1,
  output logic              rf_we2,
  output logic [RIDX_W-1:0] rf_wa2,
  output logic [XLEN-1:0]   rf_wd2,
  // PSC queue (FORKSP)
  output logic              forksp_valid,
  output cont_t             forksp_cont,
  input  logic              psc_full,
  // status and event counters
  output logic              busy,
  output logic [31:0]       cnt_instr,     // instructions written back
  output logic [31:0]       cnt_threads,   // threads handed to the PSC queue
  output logic [31:0]       cnt_bypass,    // operands taken from EX or WB
  output logic [31:0]       cnt_branch,    // taken branches (one bubble each)
  output logic [31:0]       cnt_fork_stall // cycles waiting for PSC space
);
  // ---------------- thread / fetch state ----------------
  logic            running;
  logic [IP_W-1:0] pc;
  logic [RW-1:0]   cur_rs;
  logic            fork_active;
  logic [1:0]      fork_cnt;
  logic [IP_W-1:0] fork_ip;

  // ---------------- DE stage ----------------
  logic            de_valid;
  logic [31:0]     ins;
  opcode_e         op;
  logic [4:0]      f_rs, f_rd1, f_rd2;
  logic            f_d2v;
  logic [XLEN-1:0] f_imm;
  logic [RIDX_W-1:0] src_b;

  assign ins   = if_data;
  assign op    = opcode_e'(ins[31:26]);
  assign f_rs  = ins[25:21];
  assign f_rd1 = ins[20:16];
  assign f_rd2 = ins[15:11];
  assign f_d2v = ins[10];
  assign f_imm = XLEN'($signed(ins[9:0]));
  assign src_b = f_rs + 1'b1;

  // ---------------- EX / WB stage registers ----------------
  logic              ex_valid, ex_we1, ex_we2;
  alu_op_e           ex_op;
  logic [XLEN-1:0]   ex_a, ex_b, ex_y;
  logic [RIDX_W-1:0] ex_rd1, ex_rd2;
  logic              wb_valid, wb_we1, wb_we2;
  logic [XLEN-1:0]   wb_y;
  logic [RIDX_W-1:0] wb_rd1, wb_rd2;

  sdf_alu u_alu (.op(ex_op), .a(ex_a), .b(ex_b), .y(ex_y));

  // register reads with bypass from EX (newest) and WB
  assign rf_rrs = cur_rs;
  assign rf_ra  = f_rs;
  assign rf_rb  = src_b;

  function automatic logic hit(logic v, logic we, logic [RIDX_W-1:0] d, logic [RIDX_W-1:0] s);
    return v && we && (d == s) && (s != '0);
  endfunction

  logic [XLEN-1:0] opa, opb;
  logic            byp_a, byp_b;
  always_comb begin
    opa = rf_da; byp_a = 1'b0;
    if (hit(wb_valid, wb_we1, wb_rd1, f_rs) || hit(wb_valid, wb_we2, wb_rd2, f_rs)) begin
      opa = wb_y; byp_a = 1'b1;
    end
    if (hit(ex_valid, ex_we1, ex_rd1, f_rs) || hit(ex_valid, ex_we2, ex_rd2, f_rs)) begin
      opa = ex_y; byp_a = 1'b1;
    end
    opb = rf_db; byp_b = 1'b0;
    if (hit(wb_valid, wb_we1, wb_rd1, src_b) || hit(wb_valid, wb_we2, wb_rd2, src_b)) begin
      opb = wb_y; byp_b = 1'b1;
    end
    if (hit(ex_valid, ex_we1, ex_rd1, src_b) || hit(ex_valid, ex_we2, ex_rd2, src_b)) begin
      opb = ex_y; byp_b = 1'b1;
    end
  end

  // decode
  logic    is_alu, uses_b, taken, is_fork;
  alu_op_e dec_op;
  logic [XLEN-1:0] dec_b;
  always_comb begin
    is_alu = 1'b1;
    uses_b = 1'b1;
    dec_op = ALU_ADD;
    dec_b  = opb;
    unique case (op)
      OP_ADD:  dec_op = ALU_ADD;
      OP_SUB:  dec_op = ALU_SUB;
      OP_MULT: dec_op = ALU_MUL;
      OP_DIV:  dec_op = ALU_DIV;
      OP_AND:  dec_op = ALU_AND;
      OP_OR:   dec_op = ALU_OR;
      OP_XOR:  dec_op = ALU_XOR;
      OP_SLT:  dec_op = ALU_SLT;
      OP_SHL:  dec_op = ALU_SHL;
      OP_SHR:  dec_op = ALU_SHR;
      OP_ADDI: begin dec_op = ALU_ADD;   dec_b = f_imm; uses_b = 1'b0; end
      OP_MOVI: begin dec_op = ALU_PASSB; dec_b = f_imm; uses_b = 1'b0; end
      OP_MOV:  begin dec_op = ALU_PASSA; uses_b = 1'b0; end
      default: begin is_alu = 1'b0; uses_b = 1'b0; end
    endcase
    taken   = de_valid && ((op == OP_JMP) || (op == OP_BEQZ && opa == '0)
                                           || (op == OP_BNEZ && opa != '0));
    is_fork = de_valid && (op == OP_FORKSP);
  end

  // ---------------- fetch / thread control ----------------
  logic start;
  assign start   = !running && !fork_active && exc_valid;
  assign exc_pop = start;

  always_comb begin
    if_en   = 1'b0;
    if_addr = pc;
    if (start) begin
      if_en   = 1'b1;
      if_addr = exc_head.ip;
    end else if (running && !is_fork) begin
      if_en   = 1'b1;
      if_addr = pc;
    end
  end

  assign forksp_valid   = fork_active && (fork_cnt == 0) && !psc_full;
  assign forksp_cont.fp = '0;
  assign forksp_cont.ip = fork_ip;
  assign forksp_cont.rs = RS_W'(cur_rs);
  assign busy           = running || fork_active || de_valid || ex_valid || wb_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      pc          <= '0;
      cur_rs      <= '0;
      fork_active <= 1'b0;
      fork_cnt    <= '0;
      fork_ip     <= '0;
      de_valid    <= 1'b0;
    end else begin
      // IF -> DE: the fetched word is valid unless a taken branch or FORKSP
      // in DE squashes it.
      de_valid <= if_en && !taken && !is_fork;
      if (start) begin
        running <= 1'b1;
        cur_rs  <= RW'(exc_head.rs);
        pc      <= exc_head.ip + 1'b1;
      end else if (is_fork) begin
        running     <= 1'b0;
        fork_active <= 1'b1;
        fork_cnt    <= 2'(FORK_CYCLES - 2);
        fork_ip     <= ins[IP_W-1:0];
      end else if (taken) begin
        pc <= ins[IP_W-1:0];
      end else if (running) begin
        pc <= pc + 1'b1;
      end
      if (fork_active) begin
        if (fork_cnt != 0)  fork_cnt <= fork_cnt - 1'b1;
        else if (!psc_full) fork_active <= 1'b0;
      end
    end
  end

  // ---------------- DE -> EX -> WB ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid <= 1'b0; ex_we1 <= 1'b0; ex_we2 <= 1'b0;
      ex_op <= ALU_ADD; ex_a <= '0; ex_b <= '0; ex_rd1 <= '0; ex_rd2 <= '0;
      wb_valid <= 1'b0; wb_we1 <= 1'b0; wb_we2 <= 1'b0;
      wb_y <= '0; wb_rd1 <= '0; wb_rd2 <= '0;
    end else begin
      ex_valid <= de_valid && is_alu;
      ex_op    <= dec_op;
      ex_a     <= opa;
      ex_b     <= dec_b;
      ex_rd1   <= f_rd1;
      ex_rd2   <= f_rd2;
      ex_we1   <= (f_rd1 != '0);
      ex_we2   <= f_d2v && (f_rd2 != '0) && (f_rd2 != f_rd1);
      wb_valid <= ex_valid;
      wb_y     <= ex_y;
      wb_rd1   <= ex_rd1;
      wb_rd2   <= ex_rd2;
      wb_we1   <= ex_we1;
      wb_we2   <= ex_we2;
    end
  end

  assign rf_wrs = cur_rs;
  assign rf_we1 = wb_valid && wb_we1;
  assign rf_wa1 = wb_rd1;
  assign rf_wd1 = wb_y;
  assign rf_we2 = wb_valid && wb_we2;
  assign rf_wa2 = wb_rd2;
  assign rf_wd2 = wb_y;

  // ---------------- event counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_instr <= '0; cnt_threads <= '0; cnt_bypass <= '0;
      cnt_branch <= '0; cnt_fork_stall <= '0;
    end else begin
      if (wb_valid) cnt_instr <= cnt_instr + 1;
      if (forksp_valid) cnt_threads <= cnt_threads + 1;
      if (de_valid && is_alu && (byp_a || (uses_b && byp_b))) cnt_bypass <= cnt_bypass + 1;
      if (taken) cnt_branch <= cnt_branch + 1;
      if (fork_active && fork_cnt == 0 && psc_full) cnt_fork_stall <= cnt_fork_stall + 1;
    end
  end

  // The register set must not change while an instruction of the previous
  // thread is still in flight.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !(ex_valid || wb_valid))
    else $error("sdf_ep: new thread started before the pipeline drained");
endmodule
