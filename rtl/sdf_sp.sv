// sdf_sp: Synchronization Pipeline (SP) of the SDF processor.
//
// The SP runs the memory side of every thread: the preload code that copies a
// thread's inputs from its frame into its register set, and the poststore code
// that stores its results into the frames of consumer threads. Five stages, as
// in the SDF description:
//   IF   fetch at PC,
//   DE   decode and read the base, offset and store-value registers,
//   EA   effective address = R[base] + (R[offset] or immediate)  ("Rfp|off"),
//   MEM  frame-memory access; STORE also decrements the consumer's
//        synchronization count in the Scheduling Unit; FALLOC and FFREE
//        spend ALLOC_CYCLES (two) cycles here,
//   WB   LOAD data or the FALLOC frame pointer into the register set.
// When free, the SP takes a poststore continuation (PSC) before a preload one
// (PLC). On a preload start the thread's frame pointer is written into R1
// (RFP). FORKEP ends a preload and, FORK_CYCLES (four) cycles later, pushes
// <-, IP, RS, -> into the EXC queue; STOP ends a poststore and, after the same
// drain, returns the register set. The drain also waits until the EA and MEM
// stages are empty.
//
// Hazards: a source register written by a LOAD or FALLOC still in EA or MEM
// stalls DE (interlock); one in WB is bypassed. The SDF description leaves
// these to compile-time ordering; the interlock, the PSC-first priority, STOP,
// the RFP convention and the encoding are this design's own.
module sdf_sp
  import sdf_pkg::*;
#(
  parameter int unsigned NUM_RS = 16,
  parameter int unsigned MEM_AW = 12,
  localparam int unsigned RW = $clog2(NUM_RS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // continuation queues
  input  logic               plc_valid,
  input  cont_t              plc_head,
  output logic               plc_pop,
  input  logic               psc_valid,
  input  cont_t              psc_head,
  output logic               psc_pop,
  output logic               forkep_valid,
  output cont_t              forkep_cont,
  input  logic               exc_full,
  // instruction memory port
  output logic               if_en,
  output logic [IP_W-1:0]    if_addr,
  input  logic [31:0]        if_data,
  // register sets
  output logic [RW-1:0]      rf_rrs,
  output logic [RIDX_W-1:0]  rf_ra,
  output logic [RIDX_W-1:0]  rf_rb,
  output logic [RIDX_W-1:0]  rf_rc,
  input  logic [XLEN-1:0]    rf_da,
  input  logic [XLEN-1:0]    rf_db,
  input  logic [XLEN-1:0]    rf_dc,
  output logic [RW-1:0]      rf_wrs,
  output logic               rf_we,
  output logic [RIDX_W-1:0]  rf_wa,
  output logic [XLEN-1:0]    rf_wd,
  // frame memory
  output logic               dm_en,
  output logic               dm_we,
  output logic [MEM_AW-1:0]  dm_addr,
  output logic [XLEN-1:0]    dm_wdata,
  input  logic [XLEN-1:0]    dm_rdata,
  // Scheduling Unit
  output logic               falloc_req,
  output logic [IP_W-1:0]    falloc_ip,
  output logic [SC_W-1:0]    falloc_sc,
  input  logic               falloc_gnt,
  input  logic [DADDR_W-1:0] falloc_fp,
  output logic               ffree,
  output logic [DADDR_W-1:0] ffree_fp,
  output logic               sync,
  output logic [DADDR_W-1:0] sync_addr,
  output logic               stop,
  output logic [RW-1:0]      stop_rs,
  // status and event counters
  output logic               busy,
  output logic [31:0]        cnt_instr,      // instructions leaving MEM
  output logic [31:0]        cnt_preloads,   // threads handed to the EXC queue
  output logic [31:0]        cnt_poststores, // threads terminated (STOP)
  output logic [31:0]        cnt_hazard,     // cycles DE stalled on a load
  output logic [31:0]        cnt_bypass,     // operands taken from WB
  output logic [31:0]        cnt_alloc_wait  // extra cycles spent in FALLOC/FFREE
);
  typedef enum logic [2:0] {K_NONE, K_LOAD, K_STORE, K_FALLOC, K_FFREE} kind_e;

  // ---------------- thread state ----------------
  logic            running, drain, drain_is_fork;
  logic [1:0]      drain_cnt;
  logic [IP_W-1:0] pc, drain_ip;
  logic [RW-1:0]   cur_rs;

  // ---------------- DE ----------------
  logic              de_valid;
  opcode_e           op;
  logic [RIDX_W-1:0] f_rb, f_rv, f_ro;
  logic              f_m;
  logic [XLEN-1:0]   f_imm;
  assign op    = opcode_e'(if_data[31:26]);
  assign f_rb  = if_data[25:21];
  assign f_rv  = if_data[20:16];
  assign f_ro  = if_data[15:11];
  assign f_m   = if_data[10];
  assign f_imm = XLEN'($signed(if_data[9:0]));

  kind_e d_kind;
  logic  use_rb, use_ro, use_rv, d_we, d_fork, d_stop;
  logic [RIDX_W-1:0] d_dst;
  always_comb begin
    d_kind = K_NONE; use_rb = 1'b0; use_ro = 1'b0; use_rv = 1'b0;
    d_we = 1'b0; d_dst = f_rv; d_fork = 1'b0; d_stop = 1'b0;
    unique case (op)
      OP_LOAD:   begin d_kind = K_LOAD;   use_rb = 1'b1; use_ro = f_m; d_we = (f_rv != '0); end
      OP_STORE:  begin d_kind = K_STORE;  use_rb = 1'b1; use_ro = f_m; use_rv = 1'b1; end
      OP_FALLOC: begin d_kind = K_FALLOC; d_dst = f_rb; d_we = (f_rb != '0); end
      OP_FFREE:  begin d_kind = K_FFREE;  use_rb = 1'b1; end
      OP_FORKEP: d_fork = 1'b1;
      OP_STOP:   d_stop = 1'b1;
      default:   ;
    endcase
  end

  // ---------------- EA / MEM / WB registers ----------------
  kind_e             ea_kind, mem_kind;
  logic              ea_valid, mem_valid, wb_valid;
  logic              ea_we, mem_we, wb_we;
  logic [RIDX_W-1:0] ea_dst, mem_dst, wb_dst;
  logic [XLEN-1:0]   ea_base, ea_off, ea_val, mem_val;
  logic [XLEN-1:0]   mem_addr;
  logic [31:0]       ea_ins, mem_ins;
  logic              wb_from_mem;
  logic [XLEN-1:0]   wb_fp;

  // register reads with WB bypass
  assign rf_rrs = cur_rs;
  assign rf_ra  = f_rb;
  assign rf_rb  = f_ro;
  assign rf_rc  = f_rv;

  function automatic logic wb_hit(logic [RIDX_W-1:0] s);
    return wb_valid && wb_we && (wb_dst == s) && (s != '0);
  endfunction

  logic [XLEN-1:0] wb_data;
  assign wb_data = wb_from_mem ? dm_rdata : wb_fp;

  logic [XLEN-1:0] v_rb, v_ro, v_rv;
  assign v_rb = wb_hit(f_rb) ? wb_data : rf_da;
  assign v_ro = wb_hit(f_ro) ? wb_data : rf_db;
  assign v_rv = wb_hit(f_rv) ? wb_data : rf_dc;

  // interlock on a load / falloc result not yet in WB
  function automatic logic pend(logic [RIDX_W-1:0] s);
    return (ea_valid && ea_we && ea_dst == s) || (mem_valid && mem_we && mem_dst == s);
  endfunction
  logic hz;
  assign hz = de_valid && ((use_rb && pend(f_rb)) || (use_ro && pend(f_ro))
                        || (use_rv && pend(f_rv)));

  // MEM stage: FALLOC / FFREE occupy ALLOC_CYCLES cycles, FALLOC also waits for a frame
  logic mem_first, mem_busy, mem_stall;
  assign mem_busy  = mem_valid && (mem_kind == K_FALLOC || mem_kind == K_FFREE);
  assign mem_stall = mem_busy && (mem_first || (mem_kind == K_FALLOC && !falloc_gnt));

  logic de_go, do_fork, do_stop;
  assign de_go   = de_valid && !hz && !mem_stall;
  assign do_fork = de_go && d_fork;
  assign do_stop = de_go && d_stop;

  // ---------------- fetch / thread control ----------------
  logic start, start_psc, start_plc;
  assign start     = !running && !drain && (psc_valid || plc_valid);
  assign start_psc = start && psc_valid;
  assign start_plc = start && !psc_valid;
  assign psc_pop   = start_psc;
  assign plc_pop   = start_plc;

  cont_t sc_head;
  assign sc_head = start_psc ? psc_head : plc_head;

  logic pipe_busy;  // a FALLOC waiting for a frame can stretch the drain
  assign pipe_busy = ea_valid || mem_valid;

  logic hold;  // DE cannot accept a new word
  assign hold = de_valid && (hz || mem_stall);

  always_comb begin
    if_en   = 1'b0;
    if_addr = pc;
    if (start) begin
      if_en   = 1'b1;
      if_addr = sc_head.ip;
    end else if (running && !hold && !do_fork && !do_stop) begin
      if_en = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0; drain <= 1'b0; drain_is_fork <= 1'b0; drain_cnt <= '0;
      pc <= '0; drain_ip <= '0; cur_rs <= '0; de_valid <= 1'b0;
    end else begin
      if (!hold) de_valid <= if_en;
      if (start) begin
        running <= 1'b1;
        cur_rs  <= RW'(sc_head.rs);
        pc      <= sc_head.ip + 1'b1;
      end else if (do_fork || do_stop) begin
        running       <= 1'b0;
        de_valid      <= 1'b0;
        drain         <= 1'b1;
        drain_is_fork <= do_fork;
        drain_cnt     <= 2'(FORK_CYCLES - 2);
        drain_ip      <= if_data[IP_W-1:0];
      end else if (if_en) begin
        pc <= pc + 1'b1;
      end
      if (drain) begin
        if (drain_cnt != 0) drain_cnt <= drain_cnt - 1'b1;
        else if (!(drain_is_fork && exc_full) && !pipe_busy) drain <= 1'b0;
      end
    end
  end

  assign forkep_valid   = drain && drain_is_fork && drain_cnt == 0 && !exc_full && !pipe_busy;
  assign forkep_cont.fp = '0;
  assign forkep_cont.ip = drain_ip;
  assign forkep_cont.rs = RS_W'(cur_rs);
  assign stop           = drain && !drain_is_fork && drain_cnt == 0 && !pipe_busy;
  assign stop_rs        = cur_rs;

  // ---------------- pipeline registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ea_valid <= 1'b0; ea_kind <= K_NONE; ea_we <= 1'b0; ea_dst <= '0;
      ea_base <= '0; ea_off <= '0; ea_val <= '0; ea_ins <= '0;
      mem_valid <= 1'b0; mem_kind <= K_NONE; mem_we <= 1'b0; mem_dst <= '0;
      mem_val <= '0; mem_addr <= '0; mem_ins <= '0; mem_first <= 1'b0;
      wb_valid <= 1'b0; wb_we <= 1'b0; wb_dst <= '0; wb_from_mem <= 1'b0; wb_fp <= '0;
    end else begin
      if (!mem_stall) begin
        // DE -> EA
        ea_valid <= de_go && (d_kind != K_NONE);
        ea_kind  <= d_kind;
        ea_we    <= d_we;
        ea_dst   <= d_dst;
        ea_base  <= v_rb;
        ea_off   <= f_m ? v_ro : f_imm;
        ea_val   <= v_rv;
        ea_ins   <= if_data;
        // EA -> MEM
        mem_valid <= ea_valid;
        mem_kind  <= ea_kind;
        mem_we    <= ea_we;
        mem_dst   <= ea_dst;
        mem_val   <= ea_val;
        mem_addr  <= ea_base + ea_off;
        mem_ins   <= ea_ins;
        mem_first <= ea_valid && (ea_kind == K_FALLOC || ea_kind == K_FFREE);
      end else begin
        mem_first <= 1'b0;
      end
      // MEM -> WB
      wb_valid    <= mem_valid && !mem_stall;
      wb_we       <= mem_we;
      wb_dst      <= mem_dst;
      wb_from_mem <= (mem_kind == K_LOAD);
      wb_fp       <= XLEN'(falloc_fp);
    end
  end

  // MEM-stage actions
  assign dm_en     = mem_valid && (mem_kind == K_LOAD || mem_kind == K_STORE);
  assign dm_we     = mem_valid && (mem_kind == K_STORE);
  assign dm_addr   = MEM_AW'(mem_addr);
  assign dm_wdata  = mem_val;
  assign sync      = dm_we;
  assign sync_addr = DADDR_W'(mem_addr);
  assign falloc_req = mem_valid && mem_kind == K_FALLOC && !mem_first;
  assign falloc_ip  = mem_ins[IP_W-1:0];
  assign falloc_sc  = mem_ins[20:16];
  assign ffree      = mem_valid && mem_kind == K_FFREE && !mem_first;
  assign ffree_fp   = DADDR_W'(mem_addr);  // R[rb] + 0

  // write-back; a preload start writes the frame pointer into RFP
  assign rf_wrs = start_plc ? RW'(plc_head.rs) : cur_rs;
  always_comb begin
    rf_we = 1'b0; rf_wa = wb_dst; rf_wd = wb_data;
    if (start_plc) begin
      rf_we = 1'b1; rf_wa = RFP; rf_wd = XLEN'(plc_head.fp);
    end else if (wb_valid && wb_we) begin
      rf_we = 1'b1;
    end
  end

  assign busy = running || drain || de_valid || ea_valid || mem_valid || wb_valid;

  // ---------------- event counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_instr <= '0; cnt_preloads <= '0; cnt_poststores <= '0;
      cnt_hazard <= '0; cnt_bypass <= '0; cnt_alloc_wait <= '0;
    end else begin
      if (mem_valid && !mem_stall) cnt_instr <= cnt_instr + 1;
      if (forkep_valid) cnt_preloads <= cnt_preloads + 1;
      if (stop) cnt_poststores <= cnt_poststores + 1;
      if (hz && !mem_stall) cnt_hazard <= cnt_hazard + 1;
      if (de_go && ((use_rb && wb_hit(f_rb)) || (use_ro && wb_hit(f_ro))
                 || (use_rv && wb_hit(f_rv)))) cnt_bypass <= cnt_bypass + 1;
      if (mem_stall) cnt_alloc_wait <= cnt_alloc_wait + 1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !(ea_valid || mem_valid || wb_valid))
    else $error("sdf_sp: new thread started before the pipeline drained");
endmodule
