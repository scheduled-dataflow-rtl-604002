// sdf_top: Scheduled Dataflow (SDF) processor, one SP and one EP.
//
// SDF executes a program as nonblocking threads whose instructions keep the
// dataflow property that every result is written into registers reserved for
// its consumer instructions, yet are issued in a compile-time order, so no
// dynamic scheduling hardware is needed. Memory access is decoupled from
// execution: the Synchronization Pipeline (sdf_sp) preloads a thread's inputs
// from its frame into a register set, the Execution Pipeline (sdf_ep) computes
// on registers only, and the SP then poststores the results into the frames of
// consumer threads. The Scheduling Unit (sdf_su) moves the thread
// continuations WTC -> PLC -> EXC -> PSC between them and manages frames and
// register sets. Both pipelines fetch from one dual-ported instruction memory
// (sdf_imem) and share the register sets (sdf_regsets); only the SP reaches the
// frame memory (sdf_frame_mem).
//
// Host interface (this design's own): a program is loaded through imem_we; the
// host creates threads with host_falloc_req (granted with the frame pointer on
// falloc_fp), places inputs with the frame-memory port, and counts them against
// a thread's synchronization count with host_sync; host_falloc_req and
// host_sync are taken only when host_ready is high. idle is high when no
// thread is queued, preloading, executing or poststoring.
// The sizes below are this design's own: the SDF description gives none.
module sdf_top
  import sdf_pkg::*;
#(
  parameter int unsigned NUM_RS      = 16,
  parameter int unsigned NUM_FRAMES  = 256,
  parameter int unsigned FRAME_WORDS = 16,
  parameter int unsigned IMEM_DEPTH  = 1024,
  parameter int unsigned QDEPTH      = 8,
  localparam int unsigned IAW = $clog2(IMEM_DEPTH),
  localparam int unsigned MAW = $clog2(NUM_FRAMES * FRAME_WORDS),
  localparam int unsigned RW  = $clog2(NUM_RS),
  localparam int unsigned FIW = $clog2(NUM_FRAMES)
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load
  input  logic               imem_we,
  input  logic [IAW-1:0]     imem_waddr,
  input  logic [31:0]        imem_wdata,
  // host access to the frame memory
  input  logic               host_mem_en,
  input  logic               host_mem_we,
  input  logic [MAW-1:0]     host_mem_addr,
  input  logic [XLEN-1:0]    host_mem_wdata,
  output logic [XLEN-1:0]    host_mem_rdata,
  // host thread creation and synchronization
  output logic               host_ready,
  input  logic               host_falloc_req,
  input  logic [IP_W-1:0]    host_falloc_ip,
  input  logic [SC_W-1:0]    host_falloc_sc,
  output logic               host_falloc_gnt,
  output logic [DADDR_W-1:0] falloc_fp,
  input  logic               host_sync,
  input  logic [DADDR_W-1:0] host_sync_addr,
  // status
  output logic               idle,
  output logic [FIW:0]       frames_free,
  output logic [RW:0]        rs_free,
  output logic               rs_wait,
  output logic [31:0]        ep_instr,
  output logic [31:0]        ep_threads,
  output logic [31:0]        ep_bypass,
  output logic [31:0]        ep_branch,
  output logic [31:0]        ep_fork_stall,
  output logic [31:0]        sp_instr,
  output logic [31:0]        sp_preloads,
  output logic [31:0]        sp_poststores,
  output logic [31:0]        sp_hazard,
  output logic [31:0]        sp_bypass,
  output logic [31:0]        sp_alloc_wait
);
  // SU <-> pipelines
  logic  plc_valid, plc_pop, psc_valid, psc_pop, exc_valid, exc_pop;
  cont_t plc_head, psc_head, exc_head, forkep_cont, forksp_cont;
  logic  forkep_valid, forksp_valid, exc_full, psc_full;
  logic  sp_falloc_req, sp_falloc_gnt, sp_ffree, sp_sync, sp_stop;
  logic [IP_W-1:0]    sp_falloc_ip;
  logic [SC_W-1:0]    sp_falloc_sc;
  logic [DADDR_W-1:0] sp_ffree_fp, sp_sync_addr;
  logic [RW-1:0]      sp_stop_rs;
  logic               su_idle, ep_busy, sp_busy;

  sdf_su #(.NUM_FRAMES(NUM_FRAMES), .FRAME_WORDS(FRAME_WORDS), .NUM_RS(NUM_RS),
           .QDEPTH(QDEPTH)) u_su (
    .clk, .rst_n,
    .sp_falloc_req, .sp_falloc_ip, .sp_falloc_sc, .sp_falloc_gnt, .falloc_fp,
    .sp_ffree, .sp_ffree_fp, .sp_sync, .sp_sync_addr, .sp_stop, .sp_stop_rs,
    .plc_valid, .plc_head, .plc_pop, .psc_valid, .psc_head, .psc_pop,
    .forkep_valid, .forkep_cont, .exc_full,
    .exc_valid, .exc_head, .exc_pop,
    .forksp_valid, .forksp_cont, .psc_full,
    .host_ready, .host_falloc_req, .host_falloc_ip, .host_falloc_sc, .host_falloc_gnt,
    .host_sync, .host_sync_addr,
    .frames_free, .rs_free, .idle(su_idle), .rs_wait
  );

  // instruction memory
  logic            ep_if_en, sp_if_en;
  logic [IP_W-1:0] ep_if_addr, sp_if_addr;
  logic [31:0]     ep_if_data, sp_if_data;

  sdf_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .ep_en(ep_if_en), .ep_addr(IAW'(ep_if_addr)), .ep_data(ep_if_data),
    .sp_en(sp_if_en), .sp_addr(IAW'(sp_if_addr)), .sp_data(sp_if_data),
    .wr_en(imem_we), .wr_addr(imem_waddr), .wr_data(imem_wdata)
  );

  // register sets
  logic [RW-1:0]     ep_rrs, ep_wrs, sp_rrs, sp_wrs;
  logic [RIDX_W-1:0] ep_ra, ep_rb, ep_wa1, ep_wa2, sp_ra, sp_rb, sp_rc, sp_wa;
  logic [XLEN-1:0]   ep_da, ep_db, ep_wd1, ep_wd2, sp_da, sp_db, sp_dc, sp_wd;
  logic              ep_we1, ep_we2, sp_we;

  sdf_regsets #(.NUM_RS(NUM_RS)) u_rf (
    .clk,
    .ep_rrs, .ep_ra, .ep_rb, .ep_da, .ep_db,
    .ep_wrs, .ep_we1, .ep_wa1, .ep_wd1, .ep_we2, .ep_wa2, .ep_wd2,
    .sp_rrs, .sp_ra, .sp_rb, .sp_rc, .sp_da, .sp_db, .sp_dc,
    .sp_wrs, .sp_we, .sp_wa, .sp_wd
  );

  // frame memory
  logic            dm_en, dm_we;
  logic [MAW-1:0]  dm_addr;
  logic [XLEN-1:0] dm_wdata, dm_rdata;

  sdf_frame_mem #(.NUM_FRAMES(NUM_FRAMES), .FRAME_WORDS(FRAME_WORDS)) u_fm (
    .clk,
    .a_en(dm_en), .a_we(dm_we), .a_addr(dm_addr), .a_wdata(dm_wdata), .a_rdata(dm_rdata),
    .b_en(host_mem_en), .b_we(host_mem_we), .b_addr(host_mem_addr),
    .b_wdata(host_mem_wdata), .b_rdata(host_mem_rdata)
  );

  sdf_sp #(.NUM_RS(NUM_RS), .MEM_AW(MAW)) u_sp (
    .clk, .rst_n,
    .plc_valid, .plc_head, .plc_pop, .psc_valid, .psc_head, .psc_pop,
    .forkep_valid, .forkep_cont, .exc_full,
    .if_en(sp_if_en), .if_addr(sp_if_addr), .if_data(sp_if_data),
    .rf_rrs(sp_rrs), .rf_ra(sp_ra), .rf_rb(sp_rb), .rf_rc(sp_rc),
    .rf_da(sp_da), .rf_db(sp_db), .rf_dc(sp_dc),
    .rf_wrs(sp_wrs), .rf_we(sp_we), .rf_wa(sp_wa), .rf_wd(sp_wd),
    .dm_en, .dm_we, .dm_addr, .dm_wdata, .dm_rdata,
    .falloc_req(sp_falloc_req), .falloc_ip(sp_falloc_ip), .falloc_sc(sp_falloc_sc),
    .falloc_gnt(sp_falloc_gnt), .falloc_fp,
    .ffree(sp_ffree), .ffree_fp(sp_ffree_fp), .sync(sp_sync), .sync_addr(sp_sync_addr),
    .stop(sp_stop), .stop_rs(sp_stop_rs),
    .busy(sp_busy), .cnt_instr(sp_instr), .cnt_preloads(sp_preloads),
    .cnt_poststores(sp_poststores), .cnt_hazard(sp_hazard), .cnt_bypass(sp_bypass),
    .cnt_alloc_wait(sp_alloc_wait)
  );

  sdf_ep #(.NUM_RS(NUM_RS)) u_ep (
    .clk, .rst_n,
    .exc_valid, .exc_head, .exc_pop,
    .if_en(ep_if_en), .if_addr(ep_if_addr), .if_data(ep_if_data),
    .rf_rrs(ep_rrs), .rf_ra(ep_ra), .rf_rb(ep_rb), .rf_da(ep_da), .rf_db(ep_db),
    .rf_wrs(ep_wrs), .rf_we1(ep_we1), .rf_wa1(ep_wa1), .rf_wd1(ep_wd1),
    .rf_we2(ep_we2), .rf_wa2(ep_wa2), .rf_wd2(ep_wd2),
    .forksp_valid, .forksp_cont, .psc_full,
    .busy(ep_busy), .cnt_instr(ep_instr), .cnt_threads(ep_threads),
    .cnt_bypass(ep_bypass), .cnt_branch(ep_branch), .cnt_fork_stall(ep_fork_stall)
  );

  assign idle = su_idle && !ep_busy && !sp_busy;
endmodule
