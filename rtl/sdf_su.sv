// sdf_su: Scheduling Unit (SU) of the SDF processor.
//
// The SU moves thread continuations through their four states:
//   WTC <FP,IP,-,SC>  waiting: created by FALLOC, holding a frame and a count
//                     of inputs still missing;
//   PLC <FP,IP,RS,->  count reached zero, register set assigned, queued for
//                     preload on the Synchronization Pipeline (SP);
//   EXC <-,IP,RS,->   preloaded (FORKEP), queued for the Execution Pipeline (EP);
//   PSC <-,IP,RS,->   executed (FORKSP), queued for poststore on the SP.
// FALLOC pops a free frame index from the frame stack and records IP and SC of
// the new thread in a per-frame waiting table. Every STORE the SP performs into
// a frame decrements that frame's count; when the count reaches zero the thread
// is enabled. An enabled thread gets a register set from the circular ring of
// free sets and enters the PLC queue. FFREE pushes a frame back on the stack and
// STOP (end of poststore) returns the register set to the ring.
// This follows the SDF description; the waiting table, the queue of enabled
// threads waiting for a register set, the host ports and the STOP instruction
// are this design's own means to that end.
//
// Timing: FALLOC grants (sp_falloc_gnt) in the cycle of the request when a
// frame is free; counts, frees and queue pushes take effect at the next edge. A
// thread whose count hits zero reaches the PLC queue two cycles later at the
// earliest. Host requests are accepted only in cycles where the SP makes none
// (host_ready).
module sdf_su
  import sdf_pkg::*;
#(
  parameter int unsigned NUM_FRAMES  = 256,
  parameter int unsigned FRAME_WORDS = 16,
  parameter int unsigned NUM_RS      = 16,
  parameter int unsigned QDEPTH      = 8,
  localparam int unsigned FIW = $clog2(NUM_FRAMES),
  localparam int unsigned RW  = $clog2(NUM_RS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // FALLOC from the SP
  input  logic               sp_falloc_req,
  input  logic [IP_W-1:0]    sp_falloc_ip,
  input  logic [SC_W-1:0]    sp_falloc_sc,
  output logic               sp_falloc_gnt,
  output logic [DADDR_W-1:0] falloc_fp,
  // FFREE from the SP
  input  logic               sp_ffree,
  input  logic [DADDR_W-1:0] sp_ffree_fp,
  // synchronization-count decrement from an SP STORE
  input  logic               sp_sync,
  input  logic [DADDR_W-1:0] sp_sync_addr,
  // end of poststore: release the register set
  input  logic               sp_stop,
  input  logic [RW-1:0]      sp_stop_rs,
  // SP takes continuations
  output logic               plc_valid,
  output cont_t              plc_head,
  input  logic               plc_pop,
  output logic               psc_valid,
  output cont_t              psc_head,
  input  logic               psc_pop,
  // FORKEP from the SP
  input  logic               forkep_valid,
  input  cont_t              forkep_cont,
  output logic               exc_full,
  // EP takes continuations
  output logic               exc_valid,
  output cont_t              exc_head,
  input  logic               exc_pop,
  // FORKSP from the EP
  input  logic               forksp_valid,
  input  cont_t              forksp_cont,
  output logic               psc_full,
  // host: thread creation and frame stores
  output logic               host_ready,
  input  logic               host_falloc_req,
  input  logic [IP_W-1:0]    host_falloc_ip,
  input  logic [SC_W-1:0]    host_falloc_sc,
  output logic               host_falloc_gnt,
  input  logic               host_sync,
  input  logic [DADDR_W-1:0] host_sync_addr,
  // status
  output logic [FIW:0]       frames_free,
  output logic [RW:0]        rs_free,
  output logic               idle,
  output logic               rs_wait        // an enabled thread waits for a register set
);
  localparam int unsigned FSH = $clog2(FRAME_WORDS);

  // ---- waiting-continuation table, one entry per frame ----
  logic            alive [NUM_FRAMES];
  logic [IP_W-1:0] w_ip  [NUM_FRAMES];
  logic [SC_W-1:0] w_sc  [NUM_FRAMES];

  // ---- frame stack ----
  logic           fs_pop, fs_push, fs_empty, fs_full;
  logic [FIW-1:0] fs_top, fs_push_idx;

  sdf_frame_stack #(.NUM_FRAMES(NUM_FRAMES)) u_fstack (
    .clk, .rst_n, .pop(fs_pop), .push(fs_push), .push_idx(fs_push_idx),
    .top(fs_top), .empty(fs_empty), .full(fs_full), .free_count(frames_free)
  );

  // ---- register-set ring ----
  logic          rr_alloc, rr_avail;
  logic [RW-1:0] rr_head;

  sdf_rs_ring #(.NUM_RS(NUM_RS)) u_ring (
    .clk, .rst_n, .alloc(rr_alloc), .release_en(sp_stop), .release_rs(sp_stop_rs),
    .head(rr_head), .avail(rr_avail), .free_count(rs_free)
  );

  // ---- queues ----
  // rdy: enabled threads waiting for a register set (can hold every frame).
  cont_t rdy_din, rdy_head, plc_din;
  logic  rdy_push, rdy_pop, rdy_empty, rdy_full;
  logic  plc_push, plc_full, plc_empty, psc_empty, exc_empty;
  logic [$clog2(NUM_FRAMES+1)-1:0] rdy_cnt;
  logic [$clog2(QDEPTH+1)-1:0]     plc_cnt, exc_cnt, psc_cnt;

  sdf_cont_fifo #(.DEPTH(NUM_FRAMES)) u_rdy (
    .clk, .rst_n, .push(rdy_push), .din(rdy_din), .pop(rdy_pop), .dout(rdy_head),
    .full(rdy_full), .empty(rdy_empty), .count(rdy_cnt)
  );
  sdf_cont_fifo #(.DEPTH(QDEPTH)) u_plc (
    .clk, .rst_n, .push(plc_push), .din(plc_din), .pop(plc_pop), .dout(plc_head),
    .full(plc_full), .empty(plc_empty), .count(plc_cnt)
  );
  sdf_cont_fifo #(.DEPTH(QDEPTH)) u_exc (
    .clk, .rst_n, .push(forkep_valid), .din(forkep_cont), .pop(exc_pop), .dout(exc_head),
    .full(exc_full), .empty(exc_empty), .count(exc_cnt)
  );
  sdf_cont_fifo #(.DEPTH(QDEPTH)) u_psc (
    .clk, .rst_n, .push(forksp_valid), .din(forksp_cont), .pop(psc_pop), .dout(psc_head),
    .full(psc_full), .empty(psc_empty), .count(psc_cnt)
  );

  assign plc_valid = !plc_empty;
  assign exc_valid = !exc_empty;
  assign psc_valid = !psc_empty;

  // ---- FALLOC (SP has priority over the host) ----
  assign host_ready      = !sp_falloc_req && !sp_sync;
  assign sp_falloc_gnt   = sp_falloc_req && !fs_empty;
  assign host_falloc_gnt = host_falloc_req && host_ready && !fs_empty;
  assign fs_pop          = sp_falloc_gnt || host_falloc_gnt;
  assign falloc_fp       = DADDR_W'(fs_top) << FSH;

  logic [IP_W-1:0] new_ip;
  logic [SC_W-1:0] new_sc;
  assign new_ip = sp_falloc_req ? sp_falloc_ip : host_falloc_ip;
  assign new_sc = sp_falloc_req ? sp_falloc_sc : host_falloc_sc;

  // ---- FFREE ----
  assign fs_push     = sp_ffree;
  assign fs_push_idx = FIW'(sp_ffree_fp >> FSH);

  // ---- synchronization ----
  logic           sync_v;
  logic [FIW-1:0] sync_f;
  assign sync_v = sp_sync || (host_sync && host_ready);
  assign sync_f = FIW'((sp_sync ? sp_sync_addr : host_sync_addr) >> FSH);

  // At most one thread becomes enabled per cycle: either a FALLOC with a zero
  // count, or a decrement that reaches zero (the SP issues one of them per cycle
  // and the host is held off while the SP issues either).
  logic sync_enables;
  assign sync_enables = sync_v && alive[sync_f] && (w_sc[sync_f] == SC_W'(1));

  always_comb begin
    rdy_push = 1'b0;
    rdy_din  = '0;
    if (fs_pop && new_sc == '0) begin
      rdy_push   = 1'b1;
      rdy_din.fp = falloc_fp;
      rdy_din.ip = new_ip;
    end else if (sync_enables) begin
      rdy_push   = 1'b1;
      rdy_din.fp = DADDR_W'(sync_f) << FSH;
      rdy_din.ip = w_ip[sync_f];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_FRAMES; i++) begin
        alive[i] <= 1'b0;
        w_ip[i]  <= '0;
        w_sc[i]  <= '0;
      end
    end else begin
      if (sync_v && alive[sync_f] && w_sc[sync_f] != '0)
        w_sc[sync_f] <= w_sc[sync_f] - 1'b1;
      if (fs_pop) begin
        alive[fs_top] <= 1'b1;
        w_ip[fs_top]  <= new_ip;
        w_sc[fs_top]  <= new_sc;
      end
      if (sp_ffree) alive[fs_push_idx] <= 1'b0;
    end
  end

  // ---- WTC -> PLC: assign a register set ----
  assign rdy_pop  = !rdy_empty && rr_avail && !plc_full;
  assign rr_alloc = rdy_pop;
  assign plc_push = rdy_pop;
  always_comb begin
    plc_din    = rdy_head;
    plc_din.rs = RS_W'(rr_head);
  end
  assign rs_wait = !rdy_empty && !rr_avail;

  assign idle = rdy_empty && plc_empty && exc_empty && psc_empty
             && (rs_free == (RW+1)'(NUM_RS));

  assert property (@(posedge clk) disable iff (!rst_n) !(sp_falloc_req && sp_sync))
    else $error("sdf_su: SP issued FALLOC and STORE in one cycle");
  assert property (@(posedge clk) disable iff (!rst_n) sp_ffree |-> alive[fs_push_idx])
    else $error("sdf_su: FFREE of a frame that is not allocated");
endmodule
