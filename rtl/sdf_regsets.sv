// sdf_regsets: the register sets (register contexts) of the SDF processor.
//
// Every enabled thread owns one register set from preload to the end of its
// poststore. The Synchronization Pipeline (SP) writes preloaded values into it
// and reads results out of it; the Execution Pipeline (EP) computes using only
// these registers. Dyadic EP instructions name an even/odd register pair (RR2
// means R2 and R3), so the EP side reads two registers and writes up to two
// results per cycle, as the SDF description states for its write-back unit.
//
// Ports: EP reads a pair (ep_ra, ep_rb) of set ep_rrs and writes up to two
// registers of set ep_wrs; SP reads three registers (base, offset and store
// value) of set sp_rrs and writes one register of set sp_wrs. Reads are
// combinational, writes happen at the rising edge; a read in the cycle of a
// write returns the old value (the pipelines bypass). R0 always reads zero.
// The number of sets and registers per set are this design's own choices.
module sdf_regsets
  import sdf_pkg::*;
#(
  parameter int unsigned NUM_RS = 16,
  localparam int unsigned RW = $clog2(NUM_RS)
) (
  input  logic              clk,
  // EP read pair
  input  logic [RW-1:0]     ep_rrs,
  input  logic [RIDX_W-1:0] ep_ra,
  input  logic [RIDX_W-1:0] ep_rb,
  output logic [XLEN-1:0]   ep_da,
  output logic [XLEN-1:0]   ep_db,
  // EP two write ports
  input  logic [RW-1:0]     ep_wrs,
  input  logic              ep_we1,
  input  logic [RIDX_W-1:0] ep_wa1,
  input  logic [XLEN-1:0]   ep_wd1,
  input  logic              ep_we2,
  input  logic [RIDX_W-1:0] ep_wa2,
  input  logic [XLEN-1:0]   ep_wd2,
  // SP three read ports
  input  logic [RW-1:0]     sp_rrs,
  input  logic [RIDX_W-1:0] sp_ra,
  input  logic [RIDX_W-1:0] sp_rb,
  input  logic [RIDX_W-1:0] sp_rc,
  output logic [XLEN-1:0]   sp_da,
  output logic [XLEN-1:0]   sp_db,
  output logic [XLEN-1:0]   sp_dc,
  // SP write port
  input  logic [RW-1:0]     sp_wrs,
  input  logic              sp_we,
  input  logic [RIDX_W-1:0] sp_wa,
  input  logic [XLEN-1:0]   sp_wd
);
  logic [XLEN-1:0] rf [NUM_RS][NREGS];

  function automatic logic [XLEN-1:0] rd(logic [RW-1:0] s, logic [RIDX_W-1:0] r);
    return (r == '0) ? '0 : rf[s][r];
  endfunction

  assign ep_da = rd(ep_rrs, ep_ra);
  assign ep_db = rd(ep_rrs, ep_rb);
  assign sp_da = rd(sp_rrs, sp_ra);
  assign sp_db = rd(sp_rrs, sp_rb);
  assign sp_dc = rd(sp_rrs, sp_rc);

  always_ff @(posedge clk) begin
    if (sp_we)  rf[sp_wrs][sp_wa] <= sp_wd;
    if (ep_we1) rf[ep_wrs][ep_wa1] <= ep_wd1;
    if (ep_we2) rf[ep_wrs][ep_wa2] <= ep_wd2;
  end

  // The two pipelines never own the same register set at once, and one EP
  // instruction never names the same destination twice.
  assert property (@(posedge clk) (sp_we && (ep_we1 || ep_we2)) |-> (sp_wrs != ep_wrs))
    else $error("sdf_regsets: SP and EP write the same register set");
  assert property (@(posedge clk) (ep_we1 && ep_we2) |-> (ep_wa1 != ep_wa2))
    else $error("sdf_regsets: two EP writes to one register");
endmodule
