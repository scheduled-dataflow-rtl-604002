// sdf_imem: dual-ported instruction memory shared by the EP and the SP.
//
// Both pipelines fetch instructions every cycle, so the instruction store has
// two independent read ports, as the SDF description assumes for its
// instruction cache (modelled here as a perfect memory that always hits). A
// third, write-only port lets the host load programs.
//
// Timing: reads are synchronous: an address presented in one cycle (the fetch
// stage) gives the word on the data output in the next cycle (the decode stage).
// A write and a read of the same word in one cycle return the old word.
// DEPTH is this design's own choice.
module sdf_imem
  import sdf_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  // EP fetch port
  input  logic          ep_en,
  input  logic [AW-1:0] ep_addr,
  output logic [31:0]   ep_data,
  // SP fetch port
  input  logic          sp_en,
  input  logic [AW-1:0] sp_addr,
  output logic [31:0]   sp_data,
  // host load port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ep_en) ep_data <= mem[ep_addr];
    if (sp_en) sp_data <= mem[sp_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end
endmodule
