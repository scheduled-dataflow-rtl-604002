// sdf_frame_mem: frame memory of the SDF processor.
//
// Each thread owns a fixed-size frame in which its inputs are collected until
// its synchronization count reaches zero. The Synchronization Pipeline reaches
// the frames through its memory-access stage (the "data cache" of its figure);
// like the SDF evaluation, this is a perfect memory with one-cycle access. A
// second port lets the host place initial inputs and read final results.
//
// Memory layout: frame f occupies words f*FRAME_WORDS .. f*FRAME_WORDS+FRAME_WORDS-1,
// so a frame pointer is a word address. Reads are synchronous (data in the
// cycle after the address). Frame count and frame size are this design's own.
module sdf_frame_mem
  import sdf_pkg::*;
#(
  parameter int unsigned NUM_FRAMES  = 256,
  parameter int unsigned FRAME_WORDS = 16,
  localparam int unsigned WORDS = NUM_FRAMES * FRAME_WORDS,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic            clk,
  // SP port
  input  logic            a_en,
  input  logic            a_we,
  input  logic [AW-1:0]   a_addr,
  input  logic [XLEN-1:0] a_wdata,
  output logic [XLEN-1:0] a_rdata,
  // host port
  input  logic            b_en,
  input  logic            b_we,
  input  logic [AW-1:0]   b_addr,
  input  logic [XLEN-1:0] b_wdata,
  output logic [XLEN-1:0] b_rdata
);
  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      b_rdata <= mem[b_addr];
    end
  end

  assert property (@(posedge clk) (a_en && a_we && b_en && b_we) |-> (a_addr != b_addr))
    else $error("sdf_frame_mem: both ports write one word");
endmodule
