// sdf_frame_stack: stack of the indices of free frames.
//
// Frames have a fixed size and are preallocated. A stack of the indices of the
// available frames is kept: FALLOC pops an index, FFREE pushes one back. This is
// how the SDF description makes frame allocation fast. After reset the stack
// holds every index, with frame 0 on top, so frames are handed out 0, 1, 2, ...
//
// Interface: top shows the index a pop returns; pop and push act at the rising
// edge (both in one cycle replace the top). empty means no frame is free.
// NUM_FRAMES is this design's own choice; the description gives no number.
module sdf_frame_stack #(
  parameter int unsigned NUM_FRAMES = 256,
  localparam int unsigned IW = $clog2(NUM_FRAMES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pop,
  input  logic          push,
  input  logic [IW-1:0] push_idx,
  output logic [IW-1:0] top,
  output logic          empty,
  output logic          full,
  output logic [IW:0]   free_count
);
  logic [IW-1:0] stk [NUM_FRAMES];
  logic [IW:0]   sp;   // number of entries; stk[sp-1] is the top

  assign empty      = (sp == 0);
  assign full       = (sp == (IW+1)'(NUM_FRAMES));
  assign top        = empty ? '0 : stk[IW'(sp - 1'b1)];
  assign free_count = sp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp <= (IW+1)'(NUM_FRAMES);
      for (int i = 0; i < NUM_FRAMES; i++) stk[i] <= IW'(NUM_FRAMES - 1 - i);
    end else begin
      if (pop && push && !empty) begin
        stk[IW'(sp - 1'b1)] <= push_idx;
      end else if (pop && !empty) begin
        sp <= sp - 1'b1;
      end else if (push && !full) begin
        stk[IW'(sp)] <= push_idx;
        sp <= sp + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("sdf_frame_stack: FALLOC with no free frame");
  assert property (@(posedge clk) disable iff (!rst_n) (push && !pop) |-> !full)
    else $error("sdf_frame_stack: FFREE of more frames than exist");
endmodule
