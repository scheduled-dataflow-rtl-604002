// sdf_cont_fifo: queue of thread continuations.
//
// The Scheduling Unit keeps three of these: the preload queue (PLC) and the
// poststore queue (PSC) that feed the Synchronization Pipeline, and the enabled
// queue (EXC) that feeds the Execution Pipeline. It is a plain first-in
// first-out buffer held in a register array with read and write pointers.
//
// Interface: push/din write a continuation when not full; the head is always
// visible on dout while not empty, and pop removes it. Push and pop may occur in
// the same cycle, also when full (the pop frees the slot). Both take effect at
// the rising clock edge; count reports the occupancy.
// The queues are drawn in the pipeline figures of the SDF description without a
// depth; DEPTH is this design's own choice.
module sdf_cont_fifo
  import sdf_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  cont_t din,
  input  logic  pop,
  output cont_t dout,
  output logic  full,
  output logic  empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  cont_t          mem [DEPTH];
  logic [PW-1:0]  rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  logic do_push, do_pop;
  assign empty   = (cnt == 0);
  assign full    = (cnt == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];
  assign count   = cnt;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      cnt <= cnt + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  // A push into a full queue without a pop, or a pop of an empty queue, is a
  // protocol error of the user.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop))
    else $error("sdf_cont_fifo: push while full");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("sdf_cont_fifo: pop while empty");
endmodule
