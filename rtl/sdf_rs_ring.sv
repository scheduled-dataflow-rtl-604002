// sdf_rs_ring: circular buffer of free register sets.
//
// The SDF description treats the register sets as a circular buffer for
// assigning register contexts to enabled threads and taking them back. This
// block holds the free set numbers in a ring: allocation takes the number at the
// head, release writes the returned number at the tail. After reset the ring
// holds sets 0 .. NUM_RS-1 in order.
//
// Interface: head is the set an allocation gets; alloc and release act at the
// rising edge and may coincide. avail is false when every set is in use.
// NUM_RS is this design's own choice.
module sdf_rs_ring #(
  parameter int unsigned NUM_RS = 16,
  localparam int unsigned RW = $clog2(NUM_RS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc,
  input  logic          release_en,
  input  logic [RW-1:0] release_rs,
  output logic [RW-1:0] head,
  output logic          avail,
  output logic [RW:0]   free_count
);
  logic [RW-1:0] ring [NUM_RS];
  logic [RW-1:0] hd, tl;
  logic [RW:0]   cnt;

  function automatic logic [RW-1:0] inc(logic [RW-1:0] p);
    return (p == RW'(NUM_RS - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_alloc, do_rel;
  assign avail      = (cnt != 0);
  assign head       = ring[hd];
  assign free_count = cnt;
  assign do_alloc   = alloc && avail;
  assign do_rel     = release_en && (cnt != (RW+1)'(NUM_RS) || do_alloc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd  <= '0;
      tl  <= '0;
      cnt <= (RW+1)'(NUM_RS);
      for (int i = 0; i < NUM_RS; i++) ring[i] <= RW'(i);
    end else begin
      if (do_alloc) hd <= inc(hd);
      if (do_rel) begin
        ring[tl] <= release_rs;
        tl <= inc(tl);
      end
      cnt <= cnt + (RW+1)'(do_rel) - (RW+1)'(do_alloc);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> avail)
    else $error("sdf_rs_ring: allocation with no free register set");
endmodule
