// tb_sdf_rs_ring: allocates all register sets (expects 0, 1, 2, ... in order),
// then random allocate/release traffic against a ring model.
module tb_sdf_rs_ring;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc = 0, release_en = 0, avail;
  logic [2:0] release_rs = 0, head;
  logic [3:0] free_count;
  int checks = 0, failures = 0;
  int model[$], held[$];

  sdf_rs_ring #(.NUM_RS(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) model.push_back(i);
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(free_count) != model.size() || avail != (model.size() > 0)) begin
        failures++; $display("FAIL count %0d exp %0d", free_count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (int'(head) != model[0]) begin failures++; $display("FAIL head %0d exp %0d", head, model[0]); end
      end
      alloc = (model.size() > 0) && (i < N || 1'($urandom_range(0, 1)));
      release_en = (i >= N) && (held.size() > 0) && 1'($urandom_range(0, 1));
      k = 0;
      if (release_en) begin
        k = int'($urandom_range(0, held.size() - 1));
        release_rs = 3'(held[k]);
      end
      @(posedge clk);
      if (alloc) begin held.push_back(model[0]); void'(model.pop_front()); end
      if (release_en) begin model.push_back(int'(release_rs)); held.delete(k); end
      #1 alloc = 0; release_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
