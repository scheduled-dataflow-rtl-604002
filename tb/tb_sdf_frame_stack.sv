// tb_sdf_frame_stack: pops every frame (expects 0, 1, 2, ...), then random
// FALLOC/FFREE traffic against a stack model.
module tb_sdf_frame_stack;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pop = 0, push = 0, empty, full;
  logic [2:0] push_idx = 0, top;
  logic [3:0] free_count;
  int checks = 0, failures = 0;
  int model[$];

  sdf_frame_stack #(.NUM_FRAMES(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = N - 1; i >= 0; i--) model.push_back(i);   // top is the back
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(free_count) != model.size() || empty != (model.size() == 0)
          || full != (model.size() == N)) begin
        failures++; $display("FAIL count %0d exp %0d", free_count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (int'(top) != model[$]) begin failures++; $display("FAIL top %0d exp %0d", top, model[$]); end
      end
      if (i < N) begin pop = 1; push = 0; end
      else begin
        pop  = (model.size() > 0) && 1'($urandom_range(0, 1));
        push = (model.size() < N || pop) && 1'($urandom_range(0, 1));
      end
      push_idx = 3'($urandom);
      @(posedge clk);
      if (pop && push) model[$] = int'(push_idx);
      else if (pop) void'(model.pop_back());
      else if (push) model.push_back(int'(push_idx));
      #1 pop = 0; push = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
