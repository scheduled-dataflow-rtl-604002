// tb_sdf_cont_fifo: random push/pop traffic against a queue model; checks
// order, full/empty flags and the count.
module tb_sdf_cont_fifo;
  import sdf_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, full, empty;
  cont_t din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  cont_t model[$];

  sdf_cont_fifo #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH)
          || int'(count) != model.size()) begin
        failures++;
        $display("FAIL flags size=%0d count=%0d empty=%b full=%b", model.size(), count, empty, full);
      end
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("FAIL head %h exp %h", dout, model[0]); end
      end
      pop  = (model.size() > 0) && ($urandom_range(0, 2) != 0);
      push = ((model.size() < DEPTH) || pop) && ($urandom_range(0, 1) != 0);
      din  = cont_t'({$urandom, $urandom});
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
      #1 push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
