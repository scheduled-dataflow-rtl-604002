// tb_sdf_imem: loads random words, then reads both ports at random addresses
// and checks the one-cycle read latency and that a disabled port holds.
module tb_sdf_imem;
  localparam int D = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic ep_en = 0, sp_en = 0, wr_en = 0;
  logic [5:0] ep_addr = 0, sp_addr = 0, wr_addr = 0;
  logic [31:0] ep_data, sp_data, wr_data = 0;
  logic [31:0] model [D];
  int checks = 0, failures = 0;

  sdf_imem #(.DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ep_hold, sp_hold;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 6'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    ep_hold = 0; sp_hold = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ep_en = 1'($urandom_range(0, 1)); sp_en = 1'($urandom_range(0, 1));
      ep_addr = 6'($urandom); sp_addr = 6'($urandom);
      if (ep_en) ep_hold = model[ep_addr];
      if (sp_en) sp_hold = model[sp_addr];
      @(negedge clk);
      ep_en = 0; sp_en = 0;
      checks += 2;
      if (i > 20 && ep_data !== ep_hold) begin failures++; $display("FAIL ep %h exp %h", ep_data, ep_hold); end
      if (i > 20 && sp_data !== sp_hold) begin failures++; $display("FAIL sp %h exp %h", sp_data, sp_hold); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
