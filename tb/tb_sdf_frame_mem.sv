// tb_sdf_frame_mem: random reads and writes on both ports (never the same word
// written by both), checked against a memory model one cycle after the access.
module tb_sdf_frame_mem;
  localparam int NF = 4, FW = 16, W = NF * FW;
  logic clk = 0;
  always #5 clk = ~clk;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [5:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  sdf_frame_mem #(.NUM_FRAMES(NF), .FRAME_WORDS(FW)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb;
    bit ra, rb;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 6'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      a_en = 1'($urandom_range(0, 1)); a_we = 1'($urandom_range(0, 1));
      b_en = 1'($urandom_range(0, 1)); b_we = 1'($urandom_range(0, 1));
      a_addr = 6'($urandom); b_addr = 6'($urandom);
      if (a_addr == b_addr) b_we = 0;
      a_wdata = $urandom; b_wdata = $urandom;
      ra = a_en; rb = b_en;
      ea = model[a_addr]; eb = model[b_addr];   // read-before-write
      @(posedge clk);
      if (a_en && a_we) model[a_addr] = a_wdata;
      if (b_en && b_we) model[b_addr] = b_wdata;
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL a %h exp %h", a_rdata, ea); end end
      if (rb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL b %h exp %h", b_rdata, eb); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
