// tb_sdf_regsets: random writes through the SP port and both EP ports into
// different register sets, random reads on all five read ports, compared with
// an array model; R0 must read zero.
module tb_sdf_regsets;
  import sdf_pkg::*;
  localparam int N = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0] ep_rrs, ep_wrs, sp_rrs, sp_wrs;
  logic [4:0] ep_ra, ep_rb, ep_wa1, ep_wa2, sp_ra, sp_rb, sp_rc, sp_wa;
  logic [31:0] ep_da, ep_db, ep_wd1, ep_wd2, sp_da, sp_db, sp_dc, sp_wd;
  logic ep_we1 = 0, ep_we2 = 0, sp_we = 0;
  logic [31:0] model [N][32];
  int checks = 0, failures = 0;

  sdf_regsets #(.NUM_RS(N)) dut (.*);

  function automatic logic [31:0] m(logic [1:0] s, logic [4:0] r);
    return (r == 0) ? 32'd0 : model[s][r];
  endfunction

  task automatic cmp(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every register so that reads are defined
    for (int s = 0; s < N; s++)
      for (int r = 0; r < 32; r++) begin
        @(negedge clk);
        sp_we = 1; sp_wrs = 2'(s); sp_wa = 5'(r); sp_wd = $urandom; model[s][r] = sp_wd;
      end
    @(negedge clk) sp_we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ep_rrs = 2'($urandom); ep_ra = 5'($urandom); ep_rb = ep_ra + 1'b1;
      sp_rrs = 2'($urandom); sp_ra = 5'($urandom); sp_rb = 5'($urandom); sp_rc = 5'($urandom);
      #1;
      cmp(ep_da, m(ep_rrs, ep_ra), "ep_da"); cmp(ep_db, m(ep_rrs, ep_rb), "ep_db");
      cmp(sp_da, m(sp_rrs, sp_ra), "sp_da"); cmp(sp_db, m(sp_rrs, sp_rb), "sp_db");
      cmp(sp_dc, m(sp_rrs, sp_rc), "sp_dc");
      ep_wrs = 2'($urandom); sp_wrs = ep_wrs + 2'd1;
      ep_we1 = 1'($urandom_range(0, 1)); ep_we2 = 1'($urandom_range(0, 1)); sp_we = 1'($urandom_range(0, 1));
      ep_wa1 = 5'($urandom); ep_wa2 = ep_wa1 ^ 5'd1; sp_wa = 5'($urandom);
      ep_wd1 = $urandom; ep_wd2 = $urandom; sp_wd = $urandom;
      @(posedge clk);
      if (ep_we1) model[ep_wrs][ep_wa1] = ep_wd1;
      if (ep_we2) model[ep_wrs][ep_wa2] = ep_wd2;
      if (sp_we)  model[sp_wrs][sp_wa]  = sp_wd;
      #1 ep_we1 = 0; ep_we2 = 0; sp_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
