// tb_sdf_ep: Execution Pipeline with a real instruction memory and register
// sets around it. Thread 1 is the worked example (X+Y)*(A+B), (X-Y)/(A+B) with
// its inputs placed in its register set; thread 2 has back-to-back dependences
// (EX and WB bypass) and a counted loop (taken branches). Checks the register
// results, the continuation handed on by FORKSP, the four-cycle FORKSP timing,
// the one-bubble branch cost and the stall while the PSC queue is full.
module tb_sdf_ep;
  import sdf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic exc_valid = 0, exc_pop, psc_full = 0, forksp_valid, busy;
  cont_t exc_head = '0, forksp_cont;
  logic if_en; logic [IP_W-1:0] if_addr; logic [31:0] if_data;
  logic [3:0] rf_rrs, rf_wrs, sp_rrs = 0, sp_wrs = 0;
  logic [4:0] rf_ra, rf_rb, rf_wa1, rf_wa2, sp_ra = 0, sp_wa = 0;
  logic [31:0] rf_da, rf_db, rf_wd1, rf_wd2, sp_da, sp_wd = 0, sp_db, sp_dc;
  logic rf_we1, rf_we2, sp_we = 0;
  logic [31:0] cnt_instr, cnt_threads, cnt_bypass, cnt_branch, cnt_fork_stall;
  logic imem_we = 0; logic [9:0] imem_wa = 0; logic [31:0] imem_wd = 0;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  sdf_ep dut (.*);
  sdf_imem u_imem (.clk, .ep_en(if_en), .ep_addr(if_addr[9:0]), .ep_data(if_data),
                   .sp_en(1'b0), .sp_addr(10'd0), .sp_data(),
                   .wr_en(imem_we), .wr_addr(imem_wa), .wr_data(imem_wd));
  sdf_regsets u_rf (.clk, .ep_rrs(rf_rrs), .ep_ra(rf_ra), .ep_rb(rf_rb), .ep_da(rf_da), .ep_db(rf_db),
                    .ep_wrs(rf_wrs), .ep_we1(rf_we1), .ep_wa1(rf_wa1), .ep_wd1(rf_wd1),
                    .ep_we2(rf_we2), .ep_wa2(rf_wa2), .ep_wd2(rf_wd2),
                    .sp_rrs, .sp_ra, .sp_rb(5'd0), .sp_rc(5'd0), .sp_da, .sp_db, .sp_dc,
                    .sp_wrs, .sp_we, .sp_wa, .sp_wd);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic iw(int a, logic [31:0] w);
    @(negedge clk); imem_we = 1; imem_wa = 10'(a); imem_wd = w;
    @(negedge clk); imem_we = 0;
  endtask
  task automatic rw(int s, int r, int v);
    @(negedge clk); sp_we = 1; sp_wrs = 4'(s); sp_wa = 5'(r); sp_wd = v;
    @(negedge clk); sp_we = 0;
  endtask
  task automatic rchk(int s, int r, int v);
    @(negedge clk); sp_rrs = 4'(s); sp_ra = 5'(r); #1;
    check(int'(sp_da) == v, $sformatf("rs%0d R%0d = %0d exp %0d", s, r, int'(sp_da), v));
  endtask

  // run one thread: returns the cycles from EXC pop to the PSC push
  task automatic run(int ip, int rs, int psc_block, output int lat, output cont_t c);
    longint t0;
    @(negedge clk); exc_valid = 1; exc_head = '{fp: '0, ip: 16'(ip), rs: 4'(rs)};
    @(posedge clk); t0 = cyc;
    while (!exc_pop) @(posedge clk);
    #1 exc_valid = 0;
    while (!(dut.fork_active && dut.fork_cnt == 0)) @(negedge clk);
    if (psc_block > 0) begin
      psc_full = 1; repeat (psc_block) @(negedge clk); psc_full = 0;
    end
    while (!forksp_valid) #1;
    c = forksp_cont; lat = int'(cyc - t0);
    @(negedge clk);
  endtask

  initial begin
    int lat1, lat2; cont_t c1, c2; int br0;
    // thread 1: the example
    iw(0, enc_alu(OP_ADD, 2, 11, 13, 1));
    iw(1, enc_alu(OP_ADD, 4, 10));
    iw(2, enc_alu(OP_SUB, 4, 12));
    iw(3, enc_alu(OP_MULT, 10, 14));
    iw(4, enc_alu(OP_DIV, 12, 15));
    iw(5, {OP_FORKSP, 10'd0, 16'h70});
    // thread 2: dependences and a loop
    iw(16, enc_alu(OP_MOVI, 0, 2, 0, 0, 5));
    iw(17, enc_alu(OP_MOVI, 0, 3, 0, 0, 7));
    iw(18, enc_alu(OP_ADD, 2, 4));            // R4 = 12 (R3 from EX, R2 from WB)
    iw(19, enc_alu(OP_MOVI, 0, 5, 0, 0, 100));
    iw(20, enc_alu(OP_ADD, 4, 6));            // R6 = 112
    iw(21, enc_alu(OP_MOVI, 0, 8, 9, 1, 4));  // R8 = 4, R9 = 4
    iw(22, enc_alu(OP_MOVI, 0, 9, 0, 0, 0));  // R9 = 0
    iw(23, enc_alu(OP_ADDI, 8, 8, 0, 0, -1)); // L: R8--
    iw(24, enc_alu(OP_ADD, 8, 9));            //    R9 += R8
    iw(25, enc_br(OP_BNEZ, 8, 23));
    iw(26, {OP_FORKSP, 10'd0, 16'h71});
    rw(2, 2, 3); rw(2, 3, 4); rw(2, 4, 10); rw(2, 5, 2);
    rst_n = 1;

    run(0, 2, 0, lat1, c1);
    // pop at t0, instruction k decoded at t0+1+k, FORKSP (k=5) decoded at
    // t0+6 and pushed three cycles later
    check(lat1 == 9, $sformatf("FORKSP latency %0d exp 9", lat1));
    check(c1.ip == 16'h70 && c1.rs == 2, "PSC continuation of thread 1");
    rchk(2, 11, 7); rchk(2, 13, 7); rchk(2, 10, 12); rchk(2, 12, 8);
    rchk(2, 14, 84); rchk(2, 15, 1);
    check(cnt_instr == 5, $sformatf("instructions %0d", cnt_instr));

    br0 = int'(cnt_branch);
    run(16, 3, 5, lat2, c2);
    check(c2.ip == 16'h71 && c2.rs == 3, "PSC continuation of thread 2");
    rchk(3, 4, 12); rchk(3, 6, 112); rchk(3, 8, 0); rchk(3, 9, 6);
    check(int'(cnt_branch) - br0 == 3, $sformatf("taken branches %0d", int'(cnt_branch) - br0));
    // 7 straight instructions, 4 loop passes of 3, then FORKSP: FORKSP is the
    // 20th word decoded, plus one bubble per taken branch, so it is decoded
    // at t0+1+19+3 = t0+23, pushed at t0+26, plus 5 blocked cycles
    check(lat2 == 26 + 5, $sformatf("thread 2 latency %0d exp 31", lat2));
    check(cnt_fork_stall == 5, $sformatf("fork stall cycles %0d", cnt_fork_stall));
    check(cnt_bypass > 0, "bypass used");
    check(cnt_threads == 2, "two threads finished");
    repeat (3) @(negedge clk);
    check(!busy, "EP idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
