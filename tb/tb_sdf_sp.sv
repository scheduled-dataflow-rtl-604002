// tb_sdf_sp: Synchronization Pipeline with instruction memory, register sets
// and frame memory around it; the Scheduling Unit side is modelled here.
// Runs the preload code of the worked example plus a dependent LOAD pair
// (interlock then bypass), then a poststore with FALLOC (granted late), STOREs
// (including one that must wait for the FALLOC result), FFREE and STOP, and
// checks registers, memory, the SU requests, PSC-before-PLC priority and the
// FORKEP timing.
module tb_sdf_sp;
  import sdf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic plc_valid = 0, plc_pop, psc_valid = 0, psc_pop, forkep_valid, exc_full = 0;
  cont_t plc_head = '0, psc_head = '0, forkep_cont;
  logic if_en; logic [IP_W-1:0] if_addr; logic [31:0] if_data;
  logic [3:0] rf_rrs, rf_wrs; logic [4:0] rf_ra, rf_rb, rf_rc, rf_wa;
  logic [31:0] rf_da, rf_db, rf_dc, rf_wd; logic rf_we;
  logic dm_en, dm_we; logic [11:0] dm_addr; logic [31:0] dm_wdata, dm_rdata;
  logic falloc_req, falloc_gnt, ffree, sync, stop;
  logic [IP_W-1:0] falloc_ip; logic [SC_W-1:0] falloc_sc;
  logic [DADDR_W-1:0] falloc_fp, ffree_fp, sync_addr;
  logic [3:0] stop_rs;
  logic busy;
  logic [31:0] cnt_instr, cnt_preloads, cnt_poststores, cnt_hazard, cnt_bypass, cnt_alloc_wait;
  // test-bench side ports of the memories
  logic imem_we = 0; logic [9:0] imem_wa = 0; logic [31:0] imem_wd = 0;
  logic tb_we = 0; logic [3:0] tb_rs = 0; logic [4:0] tb_ra = 0, tb_wa = 0; logic [31:0] tb_wd = 0, tb_rd;
  logic hb_en = 0, hb_we = 0; logic [11:0] hb_addr = 0; logic [31:0] hb_wdata = 0, hb_rdata;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  sdf_sp dut (.*);
  sdf_imem u_imem (.clk, .ep_en(1'b0), .ep_addr(10'd0), .ep_data(),
                   .sp_en(if_en), .sp_addr(if_addr[9:0]), .sp_data(if_data),
                   .wr_en(imem_we), .wr_addr(imem_wa), .wr_data(imem_wd));
  // EP write port 1 is used by the test bench to preset registers
  sdf_regsets u_rf (.clk, .ep_rrs(tb_rs), .ep_ra(tb_ra), .ep_rb(5'd0), .ep_da(tb_rd), .ep_db(),
                    .ep_wrs(tb_rs), .ep_we1(tb_we), .ep_wa1(tb_wa), .ep_wd1(tb_wd),
                    .ep_we2(1'b0), .ep_wa2(5'd0), .ep_wd2(32'd0),
                    .sp_rrs(rf_rrs), .sp_ra(rf_ra), .sp_rb(rf_rb), .sp_rc(rf_rc),
                    .sp_da(rf_da), .sp_db(rf_db), .sp_dc(rf_dc),
                    .sp_wrs(rf_wrs), .sp_we(rf_we), .sp_wa(rf_wa), .sp_wd(rf_wd));
  sdf_frame_mem u_fm (.clk, .a_en(dm_en), .a_we(dm_we), .a_addr(dm_addr), .a_wdata(dm_wdata),
                      .a_rdata(dm_rdata), .b_en(hb_en), .b_we(hb_we), .b_addr(hb_addr),
                      .b_wdata(hb_wdata), .b_rdata(hb_rdata));

  // Scheduling Unit model: grants FALLOC in the third cycle of the request
  int req_cycles = 0;
  always @(posedge clk) req_cycles <= falloc_req && !falloc_gnt ? req_cycles + 1 : 0;
  assign falloc_gnt = falloc_req && (req_cycles >= 2);
  assign falloc_fp  = 16'd64;

  int n_sync = 0, sync_log[$], n_ffree = 0, ffree_at = -1, n_stop = 0, stop_rs_seen = -1;
  int f_ip = -1, f_sc = -1;
  // a queue entry disappears when the SP takes it
  always @(posedge clk) if (plc_pop) plc_valid = 0;

  always @(posedge clk) if (rst_n) begin
    if (sync) begin n_sync++; sync_log.push_back(int'(sync_addr)); end
    if (ffree) begin n_ffree++; ffree_at = int'(ffree_fp); end
    if (stop) begin n_stop++; stop_rs_seen = int'(stop_rs); end
    if (falloc_gnt) begin f_ip = int'(falloc_ip); f_sc = int'(falloc_sc); end
  end

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
  task automatic mw(int a, int v);
    @(negedge clk); hb_en = 1; hb_we = 1; hb_addr = 12'(a); hb_wdata = v;
    @(negedge clk); hb_en = 0; hb_we = 0;
  endtask
  task automatic mchk(int a, int v);
    @(negedge clk); hb_en = 1; hb_we = 0; hb_addr = 12'(a);
    @(negedge clk); hb_en = 0;
    check(int'(hb_rdata) == v, $sformatf("mem[%0d] = %0d exp %0d", a, int'(hb_rdata), v));
  endtask
  task automatic rw(int s, int r, int v);
    @(negedge clk); tb_we = 1; tb_rs = 4'(s); tb_wa = 5'(r); tb_wd = v;
    @(negedge clk); tb_we = 0;
  endtask
  task automatic rchk(int s, int r, int v);
    @(negedge clk); tb_rs = 4'(s); tb_ra = 5'(r); #1;
    check(int'(tb_rd) == v, $sformatf("rs%0d R%0d = %0d exp %0d", s, r, int'(tb_rd), v));
  endtask

  initial begin
    longint t0; int lat, hz0;
    // preload code: the eight example loads, then a pointer chase, then FORKEP 0x40
    for (int r = 2; r <= 9; r++) iw(r - 2, enc_ldst(OP_LOAD, 1, r, 0, 0, r));
    iw(8, enc_ldst(OP_LOAD, 1, 20, 0, 0, 10));     // R20 = frame[10]
    iw(9, enc_ldst(OP_LOAD, 20, 21, 0, 0, 1));     // R21 = mem[R20 + 1]
    iw(10, {OP_FORKEP, 10'd0, 16'h40});
    // poststore code
    iw(16, enc_falloc(10, 3, 'h99));             // R10 = new frame
    iw(17, enc_ldst(OP_STORE, 10, 14, 0, 0, 2));   // new frame[2] = R14 (waits for R10)
    iw(18, enc_ldst(OP_STORE, 6, 14, 7, 1));       // STORE R14, R6|R7
    iw(19, enc_ldst(OP_STORE, 8, 15, 9, 1));       // STORE R15, R8|R9
    iw(20, enc_ldst(OP_FFREE, 1, 0));
    iw(21, {OP_STOP, 26'd0});
    // frames: thread at 32, second thread at 48; destinations at 96 and 112
    for (int k = 2; k <= 9; k++) mw(32 + k, 0);
    mw(34, 3); mw(35, 4); mw(36, 10); mw(37, 2);
    mw(38, 96); mw(39, 5); mw(40, 112); mw(41, 7);
    mw(42, 200); mw(201, 777);
    mw(48 + 2, 55); mw(48 + 10, 200);
    rst_n = 1;

    // ---- preload ----
    @(negedge clk);
    plc_valid = 1; plc_head = '{fp: 16'd32, ip: 16'd0, rs: 4'd5};
    #1 check(plc_pop, "PLC taken when the SP is free");
    @(posedge clk); t0 = cyc;
    #1;
    plc_valid = 0;
    while (!forkep_valid) @(negedge clk);
    lat = int'(cyc - t0);
    // 10 words before FORKEP, two interlock cycles: decoded at t0+13, pushed at t0+16
    check(lat == 16, $sformatf("FORKEP latency %0d exp 16", lat));
    check(forkep_cont.ip == 'h40 && forkep_cont.rs == 5, "EXC continuation");
    check(cnt_hazard == 2, $sformatf("interlock cycles %0d exp 2", cnt_hazard));
    check(cnt_bypass >= 1, "write-back bypass used");
    @(negedge clk);
    rchk(5, 1, 32);
    for (int r = 2; r <= 9; r++) rchk(5, r, (r == 2) ? 3 : (r == 3) ? 4 : (r == 4) ? 10 : (r == 5) ? 2 :
                                            (r == 6) ? 96 : (r == 7) ? 5 : (r == 8) ? 112 : 7);
    rchk(5, 20, 200); rchk(5, 21, 777);
    check(cnt_preloads == 1, "one preload finished");

    // ---- poststore has priority over a waiting preload ----
    rw(5, 14, 84); rw(5, 15, 1);
    hz0 = int'(cnt_hazard);
    @(negedge clk);
    psc_valid = 1; psc_head = '{fp: '0, ip: 16'd16, rs: 4'd5};
    plc_valid = 1; plc_head = '{fp: 16'd48, ip: 16'd0, rs: 4'd6};
    #1 check(psc_pop && !plc_pop, "PSC taken before PLC");
    @(negedge clk); psc_valid = 0;
    #1 check(!plc_pop, "PLC not taken while the poststore runs");
    while (!stop) @(negedge clk);
    check(stop_rs == 5, "STOP releases register set 5");
    @(negedge clk);
    check(f_ip == 'h99 && f_sc == 3, $sformatf("FALLOC ip %0h sc %0d", f_ip, f_sc));
    check(cnt_alloc_wait == 1 + 2 + 1, $sformatf("FALLOC/FFREE extra cycles %0d exp 4", cnt_alloc_wait));
    check(int'(cnt_hazard) - hz0 > 0, "STORE waited for the FALLOC result");
    rchk(5, 10, 64);
    check(n_sync == 3 && sync_log[0] == 66 && sync_log[1] == 101 && sync_log[2] == 119,
          $sformatf("synchronization decrements %0d: %p", n_sync, sync_log));
    check(n_ffree == 1 && ffree_at == 32, $sformatf("FFREE of %0d", ffree_at));
    mchk(66, 84); mchk(101, 84); mchk(119, 1);

    // ---- the waiting preload now runs ----
    while (!forkep_valid) @(negedge clk);
    @(negedge clk);
    rchk(6, 1, 48); rchk(6, 2, 55); rchk(6, 20, 200); rchk(6, 21, 777);
    check(forkep_cont.rs == 6, "second thread handed on");
    check(cnt_preloads == 2 && cnt_poststores == 1, $sformatf("preloads %0d poststores %0d", cnt_preloads, cnt_poststores));
    repeat (3) @(negedge clk);
    check(!busy, "SP idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
