// tb_sdf_su: directed test of the Scheduling Unit with 8 frames and 2
// register sets. It creates threads with and without inputs, counts inputs
// down from both the SP and the host side, runs continuations through
// PLC -> EXC -> PSC, exhausts the register sets, frees frames and sets, and
// checks the frame pointers, IPs, register sets and timing it sees.
module tb_sdf_su;
  import sdf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sp_falloc_req = 0, sp_falloc_gnt, sp_ffree = 0, sp_sync = 0, sp_stop = 0;
  logic [IP_W-1:0] sp_falloc_ip = 0, host_falloc_ip = 0;
  logic [SC_W-1:0] sp_falloc_sc = 0, host_falloc_sc = 0;
  logic [DADDR_W-1:0] falloc_fp, sp_ffree_fp = 0, sp_sync_addr = 0, host_sync_addr = 0;
  logic [0:0] sp_stop_rs = 0;
  logic plc_valid, plc_pop = 0, psc_valid, psc_pop = 0, forkep_valid = 0, exc_full;
  logic exc_valid, exc_pop = 0, forksp_valid = 0, psc_full;
  cont_t plc_head, psc_head, exc_head, forkep_cont = '0, forksp_cont = '0;
  logic host_ready, host_falloc_req = 0, host_falloc_gnt, host_sync = 0;
  logic [3:0] frames_free;
  logic [1:0] rs_free;
  logic idle, rs_wait;
  int checks = 0, failures = 0;

  sdf_su #(.NUM_FRAMES(8), .FRAME_WORDS(16), .NUM_RS(2), .QDEPTH(4)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sp_alloc(int ip, int sc, output int fp);
    @(negedge clk);
    sp_falloc_req = 1; sp_falloc_ip = IP_W'(ip); sp_falloc_sc = SC_W'(sc);
    #1 check(sp_falloc_gnt, "FALLOC granted in the cycle of the request");
    check(!host_ready, "host held off while the SP allocates");
    fp = int'(falloc_fp);
    @(negedge clk) sp_falloc_req = 0;
  endtask

  task automatic sp_store(int addr);
    @(negedge clk);
    sp_sync = 1; sp_sync_addr = DADDR_W'(addr);
    @(negedge clk) sp_sync = 0;
  endtask

  task automatic take_plc(int fp, int ip, int rs);
    int n = 0;
    while (!plc_valid && n < 10) begin @(negedge clk); n++; end
    check(plc_valid, "PLC continuation appears");
    check(int'(plc_head.fp) == fp && int'(plc_head.ip) == ip && int'(plc_head.rs) == rs,
          $sformatf("PLC <%0d,%0d,%0d> exp <%0d,%0d,%0d>", plc_head.fp, plc_head.ip, plc_head.rs, fp, ip, rs));
    plc_pop = plc_valid;
    @(negedge clk) plc_pop = 0;
  endtask

  initial begin
    int fp0, fp1, fp2, fp3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(idle && frames_free == 8 && rs_free == 2, "idle after reset");

    // thread A: two inputs; thread B: none (enabled at once)
    sp_alloc('h11, 2, fp0);
    check(fp0 == 0, $sformatf("first frame pointer %0d", fp0));
    sp_alloc('h22, 0, fp1);
    check(fp1 == 16, $sformatf("second frame pointer %0d", fp1));
    check(frames_free == 6, "two frames in use");
    take_plc(16, 'h22, 0);          // B gets register set 0
    check(!plc_valid, "A not enabled before its inputs");
    sp_store(fp0 + 3);
    @(negedge clk);
    check(!plc_valid, "A not enabled after one of two inputs");
    // second input from the host
    @(negedge clk);
    host_sync = 1; host_sync_addr = DADDR_W'(fp0 + 5);
    #1 check(host_ready, "host ready when the SP is quiet");
    @(negedge clk) host_sync = 0;
    @(negedge clk);
    check(plc_valid, "A enabled two cycles after its last input");
    take_plc(0, 'h11, 1);           // A gets register set 1

    // thread C: one input, but no register set is free
    sp_alloc('h33, 1, fp2);
    sp_store(fp2);
    repeat (3) @(negedge clk);
    check(rs_wait && !plc_valid, "C waits for a register set");

    // B: FORKEP -> EXC -> FORKSP -> PSC -> STOP
    forkep_valid = 1; forkep_cont = '{fp: '0, ip: 'h44, rs: 0};
    @(negedge clk) forkep_valid = 0;
    check(exc_valid && exc_head.ip == 'h44 && exc_head.rs == 0, "EXC continuation after FORKEP");
    exc_pop = exc_valid;
    @(negedge clk) exc_pop = 0;
    forksp_valid = 1; forksp_cont = '{fp: '0, ip: 'h55, rs: 0};
    @(negedge clk) forksp_valid = 0;
    check(psc_valid && psc_head.ip == 'h55 && psc_head.rs == 0, "PSC continuation after FORKSP");
    psc_pop = psc_valid;
    @(negedge clk) psc_pop = 0;
    sp_ffree = 1; sp_ffree_fp = DADDR_W'(fp1);
    sp_stop = 1; sp_stop_rs = 1'b0;
    @(negedge clk) sp_ffree = 0; sp_stop = 0;
    take_plc(fp2, 'h33, 0);         // C now gets the released set 0
    // the freed frame is reused first (stack)
    sp_alloc('h66, 31, fp3);
    check(fp3 == fp1, $sformatf("freed frame reused: %0d exp %0d", fp3, fp1));
    // a store into a frame with a large count does not enable it
    sp_store(fp3 + 1);
    repeat (3) @(negedge clk);
    check(!plc_valid && !rs_wait, "frame with remaining count stays waiting");
    check(!idle, "not idle with threads live");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
