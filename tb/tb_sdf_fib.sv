// tb_sdf_fib: recursive Fibonacci on sdf_top at its default sizes, written as
// nonblocking SDF threads. It is the one program of the SDF evaluation set
// that needs only frames (no array memory).
//
// FIB thread, frame: [2] n, [3] return frame pointer, [4] return offset; SC 3.
//   preload  : LOAD n, ret_fp, ret_off; FORKEP
//   execute  : n < 2 ?  FORKSP to BASE  :  compute n-1, n-2, offsets 2 and 3,
//              FORKSP to REC
//   BASE     : STORE n -> ret_fp|ret_off; FFREE; STOP
//   REC      : FALLOC JOIN (SC 4) and pass it ret_fp, ret_off; FALLOC two FIB
//              children (SC 3) returning into JOIN offsets 2 and 3; FFREE; STOP
// JOIN thread, frame: [2] a, [3] b, [4] ret_fp, [5] ret_off; SC 4.
//   LOAD all four; ADD RR2 -> R6; STORE R6 -> ret_fp|ret_off; FFREE; STOP
// The host creates FIB(n) returning into a result frame and waits for idle.
module tb_sdf_fib;
  import sdf_pkg::*;
  localparam int FIB_P = 0, FIB_E = 10, BASE = 30, REC = 40, JOIN_P = 70, JOIN_E = 80, JOIN_S = 90;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               imem_we = 0;
  logic [9:0]         imem_waddr = '0;
  logic [31:0]        imem_wdata = '0;
  logic               host_mem_en = 0, host_mem_we = 0;
  logic [11:0]        host_mem_addr = '0;
  logic [31:0]        host_mem_wdata = '0, host_mem_rdata;
  logic               host_ready, host_falloc_req = 0, host_falloc_gnt, host_sync = 0;
  logic [IP_W-1:0]    host_falloc_ip = '0;
  logic [SC_W-1:0]    host_falloc_sc = '0;
  logic [DADDR_W-1:0] falloc_fp, host_sync_addr = '0;
  logic               idle, rs_wait;
  logic [8:0]         frames_free;
  logic [4:0]         rs_free;
  logic [31:0] ep_instr, ep_threads, ep_bypass, ep_branch, ep_fork_stall;
  logic [31:0] sp_instr, sp_preloads, sp_poststores, sp_hazard, sp_bypass, sp_alloc_wait;

  sdf_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int min_frames = 256;
  always @(posedge clk) if (rst_n && int'(frames_free) < min_frames) min_frames = int'(frames_free);

  task automatic iw(int a, logic [31:0] w);
    @(negedge clk); imem_we = 1; imem_waddr = 10'(a); imem_wdata = w;
    @(negedge clk); imem_we = 0;
  endtask

  task automatic falloc(int ip, int sc, output int fp);
    forever begin
      @(negedge clk);
      host_falloc_req = 1; host_falloc_ip = IP_W'(ip); host_falloc_sc = SC_W'(sc);
      #1;
      if (host_falloc_gnt) begin
        fp = int'(falloc_fp);
        @(negedge clk) host_falloc_req = 0;
        return;
      end
      host_falloc_req = 0;
    end
  endtask

  task automatic store(int addr, int data);
    forever begin
      @(negedge clk);
      host_mem_en = 1; host_mem_we = 1; host_mem_addr = 12'(addr); host_mem_wdata = data;
      host_sync = 1; host_sync_addr = DADDR_W'(addr);
      #1;
      if (host_ready) begin
        @(negedge clk) host_mem_en = 0; host_mem_we = 0; host_sync = 0;
        return;
      end
      host_mem_en = 0; host_mem_we = 0; host_sync = 0;
    end
  endtask

  task automatic read(int addr, output int data);
    @(negedge clk); host_mem_en = 1; host_mem_we = 0; host_mem_addr = 12'(addr);
    @(negedge clk); host_mem_en = 0;
    data = int'(host_mem_rdata);
  endtask

  function automatic int fib(int n);
    return (n < 2) ? n : fib(n - 1) + fib(n - 2);
  endfunction

  initial begin
    int p, res_fp, fp, got, t0, sizes[3];
    sizes = '{5, 8, 10};
    repeat (3) @(negedge clk);
    rst_n = 1;
    p = FIB_P;
    for (int k = 2; k <= 4; k++) iw(p++, enc_ldst(OP_LOAD, 1, k, 0, 0, k));
    iw(p, {OP_FORKEP, 10'd0, 16'(FIB_E)});
    p = FIB_E;
    iw(p++, enc_alu(OP_MOV, 2, 10));              // R10 = n
    iw(p++, enc_alu(OP_MOVI, 0, 11, 0, 0, 2));    // R11 = 2
    iw(p++, enc_alu(OP_SLT, 10, 12));             // R12 = n < 2
    iw(p++, enc_br(OP_BNEZ, 12, FIB_E + 9));
    iw(p++, enc_alu(OP_ADDI, 2, 13, 0, 0, -1));   // R13 = n-1
    iw(p++, enc_alu(OP_ADDI, 2, 14, 0, 0, -2));   // R14 = n-2
    iw(p++, enc_alu(OP_MOVI, 0, 15, 0, 0, 2));    // R15 = offset 2
    iw(p++, enc_alu(OP_MOVI, 0, 16, 0, 0, 3));    // R16 = offset 3
    iw(p++, {OP_FORKSP, 10'd0, 16'(REC)});
    iw(p++, {OP_FORKSP, 10'd0, 16'(BASE)});
    p = BASE;
    iw(p++, enc_ldst(OP_STORE, 3, 2, 4, 1));      // STORE R2 -> R3|R4
    iw(p++, enc_ldst(OP_FFREE, 1, 0));
    iw(p++, {OP_STOP, 26'd0});
    p = REC;
    iw(p++, enc_falloc(20, 4, JOIN_P));
    iw(p++, enc_ldst(OP_STORE, 20, 3, 0, 0, 4));
    iw(p++, enc_ldst(OP_STORE, 20, 4, 0, 0, 5));
    iw(p++, enc_falloc(21, 3, FIB_P));
    iw(p++, enc_ldst(OP_STORE, 21, 13, 0, 0, 2));
    iw(p++, enc_ldst(OP_STORE, 21, 20, 0, 0, 3));
    iw(p++, enc_ldst(OP_STORE, 21, 15, 0, 0, 4));
    iw(p++, enc_falloc(22, 3, FIB_P));
    iw(p++, enc_ldst(OP_STORE, 22, 14, 0, 0, 2));
    iw(p++, enc_ldst(OP_STORE, 22, 20, 0, 0, 3));
    iw(p++, enc_ldst(OP_STORE, 22, 16, 0, 0, 4));
    iw(p++, enc_ldst(OP_FFREE, 1, 0));
    iw(p++, {OP_STOP, 26'd0});
    p = JOIN_P;
    for (int k = 2; k <= 5; k++) iw(p++, enc_ldst(OP_LOAD, 1, k, 0, 0, k));
    iw(p, {OP_FORKEP, 10'd0, 16'(JOIN_E)});
    p = JOIN_E;
    iw(p++, enc_alu(OP_ADD, 2, 6));
    iw(p++, {OP_FORKSP, 10'd0, 16'(JOIN_S)});
    p = JOIN_S;
    iw(p++, enc_ldst(OP_STORE, 4, 6, 5, 1));      // STORE R6 -> R4|R5
    iw(p++, enc_ldst(OP_FFREE, 1, 0));
    iw(p++, {OP_STOP, 26'd0});

    falloc(0, 31, res_fp);
    foreach (sizes[i]) begin
      int n, th0;
      n = sizes[i];
      th0 = int'(sp_poststores);
      min_frames = 256;
      falloc(FIB_P, 3, fp);
      t0 = int'($time / 10);
      store(fp + 2, n);
      store(fp + 3, res_fp);
      store(fp + 4, i);
      repeat (5) @(negedge clk);
      while (!idle) @(negedge clk);
      read(res_fp + i, got);
      $display("INFO: fib(%0d) = %0d in %0d cycles, %0d threads, at most %0d frames in use",
               n, got, int'($time / 10) - t0, int'(sp_poststores) - th0, 255 - min_frames);
      check(got == fib(n), $sformatf("fib(%0d) got %0d exp %0d", n, got, fib(n)));
      check(int'(frames_free) == 255, $sformatf("frames returned after fib(%0d): %0d free", n, frames_free));
      check(int'(rs_free) == 16, "register sets returned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
