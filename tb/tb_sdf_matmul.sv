// tb_sdf_matmul: matrix multiply C = A * B on sdf_top at its default sizes,
// written as nonblocking SDF threads, one thread per element of C (the
// innermost loop fully unrolled), for N = 4 and N = 8.
//
// The SDF machine keeps arrays in a separate structure memory that is not part
// of this RTL, so here the host places A, B and C in words of the frame memory
// that no thread is given (frames 200 and up); threads reach them with
// ordinary LOAD and STORE. Element thread, frame: [2] address of row i of A,
// [3] address of column j of B, [4] address of C[i][j]; SC 3.
//   preload : LOAD R20..R22 from the frame; for k < N
//             LOAD R(2+2k) = A[i][k] (R20|k), LOAD R(3+2k) = B[k][j] (R21|k*N);
//             FORKEP
//   execute : MULT RR(2+2k) -> R(2+k) for k < N (products end up in R2..R(N+1));
//             ADD RR(k+1) -> R(k+2) for k = 1..N-1 (running sum in R(N+1));
//             FORKSP
//   poststore: STORE R(N+1) -> R22|0; FFREE; STOP
// The host creates all N*N threads through its FALLOC port, stores their three
// inputs, waits for idle and compares C with products computed here. It checks
// that every frame and register set is returned and reports the cycle count.
// Matrix multiply is one of the programs SDF was evaluated with; this thread
// program and the sizes are this test's own.
module tb_sdf_matmul;
  import sdf_pkg::*;
  localparam int P = 0, E = 40, S = 80;
  localparam int ABASE = 200 * 16, BBASE = ABASE + 64, CBASE = BBASE + 64;

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // write a word; with sync, also count it as an input of the frame's thread
  task automatic store(int addr, int data, bit sync);
    forever begin
      @(negedge clk);
      host_mem_en = 1; host_mem_we = 1; host_mem_addr = 12'(addr); host_mem_wdata = data;
      host_sync = sync; host_sync_addr = DADDR_W'(addr);
      #1;
      if (host_ready || !sync) begin
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

  task automatic load_program(int n);
    int p;
    p = P;
    for (int k = 0; k < 3; k++) iw(p++, enc_ldst(OP_LOAD, 1, 20 + k, 0, 0, 2 + k));
    for (int k = 0; k < n; k++) begin
      iw(p++, enc_ldst(OP_LOAD, 20, 2 + 2 * k, 0, 0, k));
      iw(p++, enc_ldst(OP_LOAD, 21, 3 + 2 * k, 0, 0, k * n));
    end
    iw(p, {OP_FORKEP, 10'd0, 16'(E)});
    p = E;
    for (int k = 0; k < n; k++) iw(p++, enc_alu(OP_MULT, 2 + 2 * k, 2 + k));
    for (int k = 1; k < n; k++) iw(p++, enc_alu(OP_ADD, k + 1, k + 2));
    iw(p, {OP_FORKSP, 10'd0, 16'(S)});
    p = S;
    iw(p++, enc_ldst(OP_STORE, 22, n + 1, 0, 0, 0));
    iw(p++, enc_ldst(OP_FFREE, 1, 0));
    iw(p++, {OP_STOP, 26'd0});
  endtask

  initial begin
    int a[8][8], b[8][8], sizes[2];
    sizes = '{4, 8};
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (sizes[s]) begin
      int n, fp, got, exp, t0, ep0, sp0, th0;
      n = sizes[s];
      load_program(n);
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          a[i][j] = $urandom_range(0, 200) - 100;
          b[i][j] = $urandom_range(0, 200) - 100;
          store(ABASE + i * n + j, a[i][j], 1'b0);
          store(BBASE + i * n + j, b[i][j], 1'b0);
          store(CBASE + i * n + j, 32'hdead_beef, 1'b0);
        end
      ep0 = int'(ep_instr); sp0 = int'(sp_instr); th0 = int'(sp_poststores);
      t0 = int'($time / 10);
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          falloc(P, 3, fp);
          store(fp + 2, ABASE + i * n, 1'b1);
          store(fp + 3, BBASE + j, 1'b1);
          store(fp + 4, CBASE + i * n + j, 1'b1);
        end
      repeat (5) @(negedge clk);
      while (!idle) @(negedge clk);
      $display("INFO: %0d*%0d matrix multiply in %0d cycles, %0d threads, EP %0d SP %0d instructions",
               n, n, int'($time / 10) - t0, int'(sp_poststores) - th0,
               int'(ep_instr) - ep0, int'(sp_instr) - sp0);
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          exp = 0;
          for (int k = 0; k < n; k++) exp += a[i][k] * b[k][j];
          read(CBASE + i * n + j, got);
          check(got == exp, $sformatf("N=%0d C[%0d][%0d] got %0d exp %0d", n, i, j, got, exp));
        end
      check(int'(sp_poststores) - th0 == n * n, "one thread per element");
      check(int'(ep_instr) - ep0 == n * n * (2 * n - 1), "EP instructions per thread (FORKSP not counted)");
      check(int'(sp_instr) - sp0 == n * n * (3 + 2 * n + 2), "SP instructions per thread (FORKEP, STOP not counted)");
      check(int'(frames_free) == 256, $sformatf("frames returned: %0d free", frames_free));
      check(int'(rs_free) == 16, "register sets returned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
