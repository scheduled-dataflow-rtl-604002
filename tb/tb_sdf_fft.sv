// tb_sdf_fft: radix-2 decimation-in-time FFT of N = 8, 16, 32 and 64 complex
// integer points on sdf_top at its default sizes, written as a dataflow graph
// of nonblocking SDF threads: one thread per butterfly, log2(N) stages of N/2.
//
// Butterfly thread, frame: [2] ar [3] ai [4] br [5] bi (the four inputs, SC 4),
// [6] wr [7] wi (twiddle), [8] fp0 [9] off0, [10] fp1 [11] off1 (where the two
// complex outputs go: real part at off, imaginary part at off+1).
//   preload  : LOAD R2..R11 from the frame; FORKEP
//   execute  : t = b * w (four MULT, one SUB, one ADD), A = a * S, then
//              out0 = A + t, out1 = A - t; off+1 for both outputs; FORKSP
//   poststore: four STOREs into the consumer frames; FFREE; STOP
// MOV with two destinations builds the register pairs the dyadic MULTs need.
// Integer arithmetic with twiddles w_k = round(S*cos(2*pi*k/N)) -
// j*round(S*sin(2*pi*k/N)), S = 4 (coarse, but it keeps 64 points inside 32
// bits); nothing is rescaled, so every stage multiplies magnitudes by up to
// 3*S and the testbench's reference does the same integer steps. All
// butterflies exist at once: log2(N)*N/2 frames, 192 at N = 64.
// Each output of stage s feeds, as input a or b, the butterfly
// of stage s+1 that holds its position; the last stage stores into a result
// area in frame words no thread is given. The host allocates the butterflies
// last stage first, writes their twiddles and destinations, then stores the
// bit-reversed input into the first stage and waits for idle.
// FFT is one of the programs SDF was evaluated with; this thread program, the
// sizes and the integer arithmetic are this test's own.
module tb_sdf_fft;
  import sdf_pkg::*;
  localparam int P = 0, E = 20, ST = 60;
  localparam int SCALE = 4;
  localparam int RBASE = 200 * 16;   // result area: 2 words per point

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
    repeat (400000) @(posedge clk);
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

  task automatic load_program();
    int p;
    p = P;
    for (int k = 2; k <= 11; k++) iw(p++, enc_ldst(OP_LOAD, 1, k, 0, 0, k));
    iw(p, {OP_FORKEP, 10'd0, 16'(E)});
    p = E;
    iw(p++, enc_alu(OP_MOV, 4, 12, 16, 1));      // br -> R12, R16
    iw(p++, enc_alu(OP_MOV, 6, 13, 19, 1));      // wr -> R13, R19
    iw(p++, enc_alu(OP_MOV, 5, 14, 18, 1));      // bi -> R14, R18
    iw(p++, enc_alu(OP_MOV, 7, 15, 17, 1));      // wi -> R15, R17
    iw(p++, enc_alu(OP_MULT, 12, 20));           // br*wr
    iw(p++, enc_alu(OP_MULT, 14, 21));           // bi*wi
    iw(p++, enc_alu(OP_MULT, 16, 22));           // br*wi
    iw(p++, enc_alu(OP_MULT, 18, 23));           // bi*wr
    iw(p++, enc_alu(OP_SUB, 20, 13, 15, 1));     // tr -> R13, R15
    iw(p++, enc_alu(OP_ADD, 22, 17, 19, 1));     // ti -> R17, R19
    iw(p++, enc_alu(OP_MOV, 2, 28));             // ar
    iw(p++, enc_alu(OP_MOVI, 0, 29, 0, 0, SCALE));
    iw(p++, enc_alu(OP_MULT, 28, 12, 14, 1));    // Ar -> R12, R14
    iw(p++, enc_alu(OP_MOV, 3, 28));             // ai
    iw(p++, enc_alu(OP_MULT, 28, 16, 18, 1));    // Ai -> R16, R18
    iw(p++, enc_alu(OP_ADD, 12, 24));            // out0 re
    iw(p++, enc_alu(OP_SUB, 14, 25));            // out1 re
    iw(p++, enc_alu(OP_ADD, 16, 26));            // out0 im
    iw(p++, enc_alu(OP_SUB, 18, 27));            // out1 im
    iw(p++, enc_alu(OP_ADDI, 9, 30, 0, 0, 1));   // off0 + 1
    iw(p++, enc_alu(OP_ADDI, 11, 31, 0, 0, 1));  // off1 + 1
    iw(p, {OP_FORKSP, 10'd0, 16'(ST)});
    p = ST;
    iw(p++, enc_ldst(OP_STORE, 8, 24, 9, 1));
    iw(p++, enc_ldst(OP_STORE, 8, 26, 30, 1));
    iw(p++, enc_ldst(OP_STORE, 10, 25, 11, 1));
    iw(p++, enc_ldst(OP_STORE, 10, 27, 31, 1));
    iw(p++, enc_ldst(OP_FFREE, 1, 0));
    iw(p++, {OP_STOP, 26'd0});
  endtask

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r |= ((v >> i) & 1) << (bits - 1 - i);
    return r;
  endfunction

  initial begin
    int sizes[4];
    sizes = '{8, 16, 32, 64};
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_program();
    foreach (sizes[z]) begin
      int n, lg, fp, got, t0, th0;
      int xr[64], xi[64], yr[64], yi[64], wr[32], wi[32];
      int bfp[6][32];           // frame of the butterfly of stage s holding lower index
      n = sizes[z];
      lg = $clog2(n);
      for (int k = 0; k < n / 2; k++) begin
        wr[k] = int'(SCALE * $cos(2.0 * 3.141592653589793 * k / n));
        wi[k] = -int'(SCALE * $sin(2.0 * 3.141592653589793 * k / n));
      end
      for (int i = 0; i < n; i++) begin
        xr[i] = $urandom_range(0, 200) - 100;
        xi[i] = $urandom_range(0, 200) - 100;
      end
      // reference: same integer steps; y holds the values in position order
      for (int i = 0; i < n; i++) begin yr[i] = xr[bitrev(i, lg)]; yi[i] = xi[bitrev(i, lg)]; end
      for (int s = 0; s < lg; s++) begin
        int h;
        h = 1 << s;
        for (int lo = 0; lo < n; lo++) if ((lo & h) == 0) begin
          int k, tr, ti, ar, ai;
          k = (lo % h) * (n / (2 * h));
          tr = yr[lo + h] * wr[k] - yi[lo + h] * wi[k];
          ti = yr[lo + h] * wi[k] + yi[lo + h] * wr[k];
          ar = yr[lo] * SCALE; ai = yi[lo] * SCALE;
          yr[lo] = ar + tr; yi[lo] = ai + ti;
          yr[lo + h] = ar - tr; yi[lo + h] = ai - ti;
        end
      end
      th0 = int'(sp_poststores);
      t0 = int'($time / 10);
      // create the butterflies, last stage first, so destinations are known
      for (int s = lg - 1; s >= 0; s--) begin
        int h;
        h = 1 << s;
        for (int lo = 0; lo < n; lo++) if ((lo & h) == 0) begin
          int k;
          k = (lo % h) * (n / (2 * h));
          falloc(P, 4, fp);
          bfp[s][lo / (2 * h) * h + lo % h] = fp;
          store(fp + 6, wr[k], 1'b0);
          store(fp + 7, wi[k], 1'b0);
          for (int o = 0; o < 2; o++) begin
            int q, dfp, doff;
            q = lo + o * h;           // output position
            if (s == lg - 1) begin
              dfp = RBASE; doff = 2 * q;
            end else begin
              int h2;
              h2 = 2 * h;
              dfp = bfp[s + 1][q / (2 * h2) * h2 + q % h2];
              doff = ((q & h2) == 0) ? 2 : 4;
            end
            store(fp + 8 + 2 * o, dfp, 1'b0);
            store(fp + 9 + 2 * o, doff, 1'b0);
          end
        end
      end
      // inputs, in bit-reversed order, into the first stage
      for (int q = 0; q < n; q++) begin
        fp = bfp[0][q / 2];
        store(fp + ((q % 2 != 0) ? 4 : 2), xr[bitrev(q, lg)], 1'b1);
        store(fp + ((q % 2 != 0) ? 5 : 3), xi[bitrev(q, lg)], 1'b1);
      end
      repeat (5) @(negedge clk);
      while (!idle) @(negedge clk);
      $display("INFO: %0d-point FFT in %0d cycles, %0d butterfly threads",
               n, int'($time / 10) - t0, int'(sp_poststores) - th0);
      for (int q = 0; q < n; q++) begin
        read(RBASE + 2 * q, got);
        check(got == yr[q], $sformatf("N=%0d X[%0d] re got %0d exp %0d", n, q, got, yr[q]));
        read(RBASE + 2 * q + 1, got);
        check(got == yi[q], $sformatf("N=%0d X[%0d] im got %0d exp %0d", n, q, got, yi[q]));
      end
      check(int'(sp_poststores) - th0 == lg * n / 2, "one thread per butterfly");
      check(int'(frames_free) == 256, $sformatf("frames returned: %0d free", frames_free));
      check(int'(rs_free) == 16, "register sets returned");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
