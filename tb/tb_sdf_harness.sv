// tb_sdf_harness: end-to-end test bench body for sdf_top, shared by the
// reduced-size test (tb_sdf_top) and the default-size test (tb_sdf_top_full).
//
// Program (addresses in instruction memory):
//   Parent thread M, created by the host with SC = 7 and inputs A, B, X, Y, the
//   result frame pointer and two result offsets at frame offsets 2..8.
//     PM (preload)  : 7 LOADs from RFP|2..RFP|8, FORKEP EM
//     EM (execute)  : a three-pass countdown loop (MOVI, ADDI, BNEZ), FORKSP SM
//     SM (poststore): FALLOC a child thread T (SC = 8), 8 STOREs into its
//                     frame, FFREE R1, STOP
//   Child thread T: the worked example of the SDF description, computing
//   (X+Y)*(A+B) and (X-Y)/(A+B):
//     PT: LOAD RFP|2..RFP|9 into R2..R9, FORKEP ET
//     ET: ADD RR2->R11,R13; ADD RR4->R10; SUB RR4->R12; MULT RR10->R14;
//         DIV RR12->R15; FORKSP ST
//     ST: STORE R14 -> R6|R7; STORE R15 -> R8|R9; FFREE R1; STOP
// The host starts N_INST parents at once; every result lands in one result
// frame (SC 31, never enabled) that the host reads back and compares with
// values computed here. Each mechanism of the design is counted and must occur;
// waiting for a register set is required only when NUM_RS < 2*N_INST, and the
// fork stall only with one-entry queues (QDEPTH = 1).
module tb_sdf_harness
  import sdf_pkg::*;
#(
  parameter int unsigned NUM_RS   = 16,
  parameter int unsigned QDEPTH   = 8,
  parameter int unsigned N_INST   = 8,
  parameter bit          DEFAULTS = 1'b1,  // instantiate sdf_top with no overrides
  parameter int unsigned MAX_CYCLES = 20000
);
  localparam int unsigned NUM_FRAMES = 256, FRAME_WORDS = 16;
  localparam int unsigned PM = 0, EM = 20, SM = 40, PT = 60, ET = 80, ST = 100;

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
  logic [$clog2(NUM_RS):0] rs_free;
  logic [31:0] ep_instr, ep_threads, ep_bypass, ep_branch, ep_fork_stall;
  logic [31:0] sp_instr, sp_preloads, sp_poststores, sp_hazard, sp_bypass, sp_alloc_wait;

  if (DEFAULTS) begin : g_dut
    sdf_top dut (.*);
  end else begin : g_dut
    sdf_top #(.NUM_RS(NUM_RS), .QDEPTH(QDEPTH)) dut (.*);
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // events that only show up as levels
  int rs_wait_cycles = 0, exc_full_cycles = 0, plc_queued_max = 0;
  always @(posedge clk) begin
    if (rs_wait) rs_wait_cycles++;
  end

  task automatic load_word(int a, logic [31:0] w);
    @(negedge clk);
    imem_we = 1; imem_waddr = 10'(a); imem_wdata = w;
    @(negedge clk);
    imem_we = 0;
  endtask

  task automatic falloc(int ip, int sc, output int fp);
    forever begin
      @(negedge clk);
      host_falloc_req = 1; host_falloc_ip = IP_W'(ip); host_falloc_sc = SC_W'(sc);
      #1;
      if (host_falloc_gnt) begin
        fp = int'(falloc_fp);
        @(negedge clk);
        host_falloc_req = 0;
        return;
      end
      host_falloc_req = 0;
    end
  endtask

  // store a word into a frame and count it against the frame's SC
  task automatic store(int addr, int data, bit sync);
    forever begin
      @(negedge clk);
      host_mem_en = 1; host_mem_we = 1; host_mem_addr = 12'(addr); host_mem_wdata = data;
      host_sync = sync; host_sync_addr = DADDR_W'(addr);
      #1;
      if (!sync || host_ready) begin
        @(negedge clk);
        host_mem_en = 0; host_mem_we = 0; host_sync = 0;
        return;
      end
      host_mem_en = 0; host_mem_we = 0; host_sync = 0;
    end
  endtask

  task automatic read(int addr, output int data);
    @(negedge clk);
    host_mem_en = 1; host_mem_we = 0; host_mem_addr = 12'(addr);
    @(negedge clk);
    host_mem_en = 0;
    data = int'(host_mem_rdata);
  endtask

  int a[N_INST], b[N_INST], x[N_INST], y[N_INST];
  int res_fp, mfp[N_INST], got, cycles_start, cycles_end;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    // ---- program ----
    int p;
    repeat (3) @(negedge clk);
    rst_n = 1;
    p = PM;
    for (int r = 2; r <= 8; r++) begin load_word(p, enc_ldst(OP_LOAD, 1, r, 0, 0, r)); p++; end
    load_word(p, {OP_FORKEP, 10'd0, 16'(EM)});
    p = EM;
    load_word(p++, enc_alu(OP_MOVI, 0, 20, 0, 0, 3));
    load_word(p++, enc_alu(OP_ADDI, 20, 20, 0, 0, -1));
    load_word(p++, enc_br(OP_BNEZ, 20, EM + 1));
    load_word(p++, {OP_FORKSP, 10'd0, 16'(SM)});
    p = SM;
    load_word(p++, enc_falloc(10, 8, PT));
    load_word(p++, enc_ldst(OP_STORE, 10, 2, 0, 0, 2));
    load_word(p++, enc_ldst(OP_STORE, 10, 3, 0, 0, 3));
    load_word(p++, enc_ldst(OP_STORE, 10, 4, 0, 0, 4));
    load_word(p++, enc_ldst(OP_STORE, 10, 5, 0, 0, 5));
    load_word(p++, enc_ldst(OP_STORE, 10, 6, 0, 0, 6));
    load_word(p++, enc_ldst(OP_STORE, 10, 7, 0, 0, 7));
    load_word(p++, enc_ldst(OP_STORE, 10, 6, 0, 0, 8));
    load_word(p++, enc_ldst(OP_STORE, 10, 8, 0, 0, 9));
    load_word(p++, enc_ldst(OP_FFREE, 1, 0));
    load_word(p++, {OP_STOP, 26'd0});
    p = PT;
    for (int r = 2; r <= 9; r++) begin load_word(p, enc_ldst(OP_LOAD, 1, r, 0, 0, r)); p++; end
    load_word(p, {OP_FORKEP, 10'd0, 16'(ET)});
    p = ET;
    load_word(p++, enc_alu(OP_ADD,  2, 11, 13, 1));
    load_word(p++, enc_alu(OP_ADD,  4, 10));
    load_word(p++, enc_alu(OP_SUB,  4, 12));
    load_word(p++, enc_alu(OP_MULT, 10, 14));
    load_word(p++, enc_alu(OP_DIV,  12, 15));
    load_word(p++, {OP_FORKSP, 10'd0, 16'(ST)});
    p = ST;
    load_word(p++, enc_ldst(OP_STORE, 6, 14, 7, 1));
    load_word(p++, enc_ldst(OP_STORE, 8, 15, 9, 1));
    load_word(p++, enc_ldst(OP_FFREE, 1, 0));
    load_word(p++, {OP_STOP, 26'd0});

    // ---- threads ----
    falloc(0, 31, res_fp);
    for (int i = 0; i < N_INST; i++) begin
      a[i] = int'($urandom_range(1, 200)); b[i] = int'($urandom_range(1, 200));
      x[i] = int'($urandom_range(0, 5000)) - 2500; y[i] = int'($urandom_range(0, 5000)) - 2500;
      falloc(PM, 7, mfp[i]);
    end
    cycles_start = int'(cyc);
    for (int i = 0; i < N_INST; i++) begin
      store(mfp[i] + 2, a[i], 1);
      store(mfp[i] + 3, b[i], 1);
      store(mfp[i] + 4, x[i], 1);
      store(mfp[i] + 5, y[i], 1);
      store(mfp[i] + 6, res_fp, 1);
      store(mfp[i] + 7, 2 * i, 1);
      store(mfp[i] + 8, 2 * i + 1, 1);
    end
    // wait for completion
    repeat (5) @(negedge clk);
    while (!idle) @(negedge clk);
    cycles_end = int'(cyc);
    $display("INFO: %0d parent/child pairs finished in %0d cycles after the first input",
             N_INST, cycles_end - cycles_start);

    for (int i = 0; i < N_INST; i++) begin
      int s, d;
      s = a[i] + b[i];
      read(res_fp + 2 * i, got);
      check(got == (x[i] + y[i]) * s, $sformatf("inst %0d product got %0d exp %0d", i, got, (x[i] + y[i]) * s));
      d = (x[i] - y[i]) / s;
      read(res_fp + 2 * i + 1, got);
      check(got == d, $sformatf("inst %0d quotient got %0d exp %0d", i, got, d));
    end

    // resources all returned, instruction counts as programmed
    check(int'(frames_free) == NUM_FRAMES - 1, $sformatf("frames free %0d", frames_free));
    check(int'(rs_free) == NUM_RS, $sformatf("register sets free %0d", rs_free));
    check(ep_instr == 32'(9 * N_INST), $sformatf("EP instructions %0d", ep_instr));
    check(sp_instr == 32'(28 * N_INST), $sformatf("SP instructions %0d", sp_instr));
    check(ep_threads == 32'(2 * N_INST), $sformatf("FORKSP count %0d", ep_threads));
    check(sp_preloads == 32'(2 * N_INST), $sformatf("FORKEP count %0d", sp_preloads));
    check(sp_poststores == 32'(2 * N_INST), $sformatf("STOP count %0d", sp_poststores));
    check(ep_branch == 32'(2 * N_INST), $sformatf("taken branches %0d", ep_branch));

    // mechanisms
    $display("INFO: EP bypass=%0d branch=%0d fork_stall=%0d; SP hazard=%0d bypass=%0d alloc_wait=%0d; rs_wait=%0d",
             ep_bypass, ep_branch, ep_fork_stall, sp_hazard, sp_bypass, sp_alloc_wait, rs_wait_cycles);
    check(ep_bypass > 0, "EP bypass never used");
    check(ep_branch > 0, "EP branch never taken");
    check(sp_hazard > 0, "SP load interlock never stalled");
    check(sp_bypass > 0, "SP write-back bypass never used");
    check(sp_alloc_wait > 0, "FALLOC/FFREE extra cycle never seen");
    if (NUM_RS < 2 * N_INST) check(rs_wait_cycles > 0, "no thread ever waited for a register set");
    if (QDEPTH == 1) check(ep_fork_stall > 0, "FORKSP never waited for a full PSC queue");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
