// tb_csmt_top: end-to-end test of the CSMT core at its default size
// (4 threads, 4 clusters of 4 issue slots, 20-cycle misses).
//
// Each thread runs a small loop compiled for logical clusters 0 and 1:
//   acc = sum_{i=1..N} (K + i*i)      (K is loaded from data memory)
//   mem[B+4] = acc; mem[B+8] = acc + 3 (via copies to cluster 1 and back)
// with a per-thread N, K and data base B. Thread 2 then executes an
// illegal instruction; the exception handler at address 0 stores a marker
// and halts. Results are checked against values computed here.
//
// Runs: (1) four threads, real memory (ICache/DCache misses);
//       (2) the same with perfect memory, which must take fewer cycles;
//       (3) two threads, perfect memory (renaming shift 2);
//       (4) one thread alone, perfect memory;
//       (5) four threads, perfect memory, fixed priority with thread 3 on
//           top: thread 3 must never lose a collision.
// Counted mechanisms (each must occur): packets merging two or more
// threads, collisions, bundles executed on a renamed cluster, taken
// branches, ICache misses, DCache-miss blocking, multiplies, loads,
// inter-cluster copies, exceptions, HALT, round-robin grants to all four
// threads, and the perfect-memory mode.
module tb_csmt_top;
  import csmt_pkg::*;
  logic clk = 0, rst_n = 0, perfect_mem = 0;
  logic imem_we = 0, dmem_we = 0;
  logic [31:0] imem_waddr = 0, imem_wdata = 0, dmem_waddr = 0, dmem_wdata = 0, dmem_raddr = 0, dmem_rdata;
  logic [3:0] start = 0; logic [3:0][31:0] start_pc = 0; logic [2:0] start_nthreads = 0;
  logic fixed_prio = 0; logic [1:0] fixed_top = 3;
  int n_fixed = 0, n_top_denied = 0;
  logic [3:0] thread_active, exc, issue_grant, redirect, blocked;
  logic [3:0][31:0] epc; logic [3:0] ex_valid; logic [3:0][1:0] ex_tid;

  csmt_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc_total = 0;
  // mechanism counters
  int n_merge = 0, n_coll = 0, n_renamed = 0, n_taken = 0, n_icmiss = 0, n_blocked = 0;
  int n_mul = 0, n_load = 0, n_copy = 0, n_exc = 0, n_halt = 0, n_perfect = 0;
  int grants [4] = '{0, 0, 0, 0};
  int usage_hist [5] = '{0, 0, 0, 0, 0};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- tiny assembler ----------------
  syl_t prog [4096];
  int   pc_asm;
  syl_t cur [16];
  int   ncur;
  logic [1:0] lastc;

  task automatic op(int c, opc_e o, int d, int s1, int s2imm, bit reg2 = 0);
    logic [10:0] f;
    f = reg2 ? rr(6'(s2imm)) : 11'(s2imm);
    cur[ncur] = mk_syl(0, (ncur == 0) || (2'(c) != lastc), 2'(c), o, 6'(d), 6'(s1), f);
    lastc = 2'(c);
    ncur++;
  endtask
  task automatic endi();
    cur[ncur - 1][31] = 1'b1;
    for (int i = 0; i < ncur; i++) prog[pc_asm + i] = cur[i];
    pc_asm += ncur;
    ncur = 0;
  endtask

  int tN [4] = '{5, 8, 11, 14};
  int tK [4] = '{10, 11, 12, 13};
  int tpc [4];
  int ill_pc;
  localparam int MARK = 32'h3F00;

  task automatic gen_thread(int t);
    int loop_pc, br_pc, base;
    base = 1024 * (t + 1);
    tpc[t] = pc_asm;
    op(0, OP_ADDI, 1, 0, tN[t]); op(0, OP_ADDI, 2, 0, 0); op(0, OP_ADDI, 3, 0, 1);
    op(1, OP_ADDI, 1, 0, 3); endi();
    op(0, OP_SHLI, 3, 3, 10); endi();                    // r3 = 1024 (shift by 10)
    op(0, OP_ADDI, 6, 0, t + 1); endi();
    op(0, OP_MPY, 3, 3, 6, 1); endi();                   // r3 = 1024 * (t+1)
    op(0, OP_ADDI, 0, 0, 0); endi();                     // wait for multiply
    op(0, OP_LDW, 5, 3, 0); endi();                      // r5 = K
    op(1, OP_ADDI, 2, 0, 0); endi();                     // filler on cluster 1
    loop_pc = pc_asm;
    op(0, OP_MPY, 4, 1, 1, 1); op(0, OP_ADDI, 1, 1, -1); op(0, OP_CMPEQI, 0, 1, 1); endi();
    op(0, OP_ADD, 2, 2, 5, 1); op(1, OP_MPY, 2, 1, 1, 1); endi();
    br_pc = pc_asm;
    op(0, OP_ADD, 2, 2, 4, 1); op(0, OP_BRF, 0, 0, loop_pc - br_pc); endi();
    op(0, OP_STW, 2, 3, 4); op(0, OP_XCP, 7, 2, 1); endi();
    op(1, OP_ADD, 8, 7, 1, 1); endi();
    op(1, OP_XCP, 9, 8, 0); endi();
    op(0, OP_STW, 9, 3, 8); endi();
    if (t == 2) begin
      ill_pc = pc_asm;
      cur[0] = {1'b1, 1'b1, 2'd0, 5'd31, 23'd0}; ncur = 1;
      for (int i = 0; i < ncur; i++) prog[pc_asm + i] = cur[i];
      pc_asm += 1; ncur = 0;
    end
    op(0, OP_HALT, 0, 0, 0); endi();
  endtask

  function automatic int expect_acc(int t);
    int s = 0;
    for (int i = 1; i <= tN[t]; i++) s += tK[t] + i * i;
    return s;
  endfunction

  // ---------------- observation ----------------
  always @(posedge clk) if (rst_n) begin
    int nthr, used;
    logic [3:0] seen;
    cyc_total++;
    seen = 0; used = 0;
    for (int c = 0; c < 4; c++) if (ex_valid[c]) begin
      seen[ex_tid[c]] = 1; used++;
      if (32'(dut.u_shift.shift[ex_tid[c]]) != 0) n_renamed++;
      for (int k = 0; k < 4; k++) begin
        if (ex_bundle_opc(c, k) == OP_MPY) n_mul++;
        if (ex_bundle_opc(c, k) == OP_LDW) n_load++;
        if (ex_bundle_opc(c, k) == OP_XCP) n_copy++;
        if (ex_bundle_opc(c, k) == OP_HALT) n_halt++;
      end
    end
    usage_hist[used]++;
    nthr = $countones(seen);
    if (nthr >= 2) n_merge++;
    for (int t = 0; t < 4; t++) begin
      if (dut.t_req[t] && !issue_grant[t]) n_coll++;
      if (issue_grant[t]) grants[t]++;
      if (redirect[t]) n_taken++;
      if (exc[t]) n_exc++;
      if (dut.t_fetch_en[t] && dut.t_ic_miss[t]) n_icmiss++;
      if (dut.t_dmiss[t]) n_blocked++;
    end
    if (perfect_mem) n_perfect++;
    if (fixed_prio) begin
      n_fixed++;
      if (dut.t_req[fixed_top] && !issue_grant[fixed_top]) n_top_denied++;
    end
  end

  function automatic logic [4:0] ex_bundle_opc(int c, int k);
    return syl_opc(dut.ex_bundle[c][k]);
  endfunction

  // ---------------- one run ----------------
  task automatic run(int nthr, logic perf, logic fixed, output int cycles);
    int t0;
    @(negedge clk);
    rst_n = 0;
    perfect_mem = perf;
    fixed_prio = fixed;
    @(negedge clk);
    rst_n = 1;
    // program and data
    for (int a = 0; a < pc_asm; a++) begin
      imem_we = 1; imem_waddr = a; imem_wdata = prog[a];
      @(negedge clk);
    end
    imem_we = 0;
    for (int t = 0; t < 4; t++) begin
      dmem_we = 1; dmem_waddr = 1024 * (t + 1); dmem_wdata = tK[t];
      @(negedge clk);
      dmem_waddr = 1024 * (t + 1) + 4; dmem_wdata = 0;
      @(negedge clk);
      dmem_waddr = 1024 * (t + 1) + 8; dmem_wdata = 0;
      @(negedge clk);
    end
    dmem_waddr = MARK; dmem_wdata = 0;
    @(negedge clk);
    dmem_we = 0;
    // start the threads
    for (int t = 0; t < nthr; t++) begin
      start = 4'(1 << t); start_pc[t] = tpc[t]; start_nthreads = 3'(nthr);
      @(negedge clk);
    end
    start = 0;
    t0 = cyc_total;
    while (thread_active != 0 && cyc_total - t0 < 20000) @(negedge clk);
    repeat (3) @(negedge clk);
    cycles = cyc_total - t0;
    chk(thread_active == 0, $sformatf("%0d threads finished", nthr));
    for (int t = 0; t < nthr; t++) begin
      dmem_raddr = 1024 * (t + 1) + 4;
      #1 chk(dmem_rdata == expect_acc(t), $sformatf("thread %0d result %0d exp %0d", t, dmem_rdata, expect_acc(t)));
      dmem_raddr = 1024 * (t + 1) + 8;
      #1 chk(dmem_rdata == expect_acc(t) + 3, $sformatf("thread %0d copied result", t));
    end
    if (nthr > 2) begin
      dmem_raddr = MARK;
      #1 chk(dmem_rdata == 32'h77, "exception handler ran");
      chk(epc[2] == ill_pc, "epc of the illegal instruction");
    end
  endtask

  initial begin
    int c4r, c4p, c2p, c1p, c4f;
    pc_asm = 0; ncur = 0; lastc = 0;
    for (int i = 0; i < 4096; i++) prog[i] = 0;
    // exception handler at address 0
    pc_asm_fix();
    pc_asm = 16;
    for (int t = 0; t < 4; t++) gen_thread(t);
    repeat (2) @(negedge clk);
    run(4, 0, 0, c4r);
    run(4, 1, 0, c4p);
    run(2, 1, 0, c2p);
    run(1, 1, 0, c1p);
    run(4, 1, 1, c4f);
    fixed_prio = 0;
    $display("cycles: 4 threads real %0d, 4 threads perfect %0d, 2 threads perfect %0d, 1 thread perfect %0d, 4 threads fixed priority %0d",
             c4r, c4p, c2p, c1p, c4f);
    chk(n_fixed > 0 && n_top_denied == 0, "fixed priority: top thread never loses a collision");
    chk(c4p < c4r, "perfect memory faster than real memory");
    $display("mechanisms: merge=%0d collisions=%0d renamed=%0d taken=%0d icmiss=%0d dmiss=%0d mul=%0d load=%0d copy=%0d exc=%0d halt=%0d perfect=%0d",
             n_merge, n_coll, n_renamed, n_taken, n_icmiss, n_blocked, n_mul, n_load, n_copy, n_exc, n_halt, n_perfect);
    $display("grants per thread: %0d %0d %0d %0d", grants[0], grants[1], grants[2], grants[3]);
    $display("clusters busy histogram 0..4: %0d %0d %0d %0d %0d", usage_hist[0], usage_hist[1],
             usage_hist[2], usage_hist[3], usage_hist[4]);
    chk(n_merge > 0, "multi-thread packets");
    chk(n_coll > 0, "collisions");
    chk(n_renamed > 0, "renamed clusters");
    chk(n_taken > 0, "taken branches");
    chk(n_icmiss > 0, "ICache misses");
    chk(n_blocked > 0, "DCache misses");
    chk(n_mul > 0 && n_load > 0 && n_copy > 0, "multiplies, loads, copies");
    chk(n_exc == 3, "one exception in each 4-thread run, none otherwise");
    chk(n_halt > 0, "halts");
    chk(n_perfect > 0, "perfect-memory mode");
    for (int t = 0; t < 4; t++) chk(grants[t] > 0, "every thread granted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The handler stores to address MARK = 0x3F00, which does not fit the
  // 11-bit immediate: rebuild it as r21 = 0x3F << 8, then store at r21.
  task automatic pc_asm_fix();
    int save;
    save = pc_asm;
    pc_asm = 0;
    op(0, OP_ADDI, 20, 0, 32'h77); op(0, OP_ADDI, 21, 0, 32'h3F); endi();
    op(0, OP_SHLI, 21, 21, 8); endi();
    op(0, OP_STW, 20, 21, 0); endi();
    op(0, OP_HALT, 0, 0, 0); endi();
    pc_asm = save;
  endtask
endmodule
