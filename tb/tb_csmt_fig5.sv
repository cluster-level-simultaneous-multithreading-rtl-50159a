// tb_csmt_fig5: the four-thread, four-cluster example of the CSMT scheme,
// run on the full core at its default size with perfect memory.
//
// Each thread executes four instructions whose bundles use these logical
// clusters (thread: instr0 | instr1 | instr2 | instr3):
//   T0: {0,1} | {1}     | {0}     | {0,2,3}
//   T1: {0,1} | {1,2}   | {0}     | {0,3}
//   T2: {0}   | {1,2,3} | {0,1}   | {0,3}
//   T3: {0}   | {0,1}   | {0,1,2} | {0,3}
// All four threads start together (renaming shifts 0,1,2,3) and the round-
// robin pointer gives thread 0 top priority in the first merge cycle. The
// merged stream must take 9 cycles (against 16 for one thread at a time).
// The grant vector and the owner of each physical cluster are checked in
// every cycle against the greedy merge worked out by hand:
//   cycle 0: T0 T2 T3   owners 0 0 2 3     cycle 5: T0 T1 T2  owners 0 1 2 2
//   cycle 1: T1 T3      owners 3 1 1 3     cycle 6: T2        owners - 2 2 -
//   cycle 2: T2         owners 2 2 - 2     cycle 7: T1 T3     owners 1 1 3 3
//   cycle 3: T3         owners 3 3 - 3     cycle 8: T0        owners 0 - 0 0
//   cycle 4: T0 T1      owners - 0 1 1
// The last instruction of every thread also halts it. The cluster-0 bundle
// of thread 0's first instruction also holds a load (base r10) and an
// ADDI r10 = r10 + 64, so every run loads from a new cache line.
//
// A second core (dut2) runs the same program with real caches and a
// miss latency of 3 cycles, the cache-miss variant of the example. It runs
// the program once to warm the instruction cache, then again; in the second
// run only thread 0's load misses. That run is checked for: thread 0
// blocked for 3 cycles, other threads issuing in every cycle it is blocked,
// and a total longer than 9 cycles but shorter than 9 plus the miss latency.
module tb_csmt_fig5;
  import csmt_pkg::*;
  logic clk = 0, rst_n = 0, perfect_mem = 1;
  logic imem_we = 0, dmem_we = 0;
  logic [31:0] imem_waddr = 0, imem_wdata = 0, dmem_waddr = 0, dmem_wdata = 0, dmem_raddr = 0, dmem_rdata;
  logic [3:0] start = 0; logic [3:0][31:0] start_pc = 0; logic [2:0] start_nthreads = 4;
  logic fixed_prio = 0; logic [1:0] fixed_top = 0;
  logic [3:0] thread_active, exc, issue_grant, redirect, blocked;
  logic [3:0][31:0] epc; logic [3:0] ex_valid; logic [3:0][1:0] ex_tid;
  csmt_top dut (.*);

  logic [3:0] start2 = 0;
  logic [3:0] active2, exc2, grant2, redirect2, blocked2, ex_valid2;
  logic [3:0][31:0] epc2; logic [3:0][1:0] ex_tid2; logic [31:0] dmem_rdata2;
  csmt_top #(.MISS_LAT(3)) dut2 (
    .clk, .rst_n, .perfect_mem(1'b0), .imem_we, .imem_waddr, .imem_wdata,
    .dmem_we, .dmem_waddr, .dmem_wdata, .dmem_raddr, .dmem_rdata(dmem_rdata2),
    .start(start2), .start_pc, .start_nthreads, .fixed_prio, .fixed_top, .thread_active(active2), .exc(exc2), .epc(epc2),
    .issue_grant(grant2), .ex_valid(ex_valid2), .ex_tid(ex_tid2), .redirect(redirect2),
    .blocked(blocked2)
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // logical cluster masks, [thread][instr]
  logic [3:0] lm [4][4] = '{'{4'b0011, 4'b0010, 4'b0001, 4'b1101},
                            '{4'b0011, 4'b0110, 4'b0001, 4'b1001},
                            '{4'b0001, 4'b1110, 4'b0011, 4'b1001},
                            '{4'b0001, 4'b0011, 4'b0111, 4'b1001}};
  logic [3:0] exp_grant [9] = '{4'b1101, 4'b1010, 4'b0100, 4'b1000, 4'b0011,
                                4'b0111, 4'b0100, 4'b1010, 4'b0001};
  int exp_owner [9][4] = '{'{0, 0, 2, 3}, '{3, 1, 1, 3}, '{2, 2, -1, 2}, '{3, 3, -1, 3},
                           '{-1, 0, 1, 1}, '{0, 1, 2, 2}, '{-1, 2, 2, -1}, '{1, 1, 3, 3},
                           '{0, -1, 0, 0}};

  initial begin
    int a, n, first, last, cyc;
    syl_t s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // assemble: each used logical cluster gets one ADD; HALT joins instr 3 on cluster 0
    a = 16;
    for (int t = 0; t < 4; t++) begin
      start_pc[t] = a;
      for (int i = 0; i < 4; i++) begin
        n = 0;
        for (int c = 0; c < 4; c++) if (lm[t][i][c]) begin
          s = mk_syl(0, 1, 2'(c), OP_ADD, 6'(t + 1), 6'(t + 1), rr(0));
          imem_we = 1; imem_waddr = a; imem_wdata = s;
          @(negedge clk);
          a++;
          if (t == 0 && i == 0 && c == 0) begin
            imem_waddr = a; imem_wdata = mk_syl(0, 0, 0, OP_LDW, 6'd20, 6'd10, 11'd0);
            @(negedge clk);
            imem_waddr = a + 1; imem_wdata = mk_syl(0, 0, 0, OP_ADDI, 6'd10, 6'd10, 11'd64);
            @(negedge clk);
            a += 2;
          end
          if (i == 3 && c == 0) begin
            imem_waddr = a; imem_wdata = mk_syl(0, 0, 0, OP_HALT, 0, 0, 0);
            @(negedge clk);
            a++;
          end
        end
        // set the stop bit on the last syllable of the instruction
        imem_waddr = a - 1; imem_wdata = dut.imem[a - 1] | 32'h8000_0000;
        @(negedge clk);
      end
    end
    imem_we = 0;
    // align the round-robin pointer: merge starts two cycles after start
    while (dut.u_sel.prio != 2) @(negedge clk);
    start = 4'b1111;
    @(negedge clk);
    start = 0;
    first = -1; last = -1; cyc = 0;
    for (int k = 0; k < 40; k++) begin
      #1;
      if (issue_grant != 0) begin
        if (first < 0) begin
          first = k;
          checks++;
          if (dut.u_sel.prio != 0) failures++;
        end
        last = k;
      end
      if (first >= 0 && cyc < 9) begin
        checks++;
        if (issue_grant !== exp_grant[cyc]) begin
          failures++;
          $display("FAIL cycle %0d grant %b expected %b", cyc, issue_grant, exp_grant[cyc]);
        end
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (dut.own_valid[c] !== (exp_owner[cyc][c] >= 0) ||
              (exp_owner[cyc][c] >= 0 && 32'(dut.owner[c]) != exp_owner[cyc][c])) begin
            failures++;
            $display("FAIL cycle %0d cluster %0d owner %0d expected %0d", cyc, c, dut.owner[c], exp_owner[cyc][c]);
          end
        end
        cyc++;
      end
      @(negedge clk);
    end
    checks++;
    if (last - first + 1 != 9) begin
      failures++;
      $display("FAIL merged stream took %0d cycles, expected 9", last - first + 1);
    end
    checks++;
    if (thread_active != 0) failures++;
    $display("merged stream: %0d cycles for 16 instructions", last - first + 1);

    // ---- cache-miss variant on dut2 ----
    start2 = 4'b1111;
    @(negedge clk);
    start2 = 0;
    while (active2 != 0) @(negedge clk);
    while (dut2.u_sel.prio != 2) @(negedge clk);
    start2 = 4'b1111;
    @(negedge clk);
    start2 = 0;
    begin
      int nblk, nhidden, nicm, ndm;
      first = -1; last = -1; nblk = 0; nhidden = 0; nicm = 0; ndm = 0;
      for (int k = 0; k < 40; k++) begin
        #1;
        if (grant2 != 0) begin
          if (first < 0) first = k;
          last = k;
        end
        if (blocked2[0]) begin
          nblk++;
          if (grant2[3:1] != 0) nhidden++;
        end
        for (int t = 0; t < 4; t++) if (dut2.t_fetch_en[t] && dut2.t_ic_miss[t]) nicm++;
        for (int t = 0; t < 4; t++) if (dut2.t_dmiss[t]) ndm++;
        @(negedge clk);
      end
      checks++;
      if (nicm != 0 || ndm != 1) begin
        failures++;
        $display("FAIL miss run: %0d ICache misses, %0d DCache misses (expected 0 and 1)", nicm, ndm);
      end
      checks++;
      if (nblk != 3) begin
        failures++;
        $display("FAIL thread 0 blocked %0d cycles, expected 3", nblk);
      end
      checks++;
      if (nhidden != nblk) begin
        failures++;
        $display("FAIL other threads issued in %0d of %0d blocked cycles", nhidden, nblk);
      end
      checks++;
      if (last - first + 1 <= 9 || last - first + 1 >= 12) begin
        failures++;
        $display("FAIL miss run took %0d cycles", last - first + 1);
      end
      checks++;
      if (active2 != 0) failures++;
      $display("merged stream with one 3-cycle miss: %0d cycles", last - first + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
