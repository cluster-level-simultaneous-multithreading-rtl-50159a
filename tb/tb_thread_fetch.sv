// tb_thread_fetch: one thread front end with a testbench instruction memory
// of instructions of 1..3 syllables. Checks, with MISS_LAT = 5:
//  * one instruction per cycle in program order while every request is
//    granted (addresses advance by the decoded lengths);
//  * a taken branch withdraws the request at once and the target is
//    offered 2 cycles later (2-cycle taken-branch penalty);
//  * an ICache miss delays the next instruction by MISS_LAT cycles;
//  * a DCache miss blocks requests for MISS_LAT cycles;
//  * an illegal instruction raises exc with epc and resumes at EXC_VEC;
//  * HALT stops the thread.
module tb_thread_fetch;
  import csmt_pkg::*;
  localparam int ML = 5;
  localparam logic [31:0] VEC = 32'd200;
  logic clk = 0, rst_n = 0;
  logic start, halt, active, fetch_en, ic_miss, req, grant, redirect, dmiss, blocked, exc;
  logic [31:0] start_pc, fetch_addr, fr_pc, redirect_pc, epc;
  syl_t [15:0] fetch_win; syl_t [3:0][3:0] lbundles; logic [3:0] lmask;
  syl_t mem [512];
  int checks = 0, failures = 0;
  int istart [40];
  thread_fetch #(.NC(4), .ISSUE(4), .MISS_LAT(ML), .EXC_VEC(VEC)) dut (.*);
  always #5 clk = ~clk;

  always_comb for (int i = 0; i < 16; i++) fetch_win[i] = mem[(fetch_addr + i) % 512];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t fr_pc=%0d req=%b)", what, $time, fr_pc, req);
    end
  endtask

  // advance one cycle: grant whatever is requested
  task automatic step();
    @(negedge clk);
  endtask

  initial begin
    int a, len, k, wait_cyc;
    for (int i = 0; i < 512; i++) mem[i] = mk_syl(1, 1, 0, OP_NOP, 0, 0, 0);
    a = 0;
    for (k = 0; k < 40; k++) begin
      istart[k] = a;
      len = 1 + k % 3;
      for (int j = 0; j < len; j++) mem[a + j] = mk_syl(j == len - 1, 1, 2'(j), OP_ADD, 1, 2, rr(3));
      a += len;
    end
    mem[300] = {1'b1, 1'b1, 2'd0, 5'd30, 23'd0};    // illegal opcode
    mem[VEC] = mk_syl(0, 1, 1, OP_ADD, 1, 1, rr(1));
    mem[VEC + 1] = mk_syl(1, 1, 2, OP_SUB, 1, 1, rr(1));
    start = 0; start_pc = 0; halt = 0; ic_miss = 0; redirect = 0; redirect_pc = 0; dmiss = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    start = 1; start_pc = 0;
    step();
    start = 0;
    chk(active && !req, "started, buffer empty");
    step();
    // sequential stream, all granted
    for (k = 0; k < 10; k++) begin
      chk(req && fr_pc == istart[k], $sformatf("instr %0d in order", k));
      chk(lmask == 4'((1 << (1 + k % 3)) - 1), "cluster mask from partial decode");
      step();
    end
    // taken branch while instr 10 waits in the buffer
    chk(req && fr_pc == istart[10], "instr 10 buffered");
    redirect = 1; redirect_pc = 32'(istart[20]);
    #1 chk(!req && !grant, "request withdrawn in the redirect cycle");
    step();
    redirect = 0;
    wait_cyc = 1;
    while (!req && wait_cyc < 10) begin
      step();
      wait_cyc++;
    end
    chk(wait_cyc == 2, $sformatf("taken-branch penalty 2 (got %0d)", wait_cyc));
    chk(fr_pc == istart[20], "branch target fetched");
    step();
    // ICache miss on the next fetch (of instr 22)
    chk(req && fr_pc == istart[21], "instr 21");
    ic_miss = 1;
    step();
    ic_miss = 0;
    wait_cyc = 0;
    while (!req && wait_cyc < 40) begin
      step();
      wait_cyc++;
    end
    chk(wait_cyc == ML, $sformatf("ICache miss adds %0d cycles (got %0d)", ML, wait_cyc));
    chk(fr_pc == istart[22], "instr 22 after miss");
    // DCache miss
    dmiss = 1;
    step();
    dmiss = 0;
    wait_cyc = 0;
    while (!req && wait_cyc < 40) begin
      chk(blocked, "blocked during DCache miss");
      step();
      wait_cyc++;
    end
    chk(wait_cyc == ML, $sformatf("DCache miss blocks %0d cycles (got %0d)", ML, wait_cyc));
    // exception
    redirect = 1; redirect_pc = 300;
    step();
    redirect = 0;
    step();
    #1 chk(exc && !req, "illegal instruction raises exception");
    step();
    chk(epc == 300, "epc");
    step();
    chk(req && fr_pc == VEC, "handler fetched");
    // halt
    halt = 1;
    #1 chk(!req, "no request while halting");
    step();
    halt = 0;
    chk(!active && !req, "halted");
    step();
    chk(!active && !req && !fetch_en, "stays halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign grant = req;
endmodule
