// tb_cluster: drives one cluster with hand-written bundles of two threads
// and checks, through the copy, store and branch outputs:
//  * ALU results are readable in the next cycle, multiply and load results
//    only two cycles after issue;
//  * compares set branch registers that BR/BRF read;
//  * stores present address and data, loads report DCache misses;
//  * copies carry the renamed target cluster, incoming copies are written;
//  * each thread has its own registers; HALT is reported.
module tb_cluster;
  import csmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ex_valid; logic [1:0] ex_tid, br_tid, xo_tid; syl_t [3:0] ex_bundle; logic [31:0] ex_pc;
  logic br_taken, halt, mem_re, mem_we, dc_miss, dmiss, xo_valid;
  logic [31:0] br_target, mem_addr, mem_wdata, mem_rdata, xo_data;
  logic [1:0] xo_dst; logic [5:0] xo_reg;
  logic [3:0] xi_valid; logic [3:0][1:0] xi_tid; logic [3:0][5:0] xi_reg; logic [3:0][31:0] xi_data;
  int checks = 0, failures = 0;
  cluster #(.NT(4), .NC(4), .ISSUE(4)) dut (.*);
  always #5 clk = ~clk;
  assign mem_rdata = (mem_addr == 32) ? 32'h0000ABCD : 32'h0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s xo_data=%0d mem=%b/%0d/%0d br=%b tgt=%0d", what, xo_data, mem_we,
               mem_addr, mem_wdata, br_taken, br_target);
    end
  endtask

  // present a bundle for one cycle (ops o0..o3, NOP padded)
  task automatic issue(logic [1:0] tid, syl_t o0, syl_t o1 = 0, syl_t o2 = 0, syl_t o3 = 0);
    @(negedge clk);
    ex_valid = 1; ex_tid = tid; ex_bundle = {o3, o2, o1, o0};
    #1;
  endtask
  function automatic syl_t op(opc_e o, int d, int s1, int s2imm);
    return mk_syl(0, 0, 0, o, 6'(d), 6'(s1), 11'(s2imm));
  endfunction
  function automatic syl_t rop(opc_e o, int d, int s1, int s2);
    return mk_syl(0, 0, 0, o, 6'(d), 6'(s1), rr(6'(s2)));
  endfunction

  initial begin
    ex_valid = 0; ex_tid = 0; ex_bundle = 0; ex_pc = 100; dc_miss = 0;
    xi_valid = 0; xi_tid = 0; xi_reg = 0; xi_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    issue(1, op(OP_ADDI, 1, 0, 5), op(OP_ADDI, 2, 0, 7));
    issue(1, rop(OP_ADD, 3, 1, 2), rop(OP_MPY, 4, 1, 2), rop(OP_CMPLT, 1, 1, 2), op(OP_XCP, 9, 1, 2));
    chk(xo_valid && xo_dst == 2 && xo_data == 5 && xo_reg == 9 && xo_tid == 1, "copy of ALU result after 1 cycle");
    issue(1, op(OP_STW, 3, 0, 16), op(OP_XCP, 10, 4, 1));
    chk(mem_we && !mem_re && mem_addr == 16 && mem_wdata == 12, "store of r3 = 5 + 7");
    chk(xo_valid && xo_data == 0, "multiply result not visible after 1 cycle");
    issue(1, op(OP_XCP, 11, 4, 3), op(OP_BR, 0, 1, 8));
    chk(xo_data == 35 && xo_dst == 3, "multiply result after 2 cycles");
    chk(br_taken && br_target == 108 && br_tid == 1, "BR on b1 = (5 < 7) taken");
    dc_miss = 1;
    issue(1, op(OP_LDW, 5, 0, 32), op(OP_BRF, 0, 1, 8));
    chk(mem_re && mem_addr == 32 && dmiss, "load with DCache miss reported");
    chk(!br_taken, "BRF on true branch register not taken");
    dc_miss = 0;
    issue(1, op(OP_XCP, 12, 5, 0));
    chk(xo_data == 0 && !dmiss, "load result not visible after 1 cycle");
    issue(1, op(OP_XCP, 12, 5, 0));
    chk(xo_data == 32'hABCD, "load result after 2 cycles");
    issue(2, op(OP_XCP, 12, 1, 0), rop(OP_SUB, 7, 0, 0));
    chk(xo_data == 0 && xo_tid == 2, "thread 2 has its own registers");
    @(negedge clk);
    ex_valid = 0;
    xi_valid = 4'b0100; xi_tid[2] = 1; xi_reg[2] = 6; xi_data[2] = 99;
    #1 chk(!xo_valid && !br_taken && !mem_we, "idle cluster does nothing");
    @(negedge clk);
    xi_valid = 0;
    issue(1, op(OP_XCP, 1, 6, 0), op(OP_GOTO, 0, 0, -4));
    chk(xo_data == 99, "incoming copy written");
    chk(br_taken && br_target == 96, "GOTO backwards");
    issue(1, op(OP_HALT, 0, 0, 0));
    chk(halt && br_tid == 1, "halt");
    @(negedge clk);
    ex_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
