// tb_merge_select: first replays cycle 0 and cycle 1 of the 4-thread,
// 4-cluster example of the CSMT scheme (thread 0 holds clusters 0,1 and
// thread 1 needs cluster 1, so threads 0, 2, 3 are merged; next cycle
// thread 1 has top priority). Then random requests are compared with a
// reference greedy merge in rotating priority order; the priority must
// advance by one every cycle. In the last third of the random phase the
// fixed-priority mode is switched on with a random top thread, which must
// then lead the order while the round-robin pointer keeps moving.
// Collisions and the rotation are counted.
module tb_merge_select;
  localparam int NT = 4, NC = 4;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] req, grant; logic [NT-1:0][NC-1:0] pmask;
  logic [NC-1:0][1:0] owner; logic [NC-1:0] own_valid; logic [1:0] prio;
  logic fixed_prio = 0; logic [1:0] fixed_top = 0;
  int checks = 0, failures = 0, collisions = 0;
  merge_select #(.NT(NT), .NC(NC)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [NT-1:0] eg, logic [NC-1:0] ev, logic [NC-1:0][1:0] eo);
    checks++;
    if (grant !== eg || own_valid !== ev) begin
      failures++;
      if (failures < 5) $display("FAIL prio=%0d grant=%b/%b valid=%b/%b", prio, grant, eg, own_valid, ev);
    end
    for (int c = 0; c < NC; c++)
      if (ev[c] && owner[c] !== eo[c]) failures++;
  endtask

  initial begin
    logic [NT-1:0] eg; logic [NC-1:0] used; logic [NC-1:0][1:0] eo; int t, exp_prio;
    req = 0; pmask = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // cycle 0 of the example: T0 {PC0,PC1}, T1 {PC1,PC2}, T2 {PC2}, T3 {PC3}
    req = 4'b1111;
    pmask[0] = 4'b0011; pmask[1] = 4'b0110; pmask[2] = 4'b0100; pmask[3] = 4'b1000;
    #1;
    check(4'b1101, 4'b1111, {2'd3, 2'd2, 2'd0, 2'd0});
    @(negedge clk);
    // cycle 1: T1 {PC1,PC2}, T2 {PC3? no: PC0,PC1,PC3}, T3 {PC0,PC3}, T0 {PC1}
    pmask[1] = 4'b0110; pmask[2] = 4'b1011; pmask[3] = 4'b1001; pmask[0] = 4'b0010;
    #1;
    check(4'b1010, 4'b1111, {2'd3, 2'd1, 2'd1, 2'd3});
    exp_prio = 2;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n >= 2000) begin
        fixed_prio = ($urandom % 4) != 0;
        fixed_top  = 2'($urandom);
        #1;
      end
      checks++;
      if (prio !== (fixed_prio ? fixed_top : 2'(exp_prio))) failures++;
      exp_prio = (exp_prio + 1) % NT;
      for (int i = 0; i < NT; i++) begin
        req[i] = ($urandom % 4) != 0;
        pmask[i] = 4'($urandom);
        if (pmask[i] == 0) pmask[i] = 4'b0001;
      end
      #1;
      eg = 0; used = 0; eo = 0;
      for (int i = 0; i < NT; i++) begin
        t = (int'(prio) + i) % NT;
        if (req[t]) begin
          if ((pmask[t] & used) == 0) begin
            eg[t] = 1; used |= pmask[t];
            for (int c = 0; c < NC; c++) if (pmask[t][c]) eo[c] = 2'(t);
          end else collisions++;
        end
      end
      check(eg, used, eo);
    end
    checks++;
    if (collisions == 0) failures++;
    $display("collisions resolved: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
