// tb_shift_table: loads every thread id with every running-thread count and
// compares the stored shift with the values of the renaming equation
// (e.g. 4 threads on 4 clusters: shift = tid; 2 threads: tid 1 -> 2).
module tb_shift_table;
  logic clk = 0, rst_n = 0;
  logic [3:0] start; logic [2:0] start_nthreads; logic [3:0][1:0] shift;
  int checks = 0, failures = 0;
  shift_table #(.NT(4), .NC(4)) dut (.*);
  always #5 clk = ~clk;

  // expected shifts [nthreads-1][tid], written out by hand for 4 clusters
  int exp_tab [4][4] = '{'{0, 0, 0, 0}, '{0, 2, 0, 2}, '{0, 1, 2, 3}, '{0, 1, 2, 3}};

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; start_nthreads = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 1; n <= 4; n++)
      for (int t = 0; t < 4; t++) begin
        @(negedge clk);
        start = 4'(1 << t); start_nthreads = 3'(n);
        @(negedge clk);
        start = 0;
        checks++;
        if (shift[t] !== 2'(exp_tab[n-1][t])) begin
          failures++;
          $display("FAIL n=%0d t=%0d shift=%0d exp=%0d", n, t, shift[t], exp_tab[n-1][t]);
        end
      end
    // all four threads started together, then held while no start
    @(negedge clk);
    start = 4'b1111; start_nthreads = 4;
    @(negedge clk);
    start = 0; start_nthreads = 2;
    repeat (3) @(negedge clk);
    checks++;
    if (shift !== {2'd3, 2'd2, 2'd1, 2'd0}) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
