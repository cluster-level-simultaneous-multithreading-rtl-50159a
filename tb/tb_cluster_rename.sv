// tb_cluster_rename: random bundles and shifts. Checks the virtual cluster
// table of the 4-thread / 4-cluster case (thread 1: logical 0,1,2,3 ->
// physical 1,2,3,0), the rotated usage mask and the renamed target cluster
// of inter-cluster copies; other operations must pass unchanged.
module tb_cluster_rename;
  import csmt_pkg::*;
  logic [1:0] shift; syl_t [3:0][3:0] lbundles, pbundles; logic [3:0] lmask, pmask;
  int checks = 0, failures = 0;
  cluster_rename #(.NC(4), .ISSUE(4)) dut (.*);
  // physical cluster of logical cluster l for shift s (table written out)
  int vct [4][4] = '{'{0, 1, 2, 3}, '{1, 2, 3, 0}, '{2, 3, 0, 1}, '{3, 0, 1, 2}};

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    syl_t e;
    for (int n = 0; n < 400; n++) begin
      shift = 2'($urandom); lmask = 4'($urandom);
      for (int l = 0; l < 4; l++)
        for (int k = 0; k < 4; k++) begin
          lbundles[l][k] = $urandom;
          if ($urandom % 3 == 0) lbundles[l][k][27:23] = OP_XCP;
        end
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (pmask[vct[shift][l]] !== lmask[l]) failures++;
        for (int k = 0; k < 4; k++) begin
          e = lbundles[l][k];
          if (e[27:23] == OP_XCP) e[1:0] = 2'(vct[shift][e[1:0]]);
          checks++;
          if (pbundles[vct[shift][l]][k] !== e) begin
            failures++;
            if (failures < 5) $display("FAIL sh=%0d l=%0d k=%0d %h exp %h", shift, l, k,
                                       pbundles[vct[shift][l]][k], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
