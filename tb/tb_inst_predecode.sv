// tb_inst_predecode: builds random legal instructions (random clusters in
// random order, 1..4 ops per bundle, stop bit on the last op, junk after
// it) and checks bundles, cluster mask and length. Then checks that
// malformed instructions (no stop bit, bundle too long, cluster used twice,
// three multiplies, two memory ops, unknown opcode) are flagged.
module tb_inst_predecode;
  import csmt_pkg::*;
  syl_t [15:0] win; syl_t [3:0][3:0] bundles; logic [3:0] lmask; logic [4:0] len; logic err;
  int checks = 0, failures = 0;
  inst_predecode #(.NC(4), .ISSUE(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic syl_t rnd_op();
    opc_e ops [6] = '{OP_ADD, OP_SUB, OP_ADDI, OP_XOR, OP_CMPLT, OP_NOP};
    return mk_syl(0, 0, 0, ops[$urandom % 6], 6'($urandom), 6'($urandom), 11'($urandom));
  endfunction

  task automatic expect_err(string what);
    #1;
    checks++;
    if (err !== 1'b1) begin
      failures++;
      $display("FAIL no error for %s", what);
    end
  endtask

  initial begin
    syl_t [3:0][3:0] eb; logic [3:0] em; int n, nb, order [4], tmp, j, sz;
    for (int it = 0; it < 500; it++) begin
      eb = '0; em = '0; n = 0;
      for (int c = 0; c < 4; c++) order[c] = c;
      for (int c = 3; c > 0; c--) begin
        j = $urandom % (c + 1); tmp = order[c]; order[c] = order[j]; order[j] = tmp;
      end
      nb = 1 + $urandom % 4;
      for (int i = 0; i < 16; i++) win[i] = $urandom;   // junk after the stop bit
      for (int b = 0; b < nb; b++) begin
        sz = 1 + $urandom % 4;
        em[order[b]] = 1;
        for (int k = 0; k < sz; k++) begin
          eb[order[b]][k] = rnd_op();
          eb[order[b]][k][29:28] = 2'(order[b]);
          eb[order[b]][k][30] = (k == 0);
          win[n] = eb[order[b]][k];
          n++;
        end
      end
      win[n-1][31] = 1'b1;
      eb[order[nb-1]][sz-1][31] = 1'b1;
      #1;
      checks++;
      if (err !== 0 || lmask !== em || len !== 5'(n) || bundles !== eb) begin
        failures++;
        if (failures < 5) $display("FAIL it=%0d err=%b mask=%b/%b len=%0d/%0d", it, err, lmask, em, len, n);
      end
    end
    // malformed instructions
    for (int i = 0; i < 16; i++) win[i] = mk_syl(0, 1, 2'(i), OP_ADD, 1, 2, 0);
    expect_err("missing stop bit");
    win = '0;
    for (int i = 0; i < 5; i++) win[i] = mk_syl(i == 4, i == 0, 0, OP_ADD, 1, 2, 0);
    expect_err("5-op bundle");
    win[0] = mk_syl(0, 1, 1, OP_ADD, 1, 2, 0); win[1] = mk_syl(1, 1, 1, OP_ADD, 1, 2, 0);
    expect_err("cluster twice");
    for (int i = 0; i < 3; i++) win[i] = mk_syl(i == 2, i == 0, 0, OP_MPY, 1, 2, 0);
    expect_err("three multiplies");
    for (int i = 0; i < 2; i++) win[i] = mk_syl(i == 1, i == 0, 0, OP_LDW, 1, 2, 0);
    expect_err("two memory ops");
    win[0] = {1'b1, 1'b1, 2'd0, 5'd31, 23'd0};
    expect_err("unknown opcode");
    win[0] = mk_syl(0, 1, 0, OP_GOTO, 0, 0, 4); win[1] = mk_syl(1, 1, 1, OP_BR, 0, 0, 4);
    expect_err("two branches");
    // a legal 2-multiply, 1-load bundle has no error
    win[0] = mk_syl(0, 1, 3, OP_MPY, 1, 2, 0); win[1] = mk_syl(0, 0, 3, OP_MPY, 3, 2, 0);
    win[2] = mk_syl(1, 0, 3, OP_LDW, 4, 2, 0);
    #1;
    checks++;
    if (err !== 0 || lmask !== 4'b1000 || len !== 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
