// tb_exec_packet: random renamed bundles and owners; one edge later each
// physical cluster must hold its owner's bundle, thread tag and address,
// and a cluster without owner must hold NOPs with valid low.
module tb_exec_packet;
  import csmt_pkg::*;
  localparam int NT = 4, NC = 4, IS = 4;
  logic clk = 0, rst_n = 0;
  syl_t [NT-1:0][NC-1:0][IS-1:0] pbundles; logic [NT-1:0][31:0] pc;
  logic [NC-1:0][1:0] owner, ex_tid; logic [NC-1:0] own_valid, ex_valid;
  syl_t [NC-1:0][IS-1:0] ex_bundle; logic [NC-1:0][31:0] ex_pc;
  int checks = 0, failures = 0;
  exec_packet #(.NT(NT), .NC(NC), .ISSUE(IS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    syl_t [NC-1:0][IS-1:0] eb; logic [NC-1:0] ev; logic [NC-1:0][1:0] et; logic [NC-1:0][31:0] ep;
    pbundles = 0; pc = 0; owner = 0; own_valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int t = 0; t < NT; t++) begin
        pc[t] = $urandom;
        for (int c = 0; c < NC; c++) for (int k = 0; k < IS; k++) pbundles[t][c][k] = $urandom;
      end
      for (int c = 0; c < NC; c++) begin
        owner[c] = 2'($urandom); own_valid[c] = 1'($urandom);
        ev[c] = own_valid[c]; et[c] = owner[c]; ep[c] = pc[owner[c]];
        eb[c] = own_valid[c] ? pbundles[owner[c]][c] : '0;
      end
      @(negedge clk);
      for (int c = 0; c < NC; c++) begin
        checks++;
        if (ex_valid[c] !== ev[c] || ex_bundle[c] !== eb[c] ||
            (ev[c] && (ex_tid[c] !== et[c] || ex_pc[c] !== ep[c]))) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
