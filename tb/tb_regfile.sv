// tb_regfile: random writes through all ports against a reference array;
// checks register 0 stays zero, reads see writes after one edge and the
// higher-numbered port wins a same-register conflict.
module tb_regfile;
  localparam int NR = 4, NW = 3, NBRD = 2, NBW = 2;
  logic clk = 0, rst_n = 0;
  logic [NR-1:0][5:0] raddr; logic [NR-1:0][31:0] rdata;
  logic [NW-1:0] we; logic [NW-1:0][5:0] waddr; logic [NW-1:0][31:0] wdata;
  logic [NBRD-1:0][2:0] braddr; logic [NBRD-1:0] brdata;
  logic [NBW-1:0] bwe; logic [NBW-1:0][2:0] bwaddr; logic [NBW-1:0] bwdata;
  int checks = 0, failures = 0;
  logic [31:0] ref_r [64];
  logic [7:0]  ref_b;
  regfile #(.NREGS(64), .NBREG(8), .NR(NR), .NW(NW), .NBRD(NBRD), .NBW(NBW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; bwe = 0; raddr = 0; braddr = 0; waddr = 0; wdata = 0; bwaddr = 0; bwdata = 0;
    for (int i = 0; i < 64; i++) ref_r[i] = 0;
    ref_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== ref_r[raddr[p]]) begin
          failures++;
          if (failures < 5) $display("FAIL r%0d=%h exp %h", raddr[p], rdata[p], ref_r[raddr[p]]);
        end
      end
      for (int p = 0; p < NBRD; p++) begin
        checks++;
        if (brdata[p] !== ref_b[braddr[p]]) failures++;
      end
      for (int p = 0; p < NW; p++) begin
        we[p] = $urandom % 2; waddr[p] = 6'($urandom % 16); wdata[p] = $urandom;
        if (we[p] && waddr[p] != 0) ref_r[waddr[p]] = wdata[p];
      end
      for (int p = 0; p < NBW; p++) begin
        bwe[p] = $urandom % 2; bwaddr[p] = 3'($urandom); bwdata[p] = 1'($urandom);
        if (bwe[p]) ref_b[bwaddr[p]] = bwdata[p];
      end
      for (int p = 0; p < NR; p++) raddr[p] = 6'($urandom % 16);
      for (int p = 0; p < NBRD; p++) braddr[p] = 3'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
