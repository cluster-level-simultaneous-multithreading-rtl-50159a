// tb_mul_unit: checks that the multiplier accepts a new product every cycle
// and that each result, with its thread tag and destination, appears one
// clock edge after issue (written at the end of the second cycle).
module tb_mul_unit;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid; logic [1:0] in_tid, out_tid; logic [5:0] in_dst, out_dst;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  mul_unit #(.NT(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] pa, pb; logic pv; logic [1:0] pt; logic [5:0] pd;
    in_valid = 0; in_tid = 0; in_dst = 0; a = 0; b = 0; pv = 0; pa = 0; pb = 0; pt = 0; pd = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      // check result of the operation issued in the previous cycle
      checks++;
      if (out_valid !== pv || (pv && (y !== pa * pb || out_tid !== pt || out_dst !== pd))) begin
        failures++;
        $display("FAIL n=%0d y=%h exp=%h v=%b/%b", n, y, pa * pb, out_valid, pv);
      end
      in_valid = ($urandom % 4) != 0; in_tid = 2'($urandom); in_dst = 6'($urandom);
      a = $urandom; b = $urandom;
      pv = in_valid; pa = a; pb = b; pt = in_tid; pd = in_dst;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
