// tb_xcopy_net: random copies from every source cluster; each destination
// link must carry exactly the copies addressed to it.
module tb_xcopy_net;
  localparam int NC = 4;
  logic [NC-1:0] src_valid; logic [NC-1:0][1:0] src_dst, src_tid; logic [NC-1:0][5:0] src_reg;
  logic [NC-1:0][31:0] src_data;
  logic [NC-1:0][NC-1:0] dst_valid; logic [NC-1:0][NC-1:0][1:0] dst_tid;
  logic [NC-1:0][NC-1:0][5:0] dst_reg; logic [NC-1:0][NC-1:0][31:0] dst_data;
  int checks = 0, failures = 0;
  xcopy_net #(.NT(4), .NC(NC)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int s = 0; s < NC; s++) begin
        src_valid[s] = 1'($urandom); src_dst[s] = 2'($urandom); src_tid[s] = 2'($urandom);
        src_reg[s] = 6'($urandom); src_data[s] = $urandom;
      end
      #1;
      for (int d = 0; d < NC; d++)
        for (int s = 0; s < NC; s++) begin
          checks++;
          if (dst_valid[d][s] !== (src_valid[s] && src_dst[s] == d) ||
              (dst_valid[d][s] && (dst_data[d][s] !== src_data[s] || dst_reg[d][s] !== src_reg[s] ||
                                   dst_tid[d][s] !== src_tid[s])) ||
              (!dst_valid[d][s] && (dst_data[d][s] !== 0 || dst_reg[d][s] !== 0))) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
