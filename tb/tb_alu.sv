// tb_alu: self-checking test of the ALU. Random operands for every ALU
// opcode are compared with a reference computed in the testbench.
module tb_alu;
  import csmt_pkg::*;
  logic [4:0] opc; logic [31:0] a, b, y; logic cmp;
  int checks = 0, failures = 0;
  alu dut (.opc, .a, .b, .y, .cmp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ey; logic ec;
    opc_e ops [12] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SHL, OP_SHR,
                       OP_ADDI, OP_SHLI, OP_CMPLT, OP_CMPEQ, OP_XCP};
    for (int n = 0; n < 2000; n++) begin
      opc = ops[n % 12];
      a = $urandom; b = (n % 7 == 0) ? a : $urandom;
      if (n % 5 == 0) a = -a;
      #1;
      ey = 0; ec = 0;
      case (opc)
        OP_ADD, OP_ADDI: ey = a + b;
        OP_SUB: ey = a - b;
        OP_AND: ey = a & b;
        OP_OR:  ey = a | b;
        OP_XOR: ey = a ^ b;
        OP_SHL, OP_SHLI: ey = a << (b % 32);
        OP_SHR: ey = a >> (b % 32);
        OP_CMPLT: ec = (int'(a) < int'(b));
        OP_CMPEQ: ec = (a == b);
        OP_XCP: ey = a;
        default: ;
      endcase
      checks++;
      if (y !== ey || cmp !== ec) begin
        failures++;
        if (failures < 5) $display("FAIL op=%0d a=%h b=%h y=%h/%h cmp=%b/%b", opc, a, b, y, ey, cmp, ec);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
