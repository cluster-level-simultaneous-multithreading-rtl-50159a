// mul_unit: fully pipelined 32x32 -> 32 multiplier with a 2-cycle latency.
//
// The operands are captured at the end of the first execute cycle together
// with the destination register and the thread tag; the product is formed
// in the second cycle and written to the register file at its end, so the
// result is readable two cycles after issue. A new multiply can enter every
// cycle, from any thread, which CSMT requires of every functional unit.
// Each cluster has two of these units.
module mul_unit
  import csmt_pkg::*;
#(
  parameter int unsigned NT = NT_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [$clog2(NT)-1:0] in_tid,
  input  logic [5:0]            in_dst,
  input  logic [31:0]           a,
  input  logic [31:0]           b,
  output logic                  out_valid,
  output logic [$clog2(NT)-1:0] out_tid,
  output logic [5:0]            out_dst,
  output logic [31:0]           y
);
  logic [31:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tid   <= '0;
      out_dst   <= '0;
      a_q       <= '0;
      b_q       <= '0;
    end else begin
      out_valid <= in_valid;
      out_tid   <= in_tid;
      out_dst   <= in_dst;
      a_q       <= a;
      b_q       <= b;
    end
  end

  assign y = a_q * b_q;

endmodule
