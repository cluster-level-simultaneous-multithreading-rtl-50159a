// exec_packet: merge multiplexers and the merge pipeline register.
//
// For each physical cluster c, a multiplexer picks the renamed bundle of
// the thread that merge_select made the owner of c, and the result is
// registered together with the owner's thread id and the address of the
// owner's instruction. This register is the extra pipeline stage that CSMT
// adds in front of execution; its thread tags let every later stage tell
// which thread an operation belongs to.
//
// Timing: selection in cycle n, bundle presented to the clusters in cycle
// n+1. A cluster that receives no bundle sees ex_valid = 0 and NOPs.
module exec_packet
  import csmt_pkg::*;
#(
  parameter int unsigned NT    = NT_DEF,
  parameter int unsigned NC    = NC_DEF,
  parameter int unsigned ISSUE = ISSUE_DEF
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  syl_t [NT-1:0][NC-1:0][ISSUE-1:0]  pbundles,
  input  logic [NT-1:0][31:0]               pc,
  input  logic [NC-1:0][$clog2(NT)-1:0]     owner,
  input  logic [NC-1:0]                     own_valid,
  output logic [NC-1:0]                     ex_valid,
  output logic [NC-1:0][$clog2(NT)-1:0]     ex_tid,
  output syl_t [NC-1:0][ISSUE-1:0]          ex_bundle,
  output logic [NC-1:0][31:0]               ex_pc
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid  <= '0;
      ex_tid    <= '0;
      ex_bundle <= '0;
      ex_pc     <= '0;
    end else begin
      for (int c = 0; c < NC; c++) begin
        ex_valid[c]  <= own_valid[c];
        ex_tid[c]    <= owner[c];
        ex_bundle[c] <= own_valid[c] ? pbundles[owner[c]][c] : '0;
        ex_pc[c]     <= pc[owner[c]];
      end
    end
  end

endmodule
