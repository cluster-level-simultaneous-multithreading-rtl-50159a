// xcopy_net: point-to-point inter-cluster copy network.
//
// Every cluster may send one register value per cycle to another cluster
// (inter-cluster copy). The network has a dedicated link from each cluster
// to every cluster, so copies never compete for a shared resource, which
// is why CSMT does not need to arbitrate communication. Link [d][s] carries
// the copy sent by cluster s when its (already renamed) destination is d.
// A link that carries no copy drives zeros. Combinational; the destination
// register file writes the value at the end of the same cycle, giving the
// copy a one-cycle latency.
module xcopy_net
  import csmt_pkg::*;
#(
  parameter int unsigned NT = NT_DEF,
  parameter int unsigned NC = NC_DEF
) (
  input  logic [NC-1:0]                         src_valid,
  input  logic [NC-1:0][$clog2(NC)-1:0]         src_dst,
  input  logic [NC-1:0][$clog2(NT)-1:0]         src_tid,
  input  logic [NC-1:0][5:0]                    src_reg,
  input  logic [NC-1:0][31:0]                   src_data,
  output logic [NC-1:0][NC-1:0]                 dst_valid,
  output logic [NC-1:0][NC-1:0][$clog2(NT)-1:0] dst_tid,
  output logic [NC-1:0][NC-1:0][5:0]            dst_reg,
  output logic [NC-1:0][NC-1:0][31:0]           dst_data
);
  always_comb begin
    for (int d = 0; d < NC; d++) begin
      for (int s = 0; s < NC; s++) begin
        dst_valid[d][s] = src_valid[s] && (32'(src_dst[s]) == d);
        dst_tid[d][s]   = dst_valid[d][s] ? src_tid[s]  : '0;
        dst_reg[d][s]   = dst_valid[d][s] ? src_reg[s]  : '0;
        dst_data[d][s]  = dst_valid[d][s] ? src_data[s] : '0;
      end
    end
  end

endmodule
