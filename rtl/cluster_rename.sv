// cluster_rename: the virtual cluster table of one thread.
//
// A thread's bundles are compiled for logical clusters. The renaming maps
// logical cluster l of a thread with shift s to physical cluster
// (l + s) mod NC, so a thread with shift 1 on four clusters runs logical
// clusters 0,1,2,3 on physical clusters 1,2,3,0. The usage mask is rotated
// the same way so the collision detector sees physical clusters.
// Operands that name a cluster must be renamed too: the target cluster of
// an inter-cluster copy (OP_XCP, held in imm[1:0]) is rewritten to its
// physical number. Register numbers need no change, because each thread
// has its own register file in every physical cluster.
//
// Purely combinational; the shift is constant while a thread runs.
module cluster_rename
  import csmt_pkg::*;
#(
  parameter int unsigned NC    = NC_DEF,
  parameter int unsigned ISSUE = ISSUE_DEF
) (
  input  logic [$clog2(NC)-1:0]        shift,
  input  syl_t [NC-1:0][ISSUE-1:0]     lbundles,
  input  logic [NC-1:0]                lmask,
  output syl_t [NC-1:0][ISSUE-1:0]     pbundles,
  output logic [NC-1:0]                pmask
);
  localparam int unsigned CW = $clog2(NC);

  function automatic logic [CW-1:0] phys(logic [CW-1:0] l, logic [CW-1:0] sh);
    return CW'((32'(l) + 32'(sh)) % NC);
  endfunction

  always_comb begin
    syl_t s;
    pbundles = '0;
    pmask    = '0;
    for (int l = 0; l < NC; l++) begin
      pmask[phys(CW'(l), shift)] = lmask[l];
      for (int k = 0; k < ISSUE; k++) begin
        s = lbundles[l][k];
        if (syl_opc(s) == OP_XCP)
          s[CW-1:0] = phys(s[CW-1:0], shift);
        pbundles[phys(CW'(l), shift)][k] = s;
      end
    end
  end

endmodule
