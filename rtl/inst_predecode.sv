// inst_predecode: partial decoder of one VLIW instruction.
//
// The instruction is held in a fetch window of NC*ISSUE syllables starting
// at the instruction's first syllable. The decoder walks the window up to
// the first syllable with the instruction-stop bit set. The first syllable,
// and every syllable with the cluster-start bit set, opens a new bundle for
// the logical cluster named in its CID field; following syllables fill the
// next slots of that bundle. Only the stop and cluster-start bits and the
// opcode are looked at, which is the "partial decoding" that lets the merge
// stage know which clusters an instruction needs.
//
// Outputs (purely combinational):
//   bundles[c][k]  k-th operation of the bundle for logical cluster c
//                  (unused slots are NOP = 0)
//   lmask[c]       logical cluster c is used by this instruction
//   len            instruction length in syllables (1..NC*ISSUE)
//   err            the instruction cannot be executed: no stop bit in the
//                  window, a bundle longer than ISSUE, a cluster opened
//                  twice, an unknown opcode, more than NMUL multiplies or
//                  more than one memory op in a bundle, more than one branch
//                  or copy op in a bundle, or branches in two bundles.
// The resource rules come from the cluster make-up of the base architecture
// (ISSUE ALUs, two multipliers, one load/store unit); the legality check
// that raises an illegal-instruction exception is this design's own.
module inst_predecode
  import csmt_pkg::*;
#(
  parameter int unsigned NC    = NC_DEF,
  parameter int unsigned ISSUE = ISSUE_DEF
) (
  input  syl_t [NC*ISSUE-1:0]          win,
  output syl_t [NC-1:0][ISSUE-1:0]     bundles,
  output logic [NC-1:0]                lmask,
  output logic [$clog2(NC*ISSUE+1)-1:0] len,
  output logic                         err
);
  localparam int unsigned W  = NC * ISSUE;
  localparam int unsigned CW = (NC > 1) ? $clog2(NC) : 1;

  always_comb begin
    logic done;
    logic [CW-1:0] cur;
    int unsigned pos;
    int unsigned nmul [NC];
    int unsigned nmem [NC];
    int unsigned nbr  [NC];
    int unsigned nxcp [NC];
    int unsigned nbr_total;
    syl_t s;
    logic [4:0] o;

    bundles   = '0;
    lmask     = '0;
    len       = '0;
    err       = 1'b0;
    done      = 1'b0;
    cur       = '0;
    pos       = 0;
    nbr_total = 0;
    for (int c = 0; c < NC; c++) begin
      nmul[c] = 0; nmem[c] = 0; nbr[c] = 0; nxcp[c] = 0;
    end

    for (int i = 0; i < W; i++) begin
      if (!done) begin
        s = win[i];
        o = syl_opc(s);
        if (i == 0 || syl_cstart(s)) begin
          cur = CW'(syl_cid(s));
          pos = 0;
          if (32'(syl_cid(s)) >= NC || lmask[cur]) err = 1'b1;
          for (int c = 0; c < NC; c++)
            if (cur == CW'(c)) lmask[c] = 1'b1;
        end else begin
          pos = pos + 1;
        end
        if (pos >= ISSUE) err = 1'b1;
        if (!opc_legal(o)) err = 1'b1;
        if (opc_is_br(o)) nbr_total++;
        for (int c = 0; c < NC; c++) begin
          if (cur == CW'(c)) begin
            for (int k = 0; k < ISSUE; k++)
              if (pos == k) bundles[c][k] = s;
            if (opc_is_mul(o)) nmul[c]++;
            if (opc_is_mem(o)) nmem[c]++;
            if (opc_is_br(o))  nbr[c]++;
            if (o == OP_XCP)   nxcp[c]++;
          end
        end
        if (syl_stop(s)) begin
          done = 1'b1;
          len  = ($bits(len))'(i + 1);
        end
      end
    end
    if (!done) begin
      err = 1'b1;
      len = ($bits(len))'(W);
    end
    for (int c = 0; c < NC; c++)
      if (nmul[c] > NMUL || nmem[c] > 1 || nbr[c] > 1 || nxcp[c] > 1) err = 1'b1;
    if (nbr_total > 1) err = 1'b1;
  end

endmodule
