// regfile: register file of one thread in one cluster.
//
// CSMT gives every thread its own register file in every cluster, so this
// module is instantiated NT times per cluster. It holds NGPR 32-bit general
// registers (register 0 always reads as zero, as in VEX) and NBR one-bit
// branch registers. Reads are combinational; writes take effect at the
// clock edge, so a value written at the end of cycle n is read in cycle
// n+1 (no bypass network is needed for the exposed latencies).
// Write ports are applied in index order; when two ports write the same
// register in one cycle the higher-numbered port wins (the compiler is
// expected never to schedule that). Reset clears all registers.
// The port counts are chosen by the cluster for its functional units.
module regfile
  import csmt_pkg::*;
#(
  parameter int unsigned NREGS = NGPR,
  parameter int unsigned NBREG = NBR,
  parameter int unsigned NR    = 12,  // general read ports
  parameter int unsigned NW    = 10,  // general write ports
  parameter int unsigned NBRD  = 4,   // branch register read ports
  parameter int unsigned NBW   = 4    // branch register write ports
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NR-1:0][$clog2(NREGS)-1:0]    raddr,
  output logic [NR-1:0][31:0]                 rdata,
  input  logic [NW-1:0]                       we,
  input  logic [NW-1:0][$clog2(NREGS)-1:0]    waddr,
  input  logic [NW-1:0][31:0]                 wdata,
  input  logic [NBRD-1:0][$clog2(NBREG)-1:0]  braddr,
  output logic [NBRD-1:0]                     brdata,
  input  logic [NBW-1:0]                      bwe,
  input  logic [NBW-1:0][$clog2(NBREG)-1:0]   bwaddr,
  input  logic [NBW-1:0]                      bwdata
);
  logic [31:0]      gpr [NREGS];
  logic [NBREG-1:0] br;

  always_comb begin
    for (int i = 0; i < NR; i++)
      rdata[i] = (raddr[i] == '0) ? 32'd0 : gpr[raddr[i]];
    for (int i = 0; i < NBRD; i++)
      brdata[i] = br[braddr[i]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) gpr[r] <= '0;
      br <= '0;
    end else begin
      for (int i = 0; i < NW; i++)
        if (we[i] && waddr[i] != '0) gpr[waddr[i]] <= wdata[i];
      for (int i = 0; i < NBW; i++)
        if (bwe[i]) br[bwaddr[i]] <= bwdata[i];
    end
  end

endmodule
