// cache_tags: set-associative cache tag store used as a hit/miss model.
//
// The ICache and the DCache of the core are both 64 KB, 4-way set
// associative with 64-byte lines. This module keeps their tags, valid bits
// and LRU state and answers, for up to NPORTS lookups per cycle, whether
// the line is present. A miss allocates the line at once (replacing the
// least recently used way) and the requester is blocked for the miss
// latency by its thread; the data themselves are kept in the flat
// instruction and data memories of the core, so this store decides timing
// only. Holding no data array is this design's simplification.
//
// Lookup is combinational (miss is valid in the same cycle as req). Ports
// are served in index order: a port that misses on a line an earlier port
// missed on in the same cycle is counted as a hit on that fill. LRU uses
// per-way age counters (0 = most recent). perfect = 1 makes every access
// hit (the perfect-memory model). Reset invalidates all lines.
module cache_tags
  import csmt_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned NPORTS     = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    perfect,
  input  logic [NPORTS-1:0]       req,
  input  logic [NPORTS-1:0][31:0] addr,   // byte addresses
  output logic [NPORTS-1:0]       miss
);
  localparam int unsigned SETS = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OW   = $clog2(LINE_BYTES);
  localparam int unsigned SW   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TGW  = 32 - OW - SW;
  localparam int unsigned AW   = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [TGW-1:0] tag   [SETS][WAYS];
  logic           valid [SETS][WAYS];
  logic [AW-1:0]  age   [SETS][WAYS];

  function automatic logic [SW-1:0] set_of(logic [31:0] a);
    return SW'(a >> OW);
  endfunction
  function automatic logic [TGW-1:0] tag_of(logic [31:0] a);
    return TGW'(a >> (OW + SW));
  endfunction

  // Hit/miss in the current cycle.
  always_comb begin
    logic hit;
    for (int p = 0; p < NPORTS; p++) begin
      hit = 1'b0;
      for (int w = 0; w < WAYS; w++)
        if (valid[set_of(addr[p])][w] && tag[set_of(addr[p])][w] == tag_of(addr[p]))
          hit = 1'b1;
      for (int q = 0; q < p; q++)
        if (req[q] && (addr[q] >> OW) == (addr[p] >> OW)) hit = 1'b1;
      miss[p] = req[p] && !hit && !perfect;
    end
  end

  // LRU update and line allocation, port by port.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          valid[s][w] <= 1'b0;
          tag[s][w]   <= '0;
          age[s][w]   <= AW'(w);
        end
    end else if (!perfect) begin
      for (int p = 0; p < NPORTS; p++) begin
        if (req[p]) begin
          logic [SW-1:0] s;
          logic [AW-1:0] ages [WAYS];
          int way;
          s = set_of(addr[p]);
          for (int w = 0; w < WAYS; w++) ages[w] = age[s][w];
          way = -1;
          for (int w = 0; w < WAYS; w++)
            if (valid[s][w] && tag[s][w] == tag_of(addr[p])) way = w;
          if (way < 0) begin
            // victim: the oldest way
            way = 0;
            for (int w = 0; w < WAYS; w++)
              if (ages[w] == AW'(WAYS - 1)) way = w;
            valid[s][way] <= 1'b1;
            tag[s][way]   <= tag_of(addr[p]);
          end
          for (int w = 0; w < WAYS; w++)
            if (w == way) age[s][w] <= '0;
            else if (ages[w] < ages[way]) age[s][w] <= ages[w] + 1'b1;
        end
      end
    end
  end

endmodule
