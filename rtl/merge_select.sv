// merge_select: collision detection and round-robin thread selection.
//
// Every cycle each ready thread offers one instruction together with the
// set of physical clusters it needs (after renaming). A priority pointer
// names the highest-priority thread; it advances by one every cycle, so the
// priority rotates round robin over all threads. Threads are visited in
// priority order: the first ready thread is always taken, and each later
// one is taken only if none of its clusters is already used by the packet
// formed so far. This is the greedy merge of the CSMT scheme; a whole
// instruction is taken or left, never split.
//
// Fixed priority: while fixed_prio is set, fixed_top is the highest-
// priority thread and the others follow in thread-number order after it.
// This is the option for real-time or QoS threads, with the priority set
// by the operating system; round robin (fixed_prio = 0) is the default
// and avoids starvation. The round-robin pointer keeps moving either way.
//
// Outputs are combinational in the current cycle:
//   grant[t]     thread t's instruction joins the execution packet
//   owner[c]     thread whose bundle goes to physical cluster c
//   own_valid[c] cluster c receives a bundle
//   prio         current highest-priority thread
// The pointer resets to thread 0 and moves every cycle whatever the
// requests are.
module merge_select
  import csmt_pkg::*;
#(
  parameter int unsigned NT = NT_DEF,
  parameter int unsigned NC = NC_DEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NT-1:0]                 req,
  input  logic [NT-1:0][NC-1:0]         pmask,
  input  logic                          fixed_prio,
  input  logic [$clog2(NT)-1:0]         fixed_top,
  output logic [NT-1:0]                 grant,
  output logic [NC-1:0][$clog2(NT)-1:0] owner,
  output logic [NC-1:0]                 own_valid,
  output logic [$clog2(NT)-1:0]         prio
);
  localparam int unsigned TW = $clog2(NT);

  logic [TW-1:0] rr_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_ptr <= '0;
    else        rr_ptr <= TW'((32'(rr_ptr) + 1) % NT);
  end

  assign prio = fixed_prio ? fixed_top : rr_ptr;

  always_comb begin
    logic [NC-1:0] used;
    int unsigned t;
    used      = '0;
    grant     = '0;
    owner     = '0;
    own_valid = '0;
    for (int i = 0; i < NT; i++) begin
      t = (32'(prio) + i) % NT;
      if (req[t] && ((pmask[t] & used) == '0)) begin
        grant[t] = 1'b1;
        used     = used | pmask[t];
        for (int c = 0; c < NC; c++)
          if (pmask[t][c]) owner[c] = TW'(t);
      end
    end
    own_valid = used;
  end

endmodule
