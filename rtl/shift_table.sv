// shift_table: per-thread cluster shift for cluster renaming.
//
// When a thread is started, its shift is computed from Equation (1) of the
// CSMT scheme:
//     shift = tid * floor(NC / N)   if NC >= N
//     shift = tid * 1               if NC <  N
// where N is the number of threads running at that moment; the result is
// taken modulo NC. The shift spreads the logical cluster 0 of the threads,
// which compilers load most, as far apart as possible: with 2 threads on 4
// clusters thread 1 gets shift 2, with 4 threads thread t gets shift t.
// The shift is written only at thread start and is held until the thread
// is started again, so a running thread never changes its mapping.
//
// Interface: start[t] loads thread t's entry (several threads may start in
// the same cycle) using start_nthreads; shift[t] is a register output.
// Reset clears all shifts to 0.
module shift_table
  import csmt_pkg::*;
#(
  parameter int unsigned NT = NT_DEF,
  parameter int unsigned NC = NC_DEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NT-1:0]                 start,
  input  logic [$clog2(NT+1)-1:0]       start_nthreads,
  output logic [NT-1:0][$clog2(NC)-1:0] shift
);
  localparam int unsigned CW = $clog2(NC);

  int unsigned step;

  always_comb begin
    int unsigned n;
    n = (start_nthreads == 0) ? 1 : 32'(start_nthreads);
    step = (NC >= n) ? NC / n : 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) shift <= '0;
    else
      for (int t = 0; t < NT; t++)
        if (start[t]) shift[t] <= CW'((32'(t) * step) % NC);
  end

endmodule
