// thread_fetch: front end of one hardware thread.
//
// Holds the thread's fetch address and a one-instruction fetch buffer (FR).
// A fetch reads a window of NC*ISSUE syllables from instruction memory at
// the fetch address (the memory read is combinational; the window is
// registered into FR, which makes the fetch a pipeline stage of its own).
// The partial decoder works on FR and offers the instruction, with its
// logical bundles and cluster mask, to the merge stage (req).
//
// Sequencing, per cycle:
//   * FR granted (merged) or FR empty: fetch the next instruction, at
//     fr_pc + len after a grant, otherwise at pc_f.
//   * ICache miss on a fetch: FR stays empty and the thread is blocked for
//     MISS_LAT cycles, after which the fetch is repeated.
//   * DCache miss reported by a cluster for this thread: the thread is
//     blocked (no requests) for MISS_LAT cycles. Blocked threads leave their
//     clusters to the other threads.
//   * Taken branch in execute (redirect): the instruction in FR is on the
//     wrong path and is squashed, req is withdrawn in the same cycle so it
//     cannot be merged, and the target is fetched in the next cycle. A
//     taken branch therefore loses two issue cycles of this thread.
//   * Illegal instruction at the head of FR (and no older redirect):
//     exception. The thread's buffered instruction is flushed, its address
//     is saved in epc and fetching continues at the handler EXC_VEC.
//   * HALT executed: the thread stops; start restarts it at start_pc.
// The blocking on misses, the per-thread squash and the 2-cycle branch
// penalty follow the CSMT scheme; the single-entry buffer, the handler
// address and the start/halt interface are this design's own choices.
module thread_fetch
  import csmt_pkg::*;
#(
  parameter int unsigned NC       = NC_DEF,
  parameter int unsigned ISSUE    = ISSUE_DEF,
  parameter int unsigned MISS_LAT = MISS_LAT_DEF,
  parameter logic [31:0] EXC_VEC  = 32'd0
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // thread control
  input  logic                       start,
  input  logic [31:0]                start_pc,
  input  logic                       halt,
  output logic                       active,
  // instruction memory / ICache
  output logic                       fetch_en,
  output logic [31:0]                fetch_addr,
  input  syl_t [NC*ISSUE-1:0]        fetch_win,
  input  logic                       ic_miss,
  // merge stage
  output logic                       req,
  output syl_t [NC-1:0][ISSUE-1:0]   lbundles,
  output logic [NC-1:0]              lmask,
  output logic [31:0]                fr_pc,
  input  logic                       grant,
  // execute-stage events
  input  logic                       redirect,
  input  logic [31:0]                redirect_pc,
  input  logic                       dmiss,
  // status
  output logic                       blocked,
  output logic                       exc,
  output logic [31:0]                epc
);
  localparam int unsigned BW = $clog2(MISS_LAT + 1);
  localparam int unsigned LW = $clog2(NC * ISSUE + 1);

  logic                 fr_valid;
  syl_t [NC*ISSUE-1:0]  fr_win;
  logic [31:0]          pc_f;
  logic [BW-1:0]        blk_cnt;
  logic [LW-1:0]        fr_len;
  logic                 fr_err;

  inst_predecode #(.NC(NC), .ISSUE(ISSUE)) u_pdec (
    .win(fr_win), .bundles(lbundles), .lmask(lmask), .len(fr_len), .err(fr_err)
  );

  assign blocked  = active && (blk_cnt != '0);
  assign req      = active && fr_valid && !fr_err && !blocked && !redirect && !halt;
  assign exc      = active && fr_valid && fr_err && !redirect && !halt;
  assign fetch_addr = (fr_valid && grant) ? fr_pc + 32'(fr_len) : pc_f;
  assign fetch_en = active && !redirect && !halt && !exc && !blocked && (!fr_valid || grant);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      fr_valid <= 1'b0;
      fr_win   <= '0;
      fr_pc    <= '0;
      pc_f     <= '0;
      blk_cnt  <= '0;
      epc      <= '0;
    end else if (start) begin
      active   <= 1'b1;
      fr_valid <= 1'b0;
      pc_f     <= start_pc;
      blk_cnt  <= '0;
    end else if (active) begin
      if (blk_cnt != '0) blk_cnt <= blk_cnt - 1'b1;
      if (dmiss) blk_cnt <= BW'(MISS_LAT);
      if (halt) begin
        active   <= 1'b0;
        fr_valid <= 1'b0;
      end else if (redirect) begin
        fr_valid <= 1'b0;
        pc_f     <= redirect_pc;
      end else if (exc) begin
        fr_valid <= 1'b0;
        epc      <= fr_pc;
        pc_f     <= EXC_VEC;
      end else if (fetch_en) begin
        if (ic_miss) begin
          fr_valid <= 1'b0;
          pc_f     <= fetch_addr;
          blk_cnt  <= BW'(MISS_LAT - 1);
        end else begin
          fr_valid <= 1'b1;
          fr_win   <= fetch_win;
          fr_pc    <= fetch_addr;
        end
      end
    end
  end

endmodule
