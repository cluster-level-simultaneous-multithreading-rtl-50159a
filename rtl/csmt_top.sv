// csmt_top: clustered VLIW core with cluster-level simultaneous
// multithreading (CSMT).
//
// NT hardware threads share NC clusters. Every cycle each ready thread
// offers its next VLIW instruction. The partial decoder tells which logical
// clusters the instruction uses, the cluster renaming rotates them by the
// thread's shift onto physical clusters, and the merge stage takes whole
// instructions, in round-robin priority order, as long as their physical
// clusters do not collide. The merged execution packet (one bundle per
// physical cluster, each tagged with its thread) is registered and
// executed by the clusters; each thread has its own register file in
// every cluster.
//
// Pipeline of one instruction:
//   F   fetch window read from instruction memory into the thread's buffer
//       (ICache tag lookup; a miss blocks the thread for MISS_LAT cycles)
//   M   partial decode, renaming, collision detection and merge (the extra
//       CSMT stage), result registered in exec_packet
//   E1  register read and execution; ALU results, compares, copies and
//       stores complete; branches resolve; DCache lookup
//   E2  multiply and load results are written
// A taken branch squashes its thread's younger instruction and costs that
// thread two issue cycles. A DCache miss blocks the thread for MISS_LAT
// cycles while the others go on.
//
// Memories: instruction memory is IMEM_WORDS syllables (syllable
// addresses), data memory is DMEM_WORDS words (byte addresses, word
// accesses, addresses wrap). Both are loaded and observed through the
// plain write/read ports. The ICache and DCache are tag-only timing models
// (64 KB, 4-way, 64-byte lines); perfect_mem = 1 makes them always hit.
// Thread t is started by start[t] at start_pc[t] (any set of threads may
// start together); start_nthreads is the number of threads running, which
// sets the renaming shift (Equation (1)). The merge priority rotates round
// robin unless fixed_prio is set, which makes fixed_top the highest-
// priority thread.
module csmt_top
  import csmt_pkg::*;
#(
  parameter int unsigned NT         = NT_DEF,
  parameter int unsigned NC         = NC_DEF,
  parameter int unsigned ISSUE      = ISSUE_DEF,
  parameter int unsigned MISS_LAT   = MISS_LAT_DEF,
  parameter int unsigned IMEM_WORDS = 4096,
  parameter int unsigned DMEM_WORDS = 4096,
  parameter logic [31:0] EXC_VEC    = 32'd0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          perfect_mem,
  // program and data loading / observation
  input  logic                          imem_we,
  input  logic [31:0]                   imem_waddr,
  input  logic [31:0]                   imem_wdata,
  input  logic                          dmem_we,
  input  logic [31:0]                   dmem_waddr,
  input  logic [31:0]                   dmem_wdata,
  input  logic [31:0]                   dmem_raddr,
  output logic [31:0]                   dmem_rdata,
  // thread control
  input  logic [NT-1:0]                 start,
  input  logic [NT-1:0][31:0]           start_pc,
  input  logic [$clog2(NT+1)-1:0]       start_nthreads,
  input  logic                          fixed_prio,
  input  logic [$clog2(NT)-1:0]         fixed_top,
  output logic [NT-1:0]                 thread_active,
  output logic [NT-1:0]                 exc,
  output logic [NT-1:0][31:0]           epc,
  // observation of the merge and execute stages
  output logic [NT-1:0]                 issue_grant,
  output logic [NC-1:0]                 ex_valid,
  output logic [NC-1:0][$clog2(NT)-1:0] ex_tid,
  output logic [NT-1:0]                 redirect,
  output logic [NT-1:0]                 blocked
);
  localparam int unsigned TW = $clog2(NT);
  localparam int unsigned CW = $clog2(NC);
  localparam int unsigned W  = NC * ISSUE;

  // ---------------- memories ----------------
  syl_t        imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];

  function automatic int unsigned didx(logic [31:0] a);
    return (a >> 2) % DMEM_WORDS;
  endfunction

  // ---------------- threads ----------------
  logic [NT-1:0]                    t_halt, t_fetch_en, t_ic_miss, t_req, t_dmiss;
  logic [NT-1:0][31:0]              t_fetch_addr, t_fr_pc, t_redirect_pc;
  syl_t [NT-1:0][W-1:0]             t_win;
  syl_t [NT-1:0][NC-1:0][ISSUE-1:0] t_lb, t_pb;
  logic [NT-1:0][NC-1:0]            t_lmask, t_pmask;
  logic [NT-1:0][CW-1:0]            t_shift;

  shift_table #(.NT(NT), .NC(NC)) u_shift (
    .clk, .rst_n, .start, .start_nthreads, .shift(t_shift)
  );

  for (genvar t = 0; t < NT; t++) begin : g_thr
    always_comb
      for (int i = 0; i < W; i++)
        t_win[t][i] = imem[(t_fetch_addr[t] + 32'(i)) % IMEM_WORDS];

    thread_fetch #(.NC(NC), .ISSUE(ISSUE), .MISS_LAT(MISS_LAT), .EXC_VEC(EXC_VEC)) u_fetch (
      .clk, .rst_n,
      .start(start[t]), .start_pc(start_pc[t]), .halt(t_halt[t]), .active(thread_active[t]),
      .fetch_en(t_fetch_en[t]), .fetch_addr(t_fetch_addr[t]), .fetch_win(t_win[t]),
      .ic_miss(t_ic_miss[t]),
      .req(t_req[t]), .lbundles(t_lb[t]), .lmask(t_lmask[t]), .fr_pc(t_fr_pc[t]),
      .grant(issue_grant[t]),
      .redirect(redirect[t]), .redirect_pc(t_redirect_pc[t]), .dmiss(t_dmiss[t]),
      .blocked(blocked[t]), .exc(exc[t]), .epc(epc[t])
    );

    cluster_rename #(.NC(NC), .ISSUE(ISSUE)) u_ren (
      .shift(t_shift[t]), .lbundles(t_lb[t]), .lmask(t_lmask[t]),
      .pbundles(t_pb[t]), .pmask(t_pmask[t])
    );
  end

  // ---------------- ICache (tag model), one port per thread ----------------
  logic [NT-1:0][31:0] ic_addr;
  always_comb for (int t = 0; t < NT; t++) ic_addr[t] = t_fetch_addr[t] << 2;

  cache_tags #(.SIZE_BYTES(65536), .WAYS(4), .LINE_BYTES(64), .NPORTS(NT)) u_icache (
    .clk, .rst_n, .perfect(perfect_mem), .req(t_fetch_en), .addr(ic_addr), .miss(t_ic_miss)
  );

  // ---------------- merge stage ----------------
  logic [NC-1:0][TW-1:0] owner;
  logic [NC-1:0]         own_valid;
  logic [TW-1:0]         prio;
  syl_t [NC-1:0][ISSUE-1:0] ex_bundle;
  logic [NC-1:0][31:0]   ex_pc;

  merge_select #(.NT(NT), .NC(NC)) u_sel (
    .clk, .rst_n, .req(t_req), .pmask(t_pmask), .fixed_prio, .fixed_top,
    .grant(issue_grant), .owner, .own_valid, .prio
  );

  exec_packet #(.NT(NT), .NC(NC), .ISSUE(ISSUE)) u_pkt (
    .clk, .rst_n, .pbundles(t_pb), .pc(t_fr_pc), .owner, .own_valid,
    .ex_valid, .ex_tid, .ex_bundle, .ex_pc
  );

  // ---------------- clusters ----------------
  logic [NC-1:0]           c_br, c_halt, c_mre, c_mwe, c_dcm, c_dmiss;
  logic [NC-1:0][TW-1:0]   c_brtid;
  logic [NC-1:0][31:0]     c_brtgt, c_maddr, c_mwdata, c_mrdata;
  logic [NC-1:0]           xo_valid;
  logic [NC-1:0][CW-1:0]   xo_dst;
  logic [NC-1:0][TW-1:0]   xo_tid;
  logic [NC-1:0][5:0]      xo_reg;
  logic [NC-1:0][31:0]     xo_data;
  logic [NC-1:0][NC-1:0]         xi_valid;
  logic [NC-1:0][NC-1:0][TW-1:0] xi_tid;
  logic [NC-1:0][NC-1:0][5:0]    xi_reg;
  logic [NC-1:0][NC-1:0][31:0]   xi_data;

  for (genvar c = 0; c < NC; c++) begin : g_cl
    assign c_mrdata[c] = dmem[didx(c_maddr[c])];

    cluster #(.NT(NT), .NC(NC), .ISSUE(ISSUE)) u_cl (
      .clk, .rst_n,
      .ex_valid(ex_valid[c]), .ex_tid(ex_tid[c]), .ex_bundle(ex_bundle[c]), .ex_pc(ex_pc[c]),
      .br_taken(c_br[c]), .halt(c_halt[c]), .br_tid(c_brtid[c]), .br_target(c_brtgt[c]),
      .mem_re(c_mre[c]), .mem_we(c_mwe[c]), .mem_addr(c_maddr[c]), .mem_wdata(c_mwdata[c]),
      .mem_rdata(c_mrdata[c]), .dc_miss(c_dcm[c]), .dmiss(c_dmiss[c]),
      .xo_valid(xo_valid[c]), .xo_dst(xo_dst[c]), .xo_tid(xo_tid[c]),
      .xo_reg(xo_reg[c]), .xo_data(xo_data[c]),
      .xi_valid(xi_valid[c]), .xi_tid(xi_tid[c]), .xi_reg(xi_reg[c]), .xi_data(xi_data[c])
    );
  end

  xcopy_net #(.NT(NT), .NC(NC)) u_xnet (
    .src_valid(xo_valid), .src_dst(xo_dst), .src_tid(xo_tid), .src_reg(xo_reg),
    .src_data(xo_data),
    .dst_valid(xi_valid), .dst_tid(xi_tid), .dst_reg(xi_reg), .dst_data(xi_data)
  );

  // ---------------- DCache (tag model), one port per cluster ----------------
  cache_tags #(.SIZE_BYTES(65536), .WAYS(4), .LINE_BYTES(64), .NPORTS(NC)) u_dcache (
    .clk, .rst_n, .perfect(perfect_mem), .req(c_mre | c_mwe), .addr(c_maddr), .miss(c_dcm)
  );

  // ---------------- per-thread events from the execute stage ----------------
  always_comb begin
    redirect      = '0;
    t_halt        = '0;
    t_dmiss       = '0;
    t_redirect_pc = '0;
    for (int c = 0; c < NC; c++) begin
      if (c_br[c]) begin
        redirect[c_brtid[c]]      = 1'b1;
        t_redirect_pc[c_brtid[c]] = c_brtgt[c];
      end
      if (c_halt[c])  t_halt[c_brtid[c]]  = 1'b1;
      if (c_dmiss[c]) t_dmiss[c_brtid[c]] = 1'b1;
    end
  end

  // ---------------- memory writes ----------------
  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr % IMEM_WORDS] <= imem_wdata;
    if (dmem_we) dmem[didx(dmem_waddr)] <= dmem_wdata;
    for (int c = 0; c < NC; c++)
      if (c_mwe[c]) dmem[didx(c_maddr[c])] <= c_mwdata[c];
  end

  assign dmem_rdata = dmem[didx(dmem_raddr)];

endmodule
