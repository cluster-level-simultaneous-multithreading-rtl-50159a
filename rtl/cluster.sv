// cluster: one physical cluster of the CSMT core.
//
// A cluster receives one bundle per cycle from the execution packet,
// tagged with the thread it belongs to, and executes it in the first
// execute cycle (E1). Its resources follow the base architecture: ISSUE
// ALUs (one per slot), two fully pipelined multipliers, one load/store
// unit and a branch unit (replicated in every cluster, as CSMT needs
// homogeneous clusters). It holds one register file per thread; the
// thread tag selects which one is read and written.
//
// Timing (cycle n = E1 of the bundle):
//   ALU and compare results, and incoming copies, are written at the end
//   of n (1-cycle latency). Multiply and load results are written at the
//   end of n+1 (2-cycle latency). Stores write memory at the end of n.
//   A branch (BR/BRF/GOTO) or HALT resolves in n and is reported on
//   br_taken / halt for the owning thread. The DCache is looked up in n;
//   a miss is reported on dmiss so the thread gets blocked.
// Functional-unit steering: multiply ops go to multiplier 0 and 1 in slot
// order, the (single) memory op to the load/store unit; the predecoder
// guarantees the limits. The copy op (XCP) sends the first source register
// to the renamed target cluster over the point-to-point network.
// Slot assignment and steering are this design's own choices; the unit
// counts and latencies are those of the base architecture.
module cluster
  import csmt_pkg::*;
#(
  parameter int unsigned NT    = NT_DEF,
  parameter int unsigned NC    = NC_DEF,
  parameter int unsigned ISSUE = ISSUE_DEF
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // execution packet slot for this cluster
  input  logic                          ex_valid,
  input  logic [$clog2(NT)-1:0]         ex_tid,
  input  syl_t [ISSUE-1:0]              ex_bundle,
  input  logic [31:0]                   ex_pc,
  // control-flow results
  output logic                          br_taken,
  output logic                          halt,
  output logic [$clog2(NT)-1:0]         br_tid,
  output logic [31:0]                   br_target,
  // load/store unit
  output logic                          mem_re,
  output logic                          mem_we,
  output logic [31:0]                   mem_addr,
  output logic [31:0]                   mem_wdata,
  input  logic [31:0]                   mem_rdata,
  input  logic                          dc_miss,
  output logic                          dmiss,
  // inter-cluster copy out
  output logic                          xo_valid,
  output logic [$clog2(NC)-1:0]         xo_dst,
  output logic [$clog2(NT)-1:0]         xo_tid,
  output logic [5:0]                    xo_reg,
  output logic [31:0]                   xo_data,
  // inter-cluster copies in, one link per source cluster
  input  logic [NC-1:0]                 xi_valid,
  input  logic [NC-1:0][$clog2(NT)-1:0] xi_tid,
  input  logic [NC-1:0][5:0]            xi_reg,
  input  logic [NC-1:0][31:0]           xi_data
);
  localparam int unsigned TW  = $clog2(NT);
  localparam int unsigned NR  = 3 * ISSUE;
  localparam int unsigned NW  = ISSUE + NMUL + 1 + NC;
  localparam int unsigned RA  = $clog2(NGPR);
  localparam int unsigned BA  = $clog2(NBR);

  // ---------------- register file access ----------------
  logic [NR-1:0][RA-1:0]          raddr;
  logic [NT-1:0][NR-1:0][31:0]    rdata_t;
  logic [NR-1:0][31:0]            rdata;
  logic [ISSUE-1:0][BA-1:0]       braddr;
  logic [NT-1:0][ISSUE-1:0]       brdata_t;
  logic [ISSUE-1:0]               brdata;

  logic [NW-1:0]                  wv;       // write valid (before thread match)
  logic [NW-1:0][TW-1:0]          wtid;
  logic [NW-1:0][RA-1:0]          waddr;
  logic [NW-1:0][31:0]            wdata;
  logic [ISSUE-1:0]               bwv;
  logic [ISSUE-1:0][BA-1:0]       bwaddr;
  logic [ISSUE-1:0]               bwdata;

  for (genvar t = 0; t < NT; t++) begin : g_rf
    logic [NW-1:0]    we_t;
    logic [ISSUE-1:0] bwe_t;
    always_comb begin
      for (int i = 0; i < NW; i++) we_t[i] = wv[i] && (wtid[i] == TW'(t));
      for (int i = 0; i < ISSUE; i++) bwe_t[i] = bwv[i] && (ex_tid == TW'(t));
    end
    regfile #(.NREGS(NGPR), .NBREG(NBR), .NR(NR), .NW(NW), .NBRD(ISSUE), .NBW(ISSUE)) u_rf (
      .clk, .rst_n,
      .raddr(raddr), .rdata(rdata_t[t]),
      .we(we_t), .waddr(waddr), .wdata(wdata),
      .braddr(braddr), .brdata(brdata_t[t]),
      .bwe(bwe_t), .bwaddr(bwaddr), .bwdata(bwdata)
    );
  end

  assign rdata  = rdata_t[ex_tid];
  assign brdata = brdata_t[ex_tid];

  // ---------------- E1: decode, operands, ALUs ----------------
  logic [ISSUE-1:0][4:0]  opc;
  logic [ISSUE-1:0][31:0] opa, opb, opd, alu_y;
  logic [ISSUE-1:0]       alu_cmp;

  always_comb begin
    for (int i = 0; i < ISSUE; i++) begin
      opc[i]           = ex_valid ? syl_opc(ex_bundle[i]) : OP_NOP;
      raddr[3*i]       = syl_s1(ex_bundle[i]);
      raddr[3*i+1]     = syl_s2(ex_bundle[i]);
      raddr[3*i+2]     = syl_d(ex_bundle[i]);
      braddr[i]        = BA'(syl_s1(ex_bundle[i]));
      opa[i]           = rdata[3*i];
      opb[i]           = opc_uses_imm(opc[i]) ? syl_imm(ex_bundle[i]) : rdata[3*i+1];
      opd[i]           = rdata[3*i+2];
    end
  end

  for (genvar i = 0; i < ISSUE; i++) begin : g_alu
    alu u_alu (.opc(opc[i]), .a(opa[i]), .b(opb[i]), .y(alu_y[i]), .cmp(alu_cmp[i]));
  end

  // ---------------- multipliers ----------------
  logic [NMUL-1:0]         mul_in_v;
  logic [NMUL-1:0][5:0]    mul_in_d;
  logic [NMUL-1:0][31:0]   mul_in_a, mul_in_b;
  logic [NMUL-1:0]         mul_out_v;
  logic [NMUL-1:0][TW-1:0] mul_out_t;
  logic [NMUL-1:0][5:0]    mul_out_d;
  logic [NMUL-1:0][31:0]   mul_out_y;

  // ---------------- load/store, branch, copy steering ----------------
  logic            ld_v_q;
  logic [TW-1:0]   ld_t_q;
  logic [5:0]      ld_d_q;
  logic [31:0]     ld_data_q;
  logic [5:0]      ld_d;

  always_comb begin
    int unsigned k;
    k = 0;
    mul_in_v = '0; mul_in_d = '0; mul_in_a = '0; mul_in_b = '0;
    mem_re = 1'b0; mem_we = 1'b0; mem_addr = '0; mem_wdata = '0; ld_d = '0;
    br_taken = 1'b0; halt = 1'b0; br_target = '0;
    xo_valid = 1'b0; xo_dst = '0; xo_reg = '0; xo_data = '0;
    for (int i = 0; i < ISSUE; i++) begin
      if (opc[i] == OP_MPY && k < NMUL) begin
        mul_in_v[k] = 1'b1;
        mul_in_d[k] = syl_d(ex_bundle[i]);
        mul_in_a[k] = opa[i];
        mul_in_b[k] = opb[i];
        k++;
      end
      if (opc[i] == OP_LDW) begin
        mem_re   = 1'b1;
        mem_addr = opa[i] + opb[i];
        ld_d     = syl_d(ex_bundle[i]);
      end
      if (opc[i] == OP_STW) begin
        mem_we    = 1'b1;
        mem_addr  = opa[i] + opb[i];
        mem_wdata = opd[i];
      end
      if ((opc[i] == OP_BR && brdata[i]) || (opc[i] == OP_BRF && !brdata[i]) ||
          opc[i] == OP_GOTO) begin
        br_taken  = 1'b1;
        br_target = ex_pc + syl_imm(ex_bundle[i]);
      end
      if (opc[i] == OP_HALT) halt = 1'b1;
      if (opc[i] == OP_XCP) begin
        xo_valid = 1'b1;
        xo_dst   = ($clog2(NC))'(ex_bundle[i][1:0]);
        xo_reg   = syl_d(ex_bundle[i]);
        xo_data  = opa[i];
      end
    end
  end

  assign br_tid = ex_tid;
  assign xo_tid = ex_tid;
  assign dmiss  = (mem_re || mem_we) && dc_miss;

  for (genvar m = 0; m < NMUL; m++) begin : g_mul
    mul_unit #(.NT(NT)) u_mul (
      .clk, .rst_n,
      .in_valid(mul_in_v[m]), .in_tid(ex_tid), .in_dst(mul_in_d[m]),
      .a(mul_in_a[m]), .b(mul_in_b[m]),
      .out_valid(mul_out_v[m]), .out_tid(mul_out_t[m]), .out_dst(mul_out_d[m]),
      .y(mul_out_y[m])
    );
  end

  // load result pipeline register (E1 -> E2)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_v_q <= 1'b0; ld_t_q <= '0; ld_d_q <= '0; ld_data_q <= '0;
    end else begin
      ld_v_q    <= mem_re;
      ld_t_q    <= ex_tid;
      ld_d_q    <= ld_d;
      ld_data_q <= mem_rdata;
    end
  end

  // ---------------- register write ports ----------------
  always_comb begin
    for (int i = 0; i < ISSUE; i++) begin
      wv[i]    = (opc[i] >= OP_ADD && opc[i] <= OP_SHLI);
      wtid[i]  = ex_tid;
      waddr[i] = syl_d(ex_bundle[i]);
      wdata[i] = alu_y[i];
      bwv[i]    = opc_is_cmp(opc[i]);
      bwaddr[i] = BA'(syl_d(ex_bundle[i]));
      bwdata[i] = alu_cmp[i];
    end
    for (int m = 0; m < NMUL; m++) begin
      wv[ISSUE+m]    = mul_out_v[m];
      wtid[ISSUE+m]  = mul_out_t[m];
      waddr[ISSUE+m] = mul_out_d[m];
      wdata[ISSUE+m] = mul_out_y[m];
    end
    wv[ISSUE+NMUL]    = ld_v_q;
    wtid[ISSUE+NMUL]  = ld_t_q;
    waddr[ISSUE+NMUL] = ld_d_q;
    wdata[ISSUE+NMUL] = ld_data_q;
    for (int s = 0; s < NC; s++) begin
      wv[ISSUE+NMUL+1+s]    = xi_valid[s];
      wtid[ISSUE+NMUL+1+s]  = xi_tid[s];
      waddr[ISSUE+NMUL+1+s] = xi_reg[s];
      wdata[ISSUE+NMUL+1+s] = xi_data[s];
    end
  end

endmodule
