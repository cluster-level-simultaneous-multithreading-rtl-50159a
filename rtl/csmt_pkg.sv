// csmt_pkg: shared constants, instruction encoding and helpers of the
// cluster-level simultaneous multithreading (CSMT) VLIW core.
//
// An instruction is a sequence of 32-bit syllables (operations). Two bits of
// every syllable carry the sequencing information of the VEX encoding: the
// instruction-stop bit marks the last operation of an instruction and the
// cluster-start bit marks the first operation of a new bundle (the ops that
// one cluster executes). Where the stop and cluster-start bits follow the VEX
// scheme, the rest of the syllable layout is this design's own:
//
//   [31]    S   instruction-stop bit
//   [30]    CS  cluster-start bit
//   [29:28] CID logical cluster of the bundle (read on the first op of a bundle)
//   [27:23] OPC opcode (opc_e)
//   [22:17] D   destination register (or store data register / branch reg)
//   [16:11] S1  first source register (or branch register of BR/BRF)
//   [10:5]  S2  second source register
//   [10:0]  IMM signed 11-bit immediate for the immediate forms
//
// Latencies follow the base architecture: ALU, compare, copy and branch
// ops take one cycle; multiply and load take two.
package csmt_pkg;

  localparam int unsigned NT_DEF    = 4;   // hardware threads
  localparam int unsigned NC_DEF    = 4;   // clusters
  localparam int unsigned ISSUE_DEF = 4;   // operations per bundle / ALUs per cluster
  localparam int unsigned NGPR      = 64;  // general registers per cluster and thread
  localparam int unsigned NBR       = 8;   // branch registers per cluster and thread
  localparam int unsigned NMUL      = 2;   // multipliers per cluster
  localparam int unsigned MISS_LAT_DEF = 20;

  typedef logic [31:0] syl_t;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    OP_ADD    = 5'd1,
    OP_SUB    = 5'd2,
    OP_AND    = 5'd3,
    OP_OR     = 5'd4,
    OP_XOR    = 5'd5,
    OP_SHL    = 5'd6,
    OP_SHR    = 5'd7,   // logical right shift
    OP_ADDI   = 5'd8,
    OP_SHLI   = 5'd9,
    OP_CMPLT  = 5'd10,  // b[D] = s1 < s2 (signed)
    OP_CMPEQ  = 5'd11,  // b[D] = s1 == s2
    OP_CMPLTI = 5'd12,  // b[D] = s1 < imm
    OP_MPY    = 5'd13,  // D = s1 * s2, 2 cycles, multiplier
    OP_LDW    = 5'd14,  // D = mem[s1 + imm], 2 cycles, load/store unit
    OP_STW    = 5'd15,  // mem[s1 + imm] = D
    OP_BR     = 5'd16,  // if b[S1] then pc = pc + imm
    OP_BRF    = 5'd17,  // if !b[S1] then pc = pc + imm
    OP_GOTO   = 5'd18,  // pc = pc + imm
    OP_XCP    = 5'd19,  // r[D] of cluster imm[1:0] = s1 (inter-cluster copy)
    OP_HALT   = 5'd20,  // thread finishes
    OP_CMPEQI = 5'd21   // b[D] = s1 == imm
  } opc_e;

  function automatic logic syl_stop(syl_t s);   return s[31];    endfunction
  function automatic logic syl_cstart(syl_t s); return s[30];    endfunction
  function automatic logic [1:0] syl_cid(syl_t s); return s[29:28]; endfunction
  function automatic logic [4:0] syl_opc(syl_t s); return s[27:23]; endfunction
  function automatic logic [5:0] syl_d(syl_t s);  return s[22:17]; endfunction
  function automatic logic [5:0] syl_s1(syl_t s); return s[16:11]; endfunction
  function automatic logic [5:0] syl_s2(syl_t s); return s[10:5];  endfunction
  function automatic logic [31:0] syl_imm(syl_t s);
    return {{21{s[10]}}, s[10:0]};
  endfunction

  function automatic logic opc_legal(logic [4:0] o);
    return o <= OP_CMPEQI;
  endfunction
  function automatic logic opc_is_mul(logic [4:0] o);  return o == OP_MPY; endfunction
  function automatic logic opc_is_mem(logic [4:0] o);  return o == OP_LDW || o == OP_STW; endfunction
  function automatic logic opc_is_br(logic [4:0] o);
    return o == OP_BR || o == OP_BRF || o == OP_GOTO || o == OP_HALT;
  endfunction
  function automatic logic opc_is_cmp(logic [4:0] o);
    return o == OP_CMPLT || o == OP_CMPEQ || o == OP_CMPLTI || o == OP_CMPEQI;
  endfunction
  function automatic logic opc_uses_imm(logic [4:0] o);
    return o == OP_ADDI || o == OP_SHLI || o == OP_CMPLTI || o == OP_CMPEQI ||
           o == OP_LDW || o == OP_STW;
  endfunction

  // Build a syllable (used by program generators in testbenches).
  function automatic syl_t mk_syl(logic stop, logic cs, logic [1:0] cid, opc_e opc,
                                  logic [5:0] d, logic [5:0] s1, logic [10:0] s2imm);
    return {stop, cs, cid, opc, d, s1, s2imm};
  endfunction
  // Register-register form: s2 goes to [10:5].
  function automatic logic [10:0] rr(logic [5:0] s2);
    return {s2, 5'd0};
  endfunction

endpackage
