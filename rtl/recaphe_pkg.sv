// recaphe_pkg: types and constants shared by the RECAPHE datapath.
//
// A coefficient word is W = 54 bits. In HE configuration it holds one
// residue modulo a 54-bit prime. In PQC configuration it holds two
// independent 27-bit lanes, lane 0 in bits [26:0] and lane 1 in
// bits [53:27]; each lane has its own modulus. The Barrett constant
// m = floor(2^k / q) is carried in a 56-bit word: whole in HE mode, as two
// 28-bit lanes in PQC mode. The word widths, the 27-bit lane split and the
// Kyber/Dilithium moduli follow the document; the lane packing and the
// latencies are this design's own choices.
package recaphe_pkg;

  localparam int unsigned W      = 54;  // coefficient word
  localparam int unsigned LW     = 27;  // PQC lane width
  localparam int unsigned MW     = 56;  // Barrett constant word
  localparam int unsigned MLW    = 28;  // Barrett constant lane
  localparam int unsigned LANES  = 8;   // butterflies per hybrid module

  // Pipeline depths (this design's choice; the document gives none).
  localparam int unsigned MODMUL_LAT = 4;
  localparam int unsigned BFLY_LAT   = MODMUL_LAT + 3;

  // Kyber and Dilithium moduli, Barrett constants and roots of unity.
  localparam logic [LW-1:0]  KYBER_Q     = 27'd3329;
  localparam logic [MLW-1:0] KYBER_M     = 28'd5039;      // floor(2^24/3329)
  localparam int unsigned    KYBER_ROOT  = 17;            // primitive 256th root
  localparam logic [LW-1:0]  DIL_Q       = 27'd8380417;
  localparam logic [MLW-1:0] DIL_M       = 28'd8396807;   // floor(2^46/8380417)
  localparam int unsigned    DIL_ROOT    = 1753;          // primitive 512th root

  typedef enum logic { CFG_HE = 1'b0, CFG_PQC = 1'b1 } cfg_e;
  typedef enum logic { DIR_NTT = 1'b0, DIR_INTT = 1'b1 } dir_e;
  typedef enum logic { PQC_KYBER = 1'b0, PQC_DILITHIUM = 1'b1 } pqc_e;
  typedef enum logic { MODE_MEM = 1'b0, MODE_MDC = 1'b1 } bfmode_e;
  typedef enum logic [1:0] { OP_ADD = 2'd0, OP_SUB = 2'd1, OP_MUL = 2'd2 } cop_e;

  // Modulus configuration of a unit. Must be held stable while operands
  // are in flight.
  typedef struct packed {
    cfg_e          cfg;
    logic [W-1:0]  q;    // HE: q ; PQC: {q1, q0}
    logic [MW-1:0] m;    // HE: floor(2^k/q) ; PQC: {m1, m0}
  } modcfg_t;

  // Two-lane PQC configuration: lane 0 runs scheme s0, lane 1 runs s1.
  function automatic modcfg_t pqc_cfg(input pqc_e s0, input pqc_e s1);
    modcfg_t c;
    c.cfg = CFG_PQC;
    c.q   = {(s1 == PQC_KYBER) ? KYBER_Q : DIL_Q, (s0 == PQC_KYBER) ? KYBER_Q : DIL_Q};
    c.m   = {(s1 == PQC_KYBER) ? KYBER_M : DIL_M, (s0 == PQC_KYBER) ? KYBER_M : DIL_M};
    return c;
  endfunction

  // Number of bits of q-1, i.e. ceil(log2 q) for q > 1.
  function automatic int unsigned clog2_dyn(input logic [W-1:0] q);
    logic [W-1:0] v;
    int unsigned  r;
    v = q - 1'b1;
    r = 0;
    for (int i = 0; i < int'(W); i++) if (v[i]) r = i + 1;
    return r;
  endfunction

  // Modular reduction helpers for a lane (inputs already < q).
  function automatic logic [W-1:0] addmod(input logic [W-1:0] x, y, q);
    logic [W:0] s;
    s = {1'b0, x} + {1'b0, y};
    return (s >= {1'b0, q}) ? W'(s - {1'b0, q}) : s[W-1:0];
  endfunction

  function automatic logic [W-1:0] submod(input logic [W-1:0] x, y, q);
    return (x >= y) ? x - y : x + q - y;
  endfunction

  // x/2 mod q for odd q: halve an even x, otherwise halve x+q.
  function automatic logic [W-1:0] halfmod(input logic [W-1:0] x, q);
    logic [W:0] s;
    s = x[0] ? ({1'b0, x} + {1'b0, q}) : {1'b0, x};
    return W'(s >> 1);
  endfunction

  // Word-level (lane-aware) versions.
  function automatic logic [W-1:0] wadd(input cfg_e c, input logic [W-1:0] x, y, q);
    if (c == CFG_HE) return addmod(x, y, q);
    return {LW'(addmod(W'(x[W-1:LW]), W'(y[W-1:LW]), W'(q[W-1:LW]))),
            LW'(addmod(W'(x[LW-1:0]), W'(y[LW-1:0]), W'(q[LW-1:0])))};
  endfunction

  function automatic logic [W-1:0] wsub(input cfg_e c, input logic [W-1:0] x, y, q);
    if (c == CFG_HE) return submod(x, y, q);
    return {LW'(submod(W'(x[W-1:LW]), W'(y[W-1:LW]), W'(q[W-1:LW]))),
            LW'(submod(W'(x[LW-1:0]), W'(y[LW-1:0]), W'(q[LW-1:0])))};
  endfunction

  function automatic logic [W-1:0] whalf(input cfg_e c, input logic [W-1:0] x, q);
    if (c == CFG_HE) return halfmod(x, q);
    return {LW'(halfmod(W'(x[W-1:LW]), W'(q[W-1:LW]))),
            LW'(halfmod(W'(x[LW-1:0]), W'(q[LW-1:0])))};
  endfunction

  // Elaboration-time helpers for constant twiddle tables.
  function automatic longint unsigned powmod_c(input longint unsigned b, e, q);
    longint unsigned r, x;
    r = 1; x = b % q;
    for (int i = 0; i < 16; i++) begin
      if (e[i]) r = (r * x) % q;
      x = (x * x) % q;
    end
    return r;
  endfunction

  function automatic int unsigned bitrev_c(input int unsigned v, input int unsigned bits);
    int unsigned r;
    r = 0;
    for (int i = 0; i < 16; i++) if (i < int'(bits)) r[bits-1-i] = v[i];
    return r;
  endfunction

endpackage
