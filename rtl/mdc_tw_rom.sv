// mdc_tw_rom: twiddle source of one MDC stage ("MDC-ROM_i" with its
// address generator).
//
// Stage P of the length-2^LOGN MDC network sits at butterfly P; in the NTT
// direction it is transform layer j = LOGN-1-P (span 2^P), whose 2^j
// butterfly groups use the twiddles zeta_k, k = 2^j + g. The address
// generator counts the valid inputs of the stage within a burst (c) and
// the group is g = c >> P. The constants are held in LUT-style tables built
// at elaboration time, one set per PQC scheme and direction:
//   Kyber     (q = 3329,    17 a 256th root):  zeta_k = 17^brv7(k)
//   Dilithium (q = 8380417, 1753 a 512th root): zeta_k = 1753^brv8(k)
// and the INTT tables hold the inverses zeta_k^-1. For Kyber, stage 0 is
// the special stage and has no table. Output w carries the twiddle in both
// 27-bit lanes so the two-lane PQC butterfly can transform two polynomials
// of the same scheme at once.
// Separate constant tables for the MDC mode, held in logic rather than
// memory, follow the document; the table formulas are the Kyber and
// Dilithium definitions and the counter-based address generator is this
// design's choice.
//
// Timing: w is combinational from the counter and applies to the element
// presented together with in_valid in the same cycle. Bursts are 2^(LOGN-1)
// contiguous valid cycles; the counter returns to zero at the end of each.
module mdc_tw_rom
  import recaphe_pkg::*;
#(
  parameter int unsigned LOGN = 8,
  parameter int unsigned P    = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  dir_e          dir,
  input  pqc_e          scheme,
  output logic [W-1:0]  w
);

  localparam int unsigned J  = LOGN - 1 - P;
  localparam int unsigned SZ = 1 << J;
  localparam int unsigned NN = 1 << LOGN;
  localparam int unsigned CW = LOGN - 1;
  localparam int unsigned AW = (J == 0) ? 1 : J;

  logic [LW-1:0] t_kn [SZ];
  logic [LW-1:0] t_ki [SZ];
  logic [LW-1:0] t_dn [SZ];
  logic [LW-1:0] t_di [SZ];

  for (genvar i = 0; i < int'(SZ); i++) begin : g_tab
    localparam int unsigned K   = SZ + i;
    localparam int unsigned BK  = bitrev_c(K, LOGN - 1);
    localparam int unsigned BD  = bitrev_c(K, LOGN);
    localparam int unsigned EKI = (NN - BK) % NN;
    localparam int unsigned EDI = (2 * NN - BD) % (2 * NN);
    localparam logic [LW-1:0] KN = (P == 0) ? '0 :
        LW'(powmod_c(KYBER_ROOT, longint'(BK), longint'(KYBER_Q)));
    localparam logic [LW-1:0] KI = (P == 0) ? '0 :
        LW'(powmod_c(KYBER_ROOT, longint'(EKI), longint'(KYBER_Q)));
    localparam logic [LW-1:0] DN =
        LW'(powmod_c(DIL_ROOT, longint'(BD), longint'(DIL_Q)));
    localparam logic [LW-1:0] DI =
        LW'(powmod_c(DIL_ROOT, longint'(EDI), longint'(DIL_Q)));
    assign t_kn[i] = KN;
    assign t_ki[i] = KI;
    assign t_dn[i] = DN;
    assign t_di[i] = DI;
  end

  // address generator
  logic [CW-1:0] cnt;
  logic [AW-1:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cnt <= '0;
    else if (in_valid) cnt <= cnt + 1'b1;
  end

  assign addr = AW'(cnt >> P);

  logic [LW-1:0] wl;
  always_comb begin
    unique case ({scheme, dir})
      {PQC_KYBER,     DIR_NTT }: wl = t_kn[addr];
      {PQC_KYBER,     DIR_INTT}: wl = t_ki[addr];
      {PQC_DILITHIUM, DIR_NTT }: wl = t_dn[addr];
      default:                   wl = t_di[addr];
    endcase
  end

  assign w = {wl, wl};

endmodule
