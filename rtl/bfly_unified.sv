// bfly_unified: unified NTT/INTT butterfly (one "Uni. Bfly").
//
// The same adder, subtractor, modular multiplier and halving logic serve
// both transform directions:
//   NTT  (Cooley-Tukey):    t = b*w ;  A = a + t ;        B = a - t
//   INTT (Gentleman-Sande): A = (a + b)/2 ;  B = ((a - b)*w)/2
// all modulo q. The division by two is x/2 for even x and (x+q)/2 for odd
// x (a plain add then a shift), so an INTT through all stages is scaled by
// 1/n with no final multiplication. With `special` set the unit performs the
// special stage that Kyber needs when q is not 1 mod 512: no arithmetic, the
// inputs pass to the outputs with the normal latency so the pipeline stays
// uniform. Twiddle w is the forward root for NTT and the inverse root for
// INTT. In PQC configuration every word holds two independent 27-bit lanes
// (each with its own q), and w holds one twiddle per lane.
// The two butterfly equations, the halving and the special stage follow the
// document; where the multiplier sits in each direction and the pipeline
// depth are this design's choices.
//
// Timing: one butterfly per cycle; outputs follow inputs by
// BFLY_LAT = MODMUL_LAT + 3 = 7 cycles:
//   1: pre-add/sub (INTT)   2-5: modular multiply   6: add/sub (NTT)
//   7: halving (INTT)
// dir and special travel with the data, so they may change between
// consecutive inputs; cfg must be stable while data is in flight.
module bfly_unified
  import recaphe_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  modcfg_t       cfg,
  input  dir_e          dir,
  input  logic          special,
  input  logic          in_valid,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [W-1:0]  w,
  output logic          out_valid,
  output logic [W-1:0]  out_a,
  output logic [W-1:0]  out_b
);

  // ---- stage 1: pre add/sub for INTT ----
  logic [W-1:0] s1_a, s1_b, s1_w;
  logic         s1_v, s1_inv, s1_sp;

  always_ff @(posedge clk) begin
    if (dir == DIR_INTT && !special) begin
      s1_a <= wadd(cfg.cfg, a, b, cfg.q);
      s1_b <= wsub(cfg.cfg, a, b, cfg.q);
    end else begin
      s1_a <= a;
      s1_b <= b;
    end
    s1_w   <= w;
    s1_inv <= (dir == DIR_INTT);
    s1_sp  <= special;
  end

  // ---- stages 2-5: modular multiplier, side data delayed alongside ----
  logic         m_v;
  logic [W-1:0] m_t;
  logic [W-1:0] d_a [MODMUL_LAT];
  logic [W-1:0] d_b [MODMUL_LAT];
  logic         d_inv [MODMUL_LAT];
  logic         d_sp [MODMUL_LAT];

  modmul_dual u_mul (
    .clk, .rst_n, .cfg,
    .in_valid (s1_v),
    .a        (s1_b),
    .b        (s1_w),
    .out_valid(m_v),
    .y        (m_t)
  );

  always_ff @(posedge clk) begin
    d_a[0] <= s1_a; d_b[0] <= s1_b; d_inv[0] <= s1_inv; d_sp[0] <= s1_sp;
    for (int i = 1; i < int'(MODMUL_LAT); i++) begin
      d_a[i] <= d_a[i-1]; d_b[i] <= d_b[i-1];
      d_inv[i] <= d_inv[i-1]; d_sp[i] <= d_sp[i-1];
    end
  end

  // ---- stage 6: post add/sub for NTT ----
  logic [W-1:0] s6_a, s6_b;
  logic         s6_v, s6_half;
  localparam int unsigned L = MODMUL_LAT - 1;

  always_ff @(posedge clk) begin
    if (d_sp[L]) begin
      s6_a <= d_a[L];
      s6_b <= d_b[L];
    end else if (d_inv[L]) begin
      s6_a <= d_a[L];
      s6_b <= m_t;
    end else begin
      s6_a <= wadd(cfg.cfg, d_a[L], m_t, cfg.q);
      s6_b <= wsub(cfg.cfg, d_a[L], m_t, cfg.q);
    end
    s6_half <= d_inv[L] && !d_sp[L];
  end

  // ---- stage 7: halving for INTT ----
  always_ff @(posedge clk) begin
    out_a <= s6_half ? whalf(cfg.cfg, s6_a, cfg.q) : s6_a;
    out_b <= s6_half ? whalf(cfg.cfg, s6_b, cfg.q) : s6_b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s6_v <= 1'b0; out_valid <= 1'b0;
    end else begin
      s1_v      <= in_valid;
      s6_v      <= m_v;
      out_valid <= s6_v;
    end
  end

endmodule
