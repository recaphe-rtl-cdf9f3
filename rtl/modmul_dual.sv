// modmul_dual: dual-scheme Barrett modular multiplier, y = a*b mod q.
//
// The 54-bit operands are cut into 27-bit pieces of a and 18-bit pieces of
// b, and six 27x18 partial products m0..m5 are formed, as a DSP-cascade
// multiplier would:
//   m0=a[26:0]*b[17:0]   m1=a[26:0]*b[35:18]   m2=a[26:0]*b[53:36]
//   m3=a[53:27]*b[17:0]  m4=a[53:27]*b[35:18]  m5=a[53:27]*b[53:36]
// In HE configuration they are summed into one 108-bit product z and a
// single Barrett reduction (t=(z*m)>>k, y=z-t*q, one conditional
// subtraction of q) runs on it with k = 2*ceil(log2 q).
// In PQC configuration the same six multipliers compute two independent
// 27x27 products, lane 0 = a[26:0]*b[26:0] and lane 1 = a[53:27]*b[53:27]:
// the b pieces feeding m1 and m4 are masked to the bits of their own lane,
// m2 and m3 are fed zero, and lane 1 is (m4>>9)+(m5<<9). z is then
// {z1, z0} and steps 2, 3 and 5 of the reduction run per lane with the
// lane's q, m and k. The partial products and the two-lane split follow
// the document; the operand masking and lane packing are this design's way
// of doing the split.
//
// Interface: operands must be reduced (a, b < q per lane). cfg.m must be
// floor(2^k/q) per lane. cfg is sampled combinationally at every stage and
// must stay stable while products are in flight.
// Timing: fully pipelined, one product per cycle, out_valid/y follow
// in_valid/a/b by MODMUL_LAT = 4 cycles:
//   1: partial products   2: z and k   3: t=(z*m)>>k   4: y=z-t*q, y>=q?y-q
module modmul_dual
  import recaphe_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  modcfg_t       cfg,
  input  logic          in_valid,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  output logic          out_valid,
  output logic [W-1:0]  y
);

  // ---------------- stage 1: partial products ----------------
  logic [17:0] bs0, bs1_lo, bs1_hi, bs2;
  logic [44:0] pp [6];
  logic [3:0]  vld;

  always_comb begin
    bs0    = b[17:0];
    bs2    = b[53:36];
    bs1_lo = b[35:18];
    bs1_hi = b[35:18];
    if (cfg.cfg == CFG_PQC) begin
      bs1_lo = {9'd0, b[26:18]};   // lane 0 part of the middle piece
      bs1_hi = {b[35:27], 9'd0};   // lane 1 part of the middle piece
    end
  end

  always_ff @(posedge clk) begin
    pp[0] <= 45'(a[26:0]  * bs0);
    pp[1] <= 45'(a[26:0]  * bs1_lo);
    pp[2] <= (cfg.cfg == CFG_PQC) ? '0 : 45'(a[26:0]  * bs2);
    pp[3] <= (cfg.cfg == CFG_PQC) ? '0 : 45'(a[53:27] * bs0);
    pp[4] <= 45'(a[53:27] * bs1_hi);
    pp[5] <= 45'(a[53:27] * bs2);
  end

  // ---------------- stage 2: product z ----------------
  logic [2*W-1:0] z2;
  logic [6:0]     k_he;
  logic [5:0]     k_l0, k_l1;

  always_ff @(posedge clk) begin
    if (cfg.cfg == CFG_HE)
      z2 <= (2*W)'(pp[0]) + ((2*W)'(pp[1]) << 18) + ((2*W)'(pp[2]) << 36)
          + ((2*W)'(pp[3]) << 27) + ((2*W)'(pp[4]) << 45) + ((2*W)'(pp[5]) << 63);
    else
      z2 <= {W'(pp[4] >> 9) + (W'(pp[5]) << 9),
             W'(pp[0]) + (W'(pp[1]) << 18)};
    k_he <= 7'(2 * clog2_dyn(cfg.q));
    k_l0 <= 6'(2 * clog2_dyn(W'(cfg.q[LW-1:0])));
    k_l1 <= 6'(2 * clog2_dyn(W'(cfg.q[W-1:LW])));
  end

  // ---------------- stage 3: quotient estimate t ----------------
  logic [2*W-1:0] z3;
  logic [MW-1:0]  t3;
  logic [2*W+MW-1:0] zm_he;
  logic [W+MLW-1:0]  zm_l0, zm_l1;

  always_comb begin
    zm_he = (2*W+MW)'(z2) * (2*W+MW)'(cfg.m);
    zm_l0 = (W+MLW)'(z2[W-1:0])   * (W+MLW)'(cfg.m[MLW-1:0]);
    zm_l1 = (W+MLW)'(z2[2*W-1:W]) * (W+MLW)'(cfg.m[MW-1:MLW]);
  end

  always_ff @(posedge clk) begin
    z3 <= z2;
    if (cfg.cfg == CFG_HE)
      t3 <= MW'(zm_he >> k_he);
    else
      t3 <= {MLW'(zm_l1 >> k_l1), MLW'(zm_l0 >> k_l0)};
  end

  // ---------------- stage 4: y = z - t*q, final correction ----------------
  logic [W:0]  r_he;
  logic [LW:0] r_l0, r_l1;
  logic [W-1:0] y_d;

  always_comb begin
    r_he = (W+1)'(z3 - (2*W)'(t3) * (2*W)'(cfg.q));
    r_l0 = (LW+1)'(z3[W-1:0]   - W'(t3[MLW-1:0]) * W'(cfg.q[LW-1:0]));
    r_l1 = (LW+1)'(z3[2*W-1:W] - W'(t3[MW-1:MLW]) * W'(cfg.q[W-1:LW]));
    if (cfg.cfg == CFG_HE) begin
      y_d = (r_he >= {1'b0, cfg.q}) ? W'(r_he - {1'b0, cfg.q}) : W'(r_he);
    end else begin
      y_d[LW-1:0] = (r_l0 >= {1'b0, cfg.q[LW-1:0]}) ? LW'(r_l0 - {1'b0, cfg.q[LW-1:0]})
                                                    : LW'(r_l0);
      y_d[W-1:LW] = (r_l1 >= {1'b0, cfg.q[W-1:LW]}) ? LW'(r_l1 - {1'b0, cfg.q[W-1:LW]})
                                                    : LW'(r_l1);
    end
  end

  always_ff @(posedge clk) y <= y_d;

  // ---------------- valid pipeline ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end
  assign out_valid = vld[3];

endmodule
