// coef_unit: coefficient-wise modular arithmetic module.
//
// Applies one operation to NL coefficient pairs per cycle:
//   OP_ADD: y = a + b mod q    OP_SUB: y = a - b mod q    OP_MUL: y = a*b mod q
// Multiplication uses one dual-scheme multiplier per lane; addition and
// subtraction are delayed to the same latency so every operation has a
// result MODMUL_LAT = 4 cycles after its operands and operations may be
// mixed from cycle to cycle. As everywhere in the datapath, a 54-bit word is
// one HE residue or, in PQC configuration, two 27-bit lanes with their own
// moduli, so a PQC cycle handles 2*NL coefficients.
// The document names these modules and says there are two of them; what
// they compute here (add, sub, mul) and the lane count of 16 (chosen so
// that two modules account for the multipliers the document's overall DSP
// count leaves after the three butterfly modules) are this design's
// choices.
module coef_unit
  import recaphe_pkg::*;
#(
  parameter int unsigned NL = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  modcfg_t         cfg,
  input  cop_e            op,
  input  logic            in_valid,
  input  logic [NL*W-1:0] a,
  input  logic [NL*W-1:0] b,
  output logic            out_valid,
  output logic [NL*W-1:0] y
);

  logic [NL*W-1:0] as_d [MODMUL_LAT];
  logic [NL*W-1:0] mul_y;
  logic            op_mul [MODMUL_LAT];
  logic [NL-1:0]   mv;

  for (genvar l = 0; l < int'(NL); l++) begin : g_lane
    modmul_dual u_mul (
      .clk, .rst_n, .cfg,
      .in_valid (in_valid),
      .a        (a[l*W +: W]),
      .b        (b[l*W +: W]),
      .out_valid(mv[l]),
      .y        (mul_y[l*W +: W])
    );
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < int'(NL); l++)
      as_d[0][l*W +: W] <= (op == OP_SUB) ? wsub(cfg.cfg, a[l*W +: W], b[l*W +: W], cfg.q)
                                          : wadd(cfg.cfg, a[l*W +: W], b[l*W +: W], cfg.q);
    op_mul[0] <= (op == OP_MUL);
    for (int i = 1; i < int'(MODMUL_LAT); i++) begin
      as_d[i]   <= as_d[i-1];
      op_mul[i] <= op_mul[i-1];
    end
  end

  assign out_valid = &mv;
  assign y         = op_mul[MODMUL_LAT-1] ? mul_y : as_d[MODMUL_LAT-1];

endmodule
