// recaphe_top: the RECAPHE polynomial arithmetic core, a unified
// accelerator for lattice-based PQC (Kyber, Dilithium) and HE (CKKS/BFV
// style, 54-bit RNS moduli, up to 2^16 coefficients).
//
// The core holds NBF = 3 hybrid butterfly modules and NCU = 2
// coefficient-wise modular arithmetic modules, the counts of the
// document's evaluated implementation. Every module is configured
// independently at run time (HE or PQC moduli, memory-based or MDC mode,
// NTT or INTT), so the three butterfly modules can, for example, run three
// 256-point PQC transforms side by side, or one can run a 2^16-point HE
// transform while the others serve PQC traffic. Data movement between the
// modules and external storage is left to the system around the core: each
// module's streaming, memory-access, twiddle-load and control ports are
// brought out as arrays indexed by module number, with exactly the meaning
// and timing documented in hybrid_bfly and coef_unit.
module recaphe_top
  import recaphe_pkg::*;
#(
  parameter int unsigned NBF      = 3,
  parameter int unsigned NCU      = 2,
  parameter int unsigned CU_LANES = 16,
  parameter int unsigned LOGN_MAX = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // hybrid butterfly modules
  input  bfmode_e               bf_mode       [NBF],
  input  dir_e                  bf_dir        [NBF],
  input  modcfg_t               bf_cfg        [NBF],
  input  pqc_e                  bf_scheme     [NBF],
  input  logic [4:0]            bf_logn       [NBF],
  input  logic                  mdc_in_valid  [NBF],
  input  logic [W-1:0]          mdc_in_a      [NBF],
  input  logic [W-1:0]          mdc_in_b      [NBF],
  output logic                  mdc_out_valid [NBF],
  output logic [W-1:0]          mdc_out_a     [NBF],
  output logic [W-1:0]          mdc_out_b     [NBF],
  input  logic                  bf_start      [NBF],
  output logic                  bf_busy       [NBF],
  output logic                  bf_done       [NBF],
  input  logic                  host_wr_en    [NBF],
  input  logic                  host_wr_set   [NBF],
  input  logic [LOGN_MAX-4:0]   host_wr_row   [NBF],
  input  logic [LANES*W-1:0]    host_wr_data  [NBF],
  input  logic                  host_rd_en    [NBF],
  input  logic                  host_rd_set   [NBF],
  input  logic [LOGN_MAX-4:0]   host_rd_row   [NBF],
  output logic [LANES*W-1:0]    host_rd_data  [NBF],
  input  logic                  tw_wr_en      [NBF],
  input  dir_e                  tw_wr_dir     [NBF],
  input  logic [LOGN_MAX-4:0]   tw_wr_row     [NBF],
  input  logic [LANES*W-1:0]    tw_wr_data    [NBF],
  // coefficient-wise modules
  input  modcfg_t               cu_cfg        [NCU],
  input  cop_e                  cu_op         [NCU],
  input  logic                  cu_in_valid   [NCU],
  input  logic [CU_LANES*W-1:0] cu_a          [NCU],
  input  logic [CU_LANES*W-1:0] cu_b          [NCU],
  output logic                  cu_out_valid  [NCU],
  output logic [CU_LANES*W-1:0] cu_y          [NCU]
);

  for (genvar i = 0; i < int'(NBF); i++) begin : g_bf
    hybrid_bfly #(.LOGN_MAX(LOGN_MAX)) u_hbf (
      .clk, .rst_n,
      .mode         (bf_mode[i]),
      .dir          (bf_dir[i]),
      .cfg          (bf_cfg[i]),
      .scheme       (bf_scheme[i]),
      .logn         (bf_logn[i]),
      .mdc_in_valid (mdc_in_valid[i]),
      .mdc_in_a     (mdc_in_a[i]),
      .mdc_in_b     (mdc_in_b[i]),
      .mdc_out_valid(mdc_out_valid[i]),
      .mdc_out_a    (mdc_out_a[i]),
      .mdc_out_b    (mdc_out_b[i]),
      .start        (bf_start[i]),
      .busy         (bf_busy[i]),
      .done         (bf_done[i]),
      .host_wr_en   (host_wr_en[i]),
      .host_wr_set  (host_wr_set[i]),
      .host_wr_row  (host_wr_row[i]),
      .host_wr_data (host_wr_data[i]),
      .host_rd_en   (host_rd_en[i]),
      .host_rd_set  (host_rd_set[i]),
      .host_rd_row  (host_rd_row[i]),
      .host_rd_data (host_rd_data[i]),
      .tw_wr_en     (tw_wr_en[i]),
      .tw_wr_dir    (tw_wr_dir[i]),
      .tw_wr_row    (tw_wr_row[i]),
      .tw_wr_data   (tw_wr_data[i])
    );
  end

  for (genvar i = 0; i < int'(NCU); i++) begin : g_cu
    coef_unit #(.NL(CU_LANES)) u_cu (
      .clk, .rst_n,
      .cfg      (cu_cfg[i]),
      .op       (cu_op[i]),
      .in_valid (cu_in_valid[i]),
      .a        (cu_a[i]),
      .b        (cu_b[i]),
      .out_valid(cu_out_valid[i]),
      .y        (cu_y[i])
    );
  end

endmodule
