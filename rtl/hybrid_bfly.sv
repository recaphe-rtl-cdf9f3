// hybrid_bfly: hybrid butterfly module, eight unified butterflies that work
// either as an 8-parallel memory-based NTT/INTT engine (HE: long
// polynomials) or as a length-256 bidirectional MDC pipeline (PQC).
//
// Memory-based mode (mode = MODE_MEM). A polynomial of N = 2^logn
// coefficients (logn 5..LOGN_MAX) sits in coefficient set 0 as N/8 rows of
// 8. Each of the logn stages streams all N/16 row pairs from one set
// through the eight butterflies into the other set (ping-pong), so the
// result ends in set logn%2. The access pattern is constant-geometry:
//   NTT  stage j = 0..logn-1: butterfly i (0..N/2-1) reads x[i], x[i+N/2]
//        and writes x'[2i], x'[2i+1]; lane k of row r is i = 8r+k.
//   INTT stage j = logn-1..0: the exact reverse, reads x[2i], x[2i+1] and
//        writes x'[i], x'[i+N/2].
// Butterfly i of stage j uses zeta_(2^j + (i mod 2^j)), read from the
// loaded twiddle memory. Starting from natural order the NTT ends with the
// same array an in-place Cooley-Tukey negacyclic NTT produces (output in
// bit-reversed evaluation order), and the INTT takes that array back to
// natural order, scaled by 1/N through the per-stage halving. After the
// last row of a stage the controller waits for the butterfly pipeline to
// drain before the next stage reads; a stage takes N/16 + 9 cycles and
// a transform logn*(N/16 + 9) + 1 cycles from start to done.
//
// MDC mode (mode = MODE_MDC, cfg.cfg = CFG_PQC). The butterflies are
// chained through delay-switch-delay commutators of delay 1, 2, ... 64
// (commutator d between butterflies d+1 and d). An NTT enters at butterfly
// 7 and leaves at butterfly 0, an INTT takes the opposite path through the
// same butterflies and commutators, so the NTT input port is the INTT
// output port and vice versa, and the two directions cannot run at once.
// A 256-coefficient transform is a burst of 128 consecutive valid cycles:
//   NTT  in:  cycle c carries (x[c], x[c+128])
//   NTT  out: cycle c carries (X[2c], X[2c+1]) of the in-place CT result
//   INTT in/out: the reverse.
// Butterfly p performs layer 7-p of the NTT, with span 2^p, and takes its
// twiddles from its own constant table. For Kyber, whose q = 3329 has no
// 512th root of unity, butterfly 0 is the special stage: the pairs pass
// without arithmetic, so Kyber runs its seven layers through the same
// eight-stage pipeline as Dilithium. Each 54-bit word carries two 27-bit
// lanes, so one burst transforms two polynomials of the same scheme.
//
// The two modes, the eight shared butterflies, ping-pong between two sets
// of block RAM, the MDC chain with DSD delays 1, 2, 4, ..., separate
// twiddle stores per mode and the special stage follow the document. The
// constant-geometry schedule, memory layout, stream orders, which end each
// direction enters and the drain between stages are this design's choices.
//
// Host access (only while busy is low): rows are written into or read from
// either coefficient set; read data returns one cycle after host_rd_en.
// Twiddle rows are loaded with tw_wr_*. start begins a memory-based
// transform in direction dir; busy stays high until done pulses.
module hybrid_bfly
  import recaphe_pkg::*;
#(
  parameter int unsigned LOGN_MAX = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  bfmode_e                    mode,
  input  dir_e                       dir,
  input  modcfg_t                    cfg,
  input  pqc_e                       scheme,
  input  logic [4:0]                 logn,
  // MDC stream
  input  logic                       mdc_in_valid,
  input  logic [W-1:0]               mdc_in_a,
  input  logic [W-1:0]               mdc_in_b,
  output logic                       mdc_out_valid,
  output logic [W-1:0]               mdc_out_a,
  output logic [W-1:0]               mdc_out_b,
  // memory-based control
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // host access to the coefficient sets
  input  logic                       host_wr_en,
  input  logic                       host_wr_set,
  input  logic [LOGN_MAX-4:0]        host_wr_row,
  input  logic [LANES*W-1:0]         host_wr_data,
  input  logic                       host_rd_en,
  input  logic                       host_rd_set,
  input  logic [LOGN_MAX-4:0]        host_rd_row,
  output logic [LANES*W-1:0]         host_rd_data,
  // twiddle load for memory-based mode
  input  logic                       tw_wr_en,
  input  dir_e                       tw_wr_dir,
  input  logic [LOGN_MAX-4:0]        tw_wr_row,
  input  logic [LANES*W-1:0]         tw_wr_data
);

  localparam int unsigned NB   = LANES;          // butterflies = MDC stages
  localparam int unsigned RW   = LOGN_MAX - 3;   // row index bits
  localparam int unsigned RRW  = RW - 1;         // row-pair counter bits

  // ------------------------------------------------------------------
  // Butterflies
  // ------------------------------------------------------------------
  logic         bf_iv [NB], bf_ov [NB];
  logic [W-1:0] bf_a [NB], bf_b [NB], bf_w [NB];
  logic [W-1:0] bf_oa [NB], bf_ob [NB];
  logic         bf_sp [NB];

  for (genvar p = 0; p < int'(NB); p++) begin : g_bf
    bfly_unified u_bf (
      .clk, .rst_n, .cfg, .dir,
      .special  (bf_sp[p]),
      .in_valid (bf_iv[p]),
      .a        (bf_a[p]),
      .b        (bf_b[p]),
      .w        (bf_w[p]),
      .out_valid(bf_ov[p]),
      .out_a    (bf_oa[p]),
      .out_b    (bf_ob[p])
    );
  end

  // ------------------------------------------------------------------
  // MDC network: commutators and stage twiddle tables
  // ------------------------------------------------------------------
  logic         ds_iv [NB-1], ds_ov [NB-1];
  logic [W-1:0] ds_iu [NB-1], ds_il [NB-1], ds_ou [NB-1], ds_ol [NB-1];
  logic [W-1:0] mdc_w [NB];
  logic         is_mdc;

  assign is_mdc = (mode == MODE_MDC);

  for (genvar d = 0; d < int'(NB) - 1; d++) begin : g_dsd
    dsd #(.DW(W), .D(1 << d)) u_dsd (
      .clk, .rst_n,
      .in_valid (ds_iv[d]),
      .in_u     (ds_iu[d]),
      .in_l     (ds_il[d]),
      .out_valid(ds_ov[d]),
      .out_u    (ds_ou[d]),
      .out_l    (ds_ol[d])
    );
    always_comb begin
      if (dir == DIR_NTT) begin
        ds_iv[d] = is_mdc && bf_ov[d+1];
        ds_iu[d] = bf_oa[d+1];
        ds_il[d] = bf_ob[d+1];
      end else begin
        ds_iv[d] = is_mdc && bf_ov[d];
        ds_iu[d] = bf_oa[d];
        ds_il[d] = bf_ob[d];
      end
    end
  end

  for (genvar p = 0; p < int'(NB); p++) begin : g_rom
    mdc_tw_rom #(.LOGN(NB), .P(p)) u_rom (
      .clk, .rst_n,
      .in_valid(is_mdc && bf_iv[p]),
      .dir, .scheme,
      .w(mdc_w[p])
    );
  end

  // ------------------------------------------------------------------
  // Memory-based engine: controller
  // ------------------------------------------------------------------
  typedef enum logic [1:0] { S_IDLE, S_RUN, S_DRAIN, S_DONE } st_e;
  st_e          st;
  logic [4:0]   stg;          // stage step 0..logn-1
  logic [RRW-1:0] r;          // row pair within the stage
  logic [RRW-1:0] r_last;
  logic [4:0]   j_cur;        // transform layer of this step
  logic [7:0]   inflight;
  logic         issue, wr_fire;

  assign r_last = RRW'((1 << (logn - 5'd4)) - 1);
  assign j_cur  = (dir == DIR_NTT) ? stg : (logn - 5'd1 - stg);
  assign issue  = (st == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; stg <= '0; r <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start && !is_mdc) begin
          st <= S_RUN; stg <= '0; r <= '0;
        end
        S_RUN: begin
          r <= r + 1'b1;
          if (r == r_last) st <= S_DRAIN;
        end
        S_DRAIN: if (inflight == 0 && !wr_fire) begin
          r <= '0;
          if (stg == logn - 5'd1) st <= S_DONE;
          else begin
            stg <= stg + 1'b1;
            st  <= S_RUN;
          end
        end
        S_DONE: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);
  assign done = (st == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 8'(issue) - 8'(wr_fire);
  end

  // tag pipeline: RAM read latency (1) + butterfly latency
  localparam int unsigned TAGD = 1 + BFLY_LAT;
  logic           tg_v   [TAGD];
  logic [RRW-1:0] tg_r   [TAGD];
  logic [4:0]     tg_j   [TAGD];
  logic           tg_set [TAGD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < int'(TAGD); i++) tg_v[i] <= 1'b0;
    else begin
      tg_v[0] <= issue;
      for (int i = 1; i < int'(TAGD); i++) tg_v[i] <= tg_v[i-1];
    end
  end

  always_ff @(posedge clk) begin
    tg_r[0] <= r; tg_j[0] <= j_cur; tg_set[0] <= ~stg[0];
    for (int i = 1; i < int'(TAGD); i++) begin
      tg_r[i] <= tg_r[i-1]; tg_j[i] <= tg_j[i-1]; tg_set[i] <= tg_set[i-1];
    end
  end

  assign wr_fire = tg_v[TAGD-1];

  // read addresses
  logic [RW-1:0] rd_row0, rd_row1, half;
  assign half = RW'(1) << (logn - 5'd4);
  always_comb begin
    if (dir == DIR_NTT) begin
      rd_row0 = RW'(r);
      rd_row1 = RW'(r) + half;
    end else begin
      rd_row0 = {r, 1'b0};
      rd_row1 = {r, 1'b1};
    end
  end

  // twiddle row for layer j, row pair r
  logic [RW-1:0] tw_rd_row;
  always_comb begin
    if (j_cur < 5'd3) tw_rd_row = '0;
    else tw_rd_row = (RW'(1) << (j_cur - 5'd3)) | (RW'(r) & ((RW'(1) << (j_cur - 5'd3)) - 1'b1));
  end

  // ------------------------------------------------------------------
  // Memories
  // ------------------------------------------------------------------
  logic [LANES*W-1:0] tw_row;

  tw_mem #(.LOGN_MAX(LOGN_MAX), .NL(LANES)) u_tw (
    .clk,
    .wr_en(tw_wr_en), .wr_dir(tw_wr_dir), .wr_row(tw_wr_row), .wr_data(tw_wr_data),
    .rd_en(issue), .rd_dir(dir), .rd_row(tw_rd_row), .rd_data(tw_row)
  );

  logic [1:0]         bk_ren [2], bk_wen [2];
  logic [RW-1:0]      bk_rrow [2][2], bk_wrow [2][2];
  logic [LANES*W-1:0] bk_rdat [2][2], bk_wdat [2][2];
  logic [LANES*W-1:0] wr0, wr1;
  logic [RW-1:0]      wrow0, wrow1;
  logic               src_set, host_rd_set_q;

  assign src_set = stg[0];

  for (genvar s = 0; s < 2; s++) begin : g_set
    coef_bank #(.LOGN_MAX(LOGN_MAX), .NL(LANES)) u_bank (
      .clk, .logn,
      .rd_en(bk_ren[s]), .rd_row(bk_rrow[s]), .rd_data(bk_rdat[s]),
      .wr_en(bk_wen[s]), .wr_row(bk_wrow[s]), .wr_data(bk_wdat[s])
    );
    always_comb begin
      if (busy) begin
        bk_ren[s]     = {2{issue && (src_set == 1'(s))}};
        bk_rrow[s][0] = rd_row0;
        bk_rrow[s][1] = rd_row1;
        bk_wen[s]     = {2{wr_fire && (tg_set[TAGD-1] == 1'(s))}};
        bk_wrow[s][0] = wrow0;
        bk_wrow[s][1] = wrow1;
        bk_wdat[s][0] = wr0;
        bk_wdat[s][1] = wr1;
      end else begin
        bk_ren[s]     = {1'b0, host_rd_en && (host_rd_set == 1'(s))};
        bk_rrow[s][0] = host_rd_row;
        bk_rrow[s][1] = '0;
        bk_wen[s]     = {1'b0, host_wr_en && (host_wr_set == 1'(s))};
        bk_wrow[s][0] = host_wr_row;
        bk_wrow[s][1] = '0;
        bk_wdat[s][0] = host_wr_data;
        bk_wdat[s][1] = '0;
      end
    end
  end

  always_ff @(posedge clk) if (host_rd_en) host_rd_set_q <= host_rd_set;
  assign host_rd_data = bk_rdat[host_rd_set_q][0];

  // ------------------------------------------------------------------
  // Memory-based lane mapping
  // ------------------------------------------------------------------
  logic               src_q;
  logic [4:0]         j_q;
  logic [LANES*W-1:0] rd0, rd1;
  logic [W-1:0]       mem_a [NB], mem_b [NB], mem_w [NB];

  always_ff @(posedge clk) begin
    src_q <= src_set;
    j_q   <= j_cur;
  end
  assign rd0 = bk_rdat[src_q][0];
  assign rd1 = bk_rdat[src_q][1];

  always_comb begin
    logic [2*LANES*W-1:0] both;
    both = {rd1, rd0};
    for (int k = 0; k < int'(NB); k++) begin
      if (dir == DIR_NTT) begin
        mem_a[k] = rd0[k*W +: W];
        mem_b[k] = rd1[k*W +: W];
      end else begin
        mem_a[k] = both[(2*k)*W +: W];
        mem_b[k] = both[(2*k+1)*W +: W];
      end
      if (j_q < 5'd3)
        mem_w[k] = tw_row[((1 << j_q) + (k & ((1 << j_q) - 1)))*W +: W];
      else
        mem_w[k] = tw_row[k*W +: W];
    end
  end

  // write-back mapping
  always_comb begin
    logic [2*LANES*W-1:0] both;
    for (int k = 0; k < int'(NB); k++) begin
      both[(2*k)*W +: W]   = bf_oa[k];
      both[(2*k+1)*W +: W] = bf_ob[k];
    end
    if (dir == DIR_NTT) begin
      wrow0 = {tg_r[TAGD-1], 1'b0};
      wrow1 = {tg_r[TAGD-1], 1'b1};
      wr0   = both[LANES*W-1:0];
      wr1   = both[2*LANES*W-1:LANES*W];
    end else begin
      wrow0 = RW'(tg_r[TAGD-1]);
      wrow1 = RW'(tg_r[TAGD-1]) + half;
      for (int k = 0; k < int'(NB); k++) begin
        wr0[k*W +: W] = bf_oa[k];
        wr1[k*W +: W] = bf_ob[k];
      end
    end
  end

  // ------------------------------------------------------------------
  // Butterfly input selection
  // ------------------------------------------------------------------
  always_comb begin
    for (int p = 0; p < int'(NB); p++) begin
      bf_sp[p] = is_mdc && (p == 0) && (scheme == PQC_KYBER);
      if (!is_mdc) begin
        bf_iv[p] = tg_v[0];
        bf_a[p]  = mem_a[p];
        bf_b[p]  = mem_b[p];
        bf_w[p]  = mem_w[p];
      end else begin
        bf_w[p] = mdc_w[p];
        if (dir == DIR_NTT) begin
          if (p == int'(NB) - 1) begin
            bf_iv[p] = mdc_in_valid; bf_a[p] = mdc_in_a; bf_b[p] = mdc_in_b;
          end else begin
            bf_iv[p] = ds_ov[p]; bf_a[p] = ds_ou[p]; bf_b[p] = ds_ol[p];
          end
        end else begin
          if (p == 0) begin
            bf_iv[p] = mdc_in_valid; bf_a[p] = mdc_in_a; bf_b[p] = mdc_in_b;
          end else begin
            bf_iv[p] = ds_ov[p-1]; bf_a[p] = ds_ou[p-1]; bf_b[p] = ds_ol[p-1];
          end
        end
      end
    end
  end

  always_comb begin
    if (dir == DIR_NTT) begin
      mdc_out_valid = is_mdc && bf_ov[0];
      mdc_out_a     = bf_oa[0];
      mdc_out_b     = bf_ob[0];
    end else begin
      mdc_out_valid = is_mdc && bf_ov[NB-1];
      mdc_out_a     = bf_oa[NB-1];
      mdc_out_b     = bf_ob[NB-1];
    end
  end

endmodule
