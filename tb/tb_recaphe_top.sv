// tb_recaphe_top: end-to-end test of the RECAPHE core.
//  1. HE polynomial product, N = 64, 54-bit modulus: butterfly module 0
//     (memory-based mode) transforms a and b, coefficient-wise module 0
//     multiplies the spectra, module 0 runs the INTT; the result must
//     equal the schoolbook product modulo x^N + 1. Meanwhile module 1 runs
//     a Kyber MDC NTT and module 2 a Dilithium one (mixed modes at once).
//  2. Dilithium polynomial product through the MDC path: two products at
//     once (one per 27-bit lane) on module 2, spectra multiplied by
//     coefficient-wise module 1 in PQC mode, INTT on module 2, compared
//     with the schoolbook product.
//  3. Three 256-point PQC NTTs at once, one per butterfly module, after
//     module 0 switched from memory-based to MDC mode; outputs are
//     compared with direct evaluation, and all three must finish within
//     345 cycles (1.15 us at 300 MHz), followed by the three INTTs.
//  4. Coefficient-wise add and subtract in both configurations.
// Every mechanism (memory NTT/INTT, MDC NTT/INTT, Kyber special stage,
// two-lane PQC words, three modules in parallel, mode switch, each
// coefficient-wise operation) is counted and must occur.
module tb_recaphe_top;
  import recaphe_pkg::*;
  import tb_math_pkg::*;

  localparam int NBF = 3, NCU = 2, CUL = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bfmode_e bf_mode [NBF]; dir_e bf_dir [NBF]; modcfg_t bf_cfg [NBF];
  pqc_e bf_scheme [NBF]; logic [4:0] bf_logn [NBF];
  logic mdc_in_valid [NBF], mdc_out_valid [NBF];
  logic [W-1:0] mdc_in_a [NBF], mdc_in_b [NBF], mdc_out_a [NBF], mdc_out_b [NBF];
  logic bf_start [NBF], bf_busy [NBF], bf_done [NBF];
  logic host_wr_en [NBF], host_wr_set [NBF], host_rd_en [NBF], host_rd_set [NBF];
  logic [12:0] host_wr_row [NBF], host_rd_row [NBF];
  logic [LANES*W-1:0] host_wr_data [NBF], host_rd_data [NBF];
  logic tw_wr_en [NBF]; dir_e tw_wr_dir [NBF]; logic [12:0] tw_wr_row [NBF];
  logic [LANES*W-1:0] tw_wr_data [NBF];
  modcfg_t cu_cfg [NCU]; cop_e cu_op [NCU]; logic cu_in_valid [NCU], cu_out_valid [NCU];
  logic [CUL*W-1:0] cu_a [NCU], cu_b [NCU], cu_y [NCU];

  recaphe_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_mem_ntt = 0, n_mem_intt = 0, n_mdc_ntt = 0, n_mdc_intt = 0, n_special = 0;
  int n_twolane = 0, n_par3 = 0, n_switch = 0, n_cu_add = 0, n_cu_sub = 0, n_cu_mul = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- memory-based helpers ----------------
  task automatic load_tw(input int m, input int ln);
    logic [W-1:0] psi, ipsi;
    int n = 1 << ln;
    psi  = pw(PSI17, 64'(65536 / n), Q54);
    ipsi = pw(psi, 64'(2 * n - 1), Q54);
    for (int d = 0; d < 2; d++)
      for (int r = 0; r < n / 8; r++) begin
        @(negedge clk);
        tw_wr_en[m] = 1; tw_wr_dir[m] = dir_e'(d); tw_wr_row[m] = 13'(r);
        for (int l = 0; l < 8; l++)
          tw_wr_data[m][l*W +: W] = pw(d ? ipsi : psi, 64'(brv(8*r + l, ln)), Q54);
      end
    @(negedge clk); tw_wr_en[m] = 0;
  endtask

  task automatic write_poly(input int m, input int n, input logic [W-1:0] p [256]);
    for (int r = 0; r < n / 8; r++) begin
      @(negedge clk);
      host_wr_en[m] = 1; host_wr_set[m] = 0; host_wr_row[m] = 13'(r);
      for (int l = 0; l < 8; l++) host_wr_data[m][l*W +: W] = p[8*r + l];
    end
    @(negedge clk); host_wr_en[m] = 0;
  endtask

  task automatic read_poly(input int m, input int n, input logic set, output logic [W-1:0] p [256]);
    for (int r = 0; r < n / 8; r++) begin
      @(negedge clk);
      host_rd_en[m] = 1; host_rd_set[m] = set; host_rd_row[m] = 13'(r);
      @(negedge clk);
      host_rd_en[m] = 0;
      for (int l = 0; l < 8; l++) p[8*r + l] = host_rd_data[m][l*W +: W];
    end
  endtask

  task automatic run_mem(input int m, input dir_e d);
    @(negedge clk);
    bf_dir[m] = d; bf_start[m] = 1;
    @(negedge clk); bf_start[m] = 0;
    while (!bf_done[m]) @(negedge clk);
    if (d == DIR_NTT) n_mem_ntt++; else n_mem_intt++;
  endtask

  // ---------------- coefficient-wise helper ----------------
  task automatic cu_run(input int u, input cop_e op, input int n,
                        input logic [W-1:0] x [256], input logic [W-1:0] y [256],
                        output logic [W-1:0] z [256]);
    int got = 0;
    fork
      begin
        for (int c = 0; c < n / CUL; c++) begin
          @(negedge clk);
          cu_in_valid[u] = 1; cu_op[u] = op;
          for (int l = 0; l < CUL; l++) begin
            cu_a[u][l*W +: W] = x[c*CUL + l];
            cu_b[u][l*W +: W] = y[c*CUL + l];
          end
        end
        @(negedge clk); cu_in_valid[u] = 0;
      end
      begin
        while (got < n / CUL) begin
          @(posedge clk);
          if (cu_out_valid[u]) begin
            for (int l = 0; l < CUL; l++) z[got*CUL + l] = cu_y[u][l*W +: W];
            got++;
          end
        end
      end
    join
    case (op) OP_ADD: n_cu_add++; OP_SUB: n_cu_sub++; default: n_cu_mul++; endcase
  endtask

  // ---------------- MDC helpers ----------------
  // per module: input and output arrays, two lanes, 256 coefficients
  logic [LW-1:0] min_ [NBF][2][256];
  logic [LW-1:0] mout [NBF][2][256];
  int mo_cnt [NBF];
  int mo_last [NBF];

  for (genvar m = 0; m < NBF; m++) begin : g_cap
    always @(posedge clk) if (rst_n && mdc_out_valid[m]) begin
      for (int l = 0; l < 2; l++) begin
        if (bf_dir[m] == DIR_NTT) begin
          mout[m][l][2*mo_cnt[m]]     = mdc_out_a[m][l*LW +: LW];
          mout[m][l][2*mo_cnt[m] + 1] = mdc_out_b[m][l*LW +: LW];
        end else begin
          mout[m][l][mo_cnt[m]]       = mdc_out_a[m][l*LW +: LW];
          mout[m][l][mo_cnt[m] + 128] = mdc_out_b[m][l*LW +: LW];
        end
      end
      mo_cnt[m]++;
      mo_last[m] = cyc;
    end
  end

  // stream one 128-cycle burst into every module whose bit is set in mask
  task automatic mdc_burst(input logic [NBF-1:0] mask, input dir_e d, output int elapsed);
    int c0;
    @(negedge clk);
    c0 = cyc;
    for (int m = 0; m < NBF; m++) if (mask[m]) begin
      bf_dir[m] = d; mo_cnt[m] = 0;
    end
    for (int c = 0; c < 128; c++) begin
      for (int m = 0; m < NBF; m++) if (mask[m]) begin
        mdc_in_valid[m] = 1;
        for (int l = 0; l < 2; l++) begin
          mdc_in_a[m][l*LW +: LW] = (d == DIR_NTT) ? min_[m][l][c]       : min_[m][l][2*c];
          mdc_in_b[m][l*LW +: LW] = (d == DIR_NTT) ? min_[m][l][c + 128] : min_[m][l][2*c + 1];
        end
      end
      @(negedge clk);
    end
    for (int m = 0; m < NBF; m++) mdc_in_valid[m] = 0;
    for (int m = 0; m < NBF; m++) if (mask[m]) begin
      while (mo_cnt[m] < 128) @(negedge clk);
    end
    elapsed = 0;
    for (int m = 0; m < NBF; m++) if (mask[m] && mo_last[m] - c0 + 1 > elapsed) elapsed = mo_last[m] - c0 + 1;
    for (int m = 0; m < NBF; m++) if (mask[m]) begin
      if (d == DIR_NTT) n_mdc_ntt++; else n_mdc_intt++;
      if (bf_scheme[m] == PQC_KYBER) n_special++;
      if (bf_cfg[m].cfg == CFG_PQC) n_twolane++;
    end
  endtask

  function automatic modcfg_t cfg_of(input pqc_e s);
    if (s == PQC_KYBER) return '{cfg: CFG_PQC, q: {KYBER_Q, KYBER_Q}, m: {KYBER_M, KYBER_M}};
    return '{cfg: CFG_PQC, q: {DIL_Q, DIL_Q}, m: {DIL_M, DIL_M}};
  endfunction

  // check an MDC NTT output against direct evaluation
  task automatic check_mdc_ntt(input int m, input logic [LW-1:0] src [2][256]);
    logic [W-1:0] q, x, e0, e1;
    q = (bf_scheme[m] == PQC_KYBER) ? 3329 : 8380417;
    for (int l = 0; l < 2; l++) begin
      if (bf_scheme[m] == PQC_DILITHIUM) begin
        for (int i = 0; i < 256; i += 5) begin
          x = pw(1753, 64'(2 * brv(i, 8) + 1), q);
          e0 = 0;
          for (int jj = 255; jj >= 0; jj--) e0 = am(mm(e0, x, q), W'(src[l][jj]), q);
          chk(W'(mout[m][l][i]) == e0, $sformatf("Dilithium NTT m%0d X[%0d]", m, i));
        end
      end else begin
        for (int i = 0; i < 128; i += 3) begin
          x = pw(17, 64'(2 * brv(i, 7) + 1), q);
          e0 = 0; e1 = 0;
          for (int jj = 127; jj >= 0; jj--) begin
            e0 = am(mm(e0, x, q), W'(src[l][2*jj]), q);
            e1 = am(mm(e1, x, q), W'(src[l][2*jj + 1]), q);
          end
          chk(W'(mout[m][l][2*i]) == e0 && W'(mout[m][l][2*i+1]) == e1,
              $sformatf("Kyber NTT m%0d pair %0d", m, i));
        end
      end
    end
  endtask

  // ---------------- test body ----------------
  logic [W-1:0] pa [256], pb [256], fa [256], fb [256], fc [256], pc [256], ref_c [256];
  logic [LW-1:0] src [NBF][2][256];

  initial begin
    int el;
    logic [W-1:0] q;
    for (int m = 0; m < NBF; m++) begin
      bf_mode[m] = MODE_MEM; bf_dir[m] = DIR_NTT; bf_scheme[m] = PQC_KYBER; bf_logn[m] = 5'd6;
      bf_cfg[m] = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
      mdc_in_valid[m] = 0; mdc_in_a[m] = '0; mdc_in_b[m] = '0; bf_start[m] = 0;
      host_wr_en[m] = 0; host_wr_set[m] = 0; host_wr_row[m] = '0; host_wr_data[m] = '0;
      host_rd_en[m] = 0; host_rd_set[m] = 0; host_rd_row[m] = '0;
      tw_wr_en[m] = 0; tw_wr_dir[m] = DIR_NTT; tw_wr_row[m] = '0; tw_wr_data[m] = '0;
      mo_cnt[m] = 0; mo_last[m] = 0;
    end
    for (int u = 0; u < NCU; u++) begin
      cu_cfg[u] = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
      cu_op[u] = OP_ADD; cu_in_valid[u] = 0; cu_a[u] = '0; cu_b[u] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ===== 1. HE product on module 0, PQC NTTs on modules 1 and 2 =====
    for (int i = 0; i < 64; i++) begin pa[i] = rnd(Q54); pb[i] = rnd(Q54); end
    for (int i = 0; i < 64; i++) begin
      ref_c[i] = 0;
    end
    for (int i = 0; i < 64; i++) for (int j = 0; j < 64; j++) begin
      if (i + j < 64) ref_c[i+j] = am(ref_c[i+j], mm(pa[i], pb[j], Q54), Q54);
      else ref_c[i+j-64] = am(ref_c[i+j-64], Q54 - mm(pa[i], pb[j], Q54), Q54);
    end
    load_tw(0, 6);
    bf_mode[1] = MODE_MDC; bf_scheme[1] = PQC_KYBER;     bf_cfg[1] = cfg_of(PQC_KYBER);
    bf_mode[2] = MODE_MDC; bf_scheme[2] = PQC_DILITHIUM; bf_cfg[2] = cfg_of(PQC_DILITHIUM);
    for (int m = 1; m < 3; m++) for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) begin
      min_[m][l][i] = LW'($urandom_range(0, (m == 1) ? 3328 : 8380416));
      src[m][l][i] = min_[m][l][i];
    end
    fork
      begin
        write_poly(0, 64, pa); run_mem(0, DIR_NTT); read_poly(0, 64, 0, fa);
        write_poly(0, 64, pb); run_mem(0, DIR_NTT); read_poly(0, 64, 0, fb);
      end
      begin
        repeat (20) @(negedge clk);
        mdc_burst(3'b110, DIR_NTT, el);
      end
    join
    check_mdc_ntt(1, src[1]);
    check_mdc_ntt(2, src[2]);
    cu_run(0, OP_MUL, 64, fa, fb, fc);
    write_poly(0, 64, fc); run_mem(0, DIR_INTT); read_poly(0, 64, 0, pc);
    for (int i = 0; i < 64; i++) chk(pc[i] == ref_c[i], $sformatf("HE product c[%0d]", i));

    // ===== 2. Dilithium products via MDC on module 2 (two lanes) =====
    q = 8380417;
    begin
      logic [W-1:0] A [2][256], B [2][256], C [2][256];
      logic [W-1:0] fx [256], fy [256], fz [256];
      logic [LW-1:0] sa [2][256], sb [2][256];
      for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) begin
        A[l][i] = W'($urandom_range(0, 8380416)); B[l][i] = W'($urandom_range(0, 8380416));
        C[l][i] = 0;
      end
      for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) for (int j = 0; j < 256; j++) begin
        if (i + j < 256) C[l][i+j] = am(C[l][i+j], mm(A[l][i], B[l][j], q), q);
        else C[l][i+j-256] = am(C[l][i+j-256], q - mm(A[l][i], B[l][j], q), q);
      end
      for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) min_[2][l][i] = LW'(A[l][i]);
      mdc_burst(3'b100, DIR_NTT, el);
      sa = mout[2];
      for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) min_[2][l][i] = LW'(B[l][i]);
      mdc_burst(3'b100, DIR_NTT, el);
      sb = mout[2];
      cu_cfg[1] = cfg_of(PQC_DILITHIUM);
      for (int i = 0; i < 256; i++) begin
        fx[i] = {sa[1][i], sa[0][i]}; fy[i] = {sb[1][i], sb[0][i]};
      end
      cu_run(1, OP_MUL, 256, fx, fy, fz);
      for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) min_[2][l][i] = fz[i][l*LW +: LW];
      mdc_burst(3'b100, DIR_INTT, el);
      for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++)
        chk(W'(mout[2][l][i]) == C[l][i], $sformatf("Dilithium product lane %0d c[%0d]", l, i));
    end

    // ===== 3. three PQC NTTs in parallel, module 0 switched to MDC =====
    bf_mode[0] = MODE_MDC; bf_scheme[0] = PQC_DILITHIUM; bf_cfg[0] = cfg_of(PQC_DILITHIUM);
    n_switch++;
    for (int m = 0; m < 3; m++) for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) begin
      min_[m][l][i] = LW'($urandom_range(0, (bf_scheme[m] == PQC_KYBER) ? 3328 : 8380416));
      src[m][l][i] = min_[m][l][i];
    end
    mdc_burst(3'b111, DIR_NTT, el);
    n_par3++;
    $display("three parallel 256-point NTTs: %0d cycles", el);
    chk(el <= 345, $sformatf("parallel NTT time %0d cycles", el));
    for (int m = 0; m < 3; m++) check_mdc_ntt(m, src[m]);
    for (int m = 0; m < 3; m++) min_[m] = mout[m];
    mdc_burst(3'b111, DIR_INTT, el);
    for (int m = 0; m < 3; m++) for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++)
      chk(mout[m][l][i] == src[m][l][i], $sformatf("parallel INTT m%0d l%0d x[%0d]", m, l, i));

    // ===== 4. coefficient-wise add/sub in both configurations =====
    for (int i = 0; i < 64; i++) begin pa[i] = rnd(Q54); pb[i] = rnd(Q54); end
    cu_run(0, OP_ADD, 64, pa, pb, pc);
    for (int i = 0; i < 64; i++) chk(pc[i] == am(pa[i], pb[i], Q54), "HE add");
    cu_run(0, OP_SUB, 64, pa, pb, pc);
    for (int i = 0; i < 64; i++) chk(am(pc[i], pb[i], Q54) == pa[i], "HE sub");
    cu_cfg[1] = '{cfg: CFG_PQC, q: {DIL_Q, KYBER_Q}, m: {DIL_M, KYBER_M}};
    for (int i = 0; i < 64; i++) begin
      pa[i] = {27'($urandom_range(0, 8380416)), 27'($urandom_range(0, 3328))};
      pb[i] = {27'($urandom_range(0, 8380416)), 27'($urandom_range(0, 3328))};
    end
    cu_run(1, OP_SUB, 64, pa, pb, pc);
    for (int i = 0; i < 64; i++)
      chk(am(W'(pc[i][26:0]), W'(pb[i][26:0]), 3329) == W'(pa[i][26:0]) &&
          am(W'(pc[i][53:27]), W'(pb[i][53:27]), 8380417) == W'(pa[i][53:27]), "PQC sub");

    // ===== mechanism coverage =====
    $display("mem NTT %0d, mem INTT %0d, MDC NTT %0d, MDC INTT %0d, special %0d, two-lane %0d",
             n_mem_ntt, n_mem_intt, n_mdc_ntt, n_mdc_intt, n_special, n_twolane);
    $display("parallel-3 %0d, mode switch %0d, cu add %0d sub %0d mul %0d",
             n_par3, n_switch, n_cu_add, n_cu_sub, n_cu_mul);
    chk(n_mem_ntt > 0, "memory NTT never ran");
    chk(n_mem_intt > 0, "memory INTT never ran");
    chk(n_mdc_ntt > 0, "MDC NTT never ran");
    chk(n_mdc_intt > 0, "MDC INTT never ran");
    chk(n_special > 0, "special stage never used");
    chk(n_twolane > 0, "two-lane PQC never used");
    chk(n_par3 > 0, "three parallel transforms never ran");
    chk(n_switch > 0, "mode switch never happened");
    chk(n_cu_add > 0 && n_cu_sub > 0 && n_cu_mul > 0, "coefficient-wise op missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
