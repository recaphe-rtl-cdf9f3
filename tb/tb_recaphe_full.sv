// tb_recaphe_full: one full-size HE transform on the core with every
// parameter at its default. Butterfly module 0, memory-based mode, runs a
// 2^16-point negacyclic NTT over the 54-bit prime q = 2^54 - 0x2A0000 + 1
// (q = 1 mod 2^17) and then the INTT of the result.
//  * the NTT output is compared in full with a software in-place
//    Cooley-Tukey NTT, and 16 random outputs with direct evaluation of the
//    polynomial at psi^(2*brv(i)+1);
//  * the INTT must return the original polynomial;
//  * each transform must take 16*(4096 + 9) + 1 = 65681 cycles, i.e.
//    218.9 us at 300 MHz.
// Meanwhile modules 1 and 2 run a Kyber and a Dilithium NTT in MDC mode,
// checked by INTT round trip.
module tb_recaphe_full;
  import recaphe_pkg::*;
  import tb_math_pkg::*;

  localparam int NBF = 3, NCU = 2, CUL = 16;
  localparam int LN = 16, N = 1 << LN;

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

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  logic [W-1:0] pp [N];        // psi^e
  logic [W-1:0] zt [N], izt [N];
  logic [W-1:0] orig [N], ref_x [N], res [N];

  task automatic write_poly(input logic [W-1:0] p [N]);
    for (int r = 0; r < N / 8; r++) begin
      @(negedge clk);
      host_wr_en[0] = 1; host_wr_set[0] = 0; host_wr_row[0] = 13'(r);
      for (int l = 0; l < 8; l++) host_wr_data[0][l*W +: W] = p[8*r + l];
    end
    @(negedge clk); host_wr_en[0] = 0;
  endtask

  task automatic read_poly(input logic set);
    for (int r = 0; r < N / 8; r++) begin
      @(negedge clk);
      host_rd_en[0] = 1; host_rd_set[0] = set; host_rd_row[0] = 13'(r);
      @(negedge clk);
      host_rd_en[0] = 0;
      for (int l = 0; l < 8; l++) res[8*r + l] = host_rd_data[0][l*W +: W];
    end
  endtask

  task automatic run_mem(input dir_e d, output int cycles);
    int c0;
    @(negedge clk);
    bf_dir[0] = d; bf_start[0] = 1; c0 = cyc;
    @(negedge clk); bf_start[0] = 0;
    while (!bf_done[0]) @(negedge clk);
    cycles = cyc - c0;
  endtask

  // PQC side traffic on modules 1 and 2
  logic [LW-1:0] pin [3][2][256], pout [3][2][256];
  int oc [3];
  for (genvar m = 1; m < 3; m++) begin : g_cap
    always @(posedge clk) if (rst_n && mdc_out_valid[m]) begin
      for (int l = 0; l < 2; l++) begin
        if (bf_dir[m] == DIR_NTT) begin
          pout[m][l][2*oc[m]] = mdc_out_a[m][l*LW +: LW]; pout[m][l][2*oc[m]+1] = mdc_out_b[m][l*LW +: LW];
        end else begin
          pout[m][l][oc[m]] = mdc_out_a[m][l*LW +: LW]; pout[m][l][oc[m]+128] = mdc_out_b[m][l*LW +: LW];
        end
      end
      oc[m]++;
    end
  end

  task automatic pqc_burst(input dir_e d);
    @(negedge clk);
    for (int m = 1; m < 3; m++) begin bf_dir[m] = d; oc[m] = 0; end
    for (int c = 0; c < 128; c++) begin
      for (int m = 1; m < 3; m++) begin
        mdc_in_valid[m] = 1;
        for (int l = 0; l < 2; l++) begin
          mdc_in_a[m][l*LW +: LW] = (d == DIR_NTT) ? pin[m][l][c]       : pin[m][l][2*c];
          mdc_in_b[m][l*LW +: LW] = (d == DIR_NTT) ? pin[m][l][c + 128] : pin[m][l][2*c + 1];
        end
      end
      @(negedge clk);
    end
    for (int m = 1; m < 3; m++) mdc_in_valid[m] = 0;
    while (oc[1] < 128 || oc[2] < 128) @(negedge clk);
  endtask

  initial begin
    logic [W-1:0] psi, t, x, e;
    logic [LW-1:0] psrc [3][2][256];
    int k, cycles;
    for (int m = 0; m < NBF; m++) begin
      bf_mode[m] = MODE_MEM; bf_dir[m] = DIR_NTT; bf_scheme[m] = PQC_KYBER; bf_logn[m] = 5'(LN);
      bf_cfg[m] = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
      mdc_in_valid[m] = 0; mdc_in_a[m] = '0; mdc_in_b[m] = '0; bf_start[m] = 0;
      host_wr_en[m] = 0; host_wr_set[m] = 0; host_wr_row[m] = '0; host_wr_data[m] = '0;
      host_rd_en[m] = 0; host_rd_set[m] = 0; host_rd_row[m] = '0;
      tw_wr_en[m] = 0; tw_wr_dir[m] = DIR_NTT; tw_wr_row[m] = '0; tw_wr_data[m] = '0;
      oc[m] = 0;
    end
    for (int u = 0; u < NCU; u++) begin
      cu_cfg[u] = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
      cu_op[u] = OP_ADD; cu_in_valid[u] = 0; cu_a[u] = '0; cu_b[u] = '0;
    end
    bf_mode[1] = MODE_MDC; bf_cfg[1] = '{cfg: CFG_PQC, q: {KYBER_Q, KYBER_Q}, m: {KYBER_M, KYBER_M}};
    bf_mode[2] = MODE_MDC; bf_scheme[2] = PQC_DILITHIUM;
    bf_cfg[2] = '{cfg: CFG_PQC, q: {DIL_Q, DIL_Q}, m: {DIL_M, DIL_M}};

    // twiddle tables: zeta_k = psi^brv16(k), inverse psi^-brv16(k)
    psi = PSI17;
    pp[0] = 1;
    for (int i = 1; i < N; i++) pp[i] = mm(pp[i-1], psi, Q54);
    for (int i = 0; i < N; i++) begin
      k = brv(i, LN);
      zt[i]  = pp[k];
      izt[i] = (k == 0) ? 1 : Q54 - pp[N - k];
    end
    // reference: in-place Cooley-Tukey negacyclic NTT
    for (int i = 0; i < N; i++) begin orig[i] = rnd(Q54); ref_x[i] = orig[i]; end
    k = 1;
    for (int len = N / 2; len >= 1; len >>= 1)
      for (int st = 0; st < N; st += 2 * len) begin
        logic [W-1:0] z;
        z = zt[k]; k++;
        for (int j = st; j < st + len; j++) begin
          t = mm(z, ref_x[j + len], Q54);
          ref_x[j + len] = am(ref_x[j], Q54 - t, Q54);
          ref_x[j] = am(ref_x[j], t, Q54);
        end
      end

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int d = 0; d < 2; d++)
      for (int r = 0; r < N / 8; r++) begin
        @(negedge clk);
        tw_wr_en[0] = 1; tw_wr_dir[0] = dir_e'(d); tw_wr_row[0] = 13'(r);
        for (int l = 0; l < 8; l++) tw_wr_data[0][l*W +: W] = d ? izt[8*r + l] : zt[8*r + l];
      end
    @(negedge clk); tw_wr_en[0] = 0;
    write_poly(orig);

    for (int m = 1; m < 3; m++) for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) begin
      pin[m][l][i] = LW'($urandom_range(0, (m == 1) ? 3328 : 8380416));
      psrc[m][l][i] = pin[m][l][i];
    end

    fork
      run_mem(DIR_NTT, cycles);
      begin
        pqc_burst(DIR_NTT);
        pin = pout;
        pqc_burst(DIR_INTT);
      end
    join
    $display("2^16-point NTT: %0d cycles (%0.2f us at 300 MHz)", cycles, cycles / 300.0);
    chk(cycles == 16 * (4096 + 9) + 1, $sformatf("NTT cycles %0d", cycles));
    for (int m = 1; m < 3; m++) for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++)
      chk(pout[m][l][i] == psrc[m][l][i], $sformatf("PQC round trip m%0d l%0d i%0d", m, l, i));

    read_poly(0);
    for (int i = 0; i < N; i++) chk(res[i] == ref_x[i], $sformatf("NTT X[%0d]", i));
    for (int s = 0; s < 16; s++) begin
      int i;
      i = (s == 0) ? 0 : (s == 1) ? N - 1 : $urandom_range(0, N - 1);
      x = pp[2 * brv(i, LN) + 1 - ((2 * brv(i, LN) + 1) >= N ? N : 0)];
      if ((2 * brv(i, LN) + 1) >= N) x = Q54 - x;
      e = 0;
      for (int j = N - 1; j >= 0; j--) e = am(mm(e, x, Q54), orig[j], Q54);
      chk(res[i] == e, $sformatf("direct evaluation X[%0d]", i));
    end

    write_poly(res);
    run_mem(DIR_INTT, cycles);
    chk(cycles == 16 * (4096 + 9) + 1, $sformatf("INTT cycles %0d", cycles));
    read_poly(0);
    for (int i = 0; i < N; i++) chk(res[i] == orig[i], $sformatf("INTT x[%0d]", i));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
