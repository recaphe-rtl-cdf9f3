// tb_he_lengths: HE workload sweep on one hybrid butterfly module at its
// default size (LOGN_MAX = 16), memory-based mode, over the polynomial
// lengths used by homomorphic encryption below the full 2^16 (which the
// full-size top-level test covers): N = 2^12, 2^13, 2^14 and 2^15, with
// a 54-bit and a 40-bit NTT-friendly prime, so moduli of different widths
// run through the same datapath.
// For each (N, q) the twiddle tables are loaded, a random polynomial is
// transformed, and
//  * every NTT output is compared with a software in-place Cooley-Tukey
//    negacyclic NTT (the module's documented output order);
//  * the INTT of the result must give back the input;
//  * each transform must take logn*(N/16 + 9) + 1 cycles, start to done.
module tb_he_lengths;
  import recaphe_pkg::*;
  import tb_math_pkg::*;

  // 40-bit prime, 1 mod 2^16, and an element of order 2^16
  localparam logic [W-1:0] Q40   = 54'd549757714433;
  localparam logic [W-1:0] PSI16 = 54'd322238512309;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  bfmode_e mode; dir_e dir; modcfg_t cfg; pqc_e scheme; logic [4:0] logn;
  logic mdc_in_valid, mdc_out_valid;
  logic [W-1:0] mdc_in_a, mdc_in_b, mdc_out_a, mdc_out_b;
  logic start, busy, done;
  logic host_wr_en, host_wr_set, host_rd_en, host_rd_set;
  logic [12:0] host_wr_row, host_rd_row;
  logic [LANES*W-1:0] host_wr_data, host_rd_data;
  logic tw_wr_en; dir_e tw_wr_dir; logic [12:0] tw_wr_row; logic [LANES*W-1:0] tw_wr_data;

  hybrid_bfly dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  logic [W-1:0] orig [32768], ref_x [32768], res [32768];
  logic [W-1:0] pp [32768], zt [32768], izt [32768];

  task automatic write_poly(input int n, input logic [W-1:0] p [32768]);
    for (int r = 0; r < n / 8; r++) begin
      @(negedge clk);
      host_wr_en = 1; host_wr_set = 0; host_wr_row = 13'(r);
      for (int l = 0; l < 8; l++) host_wr_data[l*W +: W] = p[8*r + l];
    end
    @(negedge clk); host_wr_en = 0;
  endtask

  task automatic read_poly(input int n, input logic set);
    for (int r = 0; r < n / 8; r++) begin
      @(negedge clk);
      host_rd_en = 1; host_rd_set = set; host_rd_row = 13'(r);
      @(negedge clk);
      host_rd_en = 0;
      for (int l = 0; l < 8; l++) res[8*r + l] = host_rd_data[l*W +: W];
    end
  endtask

  task automatic run_mem(input dir_e d, output int cycles);
    int c0;
    @(negedge clk);
    dir = d; start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
  endtask

  // root: element of order 2^rbits modulo q
  task automatic run_case(input int ln, input logic [W-1:0] q, input logic [W-1:0] root,
                          input int rbits);
    logic [W-1:0] psi, t, z;
    int n = 1 << ln, k, cycles;
    psi = pw(root, 64'(1) << (rbits - ln - 1), q);   // order 2n
    mode = MODE_MEM; logn = 5'(ln);
    cfg = '{cfg: CFG_HE, q: q, m: barrett_m(q)};
    pp[0] = 1;
    for (int i = 1; i < n; i++) pp[i] = mm(pp[i-1], psi, q);
    for (int i = 0; i < n; i++) begin
      k = brv(i, ln);
      zt[i]  = pp[k];
      izt[i] = (k == 0) ? 1 : q - pp[n - k];
    end
    for (int i = 0; i < n; i++) begin orig[i] = rnd(q); ref_x[i] = orig[i]; end
    k = 1;
    for (int len = n / 2; len >= 1; len >>= 1)
      for (int st = 0; st < n; st += 2 * len) begin
        z = zt[k]; k++;
        for (int j = st; j < st + len; j++) begin
          t = mm(z, ref_x[j + len], q);
          ref_x[j + len] = am(ref_x[j], q - t, q);
          ref_x[j] = am(ref_x[j], t, q);
        end
      end

    for (int d = 0; d < 2; d++)
      for (int r = 0; r < n / 8; r++) begin
        @(negedge clk);
        tw_wr_en = 1; tw_wr_dir = dir_e'(d); tw_wr_row = 13'(r);
        for (int l = 0; l < 8; l++) tw_wr_data[l*W +: W] = d ? izt[8*r + l] : zt[8*r + l];
      end
    @(negedge clk); tw_wr_en = 0;

    write_poly(n, orig);
    run_mem(DIR_NTT, cycles);
    chk(cycles == ln * (n / 16 + 9) + 1, $sformatf("logn=%0d NTT cycles %0d", ln, cycles));
    read_poly(n, 1'(ln % 2));
    for (int i = 0; i < n; i++) chk(res[i] == ref_x[i], $sformatf("logn=%0d NTT X[%0d]", ln, i));

    write_poly(n, res);
    run_mem(DIR_INTT, cycles);
    chk(cycles == ln * (n / 16 + 9) + 1, $sformatf("logn=%0d INTT cycles %0d", ln, cycles));
    read_poly(n, 1'(ln % 2));
    for (int i = 0; i < n; i++) chk(res[i] == orig[i], $sformatf("logn=%0d INTT x[%0d]", ln, i));
    $display("N=2^%0d, %0d-bit q: %0d cycles per transform (%0.2f us at 300 MHz)",
             ln, clog2_dyn(q), cycles, cycles / 300.0);
  endtask

  initial begin
    mode = MODE_MEM; dir = DIR_NTT; scheme = PQC_KYBER; logn = 5'd12;
    cfg = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
    mdc_in_valid = 0; mdc_in_a = '0; mdc_in_b = '0; start = 0;
    host_wr_en = 0; host_wr_set = 0; host_rd_en = 0; host_rd_set = 0;
    host_wr_row = '0; host_rd_row = '0; host_wr_data = '0;
    tw_wr_en = 0; tw_wr_dir = DIR_NTT; tw_wr_row = '0; tw_wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(12, Q54, PSI17, 17);
    run_case(13, Q40, PSI16, 16);
    run_case(14, Q54, PSI17, 17);
    run_case(15, Q40, PSI16, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
