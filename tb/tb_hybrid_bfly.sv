// tb_hybrid_bfly: self-checking test of the hybrid butterfly module in
// both of its modes.
//  * Memory-based mode, HE configuration (54-bit prime q = 1 mod 2^17):
//    twiddle tables and a random polynomial are loaded, an NTT is run and
//    every output X[i] is compared with the polynomial evaluated directly
//    at psi^(2*brv(i)+1); the result is then transformed back with the
//    INTT and must equal the input. Run for N = 32, 64 and 256; the cycle
//    count of each transform, start to done, must be logn*(N/16 + 9) + 1.
//  * MDC mode, PQC configuration: two polynomials per burst (one per
//    lane). Dilithium outputs are compared with direct evaluation at
//    1753^(2*brv8(i)+1); Kyber output pairs with the residues modulo
//    x^2 - 17^(2*brv7(i)+1) (so the special stage is exercised); both are
//    taken back with the INTT. Two bursts are sent back to back, and the
//    latency from the first input to the first output is checked.
module tb_hybrid_bfly;
  import recaphe_pkg::*;

  localparam logic [W-1:0]  Q54   = 54'd18014398506729473;
  localparam logic [W-1:0]  PSI17 = 54'd8731769751126835;  // order 2^17
  localparam int unsigned   MDC_LAT = 8 * BFLY_LAT + 127;

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

  // ---------------- arithmetic helpers ----------------
  function automatic logic [W-1:0] mm(input logic [W-1:0] x, y, q);
    return W'((128'(x) * 128'(y)) % 128'(q));
  endfunction
  function automatic logic [W-1:0] pw(input logic [W-1:0] b, input longint unsigned e, input logic [W-1:0] q);
    logic [W-1:0] r = 1, x = b;
    for (int i = 0; i < 64; i++) begin
      if (e[i]) r = mm(r, x, q);
      x = mm(x, x, q);
    end
    return r;
  endfunction
  function automatic int brv(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if ((v >> i) & 1) r |= 1 << (bits - 1 - i);
    return r;
  endfunction
  function automatic logic [MW-1:0] barrett_m(input logic [W-1:0] q);
    logic [191:0] num;
    num = 192'd1 << (2 * clog2_dyn(q));
    return MW'(num / 192'(q));
  endfunction

  // ---------------- memory-based mode ----------------
  logic [W-1:0] poly [65536];
  logic [W-1:0] res  [65536];

  task automatic load_tw(input int ln);
    logic [W-1:0] psi, ipsi;
    int n = 1 << ln;
    psi  = pw(PSI17, 64'(65536 / n), Q54);
    ipsi = pw(psi, 64'(2 * n - 1), Q54);
    for (int d = 0; d < 2; d++)
      for (int r = 0; r < n / 8; r++) begin
        @(negedge clk);
        tw_wr_en = 1; tw_wr_dir = dir_e'(d); tw_wr_row = 13'(r);
        for (int l = 0; l < 8; l++)
          tw_wr_data[l*W +: W] = pw(d ? ipsi : psi, 64'(brv(8*r + l, ln)), Q54);
      end
    @(negedge clk); tw_wr_en = 0;
  endtask

  task automatic write_poly(input int ln, input logic set);
    for (int r = 0; r < (1 << ln) / 8; r++) begin
      @(negedge clk);
      host_wr_en = 1; host_wr_set = set; host_wr_row = 13'(r);
      for (int l = 0; l < 8; l++) host_wr_data[l*W +: W] = poly[8*r + l];
    end
    @(negedge clk); host_wr_en = 0;
  endtask

  task automatic read_poly(input int ln, input logic set);
    for (int r = 0; r < (1 << ln) / 8; r++) begin
      @(negedge clk);
      host_rd_en = 1; host_rd_set = set; host_rd_row = 13'(r);
      @(negedge clk);
      host_rd_en = 0;
      for (int l = 0; l < 8; l++) res[8*r + l] = host_rd_data[l*W +: W];
    end
  endtask

  task automatic run_mem(input int ln, input dir_e d, output int cycles);
    int c0;
    @(negedge clk);
    dir = d; start = 1; c0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - c0;
  endtask

  task automatic test_mem(input int ln);
    logic [W-1:0] orig [65536];
    logic [W-1:0] psi, x, e;
    int n = 1 << ln, cycles;
    mode = MODE_MEM; logn = 5'(ln);
    cfg = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
    psi = pw(PSI17, 64'(65536 / n), Q54);
    load_tw(ln);
    for (int i = 0; i < n; i++) begin
      poly[i] = W'({$urandom(), $urandom()} % 64'(Q54));
      orig[i] = poly[i];
    end
    write_poly(ln, 0);
    run_mem(ln, DIR_NTT, cycles);
    checks++;
    if (cycles != ln * (n / 16 + 9) + 1) begin
      failures++; $display("mem NTT logn=%0d cycles=%0d", ln, cycles);
    end
    read_poly(ln, 1'(ln % 2));
    for (int i = 0; i < n; i++) begin
      x = pw(psi, 64'(2 * brv(i, ln) + 1), Q54);
      e = 0;
      for (int jj = n - 1; jj >= 0; jj--) e = W'((128'(mm(e, x, Q54)) + 128'(orig[jj])) % 128'(Q54));
      checks++;
      if (res[i] !== e) begin
        failures++;
        if (failures < 10) $display("mem NTT logn=%0d X[%0d]=%0h exp %0h", ln, i, res[i], e);
      end
    end
    for (int i = 0; i < n; i++) poly[i] = res[i];
    write_poly(ln, 0);
    run_mem(ln, DIR_INTT, cycles);
    checks++;
    if (cycles != ln * (n / 16 + 9) + 1) begin
      failures++; $display("mem INTT logn=%0d cycles=%0d", ln, cycles);
    end
    read_poly(ln, 1'(ln % 2));
    for (int i = 0; i < n; i++) begin
      checks++;
      if (res[i] !== orig[i]) begin
        failures++;
        if (failures < 10) $display("mem INTT logn=%0d x[%0d]=%0h exp %0h", ln, i, res[i], orig[i]);
      end
    end
    $display("memory-based logn=%0d done, %0d cycles per transform", ln, cycles);
  endtask

  // ---------------- MDC mode ----------------
  logic [LW-1:0] pin  [2][2][256];  // [burst][lane][i]
  logic [LW-1:0] pout [2][2][256];
  int ob, oc, first_out;

  always @(posedge clk) if (rst_n && mdc_out_valid) begin
    if (ob < 2) begin
      if (oc == 0 && ob == 0) first_out = cyc;
      for (int l = 0; l < 2; l++) begin
        if (dir == DIR_NTT) begin
          pout[ob][l][2*oc]     = mdc_out_a[l*LW +: LW];
          pout[ob][l][2*oc + 1] = mdc_out_b[l*LW +: LW];
        end else begin
          pout[ob][l][oc]       = mdc_out_a[l*LW +: LW];
          pout[ob][l][oc + 128] = mdc_out_b[l*LW +: LW];
        end
      end
    end
    oc++;
    if (oc == 128) begin oc = 0; ob++; end
  end

  // send both bursts back to back; NTT: (x[c], x[c+128]); INTT: (X[2c], X[2c+1])
  task automatic stream(input dir_e d, output int lat);
    int c0;
    ob = 0; oc = 0;
    @(negedge clk);
    dir = d;
    c0 = cyc;
    for (int bb = 0; bb < 2; bb++)
      for (int c = 0; c < 128; c++) begin
        mdc_in_valid = 1;
        for (int l = 0; l < 2; l++) begin
          mdc_in_a[l*LW +: LW] = (d == DIR_NTT) ? pin[bb][l][c]       : pin[bb][l][2*c];
          mdc_in_b[l*LW +: LW] = (d == DIR_NTT) ? pin[bb][l][c + 128] : pin[bb][l][2*c + 1];
        end
        @(negedge clk);
      end
    mdc_in_valid = 0;
    while (ob < 2) @(negedge clk);
    lat = first_out - c0;
    repeat (5) @(negedge clk);
  endtask

  task automatic test_mdc(input pqc_e s);
    logic [LW-1:0] orig [2][2][256];
    int q, lat;
    logic [W-1:0] z, x, e0, e1;
    q = (s == PQC_KYBER) ? 3329 : 8380417;
    mode = MODE_MDC; scheme = s;
    cfg = (s == PQC_KYBER) ? '{cfg: CFG_PQC, q: {KYBER_Q, KYBER_Q}, m: {KYBER_M, KYBER_M}}
                           : '{cfg: CFG_PQC, q: {DIL_Q, DIL_Q}, m: {DIL_M, DIL_M}};
    for (int bb = 0; bb < 2; bb++) for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) begin
      pin[bb][l][i]  = LW'($urandom_range(0, q - 1));
      orig[bb][l][i] = pin[bb][l][i];
    end
    stream(DIR_NTT, lat);
    checks++;
    if (lat != int'(MDC_LAT)) begin failures++; $display("MDC NTT latency %0d", lat); end
    for (int bb = 0; bb < 2; bb++) for (int l = 0; l < 2; l++) begin
      if (s == PQC_DILITHIUM) begin
        for (int i = 0; i < 256; i++) begin
          x = pw(1753, 64'(2 * brv(i, 8) + 1), W'(q));
          e0 = 0;
          for (int jj = 255; jj >= 0; jj--) e0 = W'((mm(e0, x, W'(q)) + W'(orig[bb][l][jj])) % W'(q));
          checks++;
          if (W'(pout[bb][l][i]) !== e0) begin
            failures++;
            if (failures < 10) $display("Dil NTT b%0d l%0d X[%0d]=%0d exp %0d", bb, l, i, pout[bb][l][i], e0);
          end
        end
      end else begin
        for (int i = 0; i < 128; i++) begin
          z = pw(17, 64'(2 * brv(i, 7) + 1), W'(q));
          e0 = 0; e1 = 0;
          for (int jj = 127; jj >= 0; jj--) begin
            e0 = W'((mm(e0, z, W'(q)) + W'(orig[bb][l][2*jj])) % W'(q));
            e1 = W'((mm(e1, z, W'(q)) + W'(orig[bb][l][2*jj + 1])) % W'(q));
          end
          checks++;
          if (W'(pout[bb][l][2*i]) !== e0 || W'(pout[bb][l][2*i + 1]) !== e1) begin
            failures++;
            if (failures < 10) $display("Kyber NTT b%0d l%0d pair %0d = %0d,%0d exp %0d,%0d",
                                        bb, l, i, pout[bb][l][2*i], pout[bb][l][2*i+1], e0, e1);
          end
        end
      end
    end
    pin = pout;
    stream(DIR_INTT, lat);
    checks++;
    if (lat != int'(MDC_LAT)) begin failures++; $display("MDC INTT latency %0d", lat); end
    for (int bb = 0; bb < 2; bb++) for (int l = 0; l < 2; l++) for (int i = 0; i < 256; i++) begin
      checks++;
      if (pout[bb][l][i] !== orig[bb][l][i]) begin
        failures++;
        if (failures < 10) $display("INTT b%0d l%0d x[%0d]=%0d exp %0d", bb, l, i, pout[bb][l][i], orig[bb][l][i]);
      end
    end
    $display("MDC scheme %0d done, latency %0d cycles", s, lat);
  endtask

  initial begin
    mode = MODE_MEM; dir = DIR_NTT; scheme = PQC_KYBER; logn = 5'd6;
    cfg = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
    mdc_in_valid = 0; mdc_in_a = '0; mdc_in_b = '0; start = 0;
    host_wr_en = 0; host_wr_set = 0; host_rd_en = 0; host_rd_set = 0;
    host_wr_row = '0; host_rd_row = '0; host_wr_data = '0;
    tw_wr_en = 0; tw_wr_dir = DIR_NTT; tw_wr_row = '0; tw_wr_data = '0;
    ob = 0; oc = 0; first_out = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    test_mem(5);
    test_mem(6);
    test_mem(8);
    test_mdc(PQC_DILITHIUM);
    test_mdc(PQC_KYBER);
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
