// tb_modmul_dual: self-checking test of the dual-scheme Barrett multiplier.
// Streams random reduced operands in HE configuration (54-bit NTT-friendly
// prime and a 33-bit prime) and PQC configuration (Kyber/Dilithium lane
// pairs), compares every result against a*b % q computed with wide
// arithmetic, and checks that each result appears exactly MODMUL_LAT
// cycles after its operands.
module tb_modmul_dual;
  import recaphe_pkg::*;

  localparam logic [W-1:0] Q54 = 54'd18014398506729473;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  modcfg_t      cfg;
  logic         in_valid;
  logic [W-1:0] a, b;
  logic         out_valid;
  logic [W-1:0] y;

  modmul_dual dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results queue with issue cycle
  logic [W-1:0] exp_q[$];
  int           exp_c[$];

  function automatic logic [MW-1:0] barrett_m(input logic [W-1:0] q);
    logic [191:0] num;
    int unsigned  k;
    k = 2 * clog2_dyn(q);
    num = 192'd1 << k;
    return MW'(num / 192'(q));
  endfunction

  function automatic logic [W-1:0] ref_mul(input logic [W-1:0] x, yy, q);
    logic [127:0] p;
    p = 128'(x) * 128'(yy);
    return W'(p % 128'(q));
  endfunction

  function automatic logic [W-1:0] rnd_below(input logic [W-1:0] q);
    logic [63:0] r;
    r = {$urandom(), $urandom()};
    return W'(r % 64'(q));
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        logic [W-1:0] e; int c0;
        e = exp_q.pop_front(); c0 = exp_c.pop_front();
        checks++;
        if (y !== e) begin
          failures++; $display("mismatch y=%0h exp=%0h", y, e);
        end
        checks++;
        if (cycle - c0 != MODMUL_LAT) begin
          failures++; $display("latency %0d", cycle - c0);
        end
      end
    end
  end

  task automatic run_he(input logic [W-1:0] q, input int n);
    cfg.cfg = CFG_HE; cfg.q = q; cfg.m = barrett_m(q);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      a = (i == 0) ? q - 1 : rnd_below(q);
      b = (i == 0) ? q - 1 : rnd_below(q);
      exp_q.push_back(ref_mul(a, b, q)); exp_c.push_back(cycle);
    end
    @(negedge clk); in_valid = 0;
    repeat (MODMUL_LAT + 2) @(negedge clk);
  endtask

  task automatic run_pqc(input logic [LW-1:0] q0, q1, input int n);
    logic [LW-1:0] a0, a1, b0, b1;
    cfg.cfg = CFG_PQC; cfg.q = {q1, q0};
    cfg.m = {MLW'(barrett_m(W'(q1))), MLW'(barrett_m(W'(q0)))};
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      a0 = (i == 0) ? q0 - 1 : LW'(rnd_below(W'(q0)));
      b0 = (i == 0) ? q0 - 1 : LW'(rnd_below(W'(q0)));
      a1 = (i == 0) ? q1 - 1 : LW'(rnd_below(W'(q1)));
      b1 = (i == 0) ? q1 - 1 : LW'(rnd_below(W'(q1)));
      a = {a1, a0}; b = {b1, b0};
      exp_q.push_back({LW'(ref_mul(W'(a1), W'(b1), W'(q1))), LW'(ref_mul(W'(a0), W'(b0), W'(q0)))});
      exp_c.push_back(cycle);
    end
    @(negedge clk); in_valid = 0;
    repeat (MODMUL_LAT + 2) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; a = '0; b = '0;
    cfg = '{cfg: CFG_HE, q: Q54, m: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_he(Q54, 300);
    run_he(54'd8589852673, 200);         // 33-bit prime
    run_pqc(KYBER_Q, DIL_Q, 300);
    run_pqc(DIL_Q, KYBER_Q, 200);
    run_pqc(KYBER_Q, KYBER_Q, 100);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("missing outputs %0d", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
