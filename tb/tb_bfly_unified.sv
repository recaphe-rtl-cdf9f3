// tb_bfly_unified: self-checking test of the unified butterfly.
// Random operands are pushed through NTT, INTT and special-stage
// operations, with dir/special changing from one input to the next, in HE
// configuration (54-bit prime) and PQC configuration (Kyber and Dilithium
// lanes). Results are compared with the butterfly equations evaluated with
// wide integer arithmetic (division by two as multiplication by (q+1)/2),
// and each output must appear BFLY_LAT cycles after its input.
module tb_bfly_unified;
  import recaphe_pkg::*;

  localparam logic [W-1:0] Q54 = 54'd18014398506729473;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  modcfg_t      cfg;
  dir_e         dir;
  logic         special, in_valid;
  logic [W-1:0] a, b, w;
  logic         out_valid;
  logic [W-1:0] out_a, out_b;

  bfly_unified dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_ntt = 0, n_intt = 0, n_sp = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [2*W-1:0] exp_q[$];
  int             exp_c[$];

  function automatic logic [MW-1:0] barrett_m(input logic [W-1:0] q);
    logic [191:0] num;
    num = 192'd1 << (2 * clog2_dyn(q));
    return MW'(num / 192'(q));
  endfunction

  function automatic logic [W-1:0] mm(input logic [W-1:0] x, y, q);
    return W'((128'(x) * 128'(y)) % 128'(q));
  endfunction

  function automatic logic [W-1:0] rb(input logic [W-1:0] q);
    return W'({$urandom(), $urandom()} % 64'(q));
  endfunction

  // reference butterfly for one lane: returns {A, B}
  function automatic logic [2*W-1:0] ref_bf(input logic [W-1:0] x, y, tw, q,
                                            input logic inv, sp);
    logic [W-1:0] t, h;
    h = (q + 1) >> 1;
    if (sp) return {x, y};
    if (!inv) begin
      t = mm(y, tw, q);
      return {W'((128'(x) + 128'(t)) % 128'(q)), W'((128'(x) + 128'(q) - 128'(t)) % 128'(q))};
    end
    return {mm(W'((128'(x) + 128'(y)) % 128'(q)), h, q),
            mm(mm(W'((128'(x) + 128'(q) - 128'(y)) % 128'(q)), tw, q), h, q)};
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [2*W-1:0] e; int c0;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exp_q.pop_front(); c0 = exp_c.pop_front();
        checks += 2;
        if ({out_a, out_b} !== e) begin
          failures++; $display("mismatch A=%0h B=%0h exp=%0h", out_a, out_b, e);
        end
        if (cycle - c0 != BFLY_LAT) begin failures++; $display("latency %0d", cycle - c0); end
      end
    end
  end

  task automatic drive(input logic pqc, input int n);
    logic [2*W-1:0] r0, r1;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      dir      = dir_e'($urandom_range(0, 1));
      special  = ($urandom_range(0, 5) == 0);
      if (dir == DIR_NTT) n_ntt++; else n_intt++;
      if (special) n_sp++;
      if (!pqc) begin
        a = rb(cfg.q); b = rb(cfg.q); w = rb(cfg.q);
        exp_q.push_back(ref_bf(a, b, w, cfg.q, dir == DIR_INTT, special));
      end else begin
        a = {LW'(rb(W'(cfg.q[W-1:LW]))), LW'(rb(W'(cfg.q[LW-1:0])))};
        b = {LW'(rb(W'(cfg.q[W-1:LW]))), LW'(rb(W'(cfg.q[LW-1:0])))};
        w = {LW'(rb(W'(cfg.q[W-1:LW]))), LW'(rb(W'(cfg.q[LW-1:0])))};
        r0 = ref_bf(W'(a[LW-1:0]), W'(b[LW-1:0]), W'(w[LW-1:0]), W'(cfg.q[LW-1:0]),
                    dir == DIR_INTT, special);
        r1 = ref_bf(W'(a[W-1:LW]), W'(b[W-1:LW]), W'(w[W-1:LW]), W'(cfg.q[W-1:LW]),
                    dir == DIR_INTT, special);
        exp_q.push_back({LW'(r1[2*W-1:W]), LW'(r0[2*W-1:W]), LW'(r1[W-1:0]), LW'(r0[W-1:0])});
      end
      exp_c.push_back(cycle);
    end
    @(negedge clk); in_valid = 0;
    repeat (BFLY_LAT + 2) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; a = '0; b = '0; w = '0; dir = DIR_NTT; special = 0;
    cfg = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    drive(0, 400);
    cfg = '{cfg: CFG_PQC, q: {DIL_Q, KYBER_Q}, m: {DIL_M, KYBER_M}};
    drive(1, 400);
    checks++;
    if (exp_q.size() != 0 || n_sp == 0 || n_ntt == 0 || n_intt == 0) begin
      failures++; $display("coverage/missing %0d %0d %0d %0d", exp_q.size(), n_sp, n_ntt, n_intt);
    end
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
