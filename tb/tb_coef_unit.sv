// tb_coef_unit: self-checking test of the coefficient-wise unit.
// Random operations (add, sub, mul, changing every cycle) on random
// reduced operands in HE configuration (54-bit prime) and PQC configuration
// (Kyber lane and Dilithium lane); every lane of every result is compared
// with wide-integer arithmetic and must arrive MODMUL_LAT cycles later.
module tb_coef_unit;
  import recaphe_pkg::*;

  localparam int NL = 16;
  localparam logic [W-1:0] Q54 = 54'd18014398506729473;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  modcfg_t cfg; cop_e op; logic in_valid, out_valid;
  logic [NL*W-1:0] a, b, y;

  coef_unit #(.NL(NL)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int nop [3] = '{0, 0, 0};
  always @(posedge clk) cyc <= cyc + 1;

  logic [NL*W-1:0] exp_q[$];
  int exp_c[$];

  function automatic logic [MW-1:0] barrett_m(input logic [W-1:0] q);
    logic [191:0] num;
    num = 192'd1 << (2 * clog2_dyn(q));
    return MW'(num / 192'(q));
  endfunction

  function automatic logic [W-1:0] ref_op(input cop_e o, input logic [W-1:0] x, yy, q);
    case (o)
      OP_ADD:  return W'((128'(x) + 128'(yy)) % 128'(q));
      OP_SUB:  return W'((128'(x) + 128'(q) - 128'(yy)) % 128'(q));
      default: return W'((128'(x) * 128'(yy)) % 128'(q));
    endcase
  endfunction

  function automatic logic [W-1:0] rb(input logic [W-1:0] q);
    return W'({$urandom(), $urandom()} % 64'(q));
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    if (exp_q.size() == 0) begin failures++; $display("unexpected"); end
    else begin
      logic [NL*W-1:0] e; int c0;
      e = exp_q.pop_front(); c0 = exp_c.pop_front();
      checks++;
      if (y !== e) begin failures++; $display("mismatch"); end
      checks++;
      if (cyc - c0 != MODMUL_LAT) begin failures++; $display("latency %0d", cyc - c0); end
    end
  end

  task automatic drive(input logic pqc, input int n);
    logic [NL*W-1:0] e;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      in_valid = 1;
      op = cop_e'($urandom_range(0, 2));
      nop[op]++;
      for (int l = 0; l < NL; l++) begin
        if (!pqc) begin
          a[l*W +: W] = rb(cfg.q); b[l*W +: W] = rb(cfg.q);
          e[l*W +: W] = ref_op(op, a[l*W +: W], b[l*W +: W], cfg.q);
        end else begin
          for (int h = 0; h < 2; h++) begin
            logic [W-1:0] qq, x, yy;
            qq = W'(cfg.q[h*LW +: LW]);
            x = rb(qq); yy = rb(qq);
            a[l*W + h*LW +: LW] = LW'(x);
            b[l*W + h*LW +: LW] = LW'(yy);
            e[l*W + h*LW +: LW] = LW'(ref_op(op, x, yy, qq));
          end
        end
      end
      exp_q.push_back(e); exp_c.push_back(cyc);
    end
    @(negedge clk); in_valid = 0;
    repeat (MODMUL_LAT + 2) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; a = '0; b = '0; op = OP_ADD;
    cfg = '{cfg: CFG_HE, q: Q54, m: barrett_m(Q54)};
    repeat (3) @(negedge clk);
    rst_n = 1;
    drive(0, 300);
    cfg = '{cfg: CFG_PQC, q: {DIL_Q, KYBER_Q}, m: {DIL_M, KYBER_M}};
    drive(1, 300);
    checks++;
    if (exp_q.size() != 0 || nop[0] == 0 || nop[1] == 0 || nop[2] == 0) failures++;
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
