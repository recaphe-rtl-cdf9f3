// tb_mdc_tw_rom: self-checking test of the MDC stage twiddle tables.
// For stages 0, 1 and 6 of the 256-point network, every cycle of a
// 128-cycle burst is checked in all four scheme/direction settings:
// the value must equal root^brv(k) (k = 2^j + (c >> P)) computed here by
// repeated multiplication, the NTT and INTT values must be inverses, and
// a few entries are compared with the published Kyber and Dilithium
// constants (Kyber 2580, 3289; Dilithium 3765607).
module tb_mdc_tw_rom;
  import recaphe_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid;
  dir_e  dir;
  pqc_e  scheme;
  logic [W-1:0] w0, w1, w6;

  mdc_tw_rom #(.LOGN(8), .P(0)) r0 (.clk, .rst_n, .in_valid, .dir, .scheme, .w(w0));
  mdc_tw_rom #(.LOGN(8), .P(1)) r1 (.clk, .rst_n, .in_valid, .dir, .scheme, .w(w1));
  mdc_tw_rom #(.LOGN(8), .P(6)) r6 (.clk, .rst_n, .in_valid, .dir, .scheme, .w(w6));

  int checks = 0, failures = 0;

  function automatic longint unsigned pw(input longint unsigned b, input int e, input longint unsigned q);
    longint unsigned r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % q;
    return r;
  endfunction

  function automatic int brv(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) if ((v >> i) & 1) r |= 1 << (bits - 1 - i);
    return r;
  endfunction

  function automatic longint unsigned expect_w(input int p, input int c, input pqc_e s, input dir_e d);
    int j, k, e;
    j = 7 - p; k = (1 << j) + (c >> p);
    if (s == PQC_KYBER) begin
      e = brv(k, 7);
      if (d == DIR_INTT) e = (256 - e) % 256;
      return pw(17, e, 3329);
    end
    e = brv(k, 8);
    if (d == DIR_INTT) e = (512 - e) % 512;
    return pw(1753, e, 8380417);
  endfunction

  task automatic chk(input logic [W-1:0] w, input int p, input int c);
    checks++;
    if (w[W-1:LW] != w[LW-1:0] || longint'(w[LW-1:0]) != expect_w(p, c, scheme, dir)) begin
      failures++;
      $display("P%0d c%0d s%0d d%0d got %0d exp %0d", p, c, scheme, dir, w[LW-1:0],
               expect_w(p, c, scheme, dir));
    end
  endtask

  logic [LW-1:0] fwd [3][128];
  int known = 0;

  initial begin
    in_valid = 0; dir = DIR_NTT; scheme = PQC_KYBER;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) for (int d = 0; d < 2; d++) begin
      scheme = pqc_e'(s); dir = dir_e'(d);
      for (int c = 0; c < 128; c++) begin
        @(negedge clk);
        in_valid = 1;
        #1;
        if (s == 1) chk(w0, 0, c);
        chk(w1, 1, c);
        chk(w6, 6, c);
        if (d == 0) begin
          fwd[0][c] = w0[LW-1:0]; fwd[1][c] = w1[LW-1:0]; fwd[2][c] = w6[LW-1:0];
          // published constants
          if (s == 0 && c == 0) begin checks++; known++; if (w6[LW-1:0] != 27'd2580) failures++; end
          if (s == 0 && c == 64) begin checks++; known++; if (w6[LW-1:0] != 27'd3289) failures++; end
          if (s == 1 && c == 0) begin checks++; known++; if (w6[LW-1:0] != 27'd3765607) failures++; end
        end else begin
          longint unsigned qq;
          qq = (s == 0) ? 3329 : 8380417;
          checks++;
          if (((longint'(fwd[1][c]) * longint'(w1[LW-1:0])) % qq) != 1) begin
            failures++; $display("not inverse c%0d", c);
          end
        end
      end
      @(negedge clk); in_valid = 0;
    end
    checks++;
    if (known != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
