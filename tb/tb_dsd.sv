// tb_dsd: self-checking test of the delay-switch-delay commutator.
// Sends bursts of numbered elements (with idle gaps between bursts)
// through a commutator with D=4 and checks every output pair against the
// pairing rule (u[t],u[t+D]) / (l[t-D],l[t]) at relative cycle t+D. A
// second commutator with the same D is chained behind the first; since the
// mapping is its own inverse, its output must equal the original input
// 2D cycles later. A commutator with D=1 is checked the same way.
module tb_dsd;
  localparam int DW = 16;
  localparam int BURST = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid;
  logic [DW-1:0] in_u, in_l;
  logic          v1, v2, v3;
  logic [DW-1:0] u1, l1, u2, l2, u3, l3;

  dsd #(.DW(DW), .D(4)) dut  (.clk, .rst_n, .in_valid, .in_u, .in_l,
                              .out_valid(v1), .out_u(u1), .out_l(l1));
  dsd #(.DW(DW), .D(4)) dut2 (.clk, .rst_n, .in_valid(v1), .in_u(u1), .in_l(l1),
                              .out_valid(v2), .out_u(u2), .out_l(l2));
  dsd #(.DW(DW), .D(1)) dut3 (.clk, .rst_n, .in_valid, .in_u, .in_l,
                              .out_valid(v3), .out_u(u3), .out_l(l3));

  int checks = 0, failures = 0;
  int burst_id = 0;
  int t1 = 0, t2 = 0, t3 = 0;   // relative output counters

  // element value: burst b, stream s, time t
  function automatic logic [DW-1:0] el(input int b, s, t);
    return DW'((b << 8) | (s << 7) | t);
  endfunction

  function automatic logic [2*DW-1:0] pair_exp(input int b, t, d);
    if ((t % (2*d)) < d) return {el(b, 0, t), el(b, 0, t + d)};
    return {el(b, 1, t - d), el(b, 1, t)};
  endfunction

  int ob1 = 0, ob2 = 0, ob3 = 0;

  always @(posedge clk) if (rst_n) begin
    if (v1) begin
      checks++;
      if ({u1, l1} !== pair_exp(ob1, t1, 4)) begin
        failures++; $display("D4 b%0d t%0d got %0h %0h", ob1, t1, u1, l1);
      end
      t1 = t1 + 1; if (t1 == BURST) begin t1 = 0; ob1++; end
    end
    if (v2) begin
      checks++;
      if ({u2, l2} !== {el(ob2, 0, t2), el(ob2, 1, t2)}) begin
        failures++; $display("chain b%0d t%0d got %0h %0h", ob2, t2, u2, l2);
      end
      t2 = t2 + 1; if (t2 == BURST) begin t2 = 0; ob2++; end
    end
    if (v3) begin
      checks++;
      if ({u3, l3} !== pair_exp(ob3, t3, 1)) begin
        failures++; $display("D1 b%0d t%0d got %0h %0h", ob3, t3, u3, l3);
      end
      t3 = t3 + 1; if (t3 == BURST) begin t3 = 0; ob3++; end
    end
  end

  initial begin
    in_valid = 0; in_u = 0; in_l = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 4; b++) begin
      for (int t = 0; t < BURST; t++) begin
        @(negedge clk);
        in_valid = 1; in_u = el(b, 0, t); in_l = el(b, 1, t);
      end
      @(negedge clk); in_valid = 0;
      repeat (b * 3) @(negedge clk);
    end
    repeat (30) @(negedge clk);
    checks++;
    if (ob1 != 4 || ob2 != 4 || ob3 != 4) begin
      failures++; $display("burst counts %0d %0d %0d", ob1, ob2, ob3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
