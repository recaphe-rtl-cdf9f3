// tb_coef_bank: self-checking test of one ping-pong coefficient set.
// For N = 2^6 and N = 2^9 every row is written with unique data two rows
// per cycle in the (2r, 2r+1) pattern, then read back two rows per cycle
// in the (r, r+N/16) pattern, and again in the (2r, 2r+1) pattern; every
// row must come back unchanged and in port order. The banking assertion
// must not fire for these patterns.
module tb_coef_bank;
  import recaphe_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [4:0] logn;
  logic [1:0] rd_en, wr_en;
  logic [12:0] rd_row [2], wr_row [2];
  logic [LANES*W-1:0] rd_data [2], wr_data [2];

  coef_bank dut (.*);

  int checks = 0, failures = 0;

  function automatic logic [LANES*W-1:0] pat(input int ln, input int r);
    logic [LANES*W-1:0] v;
    for (int l = 0; l < LANES; l++) v[l*W +: W] = W'((ln << 40) | (r << 8) | l) ^ W'(54'h2AAAAAAAAAAAAA);
    return v;
  endfunction

  task automatic run(input int ln);
    int nrows = (1 << ln) / 8;
    logn = 5'(ln);
    for (int r = 0; r < nrows / 2; r++) begin
      @(negedge clk);
      wr_en = 2'b11;
      wr_row[0] = 13'(2*r);     wr_data[0] = pat(ln, 2*r);
      wr_row[1] = 13'(2*r + 1); wr_data[1] = pat(ln, 2*r + 1);
    end
    @(negedge clk); wr_en = 0;
    for (int pass = 0; pass < 2; pass++)
      for (int r = 0; r < nrows / 2; r++) begin
        int r0, r1;
        r0 = pass ? 2*r : r;
        r1 = pass ? 2*r + 1 : r + nrows / 2;
        @(negedge clk);
        rd_en = 2'b11; rd_row[0] = 13'(r0); rd_row[1] = 13'(r1);
        @(negedge clk);
        rd_en = 0;
        checks += 2;
        if (rd_data[0] !== pat(ln, r0)) begin failures++; $display("ln%0d row %0d", ln, r0); end
        if (rd_data[1] !== pat(ln, r1)) begin failures++; $display("ln%0d row %0d", ln, r1); end
      end
  endtask

  initial begin
    rd_en = 0; wr_en = 0; logn = 6;
    rd_row = '{default: '0}; wr_row = '{default: '0}; wr_data = '{default: '0};
    run(6);
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
