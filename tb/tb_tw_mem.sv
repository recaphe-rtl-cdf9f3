// tb_tw_mem: self-checking test of the twiddle memory. Random rows are
// written into both direction tables (including the first and last row),
// then read back in a different order; each read must return the last
// word written to that (direction, row), one cycle after rd_en.
module tb_tw_mem;
  import recaphe_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic wr_en, rd_en; dir_e wr_dir, rd_dir;
  logic [12:0] wr_row, rd_row;
  logic [LANES*W-1:0] wr_data, rd_data;

  tw_mem dut (.*);

  int checks = 0, failures = 0;
  logic [LANES*W-1:0] model [2][int];
  int rows [$];

  initial begin
    wr_en = 0; rd_en = 0; wr_dir = DIR_NTT; rd_dir = DIR_NTT; wr_row = '0; rd_row = '0;
    wr_data = '0;
    rows = '{0, 1, 2, 7, 8191, 4096, 1234};
    for (int i = 0; i < 40; i++) rows.push_back($urandom_range(0, 8191));
    foreach (rows[i]) for (int d = 0; d < 2; d++) begin
      @(negedge clk);
      wr_en = 1; wr_dir = dir_e'(d); wr_row = 13'(rows[i]);
      for (int l = 0; l < LANES * W; l += 32) wr_data[l +: 32] = $urandom();
      model[d][rows[i]] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = rows.size() - 1; i >= 0; i--) for (int d = 1; d >= 0; d--) begin
      @(negedge clk);
      rd_en = 1; rd_dir = dir_e'(d); rd_row = 13'(rows[i]);
      @(negedge clk);
      rd_en = 0;
      checks++;
      if (rd_data !== model[d][rows[i]]) begin
        failures++; $display("row %0d dir %0d mismatch", rows[i], d);
      end
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
