// coef_bank: one of the two ping-pong coefficient memory sets
// ("Mem-based BRAM").
//
// A polynomial of N = 2^logn coefficients is stored as N/8 rows of 8
// coefficients (row R holds coefficients 8R..8R+7). The rows are spread
// over four block memories by (half, parity): half = R >= N/16, parity =
// R[0]. Each butterfly stage of the memory-based engine either reads rows r
// and r+N/16 and writes rows 2r and 2r+1 (NTT) or the reverse (INTT); in
// both cases the two reads and the two writes of a cycle land in different
// memories, so one read and one write port per memory suffice and the
// eight butterflies never stall. Two such sets are used as ping-pong
// buffers. Two sets of block RAM shared by 8-parallel butterflies follow
// the document; the row layout and banking are this design's choices.
//
// Interface: two read ports and two write ports, each a whole row. The two
// enabled reads (writes) of one cycle must map to different memories; this
// is asserted. Read data returns one cycle after rd_en, in port order.
// logn (5..LOGN_MAX) must be stable while the bank is in use.
module coef_bank
  import recaphe_pkg::*;
#(
  parameter int unsigned LOGN_MAX = 16,
  parameter int unsigned NL       = LANES
) (
  input  logic                             clk,
  input  logic [4:0]                       logn,
  input  logic [1:0]                       rd_en,
  input  logic [LOGN_MAX-$clog2(NL)-1:0]   rd_row  [2],
  output logic [NL*W-1:0]                  rd_data [2],
  input  logic [1:0]                       wr_en,
  input  logic [LOGN_MAX-$clog2(NL)-1:0]   wr_row  [2],
  input  logic [NL*W-1:0]                  wr_data [2]
);

  localparam int unsigned RW = LOGN_MAX - $clog2(NL);   // row index bits
  localparam int unsigned AW = RW - 2;                   // per-memory address
  localparam int unsigned DEPTH = 1 << AW;

  function automatic logic [1:0] bank_of(input logic [RW-1:0] row, input logic [4:0] ln);
    return {row[4'(ln - 5'd4)], row[0]};
  endfunction

  function automatic logic [AW-1:0] addr_of(input logic [RW-1:0] row, input logic [4:0] ln);
    logic [RW-1:0] mask;
    mask = (RW'(1) << (ln - 5'd4)) - 1'b1;
    return AW'((row & mask) >> 1);
  endfunction

  logic          m_wen [4], m_ren [4];
  logic [AW-1:0] m_wa  [4], m_ra  [4];
  logic [NL*W-1:0] m_wd [4], m_rd [4];
  logic [1:0]    rsel [2];

  always_comb begin
    for (int s = 0; s < 4; s++) begin
      m_wen[s] = 1'b0; m_ren[s] = 1'b0;
      m_wa[s]  = '0;   m_ra[s]  = '0;   m_wd[s] = '0;
      for (int p = 0; p < 2; p++) begin
        if (wr_en[p] && bank_of(wr_row[p], logn) == 2'(s)) begin
          m_wen[s] = 1'b1;
          m_wa[s]  = addr_of(wr_row[p], logn);
          m_wd[s]  = wr_data[p];
        end
        if (rd_en[p] && bank_of(rd_row[p], logn) == 2'(s)) begin
          m_ren[s] = 1'b1;
          m_ra[s]  = addr_of(rd_row[p], logn);
        end
      end
    end
  end

  for (genvar s = 0; s < 4; s++) begin : g_mem
    sdp_ram #(.DW(NL*W), .DEPTH(DEPTH)) u_ram (
      .clk,
      .wr_en(m_wen[s]), .wr_addr(m_wa[s]), .wr_data(m_wd[s]),
      .rd_en(m_ren[s]), .rd_addr(m_ra[s]), .rd_data(m_rd[s])
    );
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++)
      if (rd_en[p]) rsel[p] <= bank_of(rd_row[p], logn);
  end

  assign rd_data[0] = m_rd[rsel[0]];
  assign rd_data[1] = m_rd[rsel[1]];

  // Two accesses of one kind in the same cycle must use different memories.
  always_ff @(posedge clk) begin
    if (&rd_en)
      assert (bank_of(rd_row[0], logn) != bank_of(rd_row[1], logn))
        else $error("coef_bank: read bank conflict");
    if (&wr_en)
      assert (bank_of(wr_row[0], logn) != bank_of(wr_row[1], logn))
        else $error("coef_bank: write bank conflict");
  end

endmodule
