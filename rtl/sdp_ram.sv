// sdp_ram: simple dual-port RAM (one write port, one read port, both
// synchronous), the block-RAM primitive behind the coefficient and twiddle
// memories. A read returns the stored word one cycle after rd_en. A read
// and a write of the same address in the same cycle return the old word.
// Contents are not reset.
module sdp_ram #(
  parameter int unsigned DW    = 432,
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [DW-1:0]            wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [DW-1:0]            rd_data
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
