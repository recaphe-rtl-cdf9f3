// tw_mem: twiddle memory of the memory-based (HE) mode ("Mem-based ROM").
//
// HE moduli and lengths are chosen at run time, so unlike the MDC tables
// these twiddles are loaded by the host. The memory holds one table per
// direction, each of 2^LOGN_MAX/LANES rows of LANES twiddles: row R, lane
// l holds zeta_(LANES*R + l) for the NTT table and its inverse for the INTT
// table, where zeta_k = psi^brv_logn(k) and psi is a primitive 2N-th root of
// unity of the current modulus (entry 0 is unused). This is the layout the
// memory-based controller reads: stages 0..2 take their 1, 2 and 4
// twiddles from row 0, stage j >= 3 reads one row per cycle.
// The existence of a separate, loadable twiddle store for the memory-based
// mode follows the document; its layout is this design's choice.
//
// Timing: writes take effect at the clock edge; rd_data is valid one cycle
// after rd_en.
module tw_mem
  import recaphe_pkg::*;
#(
  parameter int unsigned LOGN_MAX = 16,
  parameter int unsigned NL       = LANES
) (
  input  logic                                clk,
  input  logic                                wr_en,
  input  dir_e                                wr_dir,
  input  logic [LOGN_MAX-$clog2(NL)-1:0]      wr_row,
  input  logic [NL*W-1:0]                     wr_data,
  input  logic                                rd_en,
  input  dir_e                                rd_dir,
  input  logic [LOGN_MAX-$clog2(NL)-1:0]      rd_row,
  output logic [NL*W-1:0]                     rd_data
);

  localparam int unsigned RW = LOGN_MAX - $clog2(NL);

  sdp_ram #(.DW(NL*W), .DEPTH(2 << RW)) u_ram (
    .clk,
    .wr_en, .wr_addr({wr_dir, wr_row}), .wr_data,
    .rd_en, .rd_addr({rd_dir, rd_row}), .rd_data
  );

endmodule
