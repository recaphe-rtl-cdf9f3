// dsd: delay-switch-delay commutator ("#DSD") between two MDC stages.
//
// Two streams enter, u (upper) and l (lower), one element each per cycle.
// The lower input passes a D-cycle delay line, a 2x2 switch then either
// passes (u, l_delayed) straight or crosses them, and the upper output
// passes a second D-cycle delay line. The switch crosses during the second
// half of every 2D-cycle block of the incoming burst. For a burst starting
// at relative cycle 0, the output at relative cycle T = t + D is the pair
//   (u[t], u[t+D])       when t mod 2D <  D
//   (l[t-D], l[t])       when t mod 2D >= D
// so the pair that the next butterfly sees is taken D cycles apart from one
// stream. The mapping is its own inverse, which is what lets the same
// commutator serve the NTT direction and, reversed, the INTT direction.
// The delay-switch-delay structure and the delays 1, 2, 4, ... follow the
// document; which branch carries the delay, the switch phase and the
// counter are this design's choices.
//
// Interface: in_valid marks burst elements; bursts must be contiguous and a
// multiple of 2D long (a 256-point transform gives 128-cycle bursts), gaps
// between bursts are allowed. out_valid is in_valid delayed by D.
module dsd
  import recaphe_pkg::*;
#(
  parameter int unsigned DW = W,   // element width
  parameter int unsigned D  = 1    // delay of each branch
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_u,
  input  logic [DW-1:0] in_l,
  output logic          out_valid,
  output logic [DW-1:0] out_u,
  output logic [DW-1:0] out_l
);

  localparam int unsigned CW = $clog2(2 * D);

  logic [CW-1:0] cnt;
  logic [DW-1:0] dl_l [D];     // lower input delay line
  logic [DW-1:0] dl_u [D];     // upper output delay line
  logic          dl_v [D];
  logic          xsw;
  logic [DW-1:0] sw_u;

  assign xsw = cnt[CW-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (in_valid) cnt <= cnt + 1'b1;
  end

  always_comb sw_u = xsw ? dl_l[D-1] : in_u;

  always_ff @(posedge clk) begin
    dl_l[0] <= in_l;
    dl_u[0] <= sw_u;
    for (int i = 1; i < int'(D); i++) begin
      dl_l[i] <= dl_l[i-1];
      dl_u[i] <= dl_u[i-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < int'(D); i++) dl_v[i] <= 1'b0;
    else begin
      dl_v[0] <= in_valid;
      for (int i = 1; i < int'(D); i++) dl_v[i] <= dl_v[i-1];
    end
  end

  assign out_u     = dl_u[D-1];
  assign out_l     = xsw ? in_u : dl_l[D-1];
  assign out_valid = dl_v[D-1];

endmodule
