// mvl_multiplier: N x N-bit pipelined multiplier built on radix-2
// signed-digit (SD) addition (Fig. 9); N = 54 by default.
//
// Pipeline, one register stage per line:
//   1  booth_encoder     radix-4 modified Booth digits of b; a is carried along
//   2  pp_generator      NPP = N/2 + 1 partial products as SD numbers
//   3-6 sd_adder_tree    four-input SD addition, then three two-input levels,
//                        built from latched SD full adders
//   7-8 sd2bin_converter SD sum -> binary product, low half then high half
// The product of the unsigned operands a and b appears on p exactly LATENCY = 8
// cycles after they were applied; a new pair may be applied every cycle.
// in_valid travels alongside as out_valid. Only the valid chain is reset
// (synchronous, active low); the datapath registers hold data only.
//
// The stage order, the tree shape and the eight-cycle latency follow the
// original design. Unsigned operands, the SD coding of the partial products and the
// valid chain are this design's own choices.
module mvl_multiplier
  import sd_pkg::*;
#(
  parameter int unsigned N = 54
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic             out_valid,
  output logic [2*N-1:0]   p
);
  localparam int unsigned NPP = booth_digits(N);
  localparam int unsigned W   = 2 * N;

  logic         [N-1:0]          a_q;
  booth_digit_t [NPP-1:0]        digit_q;
  sd_digit_t    [NPP-1:0][W-1:0] pp_q;
  sd_digit_t    [W-1:0]          sum;

  booth_encoder #(.N(N), .NPP(NPP)) u_booth (
    .clk(clk), .a(a), .b(b), .a_q(a_q), .digit_q(digit_q));

  pp_generator #(.N(N), .NPP(NPP), .W(W)) u_ppg (
    .clk(clk), .a(a_q), .digit(digit_q), .pp_q(pp_q));

  sd_adder_tree #(.NPP(NPP), .W(W)) u_tree (
    .clk(clk), .pp(pp_q), .sum(sum));

  sd2bin_converter #(.W(W)) u_conv (
    .clk(clk), .s(sum), .p_q(p));

  logic [LATENCY-1:0] valid_q;
  always_ff @(posedge clk) begin
    if (!rst_n) valid_q <= '0;
    else        valid_q <= {valid_q[LATENCY-2:0], in_valid};
  end
  assign out_valid = valid_q[LATENCY-1];

endmodule
