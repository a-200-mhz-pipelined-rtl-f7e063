// pp_generator: partial product generator, second pipeline stage of the
// multiplier.
//
// For each Booth digit d_j it forms the partial product d_j * a * 4^j
// directly as a W-digit signed-digit number: the magnitude |d_j| * a (a or
// a shifted left by one) is placed at digit 2j, and a negative digit simply
// turns every 1 of the magnitude into a -1 digit. No two's-complement
// increment or sign extension is needed, which is why the SD form suits the
// adder tree that follows. Digits above W-1 are dropped (the product is
// taken modulo 2^W, W = 2N).
//
// Timing: one register stage; the partial products are stored at the
// rising edge after the Booth digits arrive. The SD form of the partial
// products is this design's own choice: the original only says that this
// generator is conventional binary logic feeding the current-mode tree.
module pp_generator
  import sd_pkg::*;
#(
  parameter int unsigned N   = 54,
  parameter int unsigned NPP = booth_digits(N),
  parameter int unsigned W   = 2 * N
) (
  input  logic                             clk,
  input  logic         [N-1:0]             a,
  input  booth_digit_t [NPP-1:0]           digit,
  output sd_digit_t    [NPP-1:0][W-1:0]    pp_q
);
  sd_digit_t [NPP-1:0][W-1:0] pp_d;

  always_comb begin
    for (int j = 0; j < int'(NPP); j++) begin
      logic [N:0] mag;
      mag = digit[j].two ? {a, 1'b0} : (digit[j].one ? {1'b0, a} : '0);
      pp_d[j] = '0;
      for (int k = 0; k <= int'(N); k++) begin
        if (2*j + k < int'(W))
          pp_d[j][2*j+k] = !mag[k] ? SD_ZERO : (digit[j].neg ? SD_NEG : SD_POS);
      end
    end
  end

  always_ff @(posedge clk)
    pp_q <= pp_d;

endmodule
