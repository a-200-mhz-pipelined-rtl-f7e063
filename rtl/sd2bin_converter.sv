// sd2bin_converter: signed-digit to binary converter, last two pipeline
// stages of the multiplier.
//
// An SD number S with digits in {-1, 0, +1} equals P - M, where P holds a 1
// wherever a digit is +1 and M a 1 wherever it is -1. The converter
// computes P - M modulo 2^W with a binary subtractor split in two halves:
// cycle 1 subtracts the low W/2 bits and stores the result, the borrow and
// the upper halves of P and M; cycle 2 subtracts the upper halves with
// that borrow. The result is the W-bit two's-complement value of S.
//
// Timing: two register stages; s is sampled at a rising edge and p_q is
// valid two edges later. One result per cycle. The two-cycle latency follows
// the original circuit; the borrow-split subtractor is this design's own choice.
module sd2bin_converter
  import sd_pkg::*;
#(
  parameter int unsigned W = 108
) (
  input  logic              clk,
  input  sd_digit_t [W-1:0] s,
  output logic      [W-1:0] p_q
);
  localparam int unsigned L = W / 2;
  localparam int unsigned H = W - L;

  logic [W-1:0] pos, neg;
  always_comb begin
    for (int i = 0; i < int'(W); i++) begin
      pos[i] = (s[i] == SD_POS);
      neg[i] = (s[i] == SD_NEG);
    end
  end

  // cycle 1: low half
  logic [L:0]   lo_diff;
  logic [L-1:0] lo_q;
  logic         borrow_q;
  logic [H-1:0] pos_hi_q, neg_hi_q;

  assign lo_diff = {1'b0, pos[L-1:0]} - {1'b0, neg[L-1:0]};

  always_ff @(posedge clk) begin
    lo_q     <= lo_diff[L-1:0];
    borrow_q <= lo_diff[L];
    pos_hi_q <= pos[W-1:L];
    neg_hi_q <= neg[W-1:L];
  end

  // cycle 2: high half
  always_ff @(posedge clk)
    p_q <= {pos_hi_q - neg_hi_q - H'(borrow_q), lo_q};

endmodule
