// booth_encoder: radix-4 modified Booth encoder, first pipeline stage of the
// multiplier.
//
// The unsigned N-bit multiplier b is zero-extended and cut into overlapping
// three-bit groups (b[2j+1], b[2j], b[2j-1]) with b[-1] = 0. Each group
// gives one digit d_j = -2*b[2j+1] + b[2j] + b[2j-1] in {-2..+2}, coded as
// (neg, two, one), so that b = sum_j d_j * 4^j. NPP = N/2 + 1 digits cover
// an unsigned operand (the top digit is never negative).
//
// Timing: one register stage. The digits and the multiplicand a, which the
// partial product generator needs one cycle later, are stored at the same
// rising edge. Conventional binary logic, as in the original circuit; the unsigned
// operand format is this design's own choice.
module booth_encoder
  import sd_pkg::*;
#(
  parameter int unsigned N   = 54,
  parameter int unsigned NPP = booth_digits(N)
) (
  input  logic                       clk,
  input  logic         [N-1:0]       a,        // multiplicand
  input  logic         [N-1:0]       b,        // multiplier
  output logic         [N-1:0]       a_q,
  output booth_digit_t [NPP-1:0]     digit_q
);
  // b with b[-1] = 0 at index 0 and zeros above the top bit
  logic [2*NPP:0] bx;
  booth_digit_t [NPP-1:0] digit_d;

  always_comb begin
    bx = '0;
    bx[N:1] = b;
    for (int j = 0; j < int'(NPP); j++) begin
      // group (b[2j+1], b[2j], b[2j-1]) = bx[2j+2 : 2j]
      unique case (bx[2*j+2 -: 3])
        3'b000, 3'b111: digit_d[j] = '{neg: 1'b0, two: 1'b0, one: 1'b0};
        3'b001, 3'b010: digit_d[j] = '{neg: 1'b0, two: 1'b0, one: 1'b1};
        3'b011:         digit_d[j] = '{neg: 1'b0, two: 1'b1, one: 1'b0};
        3'b100:         digit_d[j] = '{neg: 1'b1, two: 1'b1, one: 1'b0};
        default:        digit_d[j] = '{neg: 1'b1, two: 1'b0, one: 1'b1}; // 101, 110
      endcase
    end
  end

  always_ff @(posedge clk) begin
    a_q     <= a;
    digit_q <= digit_d;
  end

endmodule
