// sd_adder: W-digit radix-2 signed-digit adder (Fig. 6).
//
// S = A + B with every digit of A, B and S in {-1, 0, +1}. Each digit
// position holds one sdfa cell; the final sum digit is s_i = w_i + c_{i-1}
// (a wired sum in the current-mode circuit). Because the carry moves at
// most one digit to the left, the delay does not depend on W.
//
// The carry out of the top digit is dropped, so S equals A + B modulo
// 2^W. The multiplier relies on this: its product is less than 2^W.
// Digit 0 sees z_{-1} = 0 and c_{-1} = 0. Combinational.
module sd_adder
  import sd_pkg::*;
#(
  parameter int unsigned W = 108
) (
  input  sd_digit_t [W-1:0] a,
  input  sd_digit_t [W-1:0] b,
  output sd_digit_t [W-1:0] s
);
  sd_digit_t [W-1:0] c, w;
  logic      [W:0]   e;       // e[i] = (z_{i-1} >= 1); e[0] = 0

  assign e[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_digit
    sdfa u_fa (.a(a[i]), .b(b[i]), .e_in(e[i]), .e_out(e[i+1]), .c(c[i]), .w(w[i]));
    if (i == 0) begin : g_lsd
      assign s[i] = w[i];
    end else begin : g_dig
      // |w_i + c_{i-1}| <= 1 by construction of the carry rule
      assign s[i] = sd_digit_t'(w[i] + c[i-1]);
    end
  end

endmodule
