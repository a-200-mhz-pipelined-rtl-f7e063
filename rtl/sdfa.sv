// sdfa: one digit of the radix-2 signed-digit full adder (Figs. 6 and 7).
//
// It adds two SD digits a_i and b_i and splits the linear sum
// z_i = a_i + b_i into a carry c_i and an intermediate sum w_i with
// 2*c_i + w_i = z_i. Four comparators (sdfa_cmp) decode z_i; switched
// current sources (sdfa_csrc) then produce c_i and w_i, using the control
// input e_in = (z_{i-1} >= 1) from the digit on the right. The cell also
// drives e_out = (z_i >= 1) for the digit on its left. The final sum digit
// s_i = w_i + c_{i-1} is formed outside the cell, by the adder row.
//
// Combinational. The decode rule and the four comparator thresholds follow
// the adder of the original circuit; the two-bit digit encoding is this
// design's own.
module sdfa
  import sd_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  input  logic      e_in,    // z_{i-1} >= 1
  output logic      e_out,   // z_i >= 1
  output sd_digit_t c,
  output sd_digit_t w
);
  td_code_t code;

  sdfa_cmp  u_cmp  (.a(a), .b(b), .code(code));
  sdfa_csrc u_csrc (.code(code), .e(e_in), .c(c), .w(w));

  assign e_out = code.ge_p05;

endmodule
