// lsdfa: latched SD full adder, the pipelined cell of the multiplier's
// adder tree (Figs. 7 and 8).
//
// Same function as sdfa, but the four comparator outputs are stored in a
// register between the comparators and the switched current sources. In
// the current-mode circuit this storage is eight CMOS pass gates (the four
// comparator outputs and their complements) holding the binary comparator
// voltages dynamically; here it is a rising-edge register.
//
// Timing: a and b are sampled at a rising edge of clk; c and w (and
// e_out, the stored z_i >= 1 for the left neighbour) are valid one cycle
// later and stay until the next edge. e_in must come from the right
// neighbour's e_out, which is stored at the same edge, so that the pair
// refers to the same operands. No reset: the register holds data only.
module lsdfa
  import sd_pkg::*;
(
  input  logic      clk,
  input  sd_digit_t a,
  input  sd_digit_t b,
  input  logic      e_in,    // stored z_{i-1} >= 1 of the right neighbour
  output logic      e_out,   // stored z_i >= 1
  output sd_digit_t c,
  output sd_digit_t w
);
  td_code_t code_d, code_q;

  sdfa_cmp u_cmp (.a(a), .b(b), .code(code_d));

  always_ff @(posedge clk)
    code_q <= code_d;

  sdfa_csrc u_csrc (.code(code_q), .e(e_in), .c(c), .w(w));

  assign e_out = code_q.ge_p05;

endmodule
