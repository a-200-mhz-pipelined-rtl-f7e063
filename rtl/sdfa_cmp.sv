// sdfa_cmp: the comparator half of an SD full adder (Fig. 7(a) part).
//
// Forms the linear sum z = a + b of two SD digits (in the current-mode
// circuit this is two wires joined) and compares it against the four
// thresholds -1.5, -0.5, +0.5 and +1.5. The four binary results form a
// thermometer code. Purely combinational.
//
// Ports: a, b are SD digits; code is the comparator output.
module sdfa_cmp
  import sd_pkg::*;
(
  input  sd_digit_t a,
  input  sd_digit_t b,
  output td_code_t  code
);
  sd_sum_t z;

  always_comb begin
    z           = sd_sum_t'(a) + sd_sum_t'(b);
    code.ge_p15 = (z >= 3'sd2);
    code.ge_p05 = (z >= 3'sd1);
    code.ge_m05 = (z >= 3'sd0);
    code.ge_m15 = (z >= -3'sd1);
  end

endmodule
