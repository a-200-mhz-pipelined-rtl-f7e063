// sdfa_csrc: the switched-current-source half of an SD full adder
// (Fig. 7(b) carry, Fig. 7(c) intermediate sum).
//
// From the comparator code of its own digit (z_i) and the control signal
// e = (z_{i-1} >= 1) of the digit to its right, it produces the carry c_i
// and intermediate sum w_i with 2*c_i + w_i = z_i, choosing between the two
// encodings of z_i = +1 and z_i = -1 so that the next addition
// s_i = w_i + c_{i-1} stays inside {-1, 0, +1}:
//
//   z_i = +2           : c = +1, w =  0
//   z_i = +1,  e       : c = +1, w = -1
//   z_i = +1, !e       : c =  0, w = +1
//   z_i =  0           : c =  0, w =  0
//   z_i = -1,  e       : c =  0, w = -1
//   z_i = -1, !e       : c = -1, w = +1
//   z_i = -2           : c = -1, w =  0
//
// Purely combinational. A code that is not a thermometer code cannot come
// from sdfa_cmp; it is decoded as its highest set comparator.
module sdfa_csrc
  import sd_pkg::*;
(
  input  td_code_t  code,
  input  logic      e,      // z_{i-1} >= 1
  output sd_digit_t c,
  output sd_digit_t w
);

  always_comb begin
    if (code.ge_p15) begin             // z = +2
      c = SD_POS;  w = SD_ZERO;
    end else if (code.ge_p05) begin    // z = +1
      if (e) begin c = SD_POS;  w = SD_NEG; end
      else   begin c = SD_ZERO; w = SD_POS; end
    end else if (code.ge_m05) begin    // z = 0
      c = SD_ZERO; w = SD_ZERO;
    end else if (code.ge_m15) begin    // z = -1
      if (e) begin c = SD_ZERO; w = SD_NEG; end
      else   begin c = SD_NEG;  w = SD_POS; end
    end else begin                     // z = -2
      c = SD_NEG;  w = SD_ZERO;
    end
  end

endmodule
