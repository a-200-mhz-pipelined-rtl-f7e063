// sd_pkg: types and constants shared by the radix-2 signed-digit (SD)
// multiplier.
//
// A radix-2 SD digit takes a value in {-1, 0, +1}. In the current-mode
// circuit a digit is a pair of complementary currents (x, x') with
// x = (d+1)*I0 and x' = (1-d)*I0; in this RTL it is a two-bit two's
// complement number. The linear sum of two digits, z in {-2..+2}, is what
// the current-mode circuit forms by joining two wires; here it is a
// three-bit signed number.
//
// An SD full adder decodes z with four comparators placed between the five
// levels (thresholds -1.5, -0.5, +0.5, +1.5). Their binary outputs form a
// thermometer code, td_code_t, which is also what the latched adder stores
// between pipeline stages.
//
// The Booth digit (neg, two, one) selects -2X..+2X in the radix-4 modified
// Booth recoding; booth_digits() gives how many digits an unsigned N-bit
// multiplier needs.
package sd_pkg;

  typedef logic signed [1:0] sd_digit_t;   // -1, 0, +1
  typedef logic signed [2:0] sd_sum_t;     // linear sum z in -2..+2

  localparam sd_digit_t SD_NEG  = -2'sd1;
  localparam sd_digit_t SD_ZERO =  2'sd0;
  localparam sd_digit_t SD_POS  =  2'sd1;

  // Comparator outputs of one SD full adder: ge_pXX means z > +X.X and
  // ge_mXX means z > -X.X. A legal code is a thermometer code.
  typedef struct packed {
    logic ge_p15;   // z >= +2
    logic ge_p05;   // z >= +1
    logic ge_m05;   // z >=  0
    logic ge_m15;   // z >= -1
  } td_code_t;

  // Radix-4 modified Booth digit: value = (neg ? -1 : 1) * (two ? 2 : one ? 1 : 0)
  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_digit_t;

  // Booth digits needed for an unsigned N-bit multiplier (zero-extended
  // to an even length with at least one leading zero).
  function automatic int booth_digits(input int n);
    return n / 2 + 1;
  endfunction

  // Number of pipeline cycles from operands to product:
  // Booth encoder 1, partial products 1, adder tree 4, SD-to-binary 2.
  localparam int unsigned TREE_STAGES = 4;
  localparam int unsigned LATENCY     = 1 + 1 + TREE_STAGES + 2;

endpackage
