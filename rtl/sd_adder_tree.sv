// sd_adder_tree: four-stage pipelined signed-digit adder tree (Fig. 9).
//
// Adds NPP partial products, each a W-digit SD number, into one W-digit SD
// number, modulo 2^W. Stage 1 adds four operands at a time: two
// combinational SD adders (sd_adder) feed a latched SD adder row
// (sd_adder_pipe). Stages 2 to 4 each add two operands with one latched row.
// So 28 partial products become 7, 4, 2 and 1 numbers. Missing operands
// (NPP below 32) are zero and cost nothing after synthesis.
//
// Timing: the latches of stage k sit between the comparators and the
// current sources of its cells, so the sum leaves the tree 4 cycles after
// the partial products enter; a new set may enter every cycle.
// The split "four inputs in stage 1, two in each later stage" follows the
// original design; how the four-input stage is built from two-input SD adders is
// this design's own reading.
module sd_adder_tree
  import sd_pkg::*;
#(
  parameter int unsigned NPP = 28,
  parameter int unsigned W   = 108
) (
  input  logic                          clk,
  input  sd_digit_t [NPP-1:0][W-1:0]    pp,
  output sd_digit_t [W-1:0]             sum
);
  localparam int unsigned MAXPP = 4 << (TREE_STAGES - 1);   // 32

  if (NPP > MAXPP || NPP < 1) begin : g_bad_size
    $error("sd_adder_tree: NPP must be between 1 and %0d", MAXPP);
  end

  sd_digit_t [MAXPP-1:0][W-1:0] op;
  always_comb begin
    op = '0;
    for (int j = 0; j < int'(NPP); j++) op[j] = pp[j];
  end

  // stage 1: four-input addition, 32 -> 8
  sd_digit_t [7:0][W-1:0] s1;
  for (genvar g = 0; g < 8; g++) begin : g_st1
    sd_digit_t [W-1:0] x0, x1;
    sd_adder #(.W(W)) u_a0 (.a(op[4*g+0]), .b(op[4*g+1]), .s(x0));
    sd_adder #(.W(W)) u_a1 (.a(op[4*g+2]), .b(op[4*g+3]), .s(x1));
    sd_adder_pipe #(.W(W)) u_p (.clk(clk), .a(x0), .b(x1), .s(s1[g]));
  end

  // stage 2: 8 -> 4
  sd_digit_t [3:0][W-1:0] s2;
  for (genvar g = 0; g < 4; g++) begin : g_st2
    sd_adder_pipe #(.W(W)) u_p (.clk(clk), .a(s1[2*g]), .b(s1[2*g+1]), .s(s2[g]));
  end

  // stage 3: 4 -> 2
  sd_digit_t [1:0][W-1:0] s3;
  for (genvar g = 0; g < 2; g++) begin : g_st3
    sd_adder_pipe #(.W(W)) u_p (.clk(clk), .a(s2[2*g]), .b(s2[2*g+1]), .s(s3[g]));
  end

  // stage 4: 2 -> 1
  sd_adder_pipe #(.W(W)) u_st4 (.clk(clk), .a(s3[0]), .b(s3[1]), .s(sum));

endmodule
