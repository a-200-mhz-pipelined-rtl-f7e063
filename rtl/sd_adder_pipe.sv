// sd_adder_pipe: W-digit radix-2 SD adder built from latched cells (lsdfa),
// one level of the pipelined adder tree.
//
// S = A + B (mod 2^W), digits in {-1, 0, +1}, exactly as sd_adder, but the
// comparator outputs of every digit are stored at the rising edge of clk.
// A and B are sampled at an edge; S is valid one cycle later. S is formed
// after the register by the switched current sources and the wired sum
// s_i = w_i + c_{i-1}, so the combinational path of the next level starts
// with those and ends at its own comparators.
module sd_adder_pipe
  import sd_pkg::*;
#(
  parameter int unsigned W = 108
) (
  input  logic              clk,
  input  sd_digit_t [W-1:0] a,
  input  sd_digit_t [W-1:0] b,
  output sd_digit_t [W-1:0] s
);
  sd_digit_t [W-1:0] c, w;
  logic      [W:0]   e;

  assign e[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_digit
    lsdfa u_fa (.clk(clk), .a(a[i]), .b(b[i]), .e_in(e[i]), .e_out(e[i+1]),
                .c(c[i]), .w(w[i]));
    if (i == 0) begin : g_lsd
      assign s[i] = w[i];
    end else begin : g_dig
      assign s[i] = sd_digit_t'(w[i] + c[i-1]);
    end
  end

endmodule
