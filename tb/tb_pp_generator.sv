// tb_pp_generator: self-checking test of the partial product generator,
// N = 54, W = 108.
//
// Random multiplicands and Booth digits in {-2..+2} are applied one per
// cycle. One cycle later the value of every SD partial product must equal
// d_j * a * 4^j modulo 2^W, worked out in binary by the test.
module tb_pp_generator;
  import sd_pkg::*;
  localparam int unsigned N   = 54;
  localparam int unsigned NPP = booth_digits(N);
  localparam int unsigned W   = 2 * N;

  logic clk = 1'b0;
  logic [N-1:0] a;
  booth_digit_t [NPP-1:0] digit;
  sd_digit_t [NPP-1:0][W-1:0] pp_q;
  int checks = 0, failures = 0;
  int dval [NPP];

  pp_generator #(.N(N)) dut (.clk(clk), .a(a), .digit(digit), .pp_q(pp_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] sd_value(input sd_digit_t [W-1:0] x);
    logic [W-1:0] p, m;
    for (int i = 0; i < int'(W); i++) begin
      p[i] = (x[i] == 2'sd1);
      m[i] = (x[i] == -2'sd1);
    end
    return p - m;
  endfunction

  initial begin
    for (int n = 0; n < 1000; n++) begin
      logic [W-1:0] expv;
      a = (n == 0) ? '1 : N'({$urandom, $urandom});
      for (int j = 0; j < int'(NPP); j++) begin
        dval[j] = int'($urandom_range(4)) - 2;
        digit[j].neg = (dval[j] < 0);
        digit[j].two = (dval[j] == 2 || dval[j] == -2);
        digit[j].one = (dval[j] == 1 || dval[j] == -1);
      end
      @(posedge clk); #1;
      for (int j = 0; j < int'(NPP); j++) begin
        expv = W'(a) << (2*j);
        if (dval[j] == 2 || dval[j] == -2) expv = expv << 1;
        if (dval[j] == 0) expv = '0;
        if (dval[j] < 0)  expv = -expv;
        checks++;
        if (sd_value(pp_q[j]) != expv) begin
          failures++;
          $display("FAIL n=%0d j=%0d d=%0d", n, j, dval[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
