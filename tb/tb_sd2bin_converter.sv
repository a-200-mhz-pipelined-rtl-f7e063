// tb_sd2bin_converter: self-checking test of the SD-to-binary converter,
// W = 108.
//
// A random SD word enters every cycle; exactly two cycles later p_q must be
// its value modulo 2^W, computed by the test as a digit-by-digit sum. The
// test counts words whose low half produces a borrow and requires both
// cases to occur.
module tb_sd2bin_converter;
  import sd_pkg::*;
  localparam int unsigned W = 108;

  logic clk = 1'b0;
  sd_digit_t [W-1:0] s;
  logic [W-1:0] p_q;
  logic [W-1:0] expq [$];
  int checks = 0, failures = 0, borrows = 0, no_borrows = 0;

  sd2bin_converter #(.W(W)) dut (.clk(clk), .s(s), .p_q(p_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [W-1:0] v, lo;
      v = '0; lo = '0;
      for (int i = 0; i < int'(W); i++) begin
        int d;
        d = (n == 1) ? -1 : (n == 2) ? 1 : int'($urandom_range(2)) - 1;
        s[i] = sd_digit_t'(d);
        if (d == 1)  v = v + (W'(1) << i);
        if (d == -1) v = v - (W'(1) << i);
        if (i == int'(W/2) - 1) lo = v;
      end
      // signed value of the low half below zero means a borrow into the high half
      if (lo[W-1]) borrows++; else no_borrows++;
      expq.push_back(v);
      @(posedge clk); #1;
      if (n >= 1) begin
        checks++;
        if (p_q != expq.pop_front()) begin
          failures++;
          $display("FAIL word %0d", n - 1);
        end
      end
    end
    checks++;
    if (borrows == 0 || no_borrows == 0) begin
      failures++;
      $display("FAIL borrow cases not both exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
