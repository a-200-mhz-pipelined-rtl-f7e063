// tb_sd_adder_tree: self-checking test of the pipelined SD adder tree,
// 28 operands of 108 digits.
//
// A new set of random SD operands enters every cycle. Exactly four cycles
// later the tree's SD sum must have the value of the operands' sum modulo
// 2^W (worked out in binary by the test) and only legal digits; the test
// also checks that the sum is not ready a cycle early.
module tb_sd_adder_tree;
  import sd_pkg::*;
  localparam int unsigned NPP = 28;
  localparam int unsigned W   = 108;
  localparam int unsigned LAT = 4;

  logic clk = 1'b0;
  sd_digit_t [NPP-1:0][W-1:0] pp;
  sd_digit_t [W-1:0] sum;
  logic [W-1:0] expq [$];
  int checks = 0, failures = 0, early = 0;

  sd_adder_tree #(.NPP(NPP), .W(W)) dut (.clk(clk), .pp(pp), .sum(sum));

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
    localparam int NSETS = 600;
    for (int n = 0; n < NSETS + LAT; n++) begin
      logic [W-1:0] tot;
      tot = '0;
      for (int j = 0; j < int'(NPP); j++) begin
        for (int i = 0; i < int'(W); i++)
          pp[j][i] = (n == 1) ? 2'sd1 : (n == 2) ? -2'sd1 : sd_digit_t'(int'($urandom_range(2)) - 1);
        tot += sd_value(pp[j]);
      end
      expq.push_back(tot);
      @(posedge clk); #1;
      if (n >= int'(LAT) - 1) begin
        logic [W-1:0] e;
        e = expq.pop_front();
        checks++;
        if (sd_value(sum) != e) begin
          failures++;
          $display("FAIL set %0d: sum value mismatch", n - int'(LAT) + 1);
        end
        for (int i = 0; i < int'(W); i++)
          if (sum[i] == 2'sb10) failures++;
        // one cycle earlier the sum belonged to the set before
        if (expq.size() > 0 && sd_value(sum) == expq[0]) early++;
      end
    end
    checks++;
    if (early > 2) begin
      failures++;
      $display("FAIL sum appears a cycle early (%0d times)", early);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
