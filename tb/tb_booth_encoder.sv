// tb_booth_encoder: self-checking test of the radix-4 Booth encoder, N = 54.
//
// Random and corner multipliers are applied one per cycle. One cycle later
// the test checks that sum_j d_j * 4^j equals the multiplier, that no digit
// has both "one" and "two" set, that the top digit is not negative and that
// the multiplicand comes out unchanged. It also counts each digit value.
module tb_booth_encoder;
  import sd_pkg::*;
  localparam int unsigned N   = 54;
  localparam int unsigned NPP = booth_digits(N);

  logic clk = 1'b0;
  logic [N-1:0] a, b, a_q;
  booth_digit_t [NPP-1:0] digit_q;
  int checks = 0, failures = 0;
  int seen [5];

  booth_encoder #(.N(N)) dut (.clk(clk), .a(a), .b(b), .a_q(a_q), .digit_q(digit_q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rand_word(input int n);
    case (n)
      0: return '0;
      1: return '1;
      2: return {1'b1, {(N-1){1'b0}}};
      3: return {(N/2){2'b10}};
      4: return {(N/2){2'b01}};
      default: return N'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    logic [N-1:0] a_prev, b_prev;
    for (int n = 0; n < 3000; n++) begin
      a = rand_word(n + 1);
      b = rand_word(n);
      @(posedge clk); #1;
      a_prev = a; b_prev = b;
      begin
        logic signed [2*N+3:0] acc;
        acc = '0;
        for (int j = NPP - 1; j >= 0; j--) begin
          int d;
          d = digit_q[j].two ? 2 : (digit_q[j].one ? 1 : 0);
          if (digit_q[j].neg) d = -d;
          seen[d + 2]++;
          acc = acc * 4 + d;
          if (digit_q[j].two && digit_q[j].one) begin
            failures++;
            $display("FAIL n=%0d digit %0d has one and two", n, j);
          end
        end
        checks++;
        if (acc != (2*N+4)'(b_prev)) begin
          failures++;
          $display("FAIL n=%0d: Booth digits give %0d for %0d", n, acc, b_prev);
        end
        checks++;
        if (digit_q[NPP-1].neg || a_q != a_prev) begin
          failures++;
          $display("FAIL n=%0d: top digit negative or multiplicand changed", n);
        end
      end
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (seen[d] == 0) begin
        failures++;
        $display("FAIL digit value %0d never produced", d - 2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
