// tb_sd_adder: self-checking test of the W-digit SD adder at W = 108.
//
// Random SD operands (including all +1 and all -1 words) are added. The
// reference is the value of each SD word, computed as (positive digits) -
// (negative digits) in W-bit binary: the sum must equal A + B modulo 2^W
// and every result digit must be -1, 0 or +1.
module tb_sd_adder;
  import sd_pkg::*;
  localparam int unsigned W = 108;

  sd_digit_t [W-1:0] a, b, s;
  int checks = 0, failures = 0;

  sd_adder #(.W(W)) dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #1000000;
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

  function automatic sd_digit_t [W-1:0] rand_sd(input int mode);
    sd_digit_t [W-1:0] x;
    for (int i = 0; i < int'(W); i++)
      case (mode)
        1: x[i] = 2'sd1;
        2: x[i] = -2'sd1;
        default: x[i] = sd_digit_t'(int'($urandom_range(2)) - 1);
      endcase
    return x;
  endfunction

  initial begin
    for (int n = 0; n < 2000; n++) begin
      a = rand_sd(n < 4 ? n % 3 : 0);
      b = rand_sd(n < 4 ? (n / 2) + 1 : 0);
      #1;
      checks++;
      if (sd_value(s) != sd_value(a) + sd_value(b)) begin
        failures++;
        $display("FAIL n=%0d: value mismatch", n);
      end
      for (int i = 0; i < int'(W); i++)
        if (s[i] == 2'sb10) begin
          failures++;
          $display("FAIL n=%0d: digit %0d out of range", n, i);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
