// tb_sdfa: exhaustive self-checking test of one SD full adder cell.
//
// Every pair of digits a, b in {-1, 0, +1} is applied with both values of
// e_in. The expected carry and intermediate sum come from the carry rule
// written out case by case; the test also checks 2c + w = a + b and the
// e_out flag (z >= 1).
module tb_sdfa;
  import sd_pkg::*;

  sd_digit_t a, b, c, w;
  logic      e_in, e_out;
  int        checks = 0, failures = 0;

  sdfa dut (.a(a), .b(b), .e_in(e_in), .e_out(e_out), .c(c), .w(w));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = -1; ia <= 1; ia++)
      for (int ib = -1; ib <= 1; ib++)
        for (int ie = 0; ie <= 1; ie++) begin
          int z, ec, ew;
          a = sd_digit_t'(ia); b = sd_digit_t'(ib); e_in = ie[0];
          #1;
          z = ia + ib;
          case (z)
            2:  begin ec = 1;  ew = 0;  end
            1:  if (ie == 1) begin ec = 1; ew = -1; end else begin ec = 0; ew = 1; end
            0:  begin ec = 0;  ew = 0;  end
            -1: if (ie == 1) begin ec = 0; ew = -1; end else begin ec = -1; ew = 1; end
            default: begin ec = -1; ew = 0; end
          endcase
          checks++;
          if (int'(c) != ec || int'(w) != ew) begin
            failures++;
            $display("FAIL a=%0d b=%0d e=%0d: c=%0d w=%0d, expected %0d %0d", ia, ib, ie, c, w, ec, ew);
          end
          checks++;
          if (2*int'(c) + int'(w) != z) begin
            failures++;
            $display("FAIL a=%0d b=%0d e=%0d: 2c+w != z", ia, ib, ie);
          end
          checks++;
          if (e_out != (z >= 1)) begin
            failures++;
            $display("FAIL a=%0d b=%0d: e_out=%0b", ia, ib, e_out);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
