// tb_lsdfa: self-checking test of the latched SD full adder cell.
//
// Random digits a, b are applied before each rising edge. The test checks
// that the outputs do not follow the inputs before the edge and that one
// cycle later c, w and e_out match the carry rule for the stored sum,
// for both values of the neighbour flag e_in.
module tb_lsdfa;
  import sd_pkg::*;

  logic      clk = 1'b0;
  sd_digit_t a, b, c, w;
  logic      e_in, e_out;
  int        checks = 0, failures = 0;

  lsdfa dut (.clk(clk), .a(a), .b(b), .e_in(e_in), .e_out(e_out), .c(c), .w(w));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_cw(input int z, input bit e, output int ec, output int ew);
    case (z)
      2:  begin ec = 1;  ew = 0;  end
      1:  if (e) begin ec = 1; ew = -1; end else begin ec = 0; ew = 1; end
      0:  begin ec = 0;  ew = 0;  end
      -1: if (e) begin ec = 0; ew = -1; end else begin ec = -1; ew = 1; end
      default: begin ec = -1; ew = 0; end
    endcase
  endfunction

  initial begin
    int za, zb, zold, ec, ew;
    a = '0; b = '0; e_in = 1'b0;
    @(posedge clk); #1;
    zold = 0;
    for (int n = 0; n < 400; n++) begin
      za = int'($urandom_range(2)) - 1;
      zb = int'($urandom_range(2)) - 1;
      a = sd_digit_t'(za); b = sd_digit_t'(zb);
      for (int ie = 0; ie <= 1; ie++) begin
        e_in = ie[0];
        #1;
        // outputs still reflect the previously stored sum
        expect_cw(zold, e_in, ec, ew);
        checks++;
        if (int'(c) != ec || int'(w) != ew || e_out != (zold >= 1)) begin
          failures++;
          $display("FAIL n=%0d before edge: z=%0d e=%0b c=%0d w=%0d", n, zold, e_in, c, w);
        end
      end
      @(posedge clk); #1;
      zold = za + zb;
      for (int ie = 0; ie <= 1; ie++) begin
        e_in = ie[0];
        #1;
        expect_cw(zold, e_in, ec, ew);
        checks++;
        if (int'(c) != ec || int'(w) != ew || e_out != (zold >= 1)) begin
          failures++;
          $display("FAIL n=%0d after edge: z=%0d e=%0b c=%0d w=%0d", n, zold, e_in, c, w);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
