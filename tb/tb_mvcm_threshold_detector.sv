// tb_mvcm_threshold_detector: self-checking test of the dual-rail threshold
// detector model.
//
// The input pair carries the five levels of an SD linear sum, (z+2, 2-z) I0
// for z = -2..+2, and the threshold pair each of the four levels
// (0.5..3.5, 3.5..0.5) I0 used by the SD full adder, then whole-unit
// thresholds 0..4 I0 so that the input also meets the threshold exactly. After the settling
// delay iy must be IM when ix >= it and 0 otherwise, and iy + iyp must
// equal IM. Before the delay has passed the output must not have changed.
module tb_mvcm_threshold_detector;
  localparam real IM = 2.0;
  localparam int  TD = 3;

  real ix, ixp, it, itp, iy, iyp;
  int checks = 0, failures = 0;

  mvcm_threshold_detector #(.IM(IM), .TD(TD)) dut (
    .ix(ix), .ixp(ixp), .it(it), .itp(itp), .iy(iy), .iyp(iyp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real prev;
    ix = 0.0; ixp = 4.0; it = 3.5; itp = 0.5;
    #(4 * TD);
    // half-unit thresholds of the SD adder, then whole-unit thresholds,
    // where ix = it must count as "at or above the threshold" (eq. 1)
    for (int t = 0; t < 9; t++)
      for (int z = -2; z <= 2; z++) begin
        prev = iy;
        ix  = real'(z + 2);  ixp = 4.0 - ix;
        it  = (t < 4) ? 0.5 + real'(t) : real'(t - 4); itp = 4.0 - it;
        #1;
        checks++;
        if (iy != prev) begin
          failures++;
          $display("FAIL z=%0d T=%0.1f: output moved before the delay", z, it);
        end
        #(TD + 1);
        checks++;
        if (iy != ((ix >= it) ? IM : 0.0) || iy + iyp != IM) begin
          failures++;
          $display("FAIL z=%0d T=%0.1f: iy=%0.2f iyp=%0.2f", z, it, iy, iyp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
