// tb_mvcm_latched_threshold_detector: self-checking test of the latched
// dual-rail threshold detector model.
//
// Random five-valued inputs and four-valued thresholds (in units of I0) are
// applied each cycle. The output pair must keep the previous decision until
// the rising clock edge and then show iy = IM if ix >= it (else 0), with
// iy + iyp = IM.
module tb_mvcm_latched_threshold_detector;
  localparam real IM = 2.0;

  logic clk = 1'b0;
  real ix, ixp, it, itp, iy, iyp;
  int checks = 0, failures = 0;

  mvcm_latched_threshold_detector #(.IM(IM)) dut (
    .clk(clk), .ix(ix), .ixp(ixp), .it(it), .itp(itp), .iy(iy), .iyp(iyp));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exp_now, exp_next;
    ix = 0.0; ixp = 4.0; it = 0.5; itp = 3.5;
    @(posedge clk); #1;
    exp_now = 0.0;
    for (int n = 0; n < 500; n++) begin
      ix = real'($urandom_range(4));  ixp = 4.0 - ix;
      it = 0.5 + real'($urandom_range(3)); itp = 4.0 - it;
      exp_next = (ix >= it) ? IM : 0.0;
      #1;
      checks++;
      if (iy != exp_now) begin
        failures++;
        $display("FAIL n=%0d: output changed before the edge", n);
      end
      @(negedge clk); #1;
      checks++;
      if (iy != exp_now) begin
        failures++;
        $display("FAIL n=%0d: output changed in mid-cycle", n);
      end
      @(posedge clk); #1;
      checks++;
      if (iy != exp_next || iy + iyp != IM) begin
        failures++;
        $display("FAIL n=%0d: iy=%0.2f expected %0.2f", n, iy, exp_next);
      end
      exp_now = exp_next;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
