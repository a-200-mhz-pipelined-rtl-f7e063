// tb_mvl_multiplier_4x4: exhaustive test of the multiplier built at the
// size of the 4 x 4-bit prototype (N = 4).
//
// All 256 operand pairs are applied back to back, one per cycle. Each
// product is compared with a*b, and it must appear exactly 8 cycles after
// its operands, the same latency as the full-size design.
module tb_mvl_multiplier_4x4;
  import sd_pkg::*;
  localparam int unsigned N = 4;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [N-1:0] a = '0, b = '0;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0, cycle = 0, received = 0;
  logic [2*N-1:0] expq [$];
  int tq [$];

  mvl_multiplier #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                               .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      received++;
      checks++;
      if (expq.size() == 0) failures++;
      else begin
        logic [2*N-1:0] e;
        int t;
        e = expq.pop_front();
        t = tq.pop_front();
        if (p != e || cycle - t != int'(LATENCY)) begin
          failures++;
          $display("FAIL product %0d: got %0d expected %0d after %0d cycles", received, p, e, cycle - t);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a <= N'(x); b <= N'(y); in_valid <= 1'b1;
        @(negedge clk);
        expq.push_back((2*N)'(x * y));
        tq.push_back(cycle);
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (received != 256) begin
      failures++;
      $display("FAIL received %0d products", received);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
