// tb_mvl_multiplier: end-to-end self-checking test of the 54 x 54-bit
// pipelined multiplier at its default size.
//
// Operand pairs (corner values, then random ones) are applied mostly back
// to back, with occasional idle cycles. Every product is compared with a*b
// computed in 108-bit arithmetic by the test, and out_valid must rise
// exactly 8 cycles after the matching in_valid. The test also counts how
// often the design's mechanisms occur and fails if one never does: each
// Booth digit value, the two encodings the SD carry rule chooses between
// (z = +1 and z = -1, with and without the right neighbour at z >= 1) in
// the last tree level, a borrow between the converter's halves, and
// back-to-back operations (one product per cycle).
module tb_mvl_multiplier;
  import sd_pkg::*;
  localparam int unsigned N   = 54;
  localparam int unsigned W   = 2 * N;
  localparam int unsigned NPP = booth_digits(N);
  localparam int          NOPS = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [N-1:0] a = '0, b = '0;
  logic [W-1:0] p;

  mvl_multiplier dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                      .out_valid(out_valid), .p(p));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int unsigned issued = 0, received = 0;
  logic [W-1:0] expq [$];
  int           tq   [$];

  // mechanism counters
  int booth_seen [5];
  int rule_pos_e = 0, rule_pos_ne = 0, rule_neg_e = 0, rule_neg_ne = 0;
  int borrow_seen = 0, back_to_back = 0;

  initial begin : watchdog
    repeat (NOPS * 3 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // probes into the last tree level and the converter
  for (genvar i = 1; i < int'(W); i++) begin : g_probe
    always @(posedge clk) begin
      td_code_t code;
      code = dut.u_tree.u_st4.g_digit[i].u_fa.code_q;
      if (code.ge_p05 && !code.ge_p15) begin
        if (dut.u_tree.u_st4.g_digit[i].u_fa.e_in) rule_pos_e++; else rule_pos_ne++;
      end
      if (code.ge_m15 && !code.ge_m05) begin
        if (dut.u_tree.u_st4.g_digit[i].u_fa.e_in) rule_neg_e++; else rule_neg_ne++;
      end
    end
  end
  always @(posedge clk) begin
    if (dut.u_conv.borrow_q) borrow_seen++;
    for (int j = 0; j < int'(NPP); j++) begin
      int d;
      d = dut.digit_q[j].two ? 2 : (dut.digit_q[j].one ? 1 : 0);
      if (dut.digit_q[j].neg) d = -d;
      booth_seen[d + 2]++;
    end
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [W-1:0] e;
      int t;
      received++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid");
      end else begin
        e = expq.pop_front();
        t = tq.pop_front();
        checks++;
        if (p != e) begin
          failures++;
          $display("FAIL product %0d: got %h expected %h", received, p, e);
        end
        checks++;
        if (cycle - t != int'(LATENCY)) begin
          failures++;
          $display("FAIL product %0d: latency %0d cycles", received, cycle - t);
        end
      end
    end
  end

  function automatic logic [N-1:0] pick(input int n, input bit which);
    case (n)
      0: return '0;
      1: return '1;
      2: return which ? '1 : '0;
      3: return {1'b1, {(N-1){1'b0}}};
      4: return {(N/2){2'b10}};
      5: return {(N/2){which ? 2'b01 : 2'b10}};
      6: return N'(1);
      default: return N'({$urandom, $urandom});
    endcase
  endfunction

  initial begin
    logic prev_valid;
    prev_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NOPS; n++) begin
      // an idle cycle now and then
      if ($urandom_range(9) == 0) begin
        in_valid <= 1'b0;
        prev_valid = 1'b0;
        @(posedge clk);
      end
      a <= pick(n, 0);
      b <= pick(n, 1);
      in_valid <= 1'b1;
      #0;
      @(negedge clk);
      expq.push_back(W'(a) * W'(b));
      tq.push_back(cycle);
      issued++;
      if (prev_valid) back_to_back++;
      prev_valid = 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (LATENCY + 4) @(posedge clk);

    checks++;
    if (received != issued) begin
      failures++;
      $display("FAIL issued %0d products, received %0d", issued, received);
    end
    for (int d = 0; d < 5; d++) begin
      checks++;
      if (booth_seen[d] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never used", d - 2);
      end
    end
    checks++;
    if (rule_pos_e == 0 || rule_pos_ne == 0 || rule_neg_e == 0 || rule_neg_ne == 0) begin
      failures++;
      $display("FAIL carry rule case missing: %0d %0d %0d %0d", rule_pos_e, rule_pos_ne, rule_neg_e, rule_neg_ne);
    end
    checks++;
    if (borrow_seen == 0) begin
      failures++;
      $display("FAIL no borrow between converter halves");
    end
    checks++;
    if (back_to_back == 0) begin
      failures++;
      $display("FAIL no back-to-back operations");
    end
    $display("mechanisms: booth -2..2 = %0d %0d %0d %0d %0d, rule z=+1 e/!e = %0d/%0d, z=-1 e/!e = %0d/%0d, borrows = %0d, back-to-back = %0d",
             booth_seen[0], booth_seen[1], booth_seen[2], booth_seen[3], booth_seen[4],
             rule_pos_e, rule_pos_ne, rule_neg_e, rule_neg_ne, borrow_seen, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
