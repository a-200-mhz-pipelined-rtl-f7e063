// tb_mvcm_sdfa: self-checking test of the current-level SD full adder model.
//
// Every pair of input digits in {-1, 0, +1}, applied as complementary
// current pairs ((d+1), (1-d)) I0, is combined with both values of e_in.
// After the settling delay the carry and intermediate-sum currents must be
// the current pairs of the digits given by the SD carry rule, each pair
// must add up to 2 I0, and e_out must report z >= 1.
module tb_mvcm_sdfa;
  localparam int TD = 3;

  real  ia, iap, ib, ibp, ic, icp, iw, iwp;
  logic e_in, e_out;
  int   checks = 0, failures = 0;

  mvcm_sdfa #(.TD(TD)) dut (.ia(ia), .iap(iap), .ib(ib), .ibp(ibp), .e_in(e_in),
                            .e_out(e_out), .ic(ic), .icp(icp), .iw(iw), .iwp(iwp));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int da = -1; da <= 1; da++)
      for (int db = -1; db <= 1; db++)
        for (int e = 0; e <= 1; e++) begin
          int z, ec, ew;
          ia = real'(da + 1); iap = real'(1 - da);
          ib = real'(db + 1); ibp = real'(1 - db);
          e_in = e[0];
          #(TD + 2);
          z = da + db;
          case (z)
            2:  begin ec = 1;  ew = 0;  end
            1:  begin ec = e[0] ? 1 : 0;  ew = e[0] ? -1 : 1; end
            0:  begin ec = 0;  ew = 0;  end
            -1: begin ec = e[0] ? 0 : -1; ew = e[0] ? -1 : 1; end
            default: begin ec = -1; ew = 0; end
          endcase
          checks++;
          if (ic != real'(ec + 1) || iw != real'(ew + 1) || icp != real'(1 - ec) || iwp != real'(1 - ew)) begin
            failures++;
            $display("FAIL a=%0d b=%0d e=%0d: c=(%0.1f,%0.1f) w=(%0.1f,%0.1f)", da, db, e, ic, icp, iw, iwp);
          end
          checks++;
          if (ic + icp != 2.0 || iw + iwp != 2.0 || e_out != (z >= 1)) begin
            failures++;
            $display("FAIL a=%0d b=%0d: complement or e_out wrong", da, db);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
