// mvcm_sdfa: behavioural model (not synthesizable logic) of the current-mode
// SD full adder cell (Figs. 6 and 7) at the level of its currents.
//
// Every digit is a pair of complementary currents in units of I0 (digit d
// -> ((d+1), (1-d)) I0). The inputs a and b are joined into the five-valued
// linear sum z = a + b, z' = a' + b' (0..4 I0). Four dual-rail threshold
// detectors (mvcm_threshold_detector) compare it with the thresholds
// 0.5, 1.5, 2.5, 3.5 I0 (z > -1.5, -0.5, +0.5, +1.5). Their outputs switch
// the carry and intermediate-sum current pairs (c, c') and (w, w') as the
// SD carry rule requires, steered by the binary control e_in = (z_{i-1} >= 1)
// of the right neighbour; e_out is this cell's z >= 1 decision.
//
// The carry and sum currents settle TD time units after the inputs. The
// transistor-level switches of Fig. 7(b),(c) are replaced by their current
// function; the logic function is the same as that of the synthesizable
// sdfa cell.
module mvcm_sdfa #(
  parameter int TD = 3
) (
  input  real  ia,
  input  real  iap,
  input  real  ib,
  input  real  ibp,
  input  logic e_in,
  output logic e_out,
  output real  ic,
  output real  icp,
  output real  iw,
  output real  iwp
);
  real iz, izp;
  real it  [4];
  real itp [4];
  real iy  [4];
  real iyp [4];

  // linear sum by wiring
  always_comb begin
    iz  = ia + ib;
    izp = iap + ibp;
  end

  for (genvar k = 0; k < 4; k++) begin : g_td
    assign it[k]  = 0.5 + real'(k);
    assign itp[k] = 4.0 - it[k];
    mvcm_threshold_detector #(.IM(1.0), .TD(TD)) u_td (
      .ix(iz), .ixp(izp), .it(it[k]), .itp(itp[k]), .iy(iy[k]), .iyp(iyp[k]));
  end

  // detector k on (its switched current on the true rail): z > k - 1.5
  logic [3:0] v;
  always_comb
    for (int k = 0; k < 4; k++) v[k] = (iy[k] > iyp[k]);

  assign e_out = v[2];

  // switched current sources: (c, w) as digits, then as current pairs
  always_comb begin
    int c, w;
    if (v[3])      begin c = 1;  w = 0;  end
    else if (v[2]) begin c = e_in ? 1 : 0;  w = e_in ? -1 : 1; end
    else if (v[1]) begin c = 0;  w = 0;  end
    else if (v[0]) begin c = e_in ? 0 : -1; w = e_in ? -1 : 1; end
    else           begin c = -1; w = 0;  end
    ic  = real'(c + 1);  icp = real'(1 - c);
    iw  = real'(w + 1);  iwp = real'(1 - w);
  end

endmodule
