// mvcm_threshold_detector: behavioural model (not synthesizable logic) of
// the dual-rail source-coupled threshold detector (Fig. 4).
//
// Currents are real numbers in units of the unit current I0. The detector
// has a complementary input pair (ix, ixp) with ix + ixp = R - 1 and a
// complementary threshold pair (it, itp). Two comparators give the binary
// voltages v = (ix >= it) and vp = (ixp > itp), which are complements of each
// other for a legal input. They steer a source-coupled pair fed by one
// constant current source IM: iy = IM when v is high, else 0, and
// iy + iyp = IM always, because one of the two transistors always conducts.
//
// The comparison delay is modelled as a fixed delay of TD time units; the
// real delay falls with |ix - it| and is not modelled.
// Ports and function follow the original circuit; the delay value is this model's own.
module mvcm_threshold_detector #(
  parameter real IM    = 2.0,   // switched current, in I0
  parameter int  TD    = 3      // comparator + switch delay, time units
) (
  input  real ix,
  input  real ixp,
  input  real it,
  input  real itp,
  output real iy,
  output real iyp
);
  logic v, vp;

  always @(ix, it)   v  <= #(TD) (ix >= it);
  always @(ixp, itp) vp <= #(TD) (ixp > itp);

  // source-coupled pair: the side whose gate is high takes all of IM
  always_comb begin
    if (v && !vp)      begin iy = IM;       iyp = 0.0;      end
    else if (!v && vp) begin iy = 0.0;      iyp = IM;       end
    else               begin iy = IM / 2.0; iyp = IM / 2.0; end  // illegal input
  end

  initial begin
    v  = 1'b0;
    vp = 1'b1;
  end

endmodule
