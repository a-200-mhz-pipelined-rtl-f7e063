// mvcm_latched_threshold_detector: behavioural model (not synthesizable
// logic) of the latched dual-rail threshold detector (Fig. 8), the
// pipelined form of mvcm_threshold_detector.
//
// Two CMOS pass gates sit between the comparators and the source-coupled
// switched current source. The comparator outputs v = (ix >= it) and
// vp = (ixp > itp) are binary voltages, so the pass gates can hold them
// dynamically on the gate capacitance of the current switch. In this model
// the pass gates sample at the rising edge of clk and hold until the next
// one; the output currents iy + iyp = IM follow the held values.
//
// Currents are real numbers in units of I0. Ports and function follow the
// original circuit; edge sampling (rather than a level-sensitive pass gate with a
// second clock phase) is this model's own simplification.
module mvcm_latched_threshold_detector #(
  parameter real IM = 2.0
) (
  input  logic clk,
  input  real  ix,
  input  real  ixp,
  input  real  it,
  input  real  itp,
  output real  iy,
  output real  iyp
);
  logic v_q, vp_q;

  initial begin
    v_q  = 1'b0;
    vp_q = 1'b1;
  end

  always @(posedge clk) begin
    v_q  <= (ix >= it);
    vp_q <= (ixp > itp);
  end

  always_comb begin
    if (v_q && !vp_q)      begin iy = IM;       iyp = 0.0;      end
    else if (!v_q && vp_q) begin iy = 0.0;      iyp = IM;       end
    else                   begin iy = IM / 2.0; iyp = IM / 2.0; end
  end

endmodule
