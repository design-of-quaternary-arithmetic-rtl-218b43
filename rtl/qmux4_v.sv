// qmux4_v: 4:1 multiplexer of quaternary voltages with a quaternary select
// (behavioural mixed-signal model).
//
// The select voltage is compared against the three down literal thresholds
// (D1 0.5 V, D2 1.5 V, D3 2.5 V on a 3 V supply). The resulting thermometer
// code picks input k for a select near level k: below 0.5 V in0, below
// 1.5 V in1, below 2.5 V in2, otherwise in3. The chosen input voltage is
// passed through unchanged, like an ideal transmission-gate switch. How the
// original decodes its quaternary select is not described; decoding it with
// the same DLC cells as the quaternary-to-binary converter is this design's
// choice. Not synthesizable (real ports). Combinational, no delay.
module qmux4_v
  import qau_pkg::*;
#(
  parameter real VDD = VDD_DEFAULT
) (
  input  real in0,
  input  real in1,
  input  real in2,
  input  real in3,
  input  real sel,
  output real out
);
  logic below_1, below_2, below_3;   // select below the level-1/2/3 thresholds

  dlc #(.VTN(0.2), .VTP(-2.2), .VDD(VDD)) u_d1 (.vin(sel), .dout(below_1));
  dlc #(.VTN(1.2), .VTP(-1.2), .VDD(VDD)) u_d2 (.vin(sel), .dout(below_2));
  dlc #(.VTN(2.2), .VTP(-0.2), .VDD(VDD)) u_d3 (.vin(sel), .dout(below_3));

  always_comb begin
    if (below_1)      out = in0;
    else if (below_2) out = in1;
    else if (below_3) out = in2;
    else              out = in3;
  end
endmodule
