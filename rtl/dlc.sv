// dlc: down literal circuit (behavioural model of an analog cell).
//
// The cell is one CMOS inverter whose pMOS and nMOS threshold voltages are
// shifted so that it switches at a chosen input voltage: it turns a
// multi-level voltage into a binary signal that is high while the input is
// below the threshold and low above it. This is a behavioural model, not
// synthesizable logic: the input is a real-valued voltage, the output is
// ideal (no transfer-curve slope, no delay).
//
// The switching threshold is taken as the middle of the input window in
// which both transistors conduct, from VTN (nMOS turns on) to VDD - |VTP|
// (pMOS turns off). The threshold pairs used in the quaternary-to-binary
// converter, D1 (-2.2 V, 0.2 V), D2 (-1.2 V, 1.2 V) and D3 (-0.2 V, 2.2 V),
// are the original design's; they give 0.5, 1.5 and 2.5 V on a 3 V supply,
// midway between the logic levels. The midpoint rule is this model's own.
module dlc
  import qau_pkg::*;
#(
  parameter real VTN = 0.2,    // nMOS threshold voltage, V
  parameter real VTP = -2.2,   // pMOS threshold voltage, V (negative)
  parameter real VDD = VDD_DEFAULT  // supply, V
) (
  input  real  vin,
  output logic dout
);
  localparam real VTH = (VTN + VDD - ((VTP < 0.0) ? -VTP : VTP)) / 2.0;

  always_comb dout = (vin < VTH);
endmodule
