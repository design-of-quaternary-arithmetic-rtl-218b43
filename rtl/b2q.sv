// b2q: binary-to-quaternary converter (behavioural mixed-signal model).
//
// In the circuit, MSB and LSB each drive a down literal circuit (D1 type)
// whose output drives one of two CMOS inverters; the two inverter outputs
// are tied together and the ratioed fight between them settles at one of
// four voltages. The D1 cells and the tied inverters are modelled here; the
// device sizes that set the ratio are not available, so the output is the
// ideal level (2*MSB + LSB) * VDD / 3, i.e. 0, 1, 2 or 3 V on a 3 V supply.
// The binary inputs are applied to the D1 cells as 0 V or VDD. Not
// synthesizable: the output is a real-valued voltage. No clock, no delay.
module b2q
  import qau_pkg::*;
#(
  parameter real VDD = VDD_DEFAULT
) (
  input  logic msb,
  input  logic lsb,
  output real  qout
);
  real  msb_v, lsb_v;
  logic msb_n, lsb_n;    // outputs of the two D1 cells (inverted inputs)

  always_comb begin
    msb_v = msb ? VDD : 0.0;
    lsb_v = lsb ? VDD : 0.0;
  end

  dlc #(.VTN(0.2), .VTP(-2.2), .VDD(VDD)) u_d1_msb (.vin(msb_v), .dout(msb_n));
  dlc #(.VTN(0.2), .VTP(-2.2), .VDD(VDD)) u_d1_lsb (.vin(lsb_v), .dout(lsb_n));

  // Tied inverter pair: the MSB inverter carries twice the weight.
  always_comb
    qout = (2.0 * (msb_n ? 0.0 : 1.0) + (lsb_n ? 0.0 : 1.0)) * VDD / 3.0;
endmodule
