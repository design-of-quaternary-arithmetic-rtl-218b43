// q2b: quaternary-to-binary converter (behavioural mixed-signal model).
//
// Three down literal circuits look at the input voltage with thresholds of
// 0.5 V (D1), 1.5 V (D2) and 2.5 V (D3). D2 gives the complement of the MSB
// directly. The complement of the LSB comes from a 2:1 multiplexer that
// passes D1 while D2 is high (input below 1.5 V) and D3 otherwise. Two
// inverters then give B1 (MSB) and B0 (LSB), so 0, 1, 2, 3 V decode to
// 00, 01, 10, 11. Cells, thresholds and wiring follow the original
// converter; the mux polarity is the one that decodes correctly. The DLCs
// are behavioural (real-valued input); the mux and inverters are logic.
// Combinational, no clock.
module q2b
  import qau_pkg::*;
#(
  parameter real VDD = VDD_DEFAULT
) (
  input  real     qin,
  output qdigit_t b      // b[1] = B1 (MSB), b[0] = B0 (LSB)
);
  logic d1_out, d2_out, d3_out;
  logic b0_n, b1_n;

  dlc #(.VTN(0.2), .VTP(-2.2), .VDD(VDD)) u_d1 (.vin(qin), .dout(d1_out));
  dlc #(.VTN(1.2), .VTP(-1.2), .VDD(VDD)) u_d2 (.vin(qin), .dout(d2_out));
  dlc #(.VTN(2.2), .VTP(-0.2), .VDD(VDD)) u_d3 (.vin(qin), .dout(d3_out));

  always_comb begin
    b1_n = d2_out;
    b0_n = d2_out ? d1_out : d3_out;   // 2:1 mux, select from D2
    b[1] = ~b1_n;
    b[0] = ~b0_n;
  end
endmodule
