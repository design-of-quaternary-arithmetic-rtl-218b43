// gf4_mul_q: GF(4) multiplier working on quaternary voltages directly
// (behavioural mixed-signal model).
//
// The same three-multiplexer network as gf4_mul, but without any conversion
// to binary, which is how the original multiplier is drawn. Two muxes,
// selected by the Y voltage, choose among constant levels (0, 2, 3, 1 V)
// and (0, 3, 1, 2 V) to form 2*Y and 3*Y. The output mux, selected by the
// X voltage, passes 0 V (ground), Y itself, 2*Y or 3*Y. With levels of
// VDD/3 per digit this yields the GF(4) product as a voltage. Note that for
// X = 1 the Y input voltage is passed on as it is, including any offset
// from its nominal level. Mux constants and wiring follow the original;
// input k being chosen by select level k is this design's reading.
// Not synthesizable (real ports). Combinational.
module gf4_mul_q
  import qau_pkg::*;
#(
  parameter real VDD = VDD_DEFAULT
) (
  input  real x_v,
  input  real y_v,
  output real p_v
);
  localparam real L1 = VDD / 3.0;        // voltage of digit 1
  localparam real L2 = 2.0 * VDD / 3.0;  // voltage of digit 2
  localparam real L3 = VDD;              // voltage of digit 3

  real y_times2_v, y_times3_v;

  qmux4_v #(.VDD(VDD)) u_mul2 (
    .in0 (0.0), .in1 (L2), .in2 (L3), .in3 (L1), .sel (y_v), .out (y_times2_v)
  );

  qmux4_v #(.VDD(VDD)) u_mul3 (
    .in0 (0.0), .in1 (L3), .in2 (L1), .in3 (L2), .sel (y_v), .out (y_times3_v)
  );

  qmux4_v #(.VDD(VDD)) u_out (
    .in0 (0.0), .in1 (y_v), .in2 (y_times2_v), .in3 (y_times3_v),
    .sel (x_v), .out (p_v)
  );
endmodule
