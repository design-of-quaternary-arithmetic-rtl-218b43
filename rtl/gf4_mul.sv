// gf4_mul: multiplier in the Galois field GF(4), built from three 4:1 muxes.
//
// Two multiplexers with constant inputs, both selected by Y, form the
// products 2*Y (inputs 0, 2, 3, 1) and 3*Y (inputs 0, 3, 1, 2). The output
// multiplexer, selected by X, picks 0 (ground), Y, 2*Y or 3*Y. The result is
// the GF(4) product with 2 and 3 as the roots a and a^2 = a + 1 of
// x^2 + x + 1, so 2*2 = 3, 2*3 = 1 and 3*3 = 2. The mux structure and its
// constants follow the original circuit; which mux input a select value
// picks (input k for select k) is this design's reading of the drawing.
// The original switches quaternary voltages with no conversion; here the
// digits are in their two-bit code. Combinational, no clock.
module gf4_mul
  import qau_pkg::qdigit_t;
(
  input  qdigit_t x,
  input  qdigit_t y,
  output qdigit_t p
);
  qdigit_t y_times2, y_times3;

  qmux4 u_mul2 (
    .in0 (2'd0), .in1 (2'd2), .in2 (2'd3), .in3 (2'd1),
    .sel (y), .out (y_times2)
  );

  qmux4 u_mul3 (
    .in0 (2'd0), .in1 (2'd3), .in2 (2'd1), .in3 (2'd2),
    .sel (y), .out (y_times3)
  );

  qmux4 u_out (
    .in0 (2'd0), .in1 (y), .in2 (y_times2), .in3 (y_times3),
    .sel (x), .out (p)
  );
endmodule
