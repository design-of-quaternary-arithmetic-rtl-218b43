// gf4_add: adder in the Galois field GF(4).
//
// GF(4) has characteristic 2, so addition of the two-bit codes is a
// carry-free bitwise XOR: two XOR gates, logic depth one.
//   A1 = x1 ^ y1,  A2 = x2 ^ y2
// As in the original circuit. Combinational, no clock.
module gf4_add
  import qau_pkg::qdigit_t;
(
  input  qdigit_t x,
  input  qdigit_t y,
  output qdigit_t a
);
  always_comb begin
    a[1] = x[1] ^ y[1];
    a[0] = x[0] ^ y[0];
  end
endmodule
