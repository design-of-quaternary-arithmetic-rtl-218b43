// mod4_mul: modulo-4 multiplier on two quaternary digits in binary form.
//
// Of the four-bit product of X = {x1,x2} and Y = {y1,y2} only the two low
// bits survive modulo 4:
//   M2 = x2 & y2                        (LSB)
//   M1 = (x1 & y2) ^ (x2 & y1)          (MSB; the x1&y1 term has weight 4)
// Four gates, logic depth two, as in the original circuit. Combinational.
module mod4_mul
  import qau_pkg::qdigit_t;
(
  input  qdigit_t x,
  input  qdigit_t y,
  output qdigit_t m
);
  always_comb begin
    m[0] = x[0] & y[0];
    m[1] = (x[1] & y[0]) ^ (x[0] & y[1]);
  end
endmodule
