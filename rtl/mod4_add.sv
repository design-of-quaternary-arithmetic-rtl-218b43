// mod4_add: modulo-4 adder on two quaternary digits in binary form.
//
// The sum of digits X = {x1,x2} and Y = {y1,y2} modulo 4 is formed with four
// gates and a logic depth of two:
//   A2 = x2 ^ y2                  (LSB)
//   A1 = (x1 ^ y1) ^ (x2 & y2)    (MSB, the carry out of bit 0 folded in)
// The carry out of bit 1 is dropped, which is the modulo-4 wrap. These
// equations are the original circuit's. Purely combinational, no clock.
module mod4_add
  import qau_pkg::qdigit_t;
(
  input  qdigit_t x,
  input  qdigit_t y,
  output qdigit_t a
);
  always_comb begin
    a[0] = x[0] ^ y[0];
    a[1] = (x[1] ^ y[1]) ^ (x[0] & y[0]);
  end
endmodule
