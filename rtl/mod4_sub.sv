// mod4_sub: modulo-4 subtractor, S = X - Y mod 4.
//
// When X < Y the result is X + 4 - Y. In gates:
//   S2 = x2 ^ y2                     (LSB)
//   S1 = (x1 ^ y1) ^ (~x2 & y2)      (MSB, the borrow out of bit 0 folded in)
// The borrow out of bit 1 is dropped, which is the modulo-4 wrap.
// The subtraction table of the original work fixes this function; its
// printed MSB equation repeats the adder's carry term (x2 & y2), which does
// not match the table, so this design uses the borrow term ~x2 & y2 that the
// table requires. Combinational, no clock.
module mod4_sub
  import qau_pkg::qdigit_t;
(
  input  qdigit_t x,   // minuend
  input  qdigit_t y,   // subtrahend
  output qdigit_t s
);
  always_comb begin
    s[0] = x[0] ^ y[0];
    s[1] = (x[1] ^ y[1]) ^ (~x[0] & y[0]);
  end
endmodule
