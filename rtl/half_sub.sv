// half_sub: one-bit half subtractor, A - B.
//
// DIFFERENCE = A ^ B and BORROW = ~A & B: an XOR gate and an AND gate with
// an inverted A input, the cell of the GF(4) subtractor. Combinational.
module half_sub (
  input  logic a,
  input  logic b,
  output logic diff,
  output logic borrow
);
  always_comb begin
    diff   = a ^ b;
    borrow = ~a & b;
  end
endmodule
