// gf4_sub: subtractor in the Galois field GF(4).
//
// Built from one half-subtractor cell per bit of the two-bit code (the
// original circuit draws the cell: an XOR for the difference, an AND with
// one inverted input for the borrow). In GF(4) subtraction equals addition,
// so the result is the pair of differences {x1^y1, x2^y2}; the two borrows
// play no part in it and are only brought out on `borrow` (bit 1 from the
// MSB cell, bit 0 from the LSB cell). Using one cell per bit is this
// design's reading of the single drawn cell. Combinational, no clock.
module gf4_sub
  import qau_pkg::qdigit_t;
(
  input  qdigit_t    x,
  input  qdigit_t    y,
  output qdigit_t    d,
  output logic [1:0] borrow
);
  for (genvar i = 0; i < 2; i++) begin : g_cell
    half_sub u_hs (
      .a      (x[i]),
      .b      (y[i]),
      .diff   (d[i]),
      .borrow (borrow[i])
    );
  end
endmodule
