// qau_pkg: shared types of the quaternary arithmetic unit.
//
// A quaternary digit (value 0..3) is carried in the digital domain by its
// two-bit binary code {x1, x2}: bit 1 is the MSB x1, bit 0 the LSB x2, so
// digits 0, 1, 2, 3 are 00, 01, 10, 11. On the wire the digit is a voltage
// level; with the 3 V supply the levels are 0, 1, 2 and 3 V (one level step
// is VDD/3). The level voltages are this design's reading of the thresholds
// of the down literal circuits, not a number stated for the original circuit.
package qau_pkg;

  typedef logic [1:0] qdigit_t;

  // Supply voltage of the converters, in volts.
  localparam real VDD_DEFAULT = 3.0;

  // All six results of one operand pair, in the order the cells are drawn.
  typedef struct packed {
    qdigit_t mod_add;  // X + Y mod 4
    qdigit_t mod_sub;  // X - Y mod 4
    qdigit_t mod_mul;  // X * Y mod 4
    qdigit_t gf_add;   // X + Y in GF(4)
    qdigit_t gf_sub;   // X - Y in GF(4)
    qdigit_t gf_mul;   // X * Y in GF(4)
  } qau_result_t;

endpackage
