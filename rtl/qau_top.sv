// qau_top: quaternary arithmetic unit, mixed-signal top (behavioural model).
//
// Two operands arrive as quaternary voltages (levels 0, 1, 2, 3 V on a 3 V
// supply). A quaternary-to-binary converter per operand decodes each into
// its two-bit code; the digital core computes modulo-4 addition,
// subtraction and multiplication and GF(4) addition, subtraction and
// multiplication in parallel; one binary-to-quaternary converter per result
// drives it back out as a quaternary voltage. The binary results are brought
// out as well. The converters and the arithmetic cells are those of the
// original design; sharing one input converter among all six cells and
// bringing every result out at once (there is no operation select) is this
// design's choice. gf_mul_v for X = 1 is the Y input voltage itself, passed
// on without being restored to its nominal level.
// Behavioural model: the voltage ports are real-valued. Combinational.
module qau_top
  import qau_pkg::*;
#(
  parameter real VDD = VDD_DEFAULT
) (
  input  real         x_v,
  input  real         y_v,
  output qau_result_t res,
  output logic [1:0]  gf_borrow,
  output real         mod_add_v,
  output real         mod_sub_v,
  output real         mod_mul_v,
  output real         gf_add_v,
  output real         gf_sub_v,
  output real         gf_mul_v
);
  qdigit_t x, y;

  q2b #(.VDD(VDD)) u_q2b_x (.qin(x_v), .b(x));
  q2b #(.VDD(VDD)) u_q2b_y (.qin(y_v), .b(y));

  qau_core u_core (.x, .y, .res, .gf_borrow);

  b2q #(.VDD(VDD)) u_b2q_mod_add (.msb(res.mod_add[1]), .lsb(res.mod_add[0]), .qout(mod_add_v));
  b2q #(.VDD(VDD)) u_b2q_mod_sub (.msb(res.mod_sub[1]), .lsb(res.mod_sub[0]), .qout(mod_sub_v));
  b2q #(.VDD(VDD)) u_b2q_mod_mul (.msb(res.mod_mul[1]), .lsb(res.mod_mul[0]), .qout(mod_mul_v));
  b2q #(.VDD(VDD)) u_b2q_gf_add  (.msb(res.gf_add[1]),  .lsb(res.gf_add[0]),  .qout(gf_add_v));
  b2q #(.VDD(VDD)) u_b2q_gf_sub  (.msb(res.gf_sub[1]),  .lsb(res.gf_sub[0]),  .qout(gf_sub_v));
  gf4_mul_q #(.VDD(VDD)) u_gf_mul_q (.x_v(x_v), .y_v(y_v), .p_v(gf_mul_v));
endmodule
