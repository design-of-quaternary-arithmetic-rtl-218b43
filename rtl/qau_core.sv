// qau_core: digital core of the quaternary arithmetic unit.
//
// Takes two quaternary digits X and Y in their two-bit code and computes all
// six operations of the unit side by side: modulo-4 addition, subtraction
// and multiplication, and GF(4) addition, subtraction and multiplication.
// Each cell is the gate network of the original design; gathering them
// behind one pair of inputs and one result struct is this design's choice
// (the original draws every operation as a circuit of its own).
// Purely combinational: the results follow the inputs with a few gate delays.
module qau_core
  import qau_pkg::qdigit_t, qau_pkg::qau_result_t;
(
  input  qdigit_t     x,
  input  qdigit_t     y,
  output qau_result_t res,
  output logic [1:0]  gf_borrow   // borrows of the GF(4) subtractor cells
);
  mod4_add u_mod_add (.x, .y, .a (res.mod_add));
  mod4_sub u_mod_sub (.x, .y, .s (res.mod_sub));
  mod4_mul u_mod_mul (.x, .y, .m (res.mod_mul));
  gf4_add  u_gf_add  (.x, .y, .a (res.gf_add));
  gf4_sub  u_gf_sub  (.x, .y, .d (res.gf_sub), .borrow (gf_borrow));
  gf4_mul  u_gf_mul  (.x, .y, .p (res.gf_mul));
endmodule
