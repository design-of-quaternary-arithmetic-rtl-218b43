// qmux4: 4:1 multiplexer of quaternary digits with a quaternary select.
//
// The select is itself a quaternary digit: select value k passes input k.
// Building block of the GF(4) multiplier. Combinational.
module qmux4
  import qau_pkg::qdigit_t;
(
  input  qdigit_t in0,
  input  qdigit_t in1,
  input  qdigit_t in2,
  input  qdigit_t in3,
  input  qdigit_t sel,
  output qdigit_t out
);
  always_comb begin
    unique case (sel)
      2'd0:    out = in0;
      2'd1:    out = in1;
      2'd2:    out = in2;
      default: out = in3;
    endcase
  end
endmodule
