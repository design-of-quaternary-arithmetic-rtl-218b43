// tb_gf4_mul: exhaustive self-checking testbench for gf4_mul (GF(4) multiplication).
//
// Applies all 16 pairs of quaternary digits and compares the output with a
// reference computed here from integer arithmetic, independent of the gate
// equations in the design. A watchdog ends the run if it hangs.
module tb_gf4_mul;
  import qau_pkg::qdigit_t;

  qdigit_t x, y, dut_out;
  int checks = 0, failures = 0;

  // GF(4) product by polynomial multiplication over GF(2), reduced by
  // x^2 + x + 1: elements 0, 1, 2 = a, 3 = a + 1.
  function automatic int gf_mul_ref(int a, int b);
    int r = 0;
    for (int k = 0; k < 2; k++) if (b[k]) r ^= (a << k);
    if (r[2]) r ^= 3'b111;
    return r & 3;
  endfunction

  gf4_mul dut (.x(x), .y(y), .p(dut_out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int exp_v;
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        x = qdigit_t'(i);
        y = qdigit_t'(j);
        #10;
        exp_v = gf_mul_ref(i, j);
        checks++;
        if (int'(dut_out) != exp_v) begin
          failures++;
          $display("FAIL x=%0d y=%0d got=%0d expected=%0d", i, j, dut_out, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
