// tb_gf4_mul_q: self-checking testbench for the voltage-domain GF(4)
// multiplier.
//
// Applies all 16 digit pairs at the nominal levels 0, 1, 2, 3 V, then 300
// random pairs with each input up to +-0.4 V off its level. The expected
// output is the nominal voltage of the GF(4) product (computed here by
// polynomial multiplication reduced by x^2 + x + 1), except for X = 1, where
// the network passes the Y input voltage itself. Tolerance 1 mV.
module tb_gf4_mul_q;
  real x_v, y_v, p_v;
  int  checks = 0, failures = 0;

  gf4_mul_q dut (.x_v(x_v), .y_v(y_v), .p_v(p_v));

  function automatic int gf_mul_ref(int a, int b);
    int r = 0;
    for (int k = 0; k < 2; k++) if (b[k]) r ^= (a << k);
    if (r[2]) r ^= 3'b111;
    return r & 3;
  endfunction

  task automatic apply(int i, int j, real dx, real dy);
    real expected;
    x_v = real'(i) + dx;
    y_v = real'(j) + dy;
    #10;
    expected = (i == 1) ? y_v : real'(gf_mul_ref(i, j));
    checks++;
    if (p_v < expected - 0.001 || p_v > expected + 0.001) begin
      failures++;
      $display("FAIL X=%0d Y=%0d (%f V, %f V) got=%f V expected=%f V",
               i, j, x_v, y_v, p_v, expected);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        apply(i, j, 0.0, 0.0);
    for (int n = 0; n < 300; n++) begin
      int  i, j;
      real dx, dy;
      i  = int'($urandom_range(3, 0));
      j  = int'($urandom_range(3, 0));
      dx = (real'($urandom_range(800, 0)) - 400.0) / 1000.0;
      dy = (real'($urandom_range(800, 0)) - 400.0) / 1000.0;
      apply(i, j, dx, dy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
