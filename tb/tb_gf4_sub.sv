// tb_gf4_sub: exhaustive self-checking testbench for gf4_sub (GF(4) subtraction).
//
// Applies all 16 pairs of quaternary digits and compares the output with a
// reference computed here from integer arithmetic, independent of the gate
// equations in the design. A watchdog ends the run if it hangs.
module tb_gf4_sub;
  import qau_pkg::qdigit_t;

  qdigit_t x, y, dut_out;
  int checks = 0, failures = 0;
  logic [1:0] borrow;

  gf4_sub dut (.x(x), .y(y), .d(dut_out), .borrow(borrow));

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
        exp_v = i ^ j;
        checks++;
        if (int'(dut_out) != exp_v) begin
          failures++;
          $display("FAIL x=%0d y=%0d got=%0d expected=%0d", i, j, dut_out, exp_v);
        end
        // Borrow of each bit cell: set when the x bit is 0 and the y bit 1.
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (borrow[k] != (!x[k] && y[k])) begin
            failures++;
            $display("FAIL borrow[%0d] x=%0d y=%0d got=%0b", k, i, j, borrow[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
