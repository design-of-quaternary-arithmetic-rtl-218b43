// tb_gf4_add: exhaustive self-checking testbench for gf4_add (GF(4) addition).
//
// Applies all 16 pairs of quaternary digits and compares the output with a
// reference computed here from integer arithmetic, independent of the gate
// equations in the design. A watchdog ends the run if it hangs.
module tb_gf4_add;
  import qau_pkg::qdigit_t;

  qdigit_t x, y, dut_out;
  int checks = 0, failures = 0;

  gf4_add dut (.x(x), .y(y), .a(dut_out));

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
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
