// tb_b2q: self-checking testbench for the binary-to-quaternary converter.
//
// Applies the four codes 00, 01, 10, 11 and expects output voltages of
// 0, 1, 2 and 3 V (one level step of VDD/3 per unit, 3 V supply), within 1 mV.
module tb_b2q;
  logic msb, lsb;
  real  qout;
  int   checks = 0, failures = 0;

  b2q dut (.msb(msb), .lsb(lsb), .qout(qout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    real expected;
    for (int code = 0; code < 4; code++) begin
      msb = code[1];
      lsb = code[0];
      #10;
      expected = 1.0 * code;
      checks++;
      if (qout < expected - 0.001 || qout > expected + 0.001) begin
        failures++;
        $display("FAIL code=%0d got=%f V expected=%f V", code, qout, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
