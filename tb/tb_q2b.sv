// tb_q2b: self-checking testbench for the quaternary-to-binary converter.
//
// First applies the four nominal levels 0, 1, 2, 3 V and expects codes
// 00, 01, 10, 11. Then sweeps the input from 0 V to 3 V in 10 mV steps
// (offset 5 mV) and expects the code of the nearest level, i.e. each level
// decodes correctly within half a level step (0.5 V) of its nominal value.
module tb_q2b;
  import qau_pkg::qdigit_t;

  real     qin;
  qdigit_t b;
  int      checks = 0, failures = 0;

  q2b dut (.qin(qin), .b(b));

  task automatic check(int expected);
    checks++;
    if (int'(b) != expected) begin
      failures++;
      $display("FAIL qin=%f got=%0d expected=%0d", qin, b, expected);
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
    for (int lvl = 0; lvl < 4; lvl++) begin
      qin = real'(lvl);
      #10;
      check(lvl);
    end
    for (int k = 0; k < 300; k++) begin
      int nearest;
      qin = 0.005 + 0.01 * k;
      #10;
      nearest = int'($floor(qin + 0.5));
      if (nearest > 3) nearest = 3;
      check(nearest);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
