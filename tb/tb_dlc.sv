// tb_dlc: self-checking testbench for the down literal circuit model.
//
// Instantiates the three threshold settings used in the quaternary-to-binary
// converter (D1, D2, D3) and sweeps the input from 0 V to 3 V in 10 mV steps,
// offset by 5 mV so no sample sits exactly on a threshold. Each output must be
// high below its expected switching point (0.5, 1.5, 2.5 V) and low above.
module tb_dlc;
  real  vin;
  logic d1, d2, d3;
  int   checks = 0, failures = 0;

  dlc #(.VTN(0.2), .VTP(-2.2)) u_d1 (.vin(vin), .dout(d1));
  dlc #(.VTN(1.2), .VTP(-1.2)) u_d2 (.vin(vin), .dout(d2));
  dlc #(.VTN(2.2), .VTP(-0.2)) u_d3 (.vin(vin), .dout(d3));

  task automatic check(string name, logic got, logic expected);
    checks++;
    if (got !== expected) begin
      failures++;
      $display("FAIL %s vin=%f got=%0b expected=%0b", name, vin, got, expected);
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
    for (int k = 0; k < 300; k++) begin
      vin = 0.005 + 0.01 * k;
      #10;
      check("D1", d1, vin < 0.5);
      check("D2", d2, vin < 1.5);
      check("D3", d3, vin < 2.5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
