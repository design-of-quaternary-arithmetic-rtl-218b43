// tb_qau_core: exhaustive self-checking testbench for the digital core.
//
// For all 16 operand pairs, checks the six results and the two GF(4)
// subtractor borrows against references computed here: integer arithmetic
// modulo 4, bitwise XOR for GF(4) addition and subtraction, and polynomial
// multiplication reduced by x^2 + x + 1 for the GF(4) product.
module tb_qau_core;
  import qau_pkg::qdigit_t, qau_pkg::qau_result_t;

  qdigit_t     x, y;
  qau_result_t res;
  logic [1:0]  gf_borrow;
  int          checks = 0, failures = 0;

  qau_core dut (.x(x), .y(y), .res(res), .gf_borrow(gf_borrow));

  function automatic int gf_mul_ref(int a, int b);
    int r = 0;
    for (int k = 0; k < 2; k++) if (b[k]) r ^= (a << k);
    if (r[2]) r ^= 3'b111;
    return r & 3;
  endfunction

  task automatic check(string name, int got, int expected);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s x=%0d y=%0d got=%0d expected=%0d", name, x, y, got, expected);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        x = qdigit_t'(i);
        y = qdigit_t'(j);
        #10;
        check("mod_add", int'(res.mod_add), (i + j) % 4);
        check("mod_sub", int'(res.mod_sub), (i + 4 - j) % 4);
        check("mod_mul", int'(res.mod_mul), (i * j) % 4);
        check("gf_add",  int'(res.gf_add),  i ^ j);
        check("gf_sub",  int'(res.gf_sub),  i ^ j);
        check("gf_mul",  int'(res.gf_mul),  gf_mul_ref(i, j));
        check("gf_borrow", int'(gf_borrow), (~i & j) & 3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
