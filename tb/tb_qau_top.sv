// tb_qau_top: end-to-end testbench of the quaternary arithmetic unit.
//
// Drives the two quaternary voltage inputs of the full mixed-signal unit at
// its default parameters. Phase 1 applies all 16 pairs at the nominal levels
// 0, 1, 2, 3 V; phase 2 applies 400 random pairs, each input moved off its
// nominal level by up to +-0.4 V, to exercise the decoding margin of the
// down literal thresholds. For every pair it checks the six binary results,
// the GF(4) subtractor borrows and the six output voltages (nominal level of
// the expected result, within 1 mV; for the GF(4) product with X = 1, the Y
// input voltage, which that mux network passes straight on) against
// references computed here.
//
// It also counts how often each mechanism of the unit occurs: the carry
// from bit 0 into bit 1 of the modulo-4 adder, the modulo-4 wrap of the sum,
// the borrow-wrap of the modulo-4 difference (X < Y), a product of 4 or more
// folded modulo 4, a GF(4) product that needs the x^2 + x + 1 reduction, a
// GF(4) subtractor borrow, and an input decoded while off its nominal level.
// A mechanism that never occurs counts as a failure.
module tb_qau_top;
  import qau_pkg::qau_result_t;

  real         x_v, y_v;
  qau_result_t res;
  logic [1:0]  gf_borrow;
  real         mod_add_v, mod_sub_v, mod_mul_v, gf_add_v, gf_sub_v, gf_mul_v;
  int          checks = 0, failures = 0;

  int n_add_carry = 0, n_add_wrap = 0, n_sub_wrap = 0, n_mul_fold = 0;
  int n_gf_reduce = 0, n_gf_borrow = 0, n_off_level = 0;

  qau_top dut (
    .x_v, .y_v, .res, .gf_borrow,
    .mod_add_v, .mod_sub_v, .mod_mul_v, .gf_add_v, .gf_sub_v, .gf_mul_v
  );

  function automatic int gf_mul_ref(int a, int b);
    int r = 0;
    for (int k = 0; k < 2; k++) if (b[k]) r ^= (a << k);
    if (r[2]) r ^= 3'b111;
    return r & 3;
  endfunction

  task automatic check_digit(string name, int i, int j, int got, int expected);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL %s X=%0d Y=%0d got=%0d expected=%0d", name, i, j, got, expected);
    end
  endtask

  task automatic check_volt(string name, int i, int j, real got, int expected);
    checks++;
    if (got < expected - 0.001 || got > expected + 0.001) begin
      failures++;
      $display("FAIL %s X=%0d Y=%0d got=%f V expected=%0d V", name, i, j, got, expected);
    end
  endtask

  task automatic check_real(string name, int i, int j, real got, real expected);
    checks++;
    if (got < expected - 0.001 || got > expected + 0.001) begin
      failures++;
      $display("FAIL %s X=%0d Y=%0d got=%f V expected=%f V", name, i, j, got, expected);
    end
  endtask

  task automatic apply(int i, int j, real dx, real dy);
    int e_add, e_sub, e_mul, e_gadd, e_gmul;
    x_v = real'(i) + dx;
    y_v = real'(j) + dy;
    #10;
    e_add  = (i + j) % 4;
    e_sub  = (i + 4 - j) % 4;
    e_mul  = (i * j) % 4;
    e_gadd = i ^ j;
    e_gmul = gf_mul_ref(i, j);
    check_digit("mod_add", i, j, int'(res.mod_add), e_add);
    check_digit("mod_sub", i, j, int'(res.mod_sub), e_sub);
    check_digit("mod_mul", i, j, int'(res.mod_mul), e_mul);
    check_digit("gf_add",  i, j, int'(res.gf_add),  e_gadd);
    check_digit("gf_sub",  i, j, int'(res.gf_sub),  e_gadd);
    check_digit("gf_mul",  i, j, int'(res.gf_mul),  e_gmul);
    check_digit("gf_borrow", i, j, int'(gf_borrow), (~i & j) & 3);
    check_volt("mod_add_v", i, j, mod_add_v, e_add);
    check_volt("mod_sub_v", i, j, mod_sub_v, e_sub);
    check_volt("mod_mul_v", i, j, mod_mul_v, e_mul);
    check_volt("gf_add_v",  i, j, gf_add_v,  e_gadd);
    check_volt("gf_sub_v",  i, j, gf_sub_v,  e_gadd);
    // The voltage-domain GF(4) multiplier passes Y's own voltage for X = 1.
    if (i == 1) check_real("gf_mul_v", i, j, gf_mul_v, y_v);
    else        check_volt("gf_mul_v", i, j, gf_mul_v, e_gmul);
    if ((i & 1) && (j & 1))       n_add_carry++;
    if (i + j >= 4)               n_add_wrap++;
    if (i < j)                    n_sub_wrap++;
    if (i * j >= 4)               n_mul_fold++;
    if (i >= 2 && j >= 2)         n_gf_reduce++;
    if ((~i & j & 3) != 0)        n_gf_borrow++;
    if (dx != 0.0 || dy != 0.0)   n_off_level++;
  endtask

  task automatic require(string name, int count);
    $display("mechanism %-22s occurred %0d times", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", name);
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
    for (int n = 0; n < 400; n++) begin
      int  i, j;
      real dx, dy;
      i  = int'($urandom_range(3, 0));
      j  = int'($urandom_range(3, 0));
      dx = (real'($urandom_range(800, 0)) - 400.0) / 1000.0;
      dy = (real'($urandom_range(800, 0)) - 400.0) / 1000.0;
      if (i == 0 && dx < 0.0) dx = -dx;   // stay inside the 0..3 V rail
      if (i == 3 && dx > 0.0) dx = -dx;
      if (j == 0 && dy < 0.0) dy = -dy;
      if (j == 3 && dy > 0.0) dy = -dy;
      apply(i, j, dx, dy);
    end
    require("mod4 add carry", n_add_carry);
    require("mod4 add wrap", n_add_wrap);
    require("mod4 sub wrap (X<Y)", n_sub_wrap);
    require("mod4 mul fold", n_mul_fold);
    require("GF(4) mul reduction", n_gf_reduce);
    require("GF(4) sub borrow", n_gf_borrow);
    require("off-level input", n_off_level);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
