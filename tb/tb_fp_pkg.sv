// tb_fp_pkg -- checks the floating-point operators against the simulator's
// own real arithmetic. Add and multiply must match a correctly rounded
// binary32 result bit for bit (reference: double-precision result rounded
// once to binary32, which equals the correctly rounded result); 1/x,
// 1/sqrt(x) and e^x must be within 4e-7 relative error; the binary64 adder
// must match real addition exactly. Operands are random normal numbers kept
// away from overflow and underflow.
module tb_fp_pkg;
  import fp_pkg::*;

  int checks = 0, failures = 0;

  function automatic f32_t rnd_f32(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + ($urandom % (emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic real f2r(f32_t a);
    logic [10:0] e;
    if (a[30:23] == 8'd0) return 0.0;
    e = 11'(int'(a[30:23]) + 896);
    return $bitstoreal({a[31], e, a[22:0], 29'd0});
  endfunction

  // round a double to binary32, to nearest even (flush tiny values to zero)
  function automatic f32_t r2f(real r);
    logic [63:0] d;
    logic [24:0] m;
    int          e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || d[29])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (d[62:52] == 11'd0 || e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real absr(real r);
    return r < 0.0 ? -r : r;
  endfunction

  task automatic check_exact(string what, f32_t a, f32_t b, f32_t got, f32_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h got=%h exp=%h", what, a, b, got, exp);
    end
  endtask

  task automatic check_rel(string what, f32_t a, f32_t got, real exp, real tol);
    real err;
    checks++;
    err = absr(f2r(got) - exp) / absr(exp);
    if (!(err <= tol)) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h got=%g exp=%g rel=%g", what, a, f2r(got), exp, err);
    end
  endtask

  initial begin
    f32_t a, b;
    f64_t da, db, dg;
    real  ra, rb;
    int   ea, eb;
    for (int k = 0; k < 20000; k++) begin
      a = rnd_f32(100, 150);
      b = (k % 4 == 0) ? {~a[31], a[30:23], 23'($urandom)} : rnd_f32(100, 150);
      check_exact("add", a, b, f32_add(a, b), r2f(f2r(a) + f2r(b)));
      check_exact("mul", a, b, f32_mul(a, b), r2f(f2r(a) * f2r(b)));
    end
    // exact cancellation and zero operands
    a = 32'h3FC0_0000;
    check_exact("add0", a, f32_neg(a), f32_add(a, f32_neg(a)), 32'h0);
    check_exact("addz", a, 32'h0, f32_add(a, 32'h0), a);
    check_exact("mulz", a, 32'h0, f32_mul(a, 32'h0), 32'h0);
    for (int k = 0; k < 5000; k++) begin
      a = rnd_f32(90, 160);
      check_rel("recip", a, f32_recip(a), 1.0 / f2r(a), 4e-7);
      a[31] = 1'b0;
      check_rel("rsqrt", a, f32_rsqrt(a), 1.0 / $sqrt(f2r(a)), 4e-7);
      a = r2f((($urandom % 200001) / 1000.0) - 100.0);   // [-100, 100] but in range
      if (f2r(a) > -87.0 && f2r(a) < 88.0)
        check_rel("exp", a, f32_exp(a), $exp(f2r(a)), 4e-7);
    end
    checks++;
    if (f32_exp(32'hC300_0000) != 32'h0) failures++;   // e^-128 underflows to 0
    for (int k = 0; k < 20000; k++) begin
      ea = int'($urandom % 40) - 20;
      eb = int'($urandom % 40) - 20;
      ra = real'(int'($urandom % 2000001) - 1000000) * $pow(2.0, real'(ea)) / 7.0;
      rb = real'(int'($urandom % 2000001) - 1000000) * $pow(2.0, real'(eb)) / 3.0;
      if (ra == 0.0 || rb == 0.0) continue;
      da = $realtobits(ra);
      db = $realtobits(rb);
      dg = f64_add(da, db);
      checks++;
      if (dg !== $realtobits(ra + rb)) begin
        failures++;
        if (failures < 10) $display("FAIL f64_add %g + %g got %h", ra, rb, dg);
      end
      // binary32 -> binary64 conversion is exact
      a = rnd_f32(1, 254);
      checks++;
      if ($bitstoreal(f32_to_f64(a)) != f2r(a)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog (this testbench has no clock: a time limit instead)
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
