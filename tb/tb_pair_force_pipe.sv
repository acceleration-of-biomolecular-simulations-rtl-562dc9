// tb_pair_force_pipe -- random atom pairs through the force pipeline,
// compared with the double-precision reference model. Covers pairs inside the
// inner LJ cut-off, in the switching region, beyond the cut-off (must give
// exact zeros), dummy pairs, and random stalls (en low). Also checks the
// latency: a result appears exactly 7 advancing clocks after its pair.
module tb_pair_force_pipe;
  import fp_pkg::*;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int LAT = 7;
  localparam int NPAIRS = 3000;

  logic          clk = 0, rst_n = 0, en = 0, in_valid = 0, out_valid;
  force_params_t prm;
  pair_in_t      in;
  pair_out_t     out;
  ref_params_t   rp;

  int checks = 0, failures = 0;
  int n_inner = 0, n_switch = 0, n_outside = 0, n_dummy = 0, n_stall = 0;

  pair_force_pipe dut (.*);

  always #5 clk = ~clk;

  // expected results, in issue order
  ref_pair_t exp_q [$];
  real       dx_q [$], dy_q [$], dz_q [$];
  bit        dummy_q [$], last_q [$];
  int        issue_adv_q [$];
  int        adv_cnt = 0;

  task automatic check_val(string what, f32_t got, real exp, real tol);
    checks++;
    if (!(absr(f2r(got) - exp) <= tol)) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%g exp=%g tol=%g", what, f2r(got), exp, tol);
    end
  endtask

  // checker
  // The stimulus changes 1 time unit after a rising edge; the checker samples
  // on the falling edge, so en high here means the next rising edge advances.
  // adv_cnt counts advancing edges, including the one about to come.
  always @(negedge clk) begin
    if (rst_n && en) adv_cnt <= adv_cnt + 1;
    if (rst_n && en && out_valid) begin
      ref_pair_t e;
      real dx, dy, dz, fx, fy, fz, tol;
      int  lat;
      e  = exp_q.pop_front();
      dx = dx_q.pop_front(); dy = dy_q.pop_front(); dz = dz_q.pop_front();
      if (dummy_q.pop_front()) begin
        e.fpair = 0.0; e.evdwl = 0.0; e.ecoul = 0.0; e.scale = 0.0;
      end
      checks++;
      if (out.last != last_q.pop_front()) begin failures++; if (failures < 10) $display("FAIL last"); end
      checks++;
      // entered on edge E, leaves on edge E + LAT: LAT - 1 edges in between
      lat = adv_cnt - issue_adv_q.pop_front();
      if (lat != LAT) begin
        failures++;
        if (failures < 5) $display("FAIL latency %0d", lat);
      end
      fx = dx * e.fpair; fy = dy * e.fpair; fz = dz * e.fpair;
      tol = 3e-5 * e.scale * (absr(dx) + absr(dy) + absr(dz)) + 1e-30;
      check_val("fx", out.fx, fx, tol);
      check_val("fy", out.fy, fy, tol);
      check_val("fz", out.fz, fz, tol);
      check_val("evdwl", out.evdwl, 0.5 * e.evdwl, 3e-5 * absr(e.evdwl) + 1e-6 * e.scale + 1e-30);
      check_val("ecoul", out.ecoul, 0.5 * e.ecoul, 3e-5 * absr(e.ecoul) + 1e-30);
      check_val("vxx", out.v[0], 0.5 * dx * fx, 3e-5 * e.scale * dx * dx + 1e-30);
      check_val("vyz", out.v[5], 0.5 * dy * fz, 3e-5 * e.scale * (dy * dy + dz * dz) + 1e-30);
      if (!e.in_both) begin
        checks++;
        if (out.fx[30:0] != 31'd0 || out.evdwl[30:0] != 31'd0 || out.ecoul[30:0] != 31'd0) begin failures++; if (failures < 10) $display("FAIL zero"); end
      end
    end
  end

  initial begin
    real r, th, ph, xi, yi, zi, xj, yj, zj, qi, qj;
    ref_pair_t e;
    rp  = default_params();
    prm = to_params(rp);
    in  = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    #1;
    for (int k = 0; k < NPAIRS; k++) begin
      // distance 1.8 .. 12 A in a random direction
      r  = 1.8 + 10.2 * ($urandom % 100000) / 100000.0;
      th = 3.14159 * ($urandom % 1000) / 1000.0;
      ph = 6.28318 * ($urandom % 1000) / 1000.0;
      xi = 50.0 * ($urandom % 1000) / 1000.0;
      yi = 50.0 * ($urandom % 1000) / 1000.0;
      zi = 50.0 * ($urandom % 1000) / 1000.0;
      xj = xi + r * $sin(th) * $cos(ph);
      yj = yi + r * $sin(th) * $sin(ph);
      zj = zi + r * $cos(th);
      qi = -0.8 + 1.6 * ($urandom % 1000) / 1000.0;
      qj = -0.8 + 1.6 * ($urandom % 1000) / 1000.0;
      in.xi = r2f(xi); in.yi = r2f(yi); in.zi = r2f(zi); in.qi = r2f(qi);
      in.xj = r2f(xj); in.yj = r2f(yj); in.zj = r2f(zj); in.qj = r2f(qj);
      in.lj = make_lj(0.02 + 0.2 * ($urandom % 100) / 100.0, 2.5 + 1.5 * ($urandom % 100) / 100.0);
      in.last = ($urandom % 5) == 0;
      in.last_atom = 1'b0;
      in.dummy = ($urandom % 50) == 0;
      in_valid <= 1'b1;
      // stall now and then
      en <= 1'b1;
      while (($urandom % 8) == 0) begin
        en <= 1'b0;
        n_stall++;
        @(posedge clk);
        #1;
      end
      en <= 1'b1;
      // the pair enters on the next edge: derive the reference from the rounded values
      e = ref_pair(rp, prm, f2r(in.xi) - f2r(in.xj), f2r(in.yi) - f2r(in.yj),
                   f2r(in.zi) - f2r(in.zj), f2r(in.qi), f2r(in.qj), in.lj);
      exp_q.push_back(e);
      dx_q.push_back(f2r(r2f(f2r(in.xi) - f2r(in.xj))));
      dy_q.push_back(f2r(r2f(f2r(in.yi) - f2r(in.yj))));
      dz_q.push_back(f2r(r2f(f2r(in.zi) - f2r(in.zj))));
      dummy_q.push_back(in.dummy);
      last_q.push_back(in.last);
      issue_adv_q.push_back(adv_cnt);
      if (in.dummy) n_dummy++;
      else if (!e.in_both) n_outside++;
      else if (e.in_sw) n_switch++;
      else n_inner++;
      @(posedge clk);
      #1;
    end
    in_valid <= 1'b0;
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (n_inner == 0 || n_switch == 0 || n_outside == 0 || n_dummy == 0 || n_stall == 0) failures++;
    $display("pairs: inner=%0d switch=%0d outside=%0d dummy=%0d stalls=%0d",
             n_inner, n_switch, n_outside, n_dummy, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
