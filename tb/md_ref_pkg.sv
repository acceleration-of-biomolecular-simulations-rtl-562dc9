// md_ref_pkg -- double-precision reference model for the force testbenches.
//
// Evaluates the LJ CHARMM (switched) + real-space Ewald Coulomb pair force in
// 'real' arithmetic, independently of the binary32 operators of the design,
// and converts between 'real' and binary32 bit patterns.
package md_ref_pkg;
  import fp_pkg::*;
  import md_pkg::*;

  typedef struct {
    real g_ewald, qqrd2e, cut_coulsq, cut_ljsq, cut_lj_innersq, cut_bothsq;
  } ref_params_t;

  typedef struct {
    real fpair, evdwl, ecoul, scale;   // scale: size of the terms summed
    bit  in_both, in_sw;
  } ref_pair_t;

  function automatic real f2r(f32_t a);
    logic [10:0] e;
    if (a[30:23] == 8'd0) return 0.0;
    e = 11'(int'(a[30:23]) + 896);
    return $bitstoreal({a[31], e, a[22:0], 29'd0});
  endfunction

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

  function automatic force_params_t to_params(ref_params_t p);
    force_params_t f;
    real d;
    d = p.cut_ljsq - p.cut_lj_innersq;
    f.g_ewald        = r2f(p.g_ewald);
    f.qqrd2e         = r2f(p.qqrd2e);
    f.cut_coulsq     = r2f(p.cut_coulsq);
    f.cut_ljsq       = r2f(p.cut_ljsq);
    f.cut_lj_innersq = r2f(p.cut_lj_innersq);
    f.inv_denom_lj   = r2f(1.0 / (d * d * d));
    f.cut_bothsq     = r2f(p.cut_bothsq);
    return f;
  endfunction

  // Typical CHARMM-like setup: 8/10 A switching, 10 A Coulomb cut-off.
  function automatic ref_params_t default_params();
    ref_params_t p;
    p.g_ewald        = 0.2715;
    p.qqrd2e         = 332.06371;
    p.cut_coulsq     = 100.0;
    p.cut_ljsq       = 100.0;
    p.cut_lj_innersq = 64.0;
    p.cut_bothsq     = 100.0;
    return p;
  endfunction

  // lj1..lj4 of a type pair from eps and sigma
  function automatic lj_coeff_t make_lj(real eps, real sig);
    lj_coeff_t c;
    real s6;
    s6 = sig * sig * sig * sig * sig * sig;
    c.lj1 = r2f(48.0 * eps * s6 * s6);
    c.lj2 = r2f(24.0 * eps * s6);
    c.lj3 = r2f(4.0 * eps * s6 * s6);
    c.lj4 = r2f(4.0 * eps * s6);
    return c;
  endfunction

  // Pair force and energies; inputs are the binary32 values the design sees.
  function automatic ref_pair_t ref_pair(ref_params_t p, force_params_t fp,
                                         real dx, real dy, real dz, real qi, real qj,
                                         lj_coeff_t c);
    ref_pair_t o;
    real rsq, r2inv, r6inv, r, grij, expm2, t, erfc, pref, fc, ec;
    real flj, philj, elj, sw1, sw2, d, lj1, lj2, lj3, lj4, inv_den, innr, cutlj;
    rsq   = dx * dx + dy * dy + dz * dz;
    lj1 = f2r(c.lj1); lj2 = f2r(c.lj2); lj3 = f2r(c.lj3); lj4 = f2r(c.lj4);
    inv_den = f2r(fp.inv_denom_lj);
    innr  = f2r(fp.cut_lj_innersq);
    cutlj = f2r(fp.cut_ljsq);
    r2inv = 1.0 / rsq;
    r6inv = r2inv * r2inv * r2inv;
    r     = $sqrt(rsq);
    grij  = f2r(fp.g_ewald) * r;
    expm2 = $exp(-grij * grij);
    t     = 1.0 / (1.0 + 0.3275911 * grij);
    erfc  = t * (0.254829592 + t * (-0.284496736 + t * (1.421413741 + t * (-1.453152027 + t * 1.061405429)))) * expm2;
    pref  = f2r(fp.qqrd2e) * qi * qj / r;
    fc    = pref * (erfc + 1.12837917 * grij * expm2);
    ec    = pref * erfc;
    flj   = r6inv * (lj1 * r6inv - lj2);
    philj = r6inv * (lj3 * r6inv - lj4);
    o.in_sw = rsq > innr;
    o.scale = absr(fc) + absr(r6inv * lj1 * r6inv) + absr(r6inv * lj2);
    if (o.in_sw) begin
      d   = cutlj - rsq;
      sw1 = d * d * (cutlj + 2.0 * rsq - 3.0 * innr) * inv_den;
      sw2 = 12.0 * rsq * d * (rsq - innr) * inv_den;
      o.scale = o.scale + absr(philj * sw2) + absr(r6inv * lj3 * r6inv * sw2);
      flj = flj * sw1 + philj * sw2;
      elj = philj * sw1;
    end else begin
      elj = philj;
    end
    if (!(rsq < f2r(fp.cut_coulsq))) begin fc = 0.0; ec = 0.0; end
    if (!(rsq < cutlj)) begin flj = 0.0; elj = 0.0; end
    o.in_both = rsq < f2r(fp.cut_bothsq);
    o.fpair = o.in_both ? (fc + flj) * r2inv : 0.0;
    o.evdwl = o.in_both ? elj : 0.0;
    o.ecoul = o.in_both ? ec : 0.0;
    o.scale = o.scale * r2inv;
    return o;
  endfunction

endpackage
