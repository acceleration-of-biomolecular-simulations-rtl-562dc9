// pair_force_pipe -- non-bonded pair kernel, one atom pair per clock.
//
// For each pair (i, j) it evaluates the CHARMM Lennard-Jones force with its
// switching function between the inner and outer LJ cut-offs, and the
// real-space part of the Ewald (PPPM) Coulomb force, in binary32:
//   del = x_i - x_j, rsq = |del|^2, r2inv = 1/rsq, r6inv = r2inv^3
//   Coulomb (rsq < cut_coulsq):
//     r = sqrt(rsq), grij = g_ewald r, expm2 = exp(-grij^2)
//     t = 1 / (1 + EWALD_P grij)
//     erfc = t (A1 + t (A2 + t (A3 + t (A4 + t A5)))) expm2
//     prefactor = qqrd2e q_i q_j / r
//     forcecoul = prefactor (erfc + EWALD_F grij expm2), ecoul = prefactor erfc
//   LJ (rsq < cut_ljsq):
//     forcelj = r6inv (lj1 r6inv - lj2), philj = r6inv (lj3 r6inv - lj4)
//     if rsq > cut_lj_innersq (switching region), with D = cut_ljsq - rsq:
//       sw1 = D^2 (cut_ljsq + 2 rsq - 3 cut_lj_innersq) / denom_lj
//       sw2 = 12 rsq D (rsq - cut_lj_innersq) / denom_lj
//       forcelj = forcelj sw1 + philj sw2, evdwl = philj sw1
//     else evdwl = philj
//   fpair = (forcecoul + forcelj) r2inv, f_i = del fpair
// Energies and virial are tallied in-line. With a full neighbour list every
// pair is visited from both atoms, so each visit adds half of the pair energy
// and half of the pair virial (xx, yy, zz, xy, xz, yz of del * f_i).
//
// The kernel evaluates every formula for every pair, with no table lookup
// and no branch; the cut-off tests only select, at the output, whether the
// pair contributes (rsq < cut_bothsq) or gives zeros. A dummy pair (atom with
// an empty neighbour list) also gives zeros.
//
// Interface: in_valid/in enter on a clock edge with en high; the pipeline is
// LAT = 7 stages deep and moves only when en is high (a global stall, as in a
// compiled loop pipeline). out_valid/out show the result LAT advancing clocks
// after the pair entered. The square root, reciprocal and exponential come
// from fp_pkg.
//
// Evaluating the analytic erfc instead of tables, selecting at the output and
// tallying energies and virial in the loop follow the original kernel. The
// formulas are those of the LAMMPS lj/charmm/coul/long pair style, which this
// kernel reproduces; the stage split, the use of a precomputed 1/denom_lj and
// the 1/2 factors for the full list are this design's choices.
module pair_force_pipe
  import fp_pkg::*;
  import md_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  force_params_t prm,
  input  logic          in_valid,
  input  pair_in_t      in,
  output logic          out_valid,
  output pair_out_t     out
);

  localparam int   LAT     = 7;
  localparam f32_t EWALD_F = 32'h3F90_6EBB;  // 1.12837917
  localparam f32_t EWALD_P = 32'h3EA7_BA05;  // 0.3275911
  localparam f32_t A1      = 32'h3E82_7906;  //  0.254829592
  localparam f32_t A2      = 32'hBE91_A98E;  // -0.284496736
  localparam f32_t A3      = 32'h3FB5_F0E3;  //  1.421413741
  localparam f32_t A4      = 32'hBFBA_00E3;  // -1.453152027
  localparam f32_t A5      = 32'h3F87_DC22;  //  1.061405429

  // Everything a pair carries down the pipeline; each stage fills more fields.
  typedef struct packed {
    logic      valid, last, last_atom, dummy;
    f32_t      xi, yi, zi, xj, yj, zj, qi, qj;
    lj_coeff_t lj;
    f32_t      dx, dy, dz, qq;
    f32_t      rsq, r2inv, rinv;
    f32_t      grij, r6inv, prefactor, expm2, t;
    f32_t      erfc, forcecoul, ecoul, forcelj, philj, sw1, sw2;
    f32_t      fpair, evdwl;
    logic      in_sw, in_coul, in_lj, in_both;
  } st_t;

  st_t s [1:LAT];        // stage registers
  st_t n [1:LAT];        // next-state of each stage

  always_comb begin
    f32_t d, poly, flj, elj, fc, ec;

    // stage 1: distance vector, charge product
    n[1]           = '0;
    n[1].valid     = in_valid;
    n[1].last      = in.last;
    n[1].last_atom = in.last_atom;
    n[1].dummy     = in.dummy;
    n[1].lj        = in.lj;
    n[1].dx        = f32_sub(in.xi, in.xj);
    n[1].dy        = f32_sub(in.yi, in.yj);
    n[1].dz        = f32_sub(in.zi, in.zj);
    n[1].qq        = f32_mul(in.qi, in.qj);

    // stage 2: squared distance and cut-off tests
    n[2]         = s[1];
    n[2].rsq     = f32_add(f32_add(f32_mul(s[1].dx, s[1].dx), f32_mul(s[1].dy, s[1].dy)),
                           f32_mul(s[1].dz, s[1].dz));
    n[2].in_coul = f32_lt(n[2].rsq, prm.cut_coulsq);
    n[2].in_lj   = f32_lt(n[2].rsq, prm.cut_ljsq);
    n[2].in_both = f32_lt(n[2].rsq, prm.cut_bothsq);
    n[2].in_sw   = f32_lt(prm.cut_lj_innersq, n[2].rsq);

    // stage 3: reciprocals
    n[3]       = s[2];
    n[3].r2inv = f32_recip(s[2].rsq);
    n[3].rinv  = f32_rsqrt(s[2].rsq);

    // stage 4: r, grij, r^-6, Coulomb prefactor
    n[4]           = s[3];
    n[4].grij      = f32_mul(prm.g_ewald, f32_mul(s[3].rsq, s[3].rinv));
    n[4].r6inv     = f32_mul(f32_mul(s[3].r2inv, s[3].r2inv), s[3].r2inv);
    n[4].prefactor = f32_mul(f32_mul(prm.qqrd2e, s[3].qq), s[3].rinv);

    // stage 5: exp(-grij^2), t, LJ terms, switching factors
    n[5]         = s[4];
    n[5].expm2   = f32_exp(f32_neg(f32_mul(s[4].grij, s[4].grij)));
    n[5].t       = f32_recip(f32_add(F32_ONE, f32_mul(EWALD_P, s[4].grij)));
    n[5].forcelj = f32_mul(s[4].r6inv, f32_sub(f32_mul(s[4].lj.lj1, s[4].r6inv), s[4].lj.lj2));
    n[5].philj   = f32_mul(s[4].r6inv, f32_sub(f32_mul(s[4].lj.lj3, s[4].r6inv), s[4].lj.lj4));
    d            = f32_sub(prm.cut_ljsq, s[4].rsq);
    n[5].sw1     = f32_mul(f32_mul(f32_mul(d, d),
                                   f32_sub(f32_add(prm.cut_ljsq, f32_mul(F32_TWO, s[4].rsq)),
                                           f32_mul(F32_THREE, prm.cut_lj_innersq))),
                           prm.inv_denom_lj);
    n[5].sw2     = f32_mul(f32_mul(f32_mul(f32_mul(F32_TWELVE, s[4].rsq), d),
                                   f32_sub(s[4].rsq, prm.cut_lj_innersq)),
                           prm.inv_denom_lj);

    // stage 6: erfc, Coulomb force and energy, switched LJ, fpair
    n[6]           = s[5];
    poly           = f32_add(A4, f32_mul(s[5].t, A5));
    poly           = f32_add(A3, f32_mul(s[5].t, poly));
    poly           = f32_add(A2, f32_mul(s[5].t, poly));
    poly           = f32_add(A1, f32_mul(s[5].t, poly));
    n[6].erfc      = f32_mul(f32_mul(s[5].t, poly), s[5].expm2);
    fc             = f32_mul(s[5].prefactor,
                             f32_add(n[6].erfc, f32_mul(f32_mul(EWALD_F, s[5].grij), s[5].expm2)));
    ec             = f32_mul(s[5].prefactor, n[6].erfc);
    if (s[5].in_sw) begin
      flj = f32_add(f32_mul(s[5].forcelj, s[5].sw1), f32_mul(s[5].philj, s[5].sw2));
      elj = f32_mul(s[5].philj, s[5].sw1);
    end else begin
      flj = s[5].forcelj;
      elj = s[5].philj;
    end
    if (!s[5].in_coul) begin
      fc = F32_ZERO;
      ec = F32_ZERO;
    end
    if (!s[5].in_lj) begin
      flj = F32_ZERO;
      elj = F32_ZERO;
    end
    n[6].forcecoul = fc;
    n[6].ecoul     = ec;
    n[6].forcelj   = flj;
    n[6].evdwl     = elj;
    n[6].fpair     = f32_mul(f32_add(fc, flj), s[5].r2inv);

    // stage 7: force components, half energies and half virial
    n[7] = s[6];
    if (!s[6].in_both || s[6].dummy) begin
      n[7].fpair     = F32_ZERO;
      n[7].ecoul     = F32_ZERO;
      n[7].evdwl     = F32_ZERO;
    end
    for (int k = 2; k <= LAT; k++) n[k].valid = s[k-1].valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= LAT; k++) s[k] <= '0;
    end else if (en) begin
      for (int k = 1; k <= LAT; k++) s[k] <= n[k];
    end
  end

  // output: forces on atom i and the half-shares of energy and virial
  always_comb begin
    f32_t fx, fy, fz, hx, hy, hz;
    fx = f32_mul(s[LAT].dx, s[LAT].fpair);
    fy = f32_mul(s[LAT].dy, s[LAT].fpair);
    fz = f32_mul(s[LAT].dz, s[LAT].fpair);
    hx = f32_mul(F32_HALF, s[LAT].dx);
    hy = f32_mul(F32_HALF, s[LAT].dy);
    hz = f32_mul(F32_HALF, s[LAT].dz);
    out_valid     = s[LAT].valid;
    out.fx        = fx;
    out.fy        = fy;
    out.fz        = fz;
    out.evdwl     = f32_mul(F32_HALF, s[LAT].evdwl);
    out.ecoul     = f32_mul(F32_HALF, s[LAT].ecoul);
    out.v[0]      = f32_mul(hx, fx);
    out.v[1]      = f32_mul(hy, fy);
    out.v[2]      = f32_mul(hz, fz);
    out.v[3]      = f32_mul(hx, fy);
    out.v[4]      = f32_mul(hx, fz);
    out.v[5]      = f32_mul(hy, fz);
    out.last      = s[LAT].last;
    out.last_atom = s[LAT].last_atom;
  end

endmodule
