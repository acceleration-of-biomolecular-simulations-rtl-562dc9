// tb_map_compute_forces -- end-to-end test of the force kernel at its default
// sizes (4 MB banks, 69 x 69 coefficient table).
//
// Builds a small random system (48 local atoms, 16 ghost atoms, CHARMM-like
// charges and LJ types), loads the six banks and the coefficient table through
// the host ports, streams full neighbour lists (all atoms within 12 A: cut-off
// 10 A plus 2 A skin) and compares every per-atom force record, the two
// energies and the six virial terms with a double-precision reference.
// Call 1 runs with an always-ready stream and host, and checks the rate of
// one pair per clock. Call 2 repeats the same step with random gaps in the
// neighbour-list stream and random back-pressure on the force records.
// Mechanisms that must each occur at least once: bank read/write turnaround,
// accumulator stall (two one-neighbour lists in a row), dummy pair (an atom
// with no neighbours), pairs rejected by the cut-off, pairs in the LJ
// switching region, stream gaps, output back-pressure, and the dropped spare
// half-word of an odd-length neighbour list.
module tb_map_compute_forces;
  import fp_pkg::*;
  import md_pkg::*;
  import md_ref_pkg::*;

  localparam int NLOC  = 48;
  localparam int NALL  = 64;
  localparam real BOX  = 16.0;
  localparam real RNBR = 12.0;
  localparam int NPART_TB = 4;   // accumulator interleave of the top (default)

  logic                 clk = 0, rst_n = 0;
  logic                 host_wr_valid = 0, host_wr_ready;
  logic [2:0]           host_wr_bank = '0;
  logic [OBM_AW-1:0]    host_wr_addr = '0;
  logic [63:0]          host_wr_data = '0;
  logic                 lj_wr_en = 0;
  logic [LJ_AW-1:0]     lj_wr_addr = '0;
  lj_coeff_t            lj_wr_data = '0;
  force_params_t        prm;
  logic                 start = 0, busy, done;
  logic [31:0]          nlocal = NLOC;
  logic                 nl_valid = 0, nl_ready;
  logic [63:0]          nl_data = '0;
  logic                 f_valid, f_ready = 0;
  logic [127:0]         f_data;
  f64_t                 eng_vdwl, eng_coul;
  f64_t                 virial [6];

  map_compute_forces dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  ref_params_t rp;

  // system
  real  px [NALL], py [NALL], pz [NALL], pq [NALL];
  int   ptype [NALL];
  real  eps_t [NTYPES], sig_t [NTYPES];
  int   nbr [NLOC][$];
  int   flat [$];
  // reference results
  real  rfx [NLOC], rfy [NLOC], rfz [NLOC], rtol [NLOC];
  real  r_evdwl, r_ecoul, r_vir [6], t_e, t_v [6];
  // mechanism counters
  int   m_turn = 0, m_stall = 0, m_dummy = 0, m_cut = 0, m_switch = 0;
  int   m_gap = 0, m_bp = 0, m_spare = 0;
  bit   gaps = 0;
  int   nrec = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL %s", s);
  endtask

  function automatic lj_coeff_t pair_coeff(int a, int b);
    return make_lj($sqrt(eps_t[a] * eps_t[b]), 0.5 * (sig_t[a] + sig_t[b]));
  endfunction

  task automatic build_system();
    real dx, dy, dz, d2;
    bit  ok;
    for (int t = 0; t < NTYPES; t++) begin
      eps_t[t] = 0.02 + 0.15 * ($urandom % 100) / 100.0;
      sig_t[t] = 2.8 + 1.2 * ($urandom % 100) / 100.0;
    end
    for (int k = 0; k < NALL; k++) begin
      do begin
        px[k] = BOX * ($urandom % 10000) / 10000.0;
        py[k] = BOX * ($urandom % 10000) / 10000.0;
        pz[k] = BOX * ($urandom % 10000) / 10000.0;
        ok = 1;
        for (int m = 0; m < k; m++) begin
          dx = px[k] - px[m]; dy = py[k] - py[m]; dz = pz[k] - pz[m];
          if (dx * dx + dy * dy + dz * dz < 2.2 * 2.2) ok = 0;
        end
      end while (!ok);
      pq[k] = -0.7 + 1.4 * ($urandom % 1000) / 1000.0;
      ptype[k] = 1 + $urandom % (NTYPES - 1);
    end
    // atom 5 far away: empty neighbour list
    px[5] = 200.0; py[5] = 200.0; pz[5] = 200.0;
    for (int i = 0; i < NLOC; i++) begin
      nbr[i].delete();
      for (int j = 0; j < NALL; j++) begin
        if (j == i) continue;
        dx = px[i] - px[j]; dy = py[i] - py[j]; dz = pz[i] - pz[j];
        d2 = dx * dx + dy * dy + dz * dz;
        if (d2 < RNBR * RNBR) nbr[i].push_back(j);
      end
    end
    // atoms 7 and 8: one neighbour each, back to back
    while (nbr[7].size() > 1) void'(nbr[7].pop_back());
    while (nbr[8].size() > 1) void'(nbr[8].pop_back());
    flat.delete();
    for (int i = 0; i < NLOC; i++) foreach (nbr[i][n]) flat.push_back(nbr[i][n]);
    // odd total, so the last word has a spare half
    if (flat.size() % 2 == 0) begin
      void'(nbr[NLOC-1].pop_back());
      void'(flat.pop_back());
    end
  endtask

  task automatic compute_reference();
    ref_pair_t e;
    real dx, dy, dz, f;
    r_evdwl = 0; r_ecoul = 0; t_e = 0;
    for (int k = 0; k < 6; k++) begin r_vir[k] = 0; t_v[k] = 0; end
    for (int i = 0; i < NLOC; i++) begin
      rfx[i] = 0; rfy[i] = 0; rfz[i] = 0; rtol[i] = 1e-30;
      foreach (nbr[i][n]) begin
        int j;
        j  = nbr[i][n];
        dx = f2r(r2f(f2r(r2f(px[i])) - f2r(r2f(px[j]))));
        dy = f2r(r2f(f2r(r2f(py[i])) - f2r(r2f(py[j]))));
        dz = f2r(r2f(f2r(r2f(pz[i])) - f2r(r2f(pz[j]))));
        e = ref_pair(rp, prm, dx, dy, dz, f2r(r2f(pq[i])), f2r(r2f(pq[j])),
                     pair_coeff(ptype[i], ptype[j]));
        if (!e.in_both) m_cut++;
        else if (e.in_sw) m_switch++;
        f = e.fpair;
        rfx[i] += dx * f; rfy[i] += dy * f; rfz[i] += dz * f;
        rtol[i] += 3e-5 * e.scale * (absr(dx) + absr(dy) + absr(dz));
        r_evdwl += 0.5 * e.evdwl; r_ecoul += 0.5 * e.ecoul;
        t_e += 3e-5 * (absr(e.evdwl) + absr(e.ecoul) + e.scale);
        r_vir[0] += 0.5 * dx * dx * f; r_vir[1] += 0.5 * dy * dy * f;
        r_vir[2] += 0.5 * dz * dz * f; r_vir[3] += 0.5 * dx * dy * f;
        r_vir[4] += 0.5 * dx * dz * f; r_vir[5] += 0.5 * dy * dz * f;
        for (int k = 0; k < 6; k++) t_v[k] += 3e-5 * e.scale * (dx * dx + dy * dy + dz * dz);
      end
    end
  endtask

  task automatic host_write(int bank, int addr, logic [63:0] data);
    host_wr_valid = 1; host_wr_bank = 3'(bank); host_wr_addr = OBM_AW'(addr); host_wr_data = data;
    @(negedge clk);
    while (!host_wr_ready) @(negedge clk);
    @(posedge clk); #1;
    host_wr_valid = 0;
  endtask

  task automatic load_memories();
    logic [63:0] wl, wh, wc;
    for (int k = 0; k < NALL; k++) begin
      wl = {r2f(py[k]), r2f(px[k])};
      wh = {r2f(pq[k]), r2f(pz[k])};
      wc = {32'(k < NLOC ? nbr[k].size() : 0), 32'(ptype[k])};
      host_write(BANK_AL, k, wl); host_write(BANK_BL, k, wl);
      host_write(BANK_AH, k, wh); host_write(BANK_BH, k, wh);
      host_write(BANK_CL, k, wc); host_write(BANK_DL, k, wc);
    end
    for (int a = 0; a < NTYPES; a++)
      for (int b = 0; b < NTYPES; b++) begin
        lj_wr_en = 1; lj_wr_addr = LJ_AW'(a * NTYPES + b); lj_wr_data = pair_coeff(a, b);
        @(posedge clk); #1;
      end
    lj_wr_en = 0;
  endtask

  // neighbour-list stream source
  task automatic stream_list();
    for (int w = 0; w < (flat.size() + 1) / 2; w++) begin
      while (gaps && ($urandom % 4 == 0)) begin
        nl_valid = 0; m_gap++;
        @(posedge clk); #1;
      end
      nl_valid = 1;
      nl_data = {(2 * w + 1 < flat.size()) ? 32'(flat[2 * w + 1]) : 32'hDEAD_BEEF, 32'(flat[2 * w])};
      @(negedge clk);
      while (!nl_ready) @(negedge clk);
      @(posedge clk); #1;
    end
    nl_valid = 0;
  endtask

  // force record sink and checker
  always @(posedge clk) begin
    #1;
    f_ready = gaps ? ($urandom % 3 != 0) : 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && f_valid && !f_ready) m_bp++;
    if (rst_n && busy && !dut.en) m_stall++;
    if (rst_n && busy && dut.u_seq.issue_dummy) m_dummy++;
    if (rst_n && busy && dut.g_bank[3].u_bank.turn_cnt != 0) m_turn++;
    if (rst_n && f_valid && f_ready) begin
      int a;
      a = int'(f_data[127:96]);
      checks++;
      if (a != nrec) fail($sformatf("record %0d has atom number %0d", nrec, a));
      else begin
        checks += 3;
        if (!(absr(f2r(f_data[31:0]) - rfx[a]) <= rtol[a]) ||
            !(absr(f2r(f_data[63:32]) - rfy[a]) <= rtol[a]) ||
            !(absr(f2r(f_data[95:64]) - rfz[a]) <= rtol[a]))
          fail($sformatf("atom %0d force (%g %g %g) exp (%g %g %g) tol %g", a,
                         f2r(f_data[31:0]), f2r(f_data[63:32]), f2r(f_data[95:64]),
                         rfx[a], rfy[a], rfz[a], rtol[a]));
      end
      nrec++;
    end
  end

  task automatic run_call(int call);
    int cycles;
    nrec = 0;
    if (call == 2 && dut.u_unpack.have) m_spare++;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    fork
      stream_list();
      begin
        while (!done) begin @(posedge clk); #1; cycles++; end
      end
    join
    repeat (5) @(posedge clk); #1;
    checks++;
    if (nrec != NLOC) fail($sformatf("call %0d: %0d force records", call, nrec));
    checks++;
    if (!(absr($bitstoreal(eng_vdwl) - r_evdwl) <= t_e)) fail($sformatf("eng_vdwl %g exp %g", $bitstoreal(eng_vdwl), r_evdwl));
    checks++;
    if (!(absr($bitstoreal(eng_coul) - r_ecoul) <= t_e)) fail($sformatf("eng_coul %g exp %g", $bitstoreal(eng_coul), r_ecoul));
    for (int k = 0; k < 6; k++) begin
      checks++;
      if (!(absr($bitstoreal(virial[k]) - r_vir[k]) <= t_v[k]))
        fail($sformatf("virial[%0d] %g exp %g", k, $bitstoreal(virial[k]), r_vir[k]));
    end
    $display("call %0d: %0d pairs, %0d atoms, %0d clocks, evdwl=%g ecoul=%g", call,
             flat.size(), NLOC, cycles, $bitstoreal(eng_vdwl), $bitstoreal(eng_coul));
    if (call == 1) begin
      // one pair per clock; an atom i can start at most every 3 clocks and a
      // list shorter than NPART waits for the reduction adders; plus a fixed
      // fill and drain time of the banks, pipeline and accumulators
      int extra;
      extra = 0;
      for (int i = 0; i < NLOC; i++) begin
        int len;
        len = (nbr[i].size() < 1) ? 1 : nbr[i].size();
        extra += (len < 3 ? 3 - len : 0) + (len < NPART_TB ? NPART_TB - len : 0);
      end
      $display("rate: %0d clocks, %0d pairs, short-list cost %0d, fill and drain %0d",
               cycles, flat.size(), extra, cycles - flat.size() - extra);
      checks++;
      if (cycles > flat.size() + extra + 45)
        fail($sformatf("rate: %0d clocks for %0d pairs", cycles, flat.size()));
    end
  endtask

  initial begin
    rp  = default_params();
    prm = to_params(rp);
    build_system();
    compute_reference();
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    load_memories();
    gaps = 0;
    run_call(1);
    gaps = 1;
    run_call(2);
    $display("mechanisms: turnaround=%0d stall=%0d dummy=%0d cutoff=%0d switch=%0d gap=%0d backpressure=%0d spare_half=%0d",
             m_turn, m_stall, m_dummy, m_cut, m_switch, m_gap, m_bp, m_spare);
    checks++; if (m_turn == 0)   fail("no bank turnaround");
    checks++; if (m_stall == 0)  fail("no accumulator stall");
    checks++; if (m_dummy == 0)  fail("no dummy pair");
    checks++; if (m_cut == 0)    fail("no pair beyond the cut-off");
    checks++; if (m_switch == 0) fail("no pair in the switching region");
    checks++; if (m_gap == 0)    fail("no stream gap");
    checks++; if (m_bp == 0)     fail("no output back-pressure");
    checks++; if (m_spare == 0)  fail("no spare half-word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
