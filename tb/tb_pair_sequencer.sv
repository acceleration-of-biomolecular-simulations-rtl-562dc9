// tb_pair_sequencer -- checks the flat pair loop against a list of expected
// pairs, using six real obm_bank instances (256 words) as the bank copies.
// Atoms have 0 .. 5 neighbours (including empty lists at the first and last
// atom and back-to-back one-neighbour lists). Call 1 runs with en always high
// and a stream that is always valid, and checks the issue rate; calls 2 and 3
// add random en stalls and stream gaps. Every issued pair is compared field
// by field: i and j data, type, last, last_atom and the dummy flag.
module tb_pair_sequencer;
  import fp_pkg::*;
  import md_pkg::*;

  localparam int AW   = 8;
  localparam int NA   = 40;
  localparam int NLOC = 30;

  logic clk = 0, rst_n = 0;
  logic start = 0, en = 1, idle;
  logic [31:0] nlocal = NLOC;
  logic idx_valid = 0, idx_ready;
  logic [31:0] idx_data = '0;
  logic i_req, i_ready, j_req, j_ready;
  logic [AW-1:0] i_addr, j_addr;
  logic [63:0] al_rdata, ah_rdata, cl_rdata, bl_rdata, bh_rdata, dl_rdata;
  logic out_valid;
  pair_t out;

  pair_sequencer #(.AW(AW)) u_dut (.*);

  // banks; the testbench owns the write side before each call
  logic          wr = 0;
  logic [AW-1:0] waddr = '0;
  logic [63:0]   wl = '0, wh = '0, wc = '0;
  logic          r_al, r_ah, r_cl, r_bl, r_bh, r_dl;
  obm_bank #(.DEPTH(256)) u_al (.clk, .rst_n, .req(wr || i_req), .we(wr), .addr(wr ? waddr : i_addr), .wdata(wl), .rdata(al_rdata), .ready(r_al));
  obm_bank #(.DEPTH(256)) u_ah (.clk, .rst_n, .req(wr || i_req), .we(wr), .addr(wr ? waddr : i_addr), .wdata(wh), .rdata(ah_rdata), .ready(r_ah));
  obm_bank #(.DEPTH(256)) u_cl (.clk, .rst_n, .req(wr || i_req), .we(wr), .addr(wr ? waddr : i_addr), .wdata(wc), .rdata(cl_rdata), .ready(r_cl));
  obm_bank #(.DEPTH(256)) u_bl (.clk, .rst_n, .req(wr || j_req), .we(wr), .addr(wr ? waddr : j_addr), .wdata(wl), .rdata(bl_rdata), .ready(r_bl));
  obm_bank #(.DEPTH(256)) u_bh (.clk, .rst_n, .req(wr || j_req), .we(wr), .addr(wr ? waddr : j_addr), .wdata(wh), .rdata(bh_rdata), .ready(r_bh));
  obm_bank #(.DEPTH(256)) u_dl (.clk, .rst_n, .req(wr || j_req), .we(wr), .addr(wr ? waddr : j_addr), .wdata(wc), .rdata(dl_rdata), .ready(r_dl));
  assign i_ready = r_al && r_ah && r_cl && !wr;
  assign j_ready = r_bl && r_bh && r_dl && !wr;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] ax [NA], ay [NA], az [NA], aq [NA], at [NA];
  int nn [NA];
  int lists [NA][$];
  int stream [$];
  pair_t exp_q [$];
  bit gaps = 0;
  int n_dummy = 0, n_stall = 0, n_gap = 0;

  task automatic fail(string s);
    failures++;
    if (failures < 15) $display("FAIL %s", s);
  endtask

  task automatic make_data(int nloc);
    pair_t p;
    stream.delete(); exp_q.delete();
    for (int k = 0; k < NA; k++) begin
      ax[k] = $urandom; ay[k] = $urandom; az[k] = $urandom; aq[k] = $urandom;
      at[k] = $urandom % NTYPES;
      nn[k] = $urandom % 6;
    end
    nn[0] = 0; nn[nloc - 1] = 0; nn[3] = 1; nn[4] = 1; nn[5] = 1;
    for (int i = 0; i < nloc; i++) begin
      lists[i].delete();
      for (int n = 0; n < nn[i]; n++) begin
        lists[i].push_back($urandom % NA);
        stream.push_back(lists[i][n]);
      end
      if (nn[i] == 0) begin
        p = '0;
        p.xi = ax[i]; p.yi = ay[i]; p.zi = az[i]; p.qi = aq[i]; p.ti = TYPE_W'(at[i]);
        p.last = 1; p.last_atom = (i == nloc - 1); p.dummy = 1;
        exp_q.push_back(p);
      end
      for (int n = 0; n < nn[i]; n++) begin
        int j;
        j = lists[i][n];
        p = '0;
        p.xi = ax[i]; p.yi = ay[i]; p.zi = az[i]; p.qi = aq[i]; p.ti = TYPE_W'(at[i]);
        p.xj = ax[j]; p.yj = ay[j]; p.zj = az[j]; p.qj = aq[j]; p.tj = TYPE_W'(at[j]);
        p.last = (n == nn[i] - 1); p.last_atom = p.last && (i == nloc - 1); p.dummy = 0;
        exp_q.push_back(p);
      end
    end
  endtask

  task automatic load_banks();
    for (int k = 0; k < NA; k++) begin
      wr = 1; waddr = AW'(k);
      wl = {ay[k], ax[k]}; wh = {aq[k], az[k]}; wc = {32'(nn[k]), at[k]};
      @(negedge clk);
      while (!(r_al && r_bl)) @(negedge clk);
      @(posedge clk); #1;
    end
    wr = 0;
  endtask

  // stream source, en driver
  always @(posedge clk) begin
    #1;
    if (idx_valid && idx_ready_q) begin
      void'(stream.pop_front());
      idx_valid = 0;
    end
    if (stream.size() > 0 && !(gaps && $urandom % 3 == 0)) begin
      idx_valid = 1; idx_data = 32'(stream[0]);
    end else if (!idx_valid && stream.size() > 0) n_gap++;
    en = gaps ? ($urandom % 4 != 0) : 1'b1;
  end
  logic idx_ready_q = 0;
  always @(negedge clk) idx_ready_q = idx_ready;

  // pair checker: a pair is consumed on an edge with en high
  always @(negedge clk) begin
    if (rst_n && !en && !idle) n_stall++;
    if (rst_n && out_valid && en) begin
      pair_t e;
      checks++;
      if (exp_q.size() == 0) fail("unexpected pair");
      else begin
        e = exp_q.pop_front();
        if (out.dummy) n_dummy++;
        if (out.xi != e.xi || out.yi != e.yi || out.zi != e.zi || out.qi != e.qi || out.ti != e.ti)
          fail($sformatf("i data mismatch, %0d pairs left", exp_q.size()));
        if (out.last != e.last || out.last_atom != e.last_atom || out.dummy != e.dummy)
          fail($sformatf("flags %b%b%b exp %b%b%b", out.last, out.last_atom, out.dummy, e.last, e.last_atom, e.dummy));
        if (!e.dummy && (out.xj != e.xj || out.yj != e.yj || out.zj != e.zj || out.qj != e.qj || out.tj != e.tj))
          fail("j data mismatch");
      end
    end
  end

  task automatic run_call(int call, int nloc, bit g);
    int cycles, npairs, extra;
    make_data(nloc);
    // a new atom i can start at most every 3 clocks (i read, then the
    // holding register), so lists shorter than 3 cost extra clocks
    extra = 0;
    for (int i = 0; i < nloc; i++) extra += 3 - ((nn[i] < 1) ? 1 : (nn[i] > 3) ? 3 : nn[i]);
    load_banks();
    npairs = exp_q.size();
    nlocal = nloc; gaps = g;
    start = 1;
    @(posedge clk); #1;
    start = 0; cycles = 1;
    while (!(idle && exp_q.size() == 0) && cycles < 5000) begin @(posedge clk); #1; cycles++; end
    repeat (3) @(posedge clk); #1;
    checks++;
    if (exp_q.size() != 0) fail($sformatf("call %0d: %0d pairs never issued", call, exp_q.size()));
    checks++;
    if (stream.size() != 0) fail($sformatf("call %0d: %0d indices not consumed", call, stream.size()));
    $display("call %0d: %0d pairs in %0d clocks (short-list cost %0d)", call, npairs, cycles, extra);
    if (!g) begin
      checks++;
      // one pair per clock, plus short-list cost, bank turnaround, first i
      // read and the issue/output latency
      if (cycles > npairs + extra + 8) fail($sformatf("rate: %0d clocks for %0d pairs", cycles, npairs));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    run_call(1, NLOC, 0);
    run_call(2, NLOC, 1);
    run_call(3, 7, 1);
    run_call(4, 1, 1);
    $display("dummy=%0d stall=%0d gap=%0d", n_dummy, n_stall, n_gap);
    checks++; if (n_dummy == 0) fail("no dummy pair");
    checks++; if (n_stall == 0) fail("no en stall");
    checks++; if (n_gap == 0)   fail("no stream gap");
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
