// map_compute_forces -- FPGA kernel for the non-bonded forces of a molecular
// dynamics time-step (LJ CHARMM with switching + real-space Ewald Coulomb),
// computed with Newton's third law off over a full neighbour list.
//
// Because every atom i sees all of its neighbours, the force on i is a plain
// sum over its own list and no force ever has to be written back to atom j:
// the loop has no memory dependence and issues one pair per clock. The data
// path, in the order a pair travels it:
//   nl_unpack       64-bit neighbour-list stream -> one 32-bit index per clock
//   pair_sequencer  reads atom i from banks AL/AH/CL and atom j (index from the
//                   stream) from the copies BL/BH/DL
//   lj_coeff_ram    lj1..lj4 for the (type i, type j) pair, one clock
//   pair_force_pipe 7-stage binary32 force / energy / virial pipeline
//   3 x stream_fp_accum (binary32)  force on atom i, summed per neighbour list
//   8 x stream_fp_accum (binary64)  eng_vdwl, eng_coul, virial[0..5] over all
//   force_pack      {atom, fz, fy, fx} 128-bit records back to the host
// All stages advance together on en, which drops only when an accumulator
// cannot take a list end (very short lists); missing stream data makes gaps.
//
// Use: while idle, the host fills the six on-board banks through the host
// write port (bank numbers in md_pkg::obm_bank_e; the B/D banks must hold
// the same data as the A/C banks) and the coefficient table through the
// lj_wr port, sets prm, and pulses start with nlocal (>= 1) local atoms. It
// then streams the cumulative neighbour list (nn[0] + ... + nn[nlocal-1]
// indices, two per 64-bit word, low half first) on nl_*, and collects one
// 128-bit force record per local atom, in atom order, on f_*. When the last
// sums are ready, eng_vdwl, eng_coul and virial hold the binary64 totals and
// done pulses for one clock; busy is high from start until then. Host writes
// wait (host_wr_ready low) while busy and during a bank turnaround.
//
// Bank roles, packing, data precision, the full list and the 64-bit virial
// sums follow the original design; the handshakes, the result ports and the
// 64-bit energy sums are this design's choices.
//
// rst_n is an asynchronous reset of the flip-flops and also disables the
// assertions (disable iff), which a lint tool reports as a net used both
// synchronously and asynchronously; the assertions are not logic.
module map_compute_forces
  import fp_pkg::*;
  import md_pkg::*;
#(
  parameter int OBM_WORDS = OBM_DEPTH,
  parameter int NPART     = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host write port into the on-board memory banks
  input  logic                       host_wr_valid,
  input  logic [2:0]                 host_wr_bank,
  input  logic [$clog2(OBM_WORDS)-1:0] host_wr_addr,
  input  logic [63:0]                host_wr_data,
  output logic                       host_wr_ready,
  // host write port into the LJ coefficient table
  input  logic                       lj_wr_en,
  input  logic [LJ_AW-1:0]           lj_wr_addr,
  input  lj_coeff_t                  lj_wr_data,
  // call
  input  force_params_t              prm,
  input  logic                       start,
  input  logic [31:0]                nlocal,
  output logic                       busy,
  output logic                       done,
  // neighbour-list stream from global memory
  input  logic                       nl_valid,
  input  logic [63:0]                nl_data,
  output logic                       nl_ready,
  // force records to the host
  output logic                       f_valid,
  output logic [127:0]               f_data,
  input  logic                       f_ready,
  // totals of the call
  output f64_t                       eng_vdwl,
  output f64_t                       eng_coul,
  output f64_t                       virial [6]
);

  localparam int AW = $clog2(OBM_WORDS);

  // ---------------------------------------------------------------- control
  logic start_ok;
  assign start_ok = start && !busy;

  // ---------------------------------------------------------------- banks
  logic          i_req, j_req, i_ready, j_ready;
  logic [AW-1:0] i_addr, j_addr;
  logic [63:0]   rd [6];
  logic [5:0]    b_req, b_we, b_ready;
  logic [AW-1:0] b_addr [6];

  always_comb begin
    for (int b = 0; b < 6; b++) begin
      if (busy) begin
        b_req[b]  = (b < 3) ? i_req : j_req;
        b_we[b]   = 1'b0;
        b_addr[b] = (b < 3) ? i_addr : j_addr;
      end else begin
        b_req[b]  = host_wr_valid && (32'(host_wr_bank) == b);
        b_we[b]   = 1'b1;
        b_addr[b] = host_wr_addr;
      end
    end
  end

  assign i_ready       = &b_ready[2:0];
  assign j_ready       = &b_ready[5:3];
  assign host_wr_ready = !busy && (host_wr_bank < 3'd6) && b_ready[host_wr_bank];

  for (genvar b = 0; b < 6; b++) begin : g_bank
    obm_bank #(.DEPTH(OBM_WORDS)) u_bank (
      .clk, .rst_n,
      .req   (b_req[b]),
      .we    (b_we[b]),
      .addr  (b_addr[b]),
      .wdata (host_wr_data),
      .rdata (rd[b]),
      .ready (b_ready[b])
    );
  end

  // ---------------------------------------------------------------- stream
  logic        idx_valid, idx_ready;
  logic [31:0] idx_data;

  nl_unpack u_unpack (
    .clk, .rst_n,
    .clear     (start_ok),
    .in_valid  (nl_valid),
    .in_data   (nl_data),
    .in_ready  (nl_ready),
    .out_valid (idx_valid),
    .out_data  (idx_data),
    .out_ready (idx_ready)
  );

  // ---------------------------------------------------------------- compute loop
  logic  en, seq_idle;
  logic  seq_valid;
  pair_t seq_pair;

  pair_sequencer #(.AW(AW)) u_seq (
    .clk, .rst_n,
    .start     (start_ok),
    .nlocal,
    .en,
    .idle      (seq_idle),
    .idx_valid, .idx_data, .idx_ready,
    .i_req, .i_addr, .i_ready,
    .al_rdata  (rd[BANK_AL]), .ah_rdata (rd[BANK_AH]), .cl_rdata (rd[BANK_CL]),
    .j_req, .j_addr, .j_ready,
    .bl_rdata  (rd[BANK_BL]), .bh_rdata (rd[BANK_BH]), .dl_rdata (rd[BANK_DL]),
    .out_valid (seq_valid),
    .out       (seq_pair)
  );

  // coefficient fetch stage
  lj_coeff_t lj_rd;
  logic      f_stage_valid;
  pair_t     f_stage;
  pair_in_t  pipe_in;

  lj_coeff_ram u_lj (
    .clk,
    .we    (lj_wr_en),
    .waddr (lj_wr_addr),
    .wdata (lj_wr_data),
    .re    (en),
    .ti    (seq_pair.ti),
    .tj    (seq_pair.tj),
    .rdata (lj_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_stage_valid <= 1'b0;
      f_stage       <= '0;
    end else if (en) begin
      f_stage_valid <= seq_valid;
      f_stage       <= seq_pair;
    end
  end

  always_comb begin
    pipe_in.xi        = f_stage.xi;
    pipe_in.yi        = f_stage.yi;
    pipe_in.zi        = f_stage.zi;
    pipe_in.qi        = f_stage.qi;
    pipe_in.xj        = f_stage.xj;
    pipe_in.yj        = f_stage.yj;
    pipe_in.zj        = f_stage.zj;
    pipe_in.qj        = f_stage.qj;
    pipe_in.lj        = lj_rd;
    pipe_in.last      = f_stage.last;
    pipe_in.last_atom = f_stage.last_atom;
    pipe_in.dummy     = f_stage.dummy;
  end

  logic      res_valid;
  pair_out_t res;

  pair_force_pipe u_pipe (
    .clk, .rst_n, .en, .prm,
    .in_valid  (f_stage_valid),
    .in        (pipe_in),
    .out_valid (res_valid),
    .out       (res)
  );

  // ---------------------------------------------------------------- accumulators
  // 0..2: force x, y, z per atom (binary32); 3..10: totals (binary64)
  logic [10:0] acc_ready, acc_out_valid, acc_out_ready;
  f32_t        fsum [3];
  f64_t        tot  [8];
  f32_t        fin  [3];
  f32_t        tin  [8];

  assign en = &acc_ready;

  assign fin[0] = res.fx;
  assign fin[1] = res.fy;
  assign fin[2] = res.fz;
  assign tin[0] = res.evdwl;
  assign tin[1] = res.ecoul;
  for (genvar k = 0; k < 6; k++) begin : g_tin
    assign tin[2+k] = res.v[k];
  end

  for (genvar k = 0; k < 3; k++) begin : g_facc
    stream_fp_accum #(.W(32), .NPART(NPART)) u_acc (
      .clk, .rst_n,
      .in_valid  (res_valid && en),
      .in_data   (fin[k]),
      .in_last   (res.last),
      .in_ready  (acc_ready[k]),
      .out_valid (acc_out_valid[k]),
      .out_data  (fsum[k]),
      .out_ready (acc_out_ready[k])
    );
  end

  for (genvar k = 0; k < 8; k++) begin : g_tacc
    stream_fp_accum #(.W(64), .NPART(NPART)) u_acc (
      .clk, .rst_n,
      .in_valid  (res_valid && en),
      .in_data   (f32_to_f64(tin[k])),
      .in_last   (res.last_atom),
      .in_ready  (acc_ready[3+k]),
      .out_valid (acc_out_valid[3+k]),
      .out_data  (tot[k]),
      .out_ready (acc_out_ready[3+k])
    );
    assign acc_out_ready[3+k] = 1'b1;
  end

  force_pack u_pack (
    .clk, .rst_n,
    .clear     (start_ok),
    .x_valid   (acc_out_valid[0]), .x_data (fsum[0]), .x_ready (acc_out_ready[0]),
    .y_valid   (acc_out_valid[1]), .y_data (fsum[1]), .y_ready (acc_out_ready[1]),
    .z_valid   (acc_out_valid[2]), .z_data (fsum[2]), .z_ready (acc_out_ready[2]),
    .out_valid (f_valid),
    .out_data  (f_data),
    .out_ready (f_ready)
  );

  // ---------------------------------------------------------------- results
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      eng_vdwl <= '0;
      eng_coul <= '0;
      for (int k = 0; k < 6; k++) virial[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start_ok) busy <= 1'b1;
      if (acc_out_valid[3]) begin
        eng_vdwl <= tot[0];
        eng_coul <= tot[1];
        for (int k = 0; k < 6; k++) virial[k] <= tot[2+k];
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start_ok |-> seq_idle);
  a_acc_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    acc_out_valid[3] |-> (&acc_out_valid[10:3]));

endmodule
