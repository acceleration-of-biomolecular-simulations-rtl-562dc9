// pair_sequencer -- address generator of the compute loop.
//
// Runs the two nested loops of the pair computation (for every local atom i,
// for every j in the neighbour list of i) as one flat loop that issues one
// atom pair per clock. Atom i is read from banks AL, AH, CL, which give its
// position, charge, type and neighbour count nn; atom j is read from the copies
// BL, BH, DL at the index taken from the neighbour-list stream. Because i and
// j use different banks, both can be read in the same clock.
//
// The next atom i is prefetched into a holding register while the current
// one is still issuing its neighbours, so consecutive atoms follow without a
// gap as long as each has at least two neighbours. An atom with no neighbours
// issues one "dummy" pair that carries last = 1 and contributes zero, so every
// local atom still produces exactly one force record.
//
// Interface: start (one clock, while idle) begins a call over atoms
// 0 .. nlocal-1 (nlocal >= 1). en is the advance signal of the downstream
// pipeline: no pair is issued, and the pair at the output is held, while it is
// low. A pair is issued on an edge with en high, atom i available, an index
// on the stream and the j banks ready; the j bank read takes one clock, so the
// pair appears at out (out_valid) one clock after it was issued. Bank ports
// use the obm_bank req/ready handshake. idle is high when no call is running
// and every pair has been issued.
//
// Reading i and j from separate bank copies and the flat loop follow the
// original design; the prefetch register and the dummy pair for empty lists
// are this design's choices.
module pair_sequencer
  import fp_pkg::*;
  import md_pkg::*;
#(
  parameter int AW = OBM_AW,
  parameter int TW = TYPE_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [31:0]   nlocal,
  input  logic          en,
  output logic          idle,
  // neighbour-index stream
  input  logic          idx_valid,
  input  logic [31:0]   idx_data,
  output logic          idx_ready,
  // atom i banks AL, AH, CL (read only)
  output logic          i_req,
  output logic [AW-1:0] i_addr,
  input  logic          i_ready,
  input  logic [63:0]   al_rdata,
  input  logic [63:0]   ah_rdata,
  input  logic [63:0]   cl_rdata,
  // atom j banks BL, BH, DL (read only)
  output logic          j_req,
  output logic [AW-1:0] j_addr,
  input  logic          j_ready,
  input  logic [63:0]   bl_rdata,
  input  logic [63:0]   bh_rdata,
  input  logic [63:0]   dl_rdata,
  // issued pair
  output logic          out_valid,
  output pair_t         out
);

  typedef struct packed {
    f32_t          x, y, z, q;
    logic [TW-1:0] t;
    logic [31:0]   nn;
    logic          last_atom;
  } atom_i_t;

  logic        running;
  logic [31:0] i_fetch;          // next atom i to read
  logic        i_pending;        // an i read completed last clock
  logic        i_pending_last;
  logic        nxt_valid, cur_valid;
  atom_i_t     nxt, cur;
  logic [31:0] rem;              // neighbours of cur still to issue
  logic        issue_j, issue_dummy, cur_done;

  // i bank reads: prefetch while the holding register is free
  assign i_req  = running && !nxt_valid && !i_pending && (i_fetch < nlocal);
  assign i_addr = AW'(i_fetch);

  // j bank reads: one per issued pair
  assign j_req       = en && cur_valid && (rem != 32'd0) && idx_valid;
  assign j_addr      = AW'(idx_data);
  assign issue_j     = j_req && j_ready;
  assign issue_dummy = en && cur_valid && (rem == 32'd0);
  assign idx_ready   = issue_j;
  assign cur_done    = issue_dummy || (issue_j && rem == 32'd1);

  assign idle = !running && !cur_valid && !nxt_valid && !i_pending;

  // pair register: the j half comes straight from the bank read data
  logic          s_valid;
  atom_i_t       s_i;
  logic          s_last, s_dummy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running        <= 1'b0;
      i_fetch        <= '0;
      i_pending      <= 1'b0;
      i_pending_last <= 1'b0;
      nxt_valid      <= 1'b0;
      cur_valid      <= 1'b0;
      nxt            <= '0;
      cur            <= '0;
      rem            <= '0;
      s_valid        <= 1'b0;
      s_i            <= '0;
      s_last         <= 1'b0;
      s_dummy        <= 1'b0;
    end else begin
      if (start && idle) begin
        running <= 1'b1;
        i_fetch <= '0;
      end
      // i read issued: data is in the bank output registers next clock
      if (i_req && i_ready) begin
        i_pending      <= 1'b1;
        i_pending_last <= (i_fetch == nlocal - 32'd1);
        i_fetch        <= i_fetch + 32'd1;
        if (i_fetch == nlocal - 32'd1) running <= 1'b0;
      end
      if (i_pending) begin
        i_pending     <= 1'b0;
        nxt_valid     <= 1'b1;
        nxt.x         <= al_rdata[31:0];
        nxt.y         <= al_rdata[63:32];
        nxt.z         <= ah_rdata[31:0];
        nxt.q         <= ah_rdata[63:32];
        nxt.t         <= TW'(cl_rdata[31:0]);
        nxt.nn        <= cl_rdata[63:32];
        nxt.last_atom <= i_pending_last;
      end
      if (issue_j) rem <= rem - 32'd1;
      // move the prefetched atom to the issuing slot (overrides the decrement)
      if ((!cur_valid || cur_done) && nxt_valid) begin
        cur       <= nxt;
        rem       <= nxt.nn;
        cur_valid <= 1'b1;
        nxt_valid <= 1'b0;
      end else if (cur_done) begin
        cur_valid <= 1'b0;
      end
      // pair output register, advancing with the pipeline
      if (en) begin
        s_valid <= issue_j || issue_dummy;
        if (issue_j || issue_dummy) begin
          s_i     <= cur;
          s_last  <= cur_done;
          s_dummy <= issue_dummy;
        end
      end
    end
  end

  always_comb begin
    out_valid     = s_valid;
    out.xi        = s_i.x;
    out.yi        = s_i.y;
    out.zi        = s_i.z;
    out.qi        = s_i.q;
    out.ti        = s_i.t;
    out.xj        = bl_rdata[31:0];
    out.yj        = bl_rdata[63:32];
    out.zj        = bh_rdata[31:0];
    out.qj        = bh_rdata[63:32];
    out.tj        = TW'(dl_rdata[31:0]);
    out.last      = s_last;
    out.last_atom = s_last && s_i.last_atom;
    out.dummy     = s_dummy;
  end

endmodule
