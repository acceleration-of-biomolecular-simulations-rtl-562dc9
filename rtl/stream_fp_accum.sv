// stream_fp_accum -- streaming floating-point accumulator, one input per clock.
//
// Sums a stream of floating-point values into one result per list; the input
// marks the last value of each list. A floating-point adder is too slow to
// feed its own result back within one clock, so the running sum is split into
// NPART interleaved partial sums that rotate through the adder (the adder plus
// the NPART-entry ring of registers behaves as an adder pipelined NPART deep):
// input k of a list lands in partial sum k mod NPART. At the end of a list the
// NPART partials are moved to a second adder that adds them up one per clock
// while the first adder already starts on the next list. This is how a
// two-adder streaming accumulator keeps up with one value per clock.
//
// Interface: in_valid/in_ready/in_data/in_last, and out_valid/out_ready/
// out_data. in_ready is low only when a list ends while the second adder is
// still busy with the previous list or its result has not been taken, so a
// list shorter than about NPART values may stall the source. A result appears
// NPART clocks after the clock edge that took the last value of its list. W = 32 gives a binary32
// accumulator (per-atom forces), W = 64 a binary64 one (virial and energies).
//
// The two-adder structure and the one-value-per-clock rate follow the
// description of the accumulator macro used by the original kernel; NPART,
// the ring organisation and the handshake are this design's choices.
//
// rst_n is an asynchronous reset of the flip-flops and also disables the
// assertions (disable iff), which a lint tool reports as a net used both
// synchronously and asynchronously; the assertions are not logic.
module stream_fp_accum
  import fp_pkg::*;
#(
  parameter int W     = 32,
  parameter int NPART = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  input  logic         in_last,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready
);

  logic [W-1:0] ring [NPART];          // ring[NPART-1] is the adder's input
  logic [W-1:0] red_buf [NPART];       // partials of a finished list
  logic [W-1:0] red_acc;
  logic [W-1:0] sum_a, sum_b, addend;
  logic         red_busy;              // second adder busy or result not taken
  logic         red_run;               // second adder still adding
  logic [$clog2(NPART+1)-1:0] red_idx;
  logic         accept;

  function automatic logic [W-1:0] fadd(logic [W-1:0] a, logic [W-1:0] b);
    if (W == 64) return W'(f64_add(64'(a), 64'(b)));
    else         return W'(f32_add(32'(a), 32'(b)));
  endfunction

  assign in_ready = !red_busy || !in_last;
  assign accept   = in_valid && in_ready;
  assign addend   = accept ? in_data : '0;
  assign sum_a    = fadd(ring[NPART-1], addend);
  assign sum_b    = fadd(red_acc, red_buf[red_idx[$clog2(NPART)-1:0]]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NPART; k++) begin
        ring[k]    <= '0;
        red_buf[k] <= '0;
      end
      red_acc   <= '0;
      red_busy  <= 1'b0;
      red_run   <= 1'b0;
      red_idx   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      // first adder: rotate the partial sums, adding the input to the head
      if (accept && in_last) begin
        red_buf[0] <= sum_a;
        for (int k = 1; k < NPART; k++) red_buf[k] <= ring[k-1];
        for (int k = 0; k < NPART; k++) ring[k] <= '0;
        red_busy <= 1'b1;
        red_run  <= 1'b1;
        red_idx  <= '0;
        red_acc  <= '0;
      end else begin
        ring[0] <= sum_a;
        for (int k = 1; k < NPART; k++) ring[k] <= ring[k-1];
        // second adder: fold the partials of the previous list
        if (red_run) begin
          red_acc <= sum_b;
          red_idx <= red_idx + 1'b1;
          if (32'(red_idx) == NPART - 1) begin
            red_run   <= 1'b0;
            out_valid <= 1'b1;
            out_data  <= sum_b;
          end
        end
      end
      if (out_valid && out_ready) begin
        out_valid <= 1'b0;
        red_busy  <= 1'b0;
      end
    end
  end

  initial assert (W == 32 || W == 64) else $error("stream_fp_accum: W must be 32 or 64");
  initial assert (NPART >= 2 && (NPART & (NPART - 1)) == 0)
    else $error("stream_fp_accum: NPART must be a power of two >= 2");

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (accept && in_last) |-> !red_busy);

endmodule
