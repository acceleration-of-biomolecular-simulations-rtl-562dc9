// nl_unpack -- turns the 64-bit neighbour-list stream into 32-bit indices.
//
// The host packs the cumulative neighbour list (all neighbour lists of all
// local atoms, one after another) two 32-bit atom indices per 64-bit word and
// streams it from global memory. This block hands the compute loop one index
// per clock: the low half of each word first, then the high half. It holds one
// word and takes the next word in the same clock as it hands out the high
// half of the current one, so it sustains one index per clock.
//
// Interface: valid/ready streams on both sides (a transfer happens on a clock
// edge with valid && ready). clear drops a held word, used at the start of a
// call so that the unused high half of an odd-length list is not carried over.
// The low-half-first order and the clear input are this design's choices.
module nl_unpack (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  input  logic [63:0] in_data,
  output logic        in_ready,
  output logic        out_valid,
  output logic [31:0] out_data,
  input  logic        out_ready
);

  logic [63:0] word;
  logic        have;     // word holds at least one unread half
  logic        hi;       // next half to hand out is the high one

  assign out_valid = have;
  assign out_data  = hi ? word[63:32] : word[31:0];
  assign in_ready  = !clear && (!have || (hi && out_ready));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word <= 64'd0;
      have <= 1'b0;
      hi   <= 1'b0;
    end else if (clear) begin
      have <= 1'b0;
      hi   <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        if (hi) begin
          have <= 1'b0;
          hi   <= 1'b0;
        end else begin
          hi <= 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        word <= in_data;
        have <= 1'b1;
        hi   <= 1'b0;
      end
    end
  end

endmodule
