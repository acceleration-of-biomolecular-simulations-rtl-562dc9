// force_pack -- joins the three per-atom force streams into 128-bit records.
//
// The x, y and z force accumulators each produce one binary32 sum per local
// atom. This block waits until all three have a value, takes them in the same
// clock, and registers one 128-bit record for the host:
//   [31:0] force_x, [63:32] force_y, [95:64] force_z, [127:96] atom number
// where the atom number counts records since the last clear (0 = first local
// atom). Sending the three components as one wide word saves transfer
// bandwidth back to the host.
//
// Interface: three valid/ready input streams, one valid/ready output stream
// with a one-deep output register; a new record is taken in the clock its
// predecessor leaves, so the join sustains one record per clock.
// Packing into 128 bits follows the original kernel; the use of the spare
// upper 32 bits for the atom number is this design's choice.
//
// rst_n is an asynchronous reset of the flip-flops and also disables the
// assertions (disable iff), which a lint tool reports as a net used both
// synchronously and asynchronously; the assertions are not logic.
module force_pack
  import fp_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         x_valid,
  input  f32_t         x_data,
  output logic         x_ready,
  input  logic         y_valid,
  input  f32_t         y_data,
  output logic         y_ready,
  input  logic         z_valid,
  input  f32_t         z_data,
  output logic         z_ready,
  output logic         out_valid,
  output logic [127:0] out_data,
  input  logic         out_ready
);

  logic        all_valid, take;
  logic [31:0] atom_cnt;

  assign all_valid = x_valid && y_valid && z_valid;
  assign take      = all_valid && (!out_valid || out_ready);
  assign x_ready   = take;
  assign y_ready   = take;
  assign z_ready   = take;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      atom_cnt  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_valid <= 1'b1;
        out_data  <= {atom_cnt, z_data, y_data, x_data};
        atom_cnt  <= atom_cnt + 32'd1;
      end
      if (clear) atom_cnt <= '0;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
