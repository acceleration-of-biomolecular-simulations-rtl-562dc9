// lj_coeff_ram -- on-chip table of the Lennard-Jones coefficients lj1..lj4.
//
// LAMMPS keeps four n1 x n1 arrays of pair coefficients indexed by the types
// of the two atoms (lj1 = 48 eps sigma^12, lj2 = 24 eps sigma^6, lj3 =
// 4 eps sigma^12, lj4 = 4 eps sigma^6). The host loads them once, on the first
// time-step, into FPGA block RAM; here the four arrays share one 128-bit wide
// word per (type i, type j) entry, at address ti * NTYPES + tj.
//
// Interface: a write port for the host (one entry per clock) and a read port
// for the pipeline. The read port is registered with an enable: rdata changes
// only on a clock edge with re high, so a stalled pipeline keeps its operand.
// Read latency is one clock. The merged 128-bit word is this design's choice.
module lj_coeff_ram
  import md_pkg::*;
#(
  parameter int NT    = NTYPES,
  parameter int TW    = $clog2(NT),
  parameter int DEPTH = NT * NT,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  lj_coeff_t     wdata,
  input  logic          re,
  input  logic [TW-1:0] ti,
  input  logic [TW-1:0] tj,
  output lj_coeff_t     rdata
);

  lj_coeff_t     mem [DEPTH];
  logic [AW-1:0] raddr;

  assign raddr = AW'(ti * NT + tj);

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  a_waddr: assert property (@(posedge clk) we |-> (32'(waddr) < DEPTH));
  a_types: assert property (@(posedge clk) re |-> (32'(ti) < NT && 32'(tj) < NT));

endmodule
