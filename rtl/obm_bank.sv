// obm_bank -- one single-ported on-board SRAM bank (64-bit words).
//
// The accelerator board has 16 such banks of 4 MB each, each behind one
// 64-bit port. One port serves both reads and writes, so a bank does one
// access per clock, and turning the port around from reading to writing (or
// back) costs SWITCH_CYCLES idle clocks. The force kernel is laid out so that
// this penalty is paid once per call, never inside the pair loop.
//
// Interface: a requester holds req, we, addr and wdata until it sees ready.
// ready is high when the port is already in the requested direction and no
// turnaround is in progress; the access happens on a clock edge with
// req && ready. A request in the other direction starts the turnaround and is
// served SWITCH_CYCLES clocks later. Reads have one clock of latency: rdata
// shows the addressed word after the edge that did the read and holds it
// until the next read, which lets a stalled pipeline keep its operand.
//
// The two-clock penalty and the single port follow the platform description;
// the req/ready handshake and the reset state (read mode, rdata = 0) are this
// design's choices. The memory contents are not reset.
//
// rst_n is an asynchronous reset of the flip-flops and also disables the
// assertions (disable iff), which a lint tool reports as a net used both
// synchronously and asynchronously; the assertions are not logic.
module obm_bank #(
  parameter int DEPTH         = 524288,
  parameter int AW            = $clog2(DEPTH),
  parameter int SWITCH_CYCLES = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [63:0]   wdata,
  output logic [63:0]   rdata,
  output logic          ready
);

  logic [63:0] mem [DEPTH];
  logic        mode_wr;          // current port direction, 1 = write
  logic [3:0]  turn_cnt;         // remaining turnaround clocks

  assign ready = (we == mode_wr) && (turn_cnt == 4'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_wr  <= 1'b0;
      turn_cnt <= 4'd0;
    end else if (turn_cnt != 4'd0) begin
      turn_cnt <= turn_cnt - 4'd1;
    end else if (req && (we != mode_wr)) begin
      mode_wr  <= we;
      turn_cnt <= 4'(SWITCH_CYCLES - 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= 64'd0;
    else if (req && ready && !we) rdata <= mem[addr];
  end

  always_ff @(posedge clk) begin
    if (req && ready && we) mem[addr] <= wdata;
  end

  initial assert (SWITCH_CYCLES >= 1 && SWITCH_CYCLES <= 15)
    else $error("obm_bank: SWITCH_CYCLES must be 1..15");

  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    req |-> (32'(addr) < DEPTH));

endmodule
