// tb_obm_bank -- writes and reads a small bank through its req/ready port.
// Checks read data against a shadow copy, the one-clock read latency, that
// rdata holds between reads, and that each change of direction costs exactly
// two idle clocks while accesses in the same direction go one per clock.
module tb_obm_bank;
  localparam int DEPTH = 256;
  localparam int AW = $clog2(DEPTH);

  logic          clk = 0, rst_n = 0, req = 0, we = 0, ready;
  logic [AW-1:0] addr = '0;
  logic [63:0]   wdata = '0, rdata;
  logic [63:0]   shadow [DEPTH];
  int checks = 0, failures = 0, turnarounds = 0;

  obm_bank #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  // one access; returns the number of clocks until it was served
  task automatic access(input logic w, input logic [AW-1:0] a, input logic [63:0] d,
                        output int waited);
    req = 1; we = w; addr = a; wdata = d;
    waited = 0;
    @(negedge clk);
    while (!ready) begin
      waited++;
      @(negedge clk);
    end
    @(posedge clk);
    #1;
    req = 0;
  endtask

  initial begin
    int w;
    logic [63:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // first write after reset (read mode) pays the turnaround
    access(1'b1, 0, 64'h1111, w);
    checks++; if (w != 2) fail($sformatf("first write waited %0d", w));
    shadow[0] = 64'h1111;
    for (int k = 1; k < DEPTH; k++) begin
      v = {$urandom, $urandom};
      shadow[k] = v;
      access(1'b1, AW'(k), v, w);
      checks++; if (w != 0) fail("write in write mode waited");
    end
    // switch to reading
    for (int k = 0; k < 200; k++) begin
      int a;
      a = $urandom % DEPTH;
      access(1'b0, AW'(a), 64'd0, w);
      checks++;
      if (k == 0) begin
        if (w != 2) fail($sformatf("first read waited %0d", w));
        turnarounds++;
      end else if (w != 0) fail("read in read mode waited");
      checks++;
      if (rdata !== shadow[a]) fail($sformatf("read %0d got %h exp %h", a, rdata, shadow[a]));
      // rdata holds while idle
      @(posedge clk); #1;
      checks++;
      if (rdata !== shadow[a]) fail("rdata did not hold");
      // occasionally write in between: two turnarounds
      if (k % 50 == 49) begin
        v = {$urandom, $urandom};
        access(1'b1, AW'(a), v, w);
        shadow[a] = v;
        checks++; if (w != 2) fail("write after read did not wait 2");
        turnarounds++;
        access(1'b0, AW'(a), 64'd0, w);
        checks++; if (w != 2 || rdata !== v) fail("read back after write");
        turnarounds++;
      end
    end
    checks++; if (turnarounds < 5) fail("too few turnarounds");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
