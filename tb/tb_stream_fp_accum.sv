// tb_stream_fp_accum -- random lists (lengths 1..40, some of length 1 to force
// stalls) through a binary32 and a binary64 accumulator side by side, with
// random input gaps and output back-pressure. Each sum is compared with a
// double-precision sum of the same values (binary32: relative 1e-5 of the sum
// of magnitudes; binary64: 1e-12). Also checks that a long list is taken at one
// value per clock and that the result follows NPART + 1 clocks after the end.
module tb_stream_fp_accum;
  import fp_pkg::*;
  import md_ref_pkg::*;

  localparam int NPART = 4;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, in_last = 0, out_ready = 0;
  logic [31:0] in32 = '0;
  logic [63:0] in64 = '0;
  logic        rdy32, rdy64, ov32, ov64;
  logic [31:0] o32;
  logic [63:0] o64;
  real         exp_sum [$], exp_mag [$];
  real         exp_sum64 [$], exp_mag64 [$];
  int checks = 0, failures = 0, stalls = 0;
  bit  bp = 1;

  stream_fp_accum #(.W(32), .NPART(NPART)) dut32 (
    .clk, .rst_n, .in_valid, .in_data(in32), .in_last, .in_ready(rdy32),
    .out_valid(ov32), .out_data(o32), .out_ready);
  stream_fp_accum #(.W(64), .NPART(NPART)) dut64 (
    .clk, .rst_n, .in_valid, .in_data(in64), .in_last, .in_ready(rdy64),
    .out_valid(ov64), .out_data(o64), .out_ready);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    #1;
    out_ready = bp ? ($urandom % 3 != 0) : 1'b1;
  end

  always @(negedge clk) begin
    if (rst_n && ov32 && out_ready) begin
      real e, m;
      checks++;
      e = exp_sum.pop_front(); m = exp_mag.pop_front();
      if (!(absr(f2r(o32) - e) <= 1e-5 * m + 1e-30)) begin
        failures++;
        if (failures < 10) $display("FAIL f32 got %g exp %g", f2r(o32), e);
      end
    end
    if (rst_n && ov64 && out_ready) begin
      real e, m;
      checks++;
      e = exp_sum64.pop_front(); m = exp_mag64.pop_front();
      if (!(absr($bitstoreal(o64) - e) <= 1e-12 * m + 1e-300)) begin
        failures++;
        if (failures < 10) $display("FAIL f64 got %g exp %g", $bitstoreal(o64), e);
      end
    end
  end

  initial begin
    real s, m, s64, m64, v;
    int len, t0, tlast;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int l = 0; l < 300; l++) begin
      len = (l % 5 == 0) ? 1 : 1 + ($urandom % 40);
      s = 0; m = 0; s64 = 0; m64 = 0;
      for (int k = 0; k < len; k++) begin
        v = (real'(int'($urandom % 200001) - 100000)) / 997.0;
        in32 = r2f(v);
        in64 = $realtobits(v * 1.0000001);
        in_valid = 1;
        in_last = (k == len - 1);
        @(negedge clk);
        while (!(rdy32 && rdy64)) begin stalls++; @(negedge clk); end
        s += f2r(in32); m += absr(f2r(in32));
        s64 += $bitstoreal(in64); m64 += absr($bitstoreal(in64));
        @(posedge clk); #1;
        in_valid = 0;
        if ($urandom % 4 == 0) begin @(posedge clk); #1; end
      end
      exp_sum.push_back(s); exp_mag.push_back(m);
      exp_sum64.push_back(s64); exp_mag64.push_back(m64);
    end
    // rate and latency: one list of 1000 values, no gaps, output always ready
    while (exp_sum.size() != 0) begin @(posedge clk); #1; end
    bp = 0;
    @(posedge clk); #1;
    s = 0; m = 0; s64 = 0; m64 = 0;
    t0 = 0;
    for (int k = 0; k < 1000; k++) begin
      v = (real'(int'($urandom % 2001) - 1000)) / 7.0;
      in32 = r2f(v); in64 = $realtobits(v);
      in_valid = 1; in_last = (k == 999);
      @(negedge clk);
      while (!(rdy32 && rdy64)) begin @(negedge clk); t0++; end
      s += f2r(in32); m += absr(f2r(in32));
      s64 += v; m64 += absr(v);
      @(posedge clk); #1;
      t0++;
    end
    in_valid = 0;
    exp_sum.push_back(s); exp_mag.push_back(m);
    exp_sum64.push_back(s64); exp_mag64.push_back(m64);
    tlast = 0;
    while (!ov32) begin @(posedge clk); #1; tlast++; end
    checks++;
    if (t0 != 1000) begin failures++; $display("FAIL rate %0d clocks", t0); end
    checks++;
    if (tlast != NPART) begin failures++; $display("FAIL latency %0d", tlast); end
    repeat (3) @(posedge clk);
    checks++; if (exp_sum.size() != 0 || exp_sum64.size() != 0) failures++;
    checks++; if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
