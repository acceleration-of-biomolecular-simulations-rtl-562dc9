// tb_force_pack -- three force streams with independent random gaps join into
// 128-bit records under random output back-pressure. Every record must hold
// the n-th value of each stream and atom number n; with all streams ready and
// no back-pressure one record per clock must pass. A clear pulse between two
// runs must restart the atom number at 0.
module tb_force_pack;
  import fp_pkg::*;

  logic         clk = 0, rst_n = 0, clear = 0, out_ready = 0;
  logic         x_valid = 0, y_valid = 0, z_valid = 0;
  f32_t         x_data = '0, y_data = '0, z_data = '0;
  logic         x_ready, y_ready, z_ready, out_valid;
  logic [127:0] out_data;
  int checks = 0, failures = 0, nrec = 0;
  int xi = 0, yi = 0, zi = 0;
  int base = 0;                 // record index at the last clear
  bit gaps = 1;
  int N = 400;

  force_pack dut (.*);

  always #5 clk = ~clk;

  function automatic f32_t val(int axis, int n);
    return 32'(axis * 32'h0100_0000 + n * 3 + 1);
  endfunction

  // sources: each stream advances on its own handshake
  always @(posedge clk) begin
    if (rst_n) begin
      if (x_valid && x_ready) xi <= xi + 1;
      if (y_valid && y_ready) yi <= yi + 1;
      if (z_valid && z_ready) zi <= zi + 1;
    end
    #1;
    x_valid = (xi < N) && (!gaps || $urandom % 3 != 0);
    y_valid = (yi < N) && (!gaps || $urandom % 3 != 0);
    z_valid = (zi < N) && (!gaps || $urandom % 3 != 0);
    x_data = val(1, xi); y_data = val(2, yi); z_data = val(3, zi);
    out_ready = !gaps || ($urandom % 4 != 0);
  end

  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data !== {32'(nrec - base), val(3, nrec), val(2, nrec), val(1, nrec)}) begin
        failures++;
        if (failures < 10) $display("FAIL rec %0d: %h", nrec, out_data);
      end
      nrec++;
    end
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (nrec == N);
    checks++; if (xi != N || yi != N || zi != N) failures++;
    // full rate
    @(posedge clk); #2;
    gaps = 0; N = 2 * N;
    t0 = 0;
    while (nrec < N) begin @(posedge clk); t0++; end
    checks++;
    if (t0 > N / 2 + 3) begin failures++; $display("FAIL rate: %0d clocks", t0); end
    // clear between calls, then a third run with gaps
    @(posedge clk); #2;
    clear = 1;
    @(posedge clk); #2;
    clear = 0; base = nrec; gaps = 1; N = N + 100;
    wait (nrec == N);
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
