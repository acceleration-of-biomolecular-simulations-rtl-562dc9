// tb_nl_unpack -- streams random 64-bit words with random gaps on the input
// and random back-pressure on the output; the output must be the low then the
// high half of every word, in order. With no gaps it must give one index per
// clock. A clear must drop a held word.
module tb_nl_unpack;
  logic        clk = 0, rst_n = 0, clear = 0;
  logic        in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [63:0] in_data = '0;
  logic [31:0] out_data;
  logic [31:0] exp_q [$];
  int checks = 0, failures = 0, got = 0;
  bit gaps = 1, hold = 0;
  int out_cnt_window = 0;

  nl_unpack dut (.*);

  always #5 clk = ~clk;

  // checker on the falling edge
  always @(negedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      got++;
      out_cnt_window++;
      if (exp_q.size() == 0 || out_data !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("FAIL got %h", out_data);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  // output back-pressure
  always @(posedge clk) begin
    #1;
    out_ready = hold ? 1'b0 : gaps ? ($urandom % 4 != 0) : 1'b1;
  end

  task automatic send(logic [63:0] w);
    in_valid = 1; in_data = w;
    @(negedge clk);
    while (!in_ready) @(negedge clk);
    exp_q.push_back(w[31:0]);
    exp_q.push_back(w[63:32]);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    for (int k = 0; k < 500; k++) begin
      send({$urandom, $urandom});
      while ($urandom % 3 == 0) begin @(posedge clk); #1; end
    end
    repeat (10) @(posedge clk); #1;
    checks++; if (exp_q.size() != 0) failures++;
    // full rate: 200 words back to back must give 400 indices in ~400 clocks
    gaps = 0;
    @(posedge clk); #1;
    out_cnt_window = 0;
    t0 = 0;
    in_valid = 1;
    for (int k = 0; k < 200; k++) begin
      in_data = {$urandom, $urandom};
      @(negedge clk);
      while (!in_ready) begin @(negedge clk); t0++; end
      exp_q.push_back(in_data[31:0]);
      exp_q.push_back(in_data[63:32]);
      @(posedge clk); #1;
      t0++;
    end
    in_valid = 0;
    repeat (4) @(posedge clk); #1;
    checks++;
    if (t0 > 402) begin failures++; $display("FAIL rate: %0d clocks for 200 words", t0); end
    checks++; if (exp_q.size() != 0 || out_cnt_window != 400) failures++;
    // a clear drops a word that has not been handed out
    hold = 1;
    @(posedge clk); #1;
    in_valid = 1; in_data = 64'hAAAA_AAAA_5555_5555;
    @(posedge clk); #1;
    in_valid = 0;
    clear = 1;
    @(posedge clk); #1;
    clear = 0;
    checks++; if (out_valid) begin failures++; $display("FAIL clear"); end
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
