// tb_lj_coeff_ram -- fills the full 69 x 69 table with entries derived from
// (type i, type j) and reads random type pairs back, checking the one-clock
// read latency and that the output holds while re is low.
module tb_lj_coeff_ram;
  import md_pkg::*;

  logic              clk = 0, we = 0, re = 0;
  logic [LJ_AW-1:0]  waddr = '0;
  lj_coeff_t         wdata = '0, rdata;
  logic [TYPE_W-1:0] ti = '0, tj = '0;
  int checks = 0, failures = 0;

  lj_coeff_ram dut (.*);

  always #5 clk = ~clk;

  function automatic lj_coeff_t entry(int a, int b);
    return {32'(a * 1000 + b), 32'(b * 7 + a), 32'(a ^ (b << 8)), 32'(a * NTYPES + b + 5)};
  endfunction

  initial begin
    lj_coeff_t held;
    @(posedge clk); #1;
    for (int a = 0; a < NTYPES; a++)
      for (int b = 0; b < NTYPES; b++) begin
        we = 1; waddr = LJ_AW'(a * NTYPES + b); wdata = entry(a, b);
        @(posedge clk); #1;
      end
    we = 0;
    for (int k = 0; k < 2000; k++) begin
      int a, b;
      a = $urandom % NTYPES; b = $urandom % NTYPES;
      ti = TYPE_W'(a); tj = TYPE_W'(b); re = 1;
      @(posedge clk); #1;
      re = 0;
      checks++;
      if (rdata !== entry(a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) got %h", a, b, rdata);
      end
      held = rdata;
      ti = TYPE_W'($urandom % NTYPES);
      @(posedge clk); #1;
      checks++;
      if (rdata !== held) failures++;
    end
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
