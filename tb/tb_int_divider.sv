// tb_int_divider: checks the 2/3-prescaler integer divider.
// For divisors 4..40 and a few large ones (up to 511) it measures, in
// input clocks, the time between rising output edges (must be exactly Q)
// and the high time (must be Q/2 rounded down or up, i.e. duty within
// half an input cycle of 50 %). The divisor is presented on `load`, as
// the synthesizer does.
`timescale 1ns/1ps
module tb_int_divider;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #1 clk = ~clk;
  logic [8:0] q_in = 9'd4; logic load, div_clk;
  int_divider dut (.clk, .rst_n, .q_in, .load, .div_clk);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic measure(input int qv);
    int t_rise, t_fall, per, hi;
    q_in = 9'(qv);
    repeat (3) @(posedge div_clk);
    @(posedge div_clk); t_rise = cyc;
    @(negedge div_clk); t_fall = cyc;
    @(posedge div_clk); per = cyc - t_rise; hi = t_fall - t_rise;
    check(per == qv, $sformatf("Q=%0d period %0d", qv, per));
    check(hi == qv / 2 || hi == (qv + 1) / 2, $sformatf("Q=%0d high time %0d", qv, hi));
  endtask

  initial begin
    #5 rst_n = 1;
    for (int qv = 4; qv <= 40; qv++) measure(qv);
    measure(255); measure(256); measure(257); measure(511);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
