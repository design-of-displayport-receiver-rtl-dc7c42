// tb_phase_selector: checks the cascaded-multiplexer phase selector.
// 16 aligned copies of a clock of period 8 MP cycles (1600 ps cycles,
// copies 100 ps apart) are applied. For each phase word p the output must
// follow copy p: its rising edges come 100*p ps after those of copy 0.
// When the phase word changes, the period in which it takes effect must
// have no glitch: every high and low pulse stays at least 3 cycles wide.
`timescale 1ps/1ps
module tb_phase_selector;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  // one tick = 100 ps = 1/16 cycle; the base clock is high for 4 of 8
  // cycles; copy p is the base clock delayed by 32 + p ticks
  logic [31:0] tick = 0;
  always #100 tick = tick + 1;
  logic mp0;
  assign mp0 = tick[3:0] < 4'd8;
  logic rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  logic [15:0] aligned;
  always_comb for (int p = 0; p < 16; p++) aligned[p] = 7'(tick - 32'd32 - 32'(p)) < 7'd64;
  logic [3:0] phase = 0;
  logic vclk;
  phase_selector dut (.mp0, .rst_n, .aligned, .phase, .vclk);

  time t_b, t_v, t_last; int min_w = 1_000_000;
  always @(posedge aligned[0]) t_b = $time;
  always @(vclk) begin
    if (rst_n && t_last > 0 && $time - t_last < min_w) min_w = $time - t_last;
    t_last = $time;
  end
  initial begin
    #500 rst_n = 1;
    for (int p = 0; p < 16; p++) begin
      phase = 4'(p);
      repeat (3) @(posedge vclk);
      @(posedge aligned[0]);
      @(posedge vclk);
      check((($time - t_b) % 12800) == 100 * p, $sformatf("phase %0d: offset %0d ps", p, $time - t_b));
    end
    for (int p = 15; p >= 0; p -= 3) begin phase = 4'(p); repeat (3) @(posedge vclk); end
    check(min_w >= 3 * 1600, $sformatf("no glitch, narrowest pulse %0d ps", min_w));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #50_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
