// tb_mp_aligner: checks the multi-phase aligner.
// 16 phase clocks (period 1600 ps, 100 ps apart) and a divided clock
// launched on MP[0] (divide by 7). For every rising edge of the divided
// clock, aligned[p] must rise exactly 2 + (p+1)/16 cycles later
// (3200 + 100*(p+1) ps), so the copies are spaced by 1/16 cycle and the
// last one is 3 cycles late, as the document's 3-cycle delay.
`timescale 1ps/1ps
module tb_mp_aligner;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [3:0] tick = 0;
  always #100 tick = tick + 1'b1;
  logic [15:0] mp;
  always_comb for (int j = 0; j < 16; j++) mp[j] = 4'(tick - 4'(j)) < 4'd8;
  logic rst_n = 1, div_clk = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  logic [15:0] aligned;
  mp_aligner dut (.mp, .rst_n, .div_clk, .aligned);
  int c = 0;
  always @(posedge mp[0]) begin c <= (c == 6) ? 0 : c + 1; div_clk <= (c < 3); end

  time t_div = 0;
  always @(posedge div_clk) t_div = $time;
  for (genvar p = 0; p < 16; p++) begin : g
    always @(posedge aligned[p]) if (rst_n && t_div > 0)
      check($time - t_div == 3200 + 100 * (p + 1) || $time - t_div + 7 * 1600 == 3200 + 100 * (p + 1),
            $sformatf("aligned[%0d] delay %0d", p, $time - t_div));
  end

  initial begin
    #1000 rst_n = 1;
    #200_000;
    check(checks > 100, "edges observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
