// tb_ch_ctrl: checks lane swap, polarity inversion and bit reversal.
// For a set of configurations and random-looking words, each output lane
// (one clock later) must equal the selected input lane, inverted and/or
// bit-reversed as configured.
`timescale 1ns/1ps
module tb_ch_ctrl;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [3:0][9:0] din = '0, dout;
  logic [3:0][1:0] swap_sel = '0;
  logic [3:0] inv = '0, rev = '0;
  ch_ctrl dut (.clk, .rst_n, .din, .swap_sel, .inv, .rev, .dout);
  initial begin
    #22 rst_n = 1;
    for (int t = 0; t < 64; t++) begin
      for (int i = 0; i < 4; i++) begin
        din[i] = 10'((t * 97 + i * 389) ^ (t << 3));
        swap_sel[i] = 2'((i + t) % 4);
      end
      if (t % 8 == 3) swap_sel = {2'd0, 2'd0, 2'd3, 2'd1};
      inv = 4'(t * 5); rev = 4'(t * 3 + 1);
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) begin
        logic [9:0] w, r;
        w = din[swap_sel[i]] ^ {10{inv[i]}};
        for (int b = 0; b < 10; b++) r[b] = w[9-b];
        check(dout[i] == (rev[i] ? r : w), $sformatf("t=%0d lane %0d", t, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
