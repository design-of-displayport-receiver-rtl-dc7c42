// tb_aux_ch_rx: checks the oversampled Manchester-II AUX receiver
// (16 MHz sampling clock). A transaction is: 28 Manchester zeros
// (pre-charge and sync), the sync end (two bit periods high, two low),
// four data bytes, the STOP pattern. It is sent at 1 Mb/s and at rates
// 20 % and 30 % off in both directions; every byte must be received,
// done must pulse once per transaction, and the measured half-bit period
// must follow the rate (8 samples at 1 Mb/s). Short noise pulses (two
// samples) on the idle line before a transaction must be ignored.
`timescale 1ns/1ps
module tb_aux_ch_rx;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, rx = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #31.25 clk = ~clk;
  logic [7:0] rx_byte; logic byte_valid, done, in_sync; logic [9:0] th;
  aux_ch_rx dut (.clk, .rst_n, .rx, .rx_byte, .byte_valid, .done, .in_sync, .th);
  int got [$]; int n_done = 0;
  always @(posedge clk) begin if (byte_valid) got.push_back(int'(rx_byte)); if (done) n_done++; end
  real hb;
  task automatic half(input bit v); rx = v; #(hb); endtask
  task automatic send(input real rate, input logic [7:0] b [4]);
    hb = 500.0 / rate;
    for (int i = 0; i < 28; i++) begin half(0); half(1); end
    repeat (4) half(1); repeat (4) half(0);
    for (int i = 0; i < 4; i++) for (int j = 7; j >= 0; j--) begin half(!b[i][j]); half(b[i][j]); end
    repeat (4) half(1); repeat (4) half(0);
    rx = 0; #3000;
  endtask
  initial begin
    real rates [5] = '{1.0, 1.2, 0.8, 1.3, 0.77};
    #200 rst_n = 1; #1000;
    for (int r = 0; r < 5; r++) begin
      logic [7:0] b [4];
      b = '{8'h90, 8'(r * 37), 8'hA5, 8'h3C};
      got.delete(); n_done = 0;
      // noise: two-sample pulses on the idle line
      repeat (3) begin rx = 1; #125; rx = 0; #2000; end
      fork
        send(rates[r], b);
        begin
          #(hb * 40);
          check(th >= 10'(int'(16 * 8 / rates[r]) - 16) && th <= 10'(int'(16 * 8 / rates[r]) + 16),
                $sformatf("rate %.2f: half-bit period %0d/16 samples", rates[r], th));
        end
      join
      check(got.size() == 4 && got[0] == 8'h90 && got[1] == r * 37 && got[2] == 8'hA5 && got[3] == 8'h3C,
            $sformatf("rate %.2f: %0d bytes received", rates[r], got.size()));
      check(n_done == 1, $sformatf("rate %.2f: one done pulse", rates[r]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
