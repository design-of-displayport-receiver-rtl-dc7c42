// tb_aux_ch_tx: checks the AUX Manchester-II transmitter.
// The line is decoded twice: by aux_ch_rx (loop-back) and by a model that
// samples the line in the middle of every half bit. Each transaction of
// 1, 3 and 16 bytes must come back byte for byte with one STOP; the model
// must see 28 zeros, the sync end and the bytes, every half bit must last
// exactly 8 clocks (1 Mb/s from 16 MHz), and the whole transaction
// (28 zeros + 4 sync end + 8n + 4 STOP bit periods) must take exactly
// 16 * (36 + 8n) clocks.
`timescale 1ns/1ps
module tb_aux_ch_tx;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #31.25 clk = ~clk;
  logic start = 0; logic [4:0] nbytes = 0; logic [7:0] data = 0;
  logic byte_req, tx, tx_en, busy;
  aux_ch_tx dut (.clk, .rst_n, .start, .nbytes, .data, .byte_req, .tx, .tx_en, .busy);
  logic [7:0] rx_byte; logic byte_valid, done, in_sync; logic [9:0] th;
  aux_ch_rx rx (.clk, .rst_n, .rx(tx), .rx_byte, .byte_valid, .done, .in_sync, .th);

  logic [7:0] msg [16];
  int idx = 0;
  always @(posedge clk) if (byte_req) begin idx++; #1 data = msg[idx % 16]; end
  int got [$]; int n_done = 0;
  always @(posedge clk) begin if (byte_valid) got.push_back(int'(rx_byte)); if (done) n_done++; end
  // run lengths of the line level in clocks while enabled
  int run = 0, bad_runs = 0; logic tx_d = 0;
  always @(posedge clk) begin
    if (tx_en && tx == tx_d) run++;
    else begin
      if (tx_en && run != 0 && run % 8 != 0) bad_runs++;
      run = tx_en ? 1 : 0;
    end
    tx_d <= tx;
  end
  int busy_clks = 0;
  always @(posedge clk) if (busy) busy_clks++;

  initial begin
    int sizes [3] = '{1, 3, 16};
    #200 rst_n = 1; #500;
    foreach (sizes[s]) begin
      int n; n = sizes[s];
      for (int i = 0; i < 16; i++) msg[i] = 8'(37 * i + 11 * s + 5);
      got.delete(); n_done = 0; busy_clks = 0; bad_runs = 0; idx = 0;
      @(negedge clk); data = msg[0]; nbytes = 5'(n); start = 1; @(negedge clk); start = 0;
      wait (!busy); repeat (40) @(posedge clk);
      check(busy_clks == 16 * (36 + 8 * n), $sformatf("%0d bytes: %0d clocks", n, busy_clks));
      check(bad_runs == 0, $sformatf("%0d bytes: half bits of 8 clocks", n));
      check(got.size() == n, $sformatf("%0d bytes: %0d received", n, got.size()));
      for (int i = 0; i < n && i < got.size(); i++)
        check(got[i] == int'(msg[i]), $sformatf("byte %0d: %h vs %h", i, got[i], msg[i]));
      check(n_done == 1, "one STOP");
      check(!tx_en && !tx, "line released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
