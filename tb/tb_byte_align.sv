// tb_byte_align: checks symbol alignment on K28.5.
// An 8b/10b encoded stream with a K28.5 every 20 symbols is serialised
// and cut into 10-bit words starting at bit offset o (o = 0..9). After
// sym_lock the output words must be exactly the encoded symbols (checked
// over 300 words, after locating the first comma). A one-bit slip of the
// stream must move the lock to the new offset (after UNLOCK_CNT = 4
// commas) and the output must again be exact; relock must clear the
// lock. D10.2 words must raise tps1.
`timescale 1ns/1ps
module tb_byte_align;
  import dp_pkg::*;
  import tb_dp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, relock = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [9:0] din = 0, dout; logic sym_lock, tps1;
  byte_align dut (.clk, .rst_n, .relock, .din, .dout, .sym_lock, .tps1);

  logic [9:0] words [$];
  bit bits [$];
  bit rd = 0;
  int bp = 0;
  task automatic gen(input int n);
    for (int i = 0; i < n; i++) begin
      sym_t s; logic [9:0] w;
      s = (words.size() % 20 == 0) ? K(K_BS) : D(8'((words.size() * 29) % 256));
      w = enc(s, rd); words.push_back(w);
      for (int b = 0; b < 10; b++) bits.push_back(w[b]);
    end
  endtask
  // feed n words starting at bit bp
  logic [9:0] outs [$];
  task automatic feed(input int n);
    for (int i = 0; i < n; i++) begin
      for (int b = 0; b < 10; b++) din[b] = bits[bp + b];
      bp += 10;
      @(posedge clk); #1;
      outs.push_back(dout);
    end
  endtask
  task automatic check_exact(input string msg);
    int k, j0, bad; k = -1; bad = 0;
    for (int i = outs.size() - 300; i < outs.size(); i++)
      if (outs[i] == 10'h17C || outs[i] == 10'h283) begin k = i; break; end
    // the comma's index in the source: try all candidates
    j0 = -1;
    for (int j = 0; j < words.size(); j += 20) begin
      bit ok; ok = 1;
      for (int t = 0; t < 40 && k + t < outs.size(); t++) if (outs[k + t] != words[j + t]) ok = 0;
      if (ok) begin j0 = j; break; end
    end
    if (j0 >= 0) for (int t = 0; k + t < outs.size(); t++) if (outs[k + t] != words[j0 + t]) bad++;
    check(k >= 0 && j0 >= 0 && bad == 0, $sformatf("%s: output words exact (bad %0d)", msg, bad));
  endtask

  initial begin
    gen(20000);
    #22 rst_n = 1;
    for (int o = 0; o < 10; o++) begin
      relock = 1; @(posedge clk); #1 relock = 0;
      check(!sym_lock, "relock clears lock");
      bp = bp + 1;                      // move to the next offset
      outs.delete();
      feed(100);
      check(sym_lock, $sformatf("offset %0d: locked", bp % 10));
      feed(300);
      check_exact($sformatf("offset %0d", bp % 10));
    end
    // slip by one bit without relock
    bp = bp + 1; outs.delete();
    feed(60);
    check(sym_lock, "lock kept through a slip");
    feed(300);
    check_exact("after slip");
    for (int i = 0; i < 4; i++) begin din = (i % 2) ? 10'h155 : 10'h2AA; @(posedge clk); #1; end
    check(tps1, "D10.2 detected as TPS1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
