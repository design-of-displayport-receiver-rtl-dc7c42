// tb_bbpd_deser: checks the half-rate bang-bang detector and 2:10
// deserializer. Four quadrature clocks of 736 ps (2.72 Gb/s) sample a
// serial stream. Checks: clk_ls has a period of 5 half-rate cycles
// (3680 ps); the data words, taken in order, reproduce the transmitted
// bit stream; with transitions placed 46 ps after the edge-sampling
// clocks (clock early) only pd_dn fires and the edge bits equal the
// earlier data bits; with transitions 46 ps before them (clock late)
// only pd_up fires.
`timescale 1ps/1ps
module tb_bbpd_deser;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [3:0] tick = 0;
  always #46 tick = tick + 1'b1;
  logic [15:0] mp;
  always_comb for (int j = 0; j < 16; j++) mp[j] = 4'(tick - 4'(j)) < 4'd8;
  logic [3:0] clk;
  assign clk = {mp[12], mp[8], mp[4], mp[0]};
  logic rst_n = 1, din = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  logic pd_up, pd_dn, clk_ls; logic [9:0] d, e;
  bbpd_deser dut (.rst_n, .din, .clk, .pd_up, .pd_dn, .d, .e, .clk_ls);

  bit late = 0;                 // transitions after the edge clocks
  int sent = 0;
  function automatic bit bitv(input int i); return 1'((i ^ (i >> 2) ^ (i >> 5)) & 1); endfunction
  initial begin
    forever begin
      @(posedge (late ? mp[5] : mp[3])); din <= bitv(sent); sent++;
      @(posedge (late ? mp[13] : mp[11])); din <= bitv(sent); sent++;
    end
  end
  int n_up = 0, n_dn = 0;
  always @(negedge clk[0]) if (rst_n) begin n_up += int'(pd_up); n_dn += int'(pd_dn); end
  bit rx [$];
  time t_ls [$];
  always @(posedge clk_ls) if (rst_n) begin
    for (int b = 0; b < 10; b++) rx.push_back(d[b]);
    t_ls.push_back($time);
  end

  initial begin
    int off, bad;
    #5000 rst_n = 1;
    #400_000;
    check(t_ls.size() > 50 && t_ls[20] - t_ls[19] == 3680, "link clock period 5 half-rate cycles");
    // find the offset of the received stream in the sent stream
    off = -1;
    for (int o = 0; o < 40; o++) begin
      bit ok; ok = 1;
      for (int i = 100; i < 300; i++) if (rx[i] != bitv(i + o - 0)) ok = 0;
      if (ok) begin off = o; break; end
    end
    check(off >= 0, "data words reproduce the bit stream");
    check(n_up > 50 && n_dn == 0, $sformatf("early transitions: up=%0d dn=%0d", n_up, n_dn));
    late = 1; #20_000; n_up = 0; n_dn = 0;
    #400_000;
    check(n_dn > 50 && n_up == 0, $sformatf("late transitions: up=%0d dn=%0d", n_up, n_dn));
    bad = 0;
    for (int i = 1; i < 10; i++) if (d[i] != d[i-1] && e[i] != d[i-1]) bad++;
    check(bad == 0, "edge bits equal the earlier data bits when the clock is early");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
