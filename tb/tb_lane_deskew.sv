// tb_lane_deskew: checks inter-lane de-skew.
// The same symbol stream (a BS every 60 symbols, the TPS2 pattern in a
// first part) is sent on four lanes with the transmitter's skew of two
// symbols per lane plus channel skew (lane delays 1, 3, 5, 7 symbols).
// After `aligned`, all four output lanes must carry the same symbol in
// every clock. Changing a lane's delay must drop and regain alignment;
// with two active lanes only lanes 0 and 1 are aligned.
`timescale 1ns/1ps
module tb_lane_deskew;
  import dp_pkg::*;
  import tb_dp_pkg::*;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic clk = 0, rst_n = 1, realign = 0;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  always #5 clk = ~clk;
  logic [2:0] lane_cnt = 3'd4;
  sym_t [3:0] din, dout; logic aligned;
  lane_deskew dut (.clk, .rst_n, .realign, .lane_cnt, .din, .dout, .aligned);
  sym_t hist [$];
  int dly [4] = '{1, 3, 5, 7};
  int n = 0; bit tps2 = 1;
  function automatic sym_t sym_at(input int i);
    if (i < 0) return D(8'h00);
    if (tps2 && i < 400) begin
      int p; p = i % 10;
      return (p == 0 || p == 2) ? K(K_BS) : (p == 1 || p == 3) ? D(8'hCB) : D(8'h4A);
    end
    return (i % 60 == 0) ? K(K_BS) : D(8'(i * 7));
  endfunction
  // lane 0 output statistics: BS symbols, and data symbols that follow
  // their predecessor by +7 as the frame stream does
  int n_bs = 0, n_seq = 0;
  sym_t prev0;
  task automatic step(input int cycles, output int mism);
    mism = 0; n_bs = 0; n_seq = 0; prev0 = '0;
    for (int c = 0; c < cycles; c++) begin
      for (int l = 0; l < 4; l++) din[l] = sym_at(n - dly[l]);
      n++;
      @(posedge clk); #1;
      for (int l = 1; l < 32'(lane_cnt); l++) if (dout[l] != dout[0]) mism++;
      if (dout[0].k && dout[0].d == K_BS) n_bs++;
      if (!dout[0].k && !prev0.k && dout[0].d == 8'(prev0.d + 8'd7)) n_seq++;
      prev0 = dout[0];
    end
  endtask
  initial begin
    int m;
    #22 rst_n = 1;
    step(300, m);
    check(aligned, "aligned on the TPS2 pattern");
    step(200, m);
    check(aligned && m == 0, $sformatf("lanes equal during TPS2 (%0d mismatches)", m));
    step(600, m);
    check(aligned && m == 0, $sformatf("lanes equal in the frame stream (%0d)", m));
    check(n_bs == 10 && n_seq >= 570, $sformatf("lane 0 carries the stream (%0d BS, %0d in sequence)", n_bs, n_seq));
    dly[2] = 6;
    step(200, m);
    step(300, m);
    check(aligned && m == 0, $sformatf("re-aligned after skew change (%0d)", m));
    lane_cnt = 3'd2; dly[3] = 0;
    realign = 1; @(posedge clk); #1 realign = 0;
    step(200, m); step(300, m);
    check(aligned && m == 0, "two-lane alignment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1_000_000; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1); $finish; end
endmodule
