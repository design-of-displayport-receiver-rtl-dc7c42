// tb_video_clk_synth: checks the synthesized video clock period.
//
// Sixteen phases of a 736 ps recovered clock (46 ps apart, about the
// 1.35 GHz half-rate clock) drive the synthesizer. For each (M,N) the
// expected period is 16*5*N/M sixteenths of 736 ps; every measured period
// must be one of the two neighbouring multiples of 46 ps and the mean
// over 256 periods must match to 0.1%. M is then changed, as in a
// display-format switch, and the new period must settle within 64 output
// cycles.
`timescale 1ps/1ps
module tb_video_clk_synth;
  localparam int T = 736, STEP = 46;
  logic [15:0] mp = '0;
  logic rst_n = 1;
  initial #1 rst_n = 0;   // reset asserted before the first clock edge
  logic [23:0] m, n;
  logic vclk, valid;
  logic [8:0] q; logic [3:0] f;
  int checks = 0, failures = 0;

  for (genvar j = 0; j < 16; j++) begin : g_ph
    initial begin
      #(j*STEP + 1000);
      forever begin mp[j] = 1'b1; #(T/2); mp[j] = 1'b0; #(T/2); end
    end
  end

  video_clk_synth #(.CLK_MULT(5), .PIX_PER_CLK(1)) dut (.mp, .rst_n, .m, .n, .vclk, .q, .f, .valid);

  realtime last = 0, per;
  task automatic measure(input int mm, input int nn, input string name);
    real exp16, sum; int lo, hi, bad;
    exp16 = 80.0 * nn / mm;
    lo = $floor(exp16); hi = lo + 1; sum = 0; bad = 0;
    m = 24'(mm); n = 24'(nn);
    repeat (64) @(posedge vclk);
    last = $realtime;
    for (int i = 0; i < 256; i++) begin
      @(posedge vclk);
      per = $realtime - last; last = $realtime; sum += per;
      if (per != lo*STEP && per != hi*STEP) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d periods off-grid (expect %0d or %0d x46ps)", name, bad, lo, hi); end
    checks++;
    if ((sum/256.0 - exp16*STEP) > 0.001*exp16*STEP || (exp16*STEP - sum/256.0) > 0.001*exp16*STEP) begin
      failures++; $display("FAIL %s: mean %f ps, expected %f ps", name, sum/256.0, exp16*STEP);
    end else $display("ok %s: mean period %f ps (expected %f), f=%f MHz", name, sum/256.0, exp16*STEP, 1e6/(sum/256.0));
  endtask

  initial begin
    m = 24'd10376; n = 24'd32768;
    #5000 rst_n = 1;
    measure(10376, 32768, "85.5MHz");       // 270 MHz * M/N
    measure(32768, 32768, "ratio 1 (Q=5,F=0)");
    measure(17203, 32768, "fractional");
    measure(4321, 32768, "low rate (Q=37)");
    measure(16384, 32768, "even Q=10");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
