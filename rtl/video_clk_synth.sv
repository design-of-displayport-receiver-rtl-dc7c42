// video_clk_synth: direct all-digital video stream clock synthesizer.
//
// Generates the video clock Fout = PIX_PER_CLK^-1 * (M/N) * f_ls from the
// 16-phase recovered clock (f_mp = CLK_MULT * f_ls) without a PLL. The
// division ratio 16*CLK_MULT*PIX_PER_CLK*N/M, in sixteenths of a
// recovered-clock period, comes from the divider-merged DSM as {Q,F}.
// Each output period is built in two parts:
//   * the integer divider counts Q (+1 on a phase wrap) recovered-clock
//     cycles;
//   * a 4-bit phase accumulator adds F every period; the sum selects which
//     of the 16 aligned copies of the divided clock drives the output, so
//     each output edge is moved by F/16 of a cycle relative to the last.
// When the accumulator wraps, one extra integer cycle is counted and the
// phase steps back by 16/16, which keeps the period at Q + F/16.
// The DSM runs on the synthesized clock itself, one new ratio per output
// cycle, so the output alternates between two periods 1/16 cycle apart
// whose mean is the exact ratio.
//
// Timing: the output edge lags the divider edge by 2+(p+1)/16 cycles; the
// phase selection changes 1.5 cycles after the output edge is seen.
// The recovered clock must be at least 4x (5x for every phase) the output
// clock.
//
// Follows the document: integer divider first, then multi-phase aligner
// and phase selector, DSM as arithmetic divider, 9-bit Q and 4-bit F.
// This design's choice: the explicit phase accumulator with carry into
// the integer divider (the document does not show how the phase word is
// formed from F).
module video_clk_synth #(
  parameter int MN_W        = 24,
  parameter int CLK_MULT    = 5,
  parameter int PIX_PER_CLK = 1
) (
  input  logic [15:0]     mp,       // 16 phases of the recovered clock
  input  logic            rst_n,
  input  logic [MN_W-1:0] m,
  input  logic [MN_W-1:0] n,
  output logic            vclk,     // synthesized video clock
  output logic [8:0]      q,        // ratio in use (for observation)
  output logic [3:0]      f,
  output logic            valid
);
  logic       load, div_clk;
  logic [3:0] phase;
  logic [15:0] aligned;

  dsm_divider #(.MN_W(MN_W), .Q_W(9), .F_W(4), .CLK_MULT(CLK_MULT),
                .PIX_PER_CLK(PIX_PER_CLK))
    u_dsm (.clk(vclk), .rst_n, .m, .n, .q, .f, .valid);

  // phase accumulator in the MP[0] domain, advanced once per period
  wire  [4:0] acc_sum = {1'b0, phase} + {1'b0, f};
  wire  [8:0] q_next  = q + 9'(acc_sum[4]);

  always_ff @(posedge mp[0] or negedge rst_n)
    if (!rst_n)    phase <= '0;
    else if (load) phase <= acc_sum[3:0];

  int_divider #(.Q_W(9)) u_int (.clk(mp[0]), .rst_n, .q_in(q_next), .load, .div_clk);

  mp_aligner #(.PHASES(16)) u_align (.mp, .rst_n, .div_clk, .aligned);

  phase_selector #(.PHASES(16)) u_sel (.mp0(mp[0]), .rst_n, .aligned, .phase, .vclk);

endmodule
