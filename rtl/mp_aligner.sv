// mp_aligner: multi-phase aligner of the video clock synthesizer.
//
// The integer-divided clock (launched on MP[0]) is delayed by two cycles
// of MP[0] and then re-sampled by each of the 16 phases MP[j]. Output
// aligned[p] is the divided clock delayed by 2 + (p+1)/16 recovered-clock
// cycles, so aligned[0] .. aligned[15] are spaced by 1/16 cycle and
// aligned[15] is exactly 3 cycles late. The phase selector switches
// between these copies while all of them are at the same level, which is
// what makes the phase switching free of glitches.
//
// Follows the document: sampling of the divided clock by the multi-phase
// clocks and a delay of up to 3 cycles. The document's arrangement that
// samples first with phases 12 apart and then with the remaining phases
// (to widen the flip-flop timing margin) is not reproduced: here every
// copy is taken from the same 2-cycle-delayed signal, which is
// equivalent in a zero-delay model but has less margin in silicon.
module mp_aligner #(
  parameter int PHASES = 16
) (
  input  logic [PHASES-1:0] mp,        // multi-phase clocks, mp[j] lags mp[0] by j/PHASES cycle
  input  logic              rst_n,
  input  logic              div_clk,   // integer-divided clock, launched on mp[0]
  output logic [PHASES-1:0] aligned    // aligned[p]: delay 2 + (p+1)/PHASES cycles
);
  logic d1, d2;
  always_ff @(posedge mp[0] or negedge rst_n)
    if (!rst_n) begin d1 <= 1'b0; d2 <= 1'b0; end
    else        begin d1 <= div_clk; d2 <= d1; end

  logic [PHASES-1:0] smp;
  for (genvar j = 0; j < PHASES; j++) begin : g_smp
    always_ff @(posedge mp[j] or negedge rst_n)
      if (!rst_n) smp[j] <= 1'b0;
      else        smp[j] <= d2;
  end

  for (genvar p = 0; p < PHASES; p++) begin : g_out
    assign aligned[p] = smp[(p + 1) % PHASES];
  end
endmodule
