// phase_selector: glitch-free phase selection of the video clock synthesizer.
//
// The 4-bit phase word is converted to an 8-bit thermometer code and
// registered by a strobe that is the video clock re-timed first on the
// rising and then on the falling edge of MP[0]. The strobe therefore
// rises 1.5 MP[0] cycles after the video clock edge has been seen, when
// every aligned copy of the divided clock is high, so changing the
// selection cannot cut a pulse. The output is chosen by two cascaded
// 4:1 multiplexer stages: four 4:1 muxes pick, within each group of four
// phases, the phase given by sel[3:0]; a last 4:1 mux picks the group
// given by sel[7:4].
//
// sel[3:0] is the thermometer code of phase[1:0] and sel[7:4] that of
// phase[3:2] (0 -> 0000, 1 -> 0001, 2 -> 0011, 3 -> 0111); the grouping
// of the phases and this code assignment are this design's choices, the
// two-stage structure and the strobe path follow the document.
module phase_selector #(
  parameter int PHASES = 16
) (
  input  logic              mp0,       // phase MP[0]
  input  logic              rst_n,
  input  logic [PHASES-1:0] aligned,   // from mp_aligner
  input  logic [3:0]        phase,     // phase to use from the next period on
  output logic              vclk       // selected (video) clock
);
  function automatic logic [3:0] thermo2(input logic [1:0] b);
    return 4'((5'd1 << b) - 5'd1);
  endfunction

  function automatic logic [1:0] unthermo(input logic [3:0] t);
    return 2'(t[0]) + 2'(t[1]) + 2'(t[2]);
  endfunction

  logic s1, strobe;
  always_ff @(posedge mp0 or negedge rst_n)
    if (!rst_n) s1 <= 1'b0; else s1 <= vclk;
  always_ff @(negedge mp0 or negedge rst_n)
    if (!rst_n) strobe <= 1'b0; else strobe <= s1;

  logic [7:0] sel;
  always_ff @(posedge strobe or negedge rst_n)
    if (!rst_n) sel <= '0;
    else        sel <= {thermo2(phase[3:2]), thermo2(phase[1:0])};

  logic [3:0] stage1;
  always_comb begin
    for (int g = 0; g < 4; g++)
      stage1[g] = aligned[4*g + 32'(unthermo(sel[3:0]))];
    vclk = stage1[unthermo(sel[7:4])];
  end
endmodule
