// ch_ctrl: channel control of the logical PHY.
//
// Applies three register-controlled corrections to the 10-bit
// deserialized words of the lanes, in this order and registered once:
//   lane swap      output lane i takes input lane swap_sel[i];
//   polarity       inv[i] inverts every bit of output lane i;
//   bit reversal   rev[i] reverses the bit order of output lane i.
// Word bit 0 is the first bit received.
//
// Follows the document: lane swapping between lanes 0..3, polarity
// inversion and bit-order reversal by user configuration. Order of the
// operations and the register stage are this design's choices.
module ch_ctrl #(
  parameter int LANES = 4
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [LANES-1:0][9:0]                din,
  input  logic [LANES-1:0][$clog2(LANES)-1:0]  swap_sel,
  input  logic [LANES-1:0]                     inv,
  input  logic [LANES-1:0]                     rev,
  output logic [LANES-1:0][9:0]                dout
);
  function automatic logic [9:0] reverse10(input logic [9:0] w);
    logic [9:0] r;
    for (int b = 0; b < 10; b++) r[b] = w[9-b];
    return r;
  endfunction

  logic [LANES-1:0][9:0] w;   // lane-swapped, polarity-corrected words
  always_comb
    for (int i = 0; i < LANES; i++) w[i] = din[swap_sel[i]] ^ {10{inv[i]}};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) dout <= '0;
    else
      for (int i = 0; i < LANES; i++) dout[i] <= rev[i] ? reverse10(w[i]) : w[i];
endmodule
