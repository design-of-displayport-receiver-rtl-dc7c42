// dcr_decoder: code decoder of the digitally controlled resistor.
//
// The DCR is a matrix of 32 x 32 unit resistor cells plus one fine cell.
// The 11-bit integral word w selects how many cells conduct:
//   rows   = w[10:6]  -> row[30:0], thermometer (row[i] = i < rows)
//   cols   = w[5:1]   -> col[30:0], thermometer (col[j] = j < cols)
//   fine   = w[0]     -> the fine cell
// A cell (n, m) conducts when its row is full (row[n]) or when its row is
// the partly filled one (row[n-1] & !row[n], with row[-1] = 1) and
// col[m] is set. The number of conducting matrix cells is therefore
// 32*rows + cols = w[10:1], monotonic in w, and a one-code change
// switches a single cell, which keeps glitches small. Outputs are
// registered.
//
// Follows the document: 11-bit integral word, 31-bit row and 31-bit
// column segmented thermometer codes. The split of the word and the use
// of the LSB for a fine cell are this design's choices.
module dcr_decoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [10:0] w,
  output logic [30:0] row,
  output logic [30:0] col,
  output logic        fine
);
  function automatic logic [30:0] thermo(input logic [4:0] v);
    logic [30:0] t;
    for (int i = 0; i < 31; i++) t[i] = (5'(i) < v);
    return t;
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin row <= '0; col <= '0; fine <= 1'b0; end
    else begin
      row  <= thermo(w[10:6]);
      col  <= thermo(w[5:1]);
      fine <= w[0];
    end
endmodule
