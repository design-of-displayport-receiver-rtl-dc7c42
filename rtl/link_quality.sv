// link_quality: link quality test of one lane.
//
// Two measurements, selected by the test pattern in use:
//   symbol errors  while sym_en is high, every decoded symbol with a code
//                  or disparity error increments sym_err_cnt (15 bits,
//                  saturating). The source reads the count after a
//                  known time; the error rate is count / (symbol rate x
//                  time), e.g. count / (0.27 * seconds) in units of 1e-9
//                  at 2.7 Gb/s.
//   PRBS7 bits     while prbs_en is high, the raw 10-bit words are
//                  checked bit by bit against the self-synchronizing
//                  PRBS7 rule b[n] = b[n-7] ^ b[n-6]; every mismatch
//                  increments bit_err_cnt (16 bits, saturating).
// clear resets both counters.
//
// Follows the document: symbol error counting per lane, PRBS7 pattern
// check, error-rate formula. Counter widths and the checker structure
// are this design's choices.
module link_quality (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        sym_en,
  input  logic        sym_err,     // code or disparity error of this symbol
  input  logic        prbs_en,
  input  logic [9:0]  raw,         // raw word, bit 0 first
  output logic [14:0] sym_err_cnt,
  output logic [15:0] bit_err_cnt
);
  logic [6:0] hist;               // last 7 bits, hist[0] newest
  logic [3:0] nerr;
  logic [6:0] h_n;

  always_comb begin
    logic [16:0] seq;             // seq[16:10] history (oldest first), seq[9:0] new
    seq  = {hist[6], hist[5], hist[4], hist[3], hist[2], hist[1], hist[0], 10'b0};
    for (int b = 0; b < 10; b++) seq[9-b] = raw[b];
    nerr = '0;
    // bit at position p (p=9..0, time order) depends on p+7 and p+6
    for (int p = 9; p >= 0; p--)
      if (seq[p] != (seq[p+7] ^ seq[p+6])) nerr += 4'd1;
    for (int b = 0; b < 7; b++) h_n[b] = raw[9-b];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin hist <= '0; sym_err_cnt <= '0; bit_err_cnt <= '0; end
    else begin
      hist <= h_n;
      if (clear) begin sym_err_cnt <= '0; bit_err_cnt <= '0; end
      else begin
        if (sym_en && sym_err && sym_err_cnt != '1) sym_err_cnt <= sym_err_cnt + 1'b1;
        if (prbs_en) bit_err_cnt <= (32'(bit_err_cnt) + 32'(nerr) > 32'hFFFF) ? '1
                                    : bit_err_cnt + 16'(nerr);
      end
    end
endmodule
