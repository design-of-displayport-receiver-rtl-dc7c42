// m_filter: filter of the transmitted time-stamp value M.
//
// The source measures M over N link clocks and sends it once per
// blanking period, so individual values jump (quantization, SSC,
// jitter). The filter keeps a running value M':
//   * the first M after clear, or any M sent with a new N, is taken as is;
//   * a new M that differs from M' by more than M' >> REJ_SHIFT is
//     ignored, unless REJ_MAX such values arrive in a row (a real change
//     of the video format), in which case it is taken as is;
//   * otherwise M' moves towards the new M by (M - M') / 2^AVG_SHIFT,
//     rounded (exponential moving average).
// One update per m_valid pulse; N' is N of the last accepted M.
//
// Follows the document: rejection of large jumps, moving average. The
// shift values, the accept-after-REJ_MAX rule and the N handling are
// this design's choices.
module m_filter #(
  parameter int AVG_SHIFT = 2,
  parameter int REJ_SHIFT = 5,
  parameter int REJ_MAX   = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        m_valid,
  input  logic [23:0] m_in,
  input  logic [23:0] n_in,
  output logic [23:0] m_out,
  output logic [23:0] n_out,
  output logic        valid
);
  logic [$clog2(REJ_MAX+1)-1:0] rej;
  wire signed [25:0] diff  = 26'(signed'({2'b0, m_in}) - signed'({2'b0, m_out}));
  wire        [25:0] adiff = diff < 0 ? 26'(-diff) : 26'(diff);
  wire               big   = adiff > 26'(m_out >> REJ_SHIFT);
  wire signed [25:0] stepv = (diff + (26'sd1 <<< (AVG_SHIFT - 1))) >>> AVG_SHIFT;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin m_out <= '0; n_out <= '0; valid <= 1'b0; rej <= '0; end
    else if (clear) begin valid <= 1'b0; rej <= '0; end
    else if (m_valid) begin
      if (!valid || n_in != n_out ||
          (big && rej == ($clog2(REJ_MAX+1))'(REJ_MAX))) begin
        m_out <= m_in; n_out <= n_in; valid <= 1'b1; rej <= '0;
      end else if (big) begin
        rej <= rej + 1'b1;
      end else begin
        m_out <= 24'(signed'({2'b0, m_out}) + stepv);
        rej   <= '0;
      end
    end
endmodule
