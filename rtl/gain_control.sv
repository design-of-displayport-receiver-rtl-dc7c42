// gain_control: gain control of the frequency error compensation.
//
// Integrates the Up/Dn decisions of the FIFO monitor into a signed
// correction k that is added to the filtered M (M'' = M' + k). The step
// adapts: it starts at STEP, doubles with every further decision in the
// same direction (up to STEP << MAX_LVL) and falls back to STEP when the
// direction reverses, so a large error is caught quickly and a small one
// settles finely. k is limited to +-(M' >> LIM_SHIFT); with the default
// LIM_SHIFT = 8 that is 0.39% of M, inside the 0.5% bound on the video
// clock variation. clear sets k back to 0.
//
// Follows the document: Up/Dn in, k out, adjustable amount, bound of the
// clock variation. The doubling rule and the limit are this design's.
module gain_control #(
  parameter int K_W       = 16,
  parameter int STEP      = 1,
  parameter int MAX_LVL   = 4,
  parameter int LIM_SHIFT = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  up,
  input  logic                  dn,
  input  logic [23:0]           m_ref,   // M' (limit reference)
  output logic signed [K_W-1:0] k
);
  logic [$clog2(MAX_LVL+1)-1:0] lvl;
  logic                          last_up;

  wire signed [K_W+1:0] lim  = (K_W+2)'(m_ref >> LIM_SHIFT);
  localparam int LW = $clog2(MAX_LVL+1);
  // level of this decision: back to 0 on a reversal, else one higher
  wire [LW-1:0]         nlvl = (up != last_up) ? '0 :
                               (lvl == LW'(MAX_LVL)) ? lvl : lvl + 1'b1;
  wire signed [K_W+1:0] step = (K_W+2)'(STEP << nlvl);
  wire signed [K_W+1:0] kx   = (K_W+2)'(k);
  wire signed [K_W+1:0] k_up = (kx + step > lim)  ? lim  : kx + step;
  wire signed [K_W+1:0] k_dn = (kx - step < -lim) ? -lim : kx - step;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin k <= '0; lvl <= '0; last_up <= 1'b0; end
    else if (clear) begin k <= '0; lvl <= '0; end
    else if (up ^ dn) begin
      k       <= K_W'(up ? k_up : k_dn);
      last_up <= up;
      lvl     <= nlvl;
    end
endmodule
