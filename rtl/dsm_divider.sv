// dsm_divider: divider-merged first-order delta-sigma modulator.
//
// Produces, once per video clock, the division ratio used by the
// fractional divider of the video clock synthesizer, as a 9-bit integer
// part Q and a 4-bit fraction F in units of 1/16 of the recovered clock
// period. A binary divider computes
//     {Q,F} + R/M = 16 * CLK_MULT * PIX_PER_CLK * N / M
// where CLK_MULT is the ratio of the recovered (phase) clock to the link
// symbol clock. The remainder R is added to an accumulator every cycle;
// when the accumulator passes M the ratio of that cycle is raised by one
// LSB (1/16 period). The long-run average is then exact, and the output
// only dithers between two adjacent 1/16 steps.
//
// The binary divider is a sequential restoring divider (one quotient bit
// per clock, NUM_W+1 clocks per result): M and N change only once per
// blanking period, so a new ratio a few tens of cycles later is enough.
// M and N come from another clock domain and are taken only when two
// consecutive samples agree. A Q smaller than 4 (the integer divider's
// lower limit) is replaced by 16.
//
// Follows the document: 24-bit M and N, 9-bit Q, 4-bit F, first-order
// DSM on the remainder, the Q<4 guard. This design's choices: the
// sequential divider, the input capture, the constant factor in the
// numerator and saturation of ratios that do not fit in 13 bits.
module dsm_divider #(
  parameter int MN_W        = 24,
  parameter int Q_W         = 9,
  parameter int F_W         = 4,
  parameter int CLK_MULT    = 5,   // recovered clock / link symbol clock
  parameter int PIX_PER_CLK = 1
) (
  input  logic            clk,     // video clock (synthesizer output)
  input  logic            rst_n,
  input  logic [MN_W-1:0] m,
  input  logic [MN_W-1:0] n,
  output logic [Q_W-1:0]  q,       // integer part of this cycle's ratio
  output logic [F_W-1:0]  f,       // fraction of this cycle's ratio
  output logic            valid    // a ratio has been computed
);
  localparam int SCALE = (1 << F_W) * CLK_MULT * PIX_PER_CLK;
  localparam int SC_W  = $clog2(SCALE + 1);
  localparam int NUM_W = MN_W + SC_W;
  localparam int R_W   = Q_W + F_W;

  // ---------------- input capture ----------------
  logic [MN_W-1:0] m_s1, m_s2, n_s1, n_s2;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      m_s1 <= '0; m_s2 <= '0; n_s1 <= '0; n_s2 <= '0;
    end else begin
      m_s1 <= m; m_s2 <= m_s1; n_s1 <= n; n_s2 <= n_s1;
    end
  wire stable = (m_s1 == m_s2) && (n_s1 == n_s2) && (m_s2 != '0);

  // ---------------- sequential restoring divider ----------------
  logic [NUM_W-1:0] num_sh;    // numerator bits still to shift in
  logic [MN_W:0]    rem;       // partial remainder
  logic [NUM_W-1:0] quo;
  logic [MN_W-1:0]  div_m;
  logic [$clog2(NUM_W+1)-1:0] bitcnt;
  logic             busy;

  logic [R_W-1:0]   ratio_r;   // latched quotient {Q,F}
  logic [MN_W-1:0]  rem_r;     // latched remainder
  logic [MN_W-1:0]  mod_r;     // latched modulus (M)

  wire [MN_W:0] rem_sh  = {rem[MN_W-1:0], num_sh[NUM_W-1]};
  wire          ge      = rem_sh >= {1'b0, div_m};
  wire [MN_W:0] rem_nxt = ge ? rem_sh - {1'b0, div_m} : rem_sh;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; bitcnt <= '0; num_sh <= '0; rem <= '0; quo <= '0; div_m <= '0;
      ratio_r <= '0; rem_r <= '0; mod_r <= '1; valid <= 1'b0;
    end else if (!busy) begin
      if (stable) begin
        busy   <= 1'b1;
        bitcnt <= '0;
        num_sh <= NUM_W'(n_s2) * NUM_W'(SCALE);
        rem    <= '0;
        quo    <= '0;
        div_m  <= m_s2;
      end
    end else begin
      num_sh <= num_sh << 1;
      rem    <= rem_nxt;
      quo    <= {quo[NUM_W-2:0], ge};
      bitcnt <= bitcnt + 1'b1;
      if (32'(bitcnt) == NUM_W - 1) begin
        busy  <= 1'b0;
        valid <= 1'b1;
        // quotient bits above R_W mean the ratio does not fit: saturate
        if ((({quo[NUM_W-2:0], ge}) >> R_W) != '0) begin
          ratio_r <= '1;
          rem_r   <= '0;
        end else begin
          ratio_r <= R_W'({quo[NUM_W-2:0], ge});
          rem_r   <= rem_nxt[MN_W-1:0];
        end
        mod_r <= div_m;
      end
    end

  // ---------------- first-order DSM on the remainder ----------------
  logic [MN_W-1:0] acc;
  wire  [MN_W:0]   acc_sum = {1'b0, acc} + {1'b0, rem_r};
  wire             carry   = acc_sum >= {1'b0, mod_r};
  wire  [R_W:0]    ratio_d = {1'b0, ratio_r} + (R_W+1)'(carry);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc <= '0; q <= Q_W'(16); f <= '0;
    end else begin
      acc <= carry ? MN_W'(acc_sum - {1'b0, mod_r}) : acc_sum[MN_W-1:0];
      if (ratio_d[R_W] || ratio_d[R_W-1:F_W] < Q_W'(4)) begin
        q <= Q_W'(16);                  // out-of-range ratio: safe default
        f <= '0;
      end else begin
        q <= ratio_d[R_W-1:F_W];
        f <= ratio_d[F_W-1:0];
      end
    end

endmodule
