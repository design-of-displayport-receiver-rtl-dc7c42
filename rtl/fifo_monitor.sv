// fifo_monitor: FIFO status monitor of the frequency error compensation.
//
// Watches the distance between the line FIFO's write pointer (link
// clock domain) and read pointer (video clock domain). In the intended
// steady state the writer is half a line ahead whenever the reader
// starts a line. At each line start of the reader (line_start) the
// distance d = wpix - rpix is compared with hwidth/2:
//   d > hwidth/2 + TOL  -> up  (read clock too slow: raise M)
//   d < hwidth/2 - TOL  -> dn  (read clock too fast: lower M)
// It also flags the two false operations of the FIFO at any time:
//   udf  the reader has caught up with the writer (would read stale data)
//   ovf  the writer is more than DEPTH pixels ahead (would overwrite)
//
// The write count crosses into the video clock domain through a
// toggle handshake: the link side copies wpix into a holding register
// only after the previous copy has been acknowledged, so the video side
// always captures a stable value, a few clocks old.
//
// Follows the document: monitoring of the write and read addresses,
// Up/Dn output, half-line target. Tolerance, the line-start sampling
// point and the handshake are this design's choices.
module fifo_monitor #(
  parameter int DEPTH = 2560,
  parameter int TOL   = 8
) (
  input  logic        wclk,
  input  logic        wrst_n,
  input  logic [23:0] wpix,        // pixels written (link clock domain)
  input  logic        rclk,
  input  logic        rrst_n,
  input  logic [23:0] rpix,        // pixels read (video clock domain)
  input  logic        line_start,  // reader begins a line (video clock)
  input  logic        reading,     // reader is fetching pixels now
  input  logic [15:0] hwidth,
  output logic        up,          // one-cycle pulses, video clock domain
  output logic        dn,
  output logic        ovf,
  output logic        udf,
  output logic signed [24:0] distance  // last measured distance
);
  // ---- link side ----
  logic [23:0] hold;
  logic        req, ack_s1, ack_s2;
  logic        ack;
  always_ff @(posedge wclk or negedge wrst_n)
    if (!wrst_n) begin hold <= '0; req <= 1'b0; ack_s1 <= 1'b0; ack_s2 <= 1'b0; end
    else begin
      ack_s1 <= ack; ack_s2 <= ack_s1;
      if (ack_s2 == req) begin hold <= wpix; req <= ~req; end
    end

  // ---- video side ----
  logic        req_s1, req_s2;
  logic [23:0] wpix_v;
  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin req_s1 <= 1'b0; req_s2 <= 1'b0; ack <= 1'b0; wpix_v <= '0; end
    else begin
      req_s1 <= req; req_s2 <= req_s1;
      if (req_s2 != ack) begin wpix_v <= hold; ack <= req_s2; end
    end

  wire signed [24:0] d    = 25'(signed'({1'b0, wpix_v}) - signed'({1'b0, rpix}));
  wire signed [24:0] half = 25'(hwidth >> 1);

  always_ff @(posedge rclk or negedge rrst_n)
    if (!rrst_n) begin up <= 1'b0; dn <= 1'b0; ovf <= 1'b0; udf <= 1'b0; distance <= '0; end
    else begin
      up  <= line_start && (d > half + 25'(TOL));
      dn  <= line_start && (d < half - 25'(TOL));
      if (line_start) distance <= d;
      ovf <= d > 25'(DEPTH);
      udf <= reading && (d <= 25'sd0);
    end
endmodule
