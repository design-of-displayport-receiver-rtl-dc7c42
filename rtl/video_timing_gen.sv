// video_timing_gen: video signal generator (video stream clock domain).
//
// Rebuilds Hsync, Vsync and DE from the main stream attribute data and
// fetches the pixels from the line FIFO. It is a 17-state machine: the
// state number is 4*v + h, where h (and v) is 0 sync, 1 back porch,
// 2 active, 3 front porch of the horizontal (vertical) timing, and 16 is
// idle. Each state runs a counter loaded from the attribute data:
//   h: sync = HSW, back porch = Hstart - HSW, active = Hwidth,
//      front porch = Htotal - Hstart - Hwidth (in video clocks, i.e.
//      pixels / PIX_PER_CLK);
//   v: the same with the V values, counted in lines.
// DE is high only in state 10 (horizontal and vertical active); the
// FIFO is read in that state, PIX_PER_CLK pixels per clock.
//
// Start-up: from idle the generator waits for `start` (half of the
// first line of a frame has been written) and then enters state 10 at
// the first active pixel of line 0, so read and write begin half a line
// apart. From then on it runs freely; the frequency compensation keeps
// it in step with the writer. flush returns it to idle.
// Outputs are registered; hsync/vsync follow the polarities (1 = active
// low). rpix counts pixels read; raddr is the FIFO read address.
//
// Follows the document: the state definition and numbering, DE only in
// state 10, FIFO read during DE, half-line read start, half-rate
// (dual pixel) operation. Counter loading and start-up entry are this
// design's. Interlaced and 3D variants are not supported.
module video_timing_gen
  import dp_pkg::*;
#(
  parameter int DEPTH       = 2560,
  parameter int PIX_PER_CLK = 2,
  localparam int AW         = $clog2(DEPTH)
) (
  input  logic          clk,        // video stream clock
  input  logic          rst_n,
  input  logic          flush,
  input  logic          start,      // already synchronized to clk
  input  msa_t          msa,        // quasi-static timing values
  output logic [4:0]    state,
  output logic          hsync,
  output logic          vsync,
  output logic          de,
  output logic          re,         // FIFO read enable
  output logic [AW-1:0] raddr,
  output logic [23:0]   rpix,
  output logic          line_start  // pulse: first read of a line
);
  localparam int SH = $clog2(PIX_PER_CLK);
  localparam logic [4:0] S_IDLE = 5'd16;

  logic [15:0] hcnt, vcnt;
  logic [1:0]  hph, vph;

  function automatic logic [15:0] hlen(input logic [1:0] ph, input msa_t a);
    logic [15:0] v;
    case (ph)
      2'd0:    v = 16'(a.hsw);
      2'd1:    v = a.hstart - 16'(a.hsw);
      2'd2:    v = a.hwidth;
      default: v = a.htotal - a.hstart - a.hwidth;
    endcase
    return v >> SH;
  endfunction

  function automatic logic [15:0] vlen(input logic [1:0] ph, input msa_t a);
    case (ph)
      2'd0:    return 16'(a.vsw);
      2'd1:    return a.vstart - 16'(a.vsw);
      2'd2:    return a.vheight;
      default: return a.vtotal - a.vstart - a.vheight;
    endcase
  endfunction

  // next horizontal / vertical phase, skipping zero-length phases
  function automatic logic [1:0] next_ph_h(input logic [1:0] ph, input msa_t a);
    logic [1:0] p;
    p = ph + 2'd1;
    for (int i = 0; i < 3; i++) if (hlen(p, a) == 0) p = p + 2'd1;
    return p;
  endfunction
  function automatic logic [1:0] next_ph_v(input logic [1:0] ph, input msa_t a);
    logic [1:0] p;
    p = ph + 2'd1;
    for (int i = 0; i < 3; i++) if (vlen(p, a) == 0) p = p + 2'd1;
    return p;
  endfunction

  logic running;
  wire  h_end    = (hcnt == 16'd1);
  wire  line_end = h_end && (hph == 2'd3 || next_ph_h(hph, msa) == 2'd0);
  logic de_q, hs_q, vs_q;

  assign state = running ? {1'b0, vph, hph} : S_IDLE;
  assign re    = running && (state == 5'd10);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      running <= 1'b0; hph <= '0; vph <= '0; hcnt <= '0; vcnt <= '0;
      raddr <= '0; rpix <= '0;
    end else if (flush) begin
      running <= 1'b0; raddr <= '0; rpix <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        hph <= 2'd2; vph <= 2'd2;
        hcnt <= hlen(2'd2, msa); vcnt <= msa.vheight;
      end
    end else begin
      // horizontal phase counter
      if (h_end) begin
        hph  <= next_ph_h(hph, msa);
        hcnt <= hlen(next_ph_h(hph, msa), msa);
      end else hcnt <= hcnt - 16'd1;
      // vertical phase counter, advanced at the end of each line
      if (line_end) begin
        if (vcnt == 16'd1) begin
          vph  <= next_ph_v(vph, msa);
          vcnt <= vlen(next_ph_v(vph, msa), msa);
        end else vcnt <= vcnt - 16'd1;
      end
      if (re) begin
        raddr <= (32'(raddr) + PIX_PER_CLK >= DEPTH) ? AW'(32'(raddr) + PIX_PER_CLK - DEPTH)
                                                     : AW'(32'(raddr) + PIX_PER_CLK);
        rpix  <= rpix + 24'(PIX_PER_CLK);
      end
    end

  // outputs delayed one clock to line up with the FIFO read data
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin de_q <= 1'b0; hs_q <= 1'b0; vs_q <= 1'b0; end
    else begin
      de_q <= re;
      hs_q <= running && ((hph == 2'd0) ^ msa.hsp);
      vs_q <= running && ((vph == 2'd0) ^ msa.vsp);
    end

  assign de         = de_q;
  assign hsync      = hs_q;
  assign vsync      = vs_q;
  assign line_start = re && !de_q;
endmodule
