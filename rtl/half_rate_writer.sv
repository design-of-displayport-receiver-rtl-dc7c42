// half_rate_writer: elastic buffer and half-rate write control of the
// line FIFO (link symbol clock domain).
//
// The pixel un-packer delivers 0..IN_PIX pixels per link clock. They are
// queued in a small elastic buffer (EB_DEPTH pixels). A half clock
// generator (a toggle flip-flop on the link clock) provides a write
// strobe: in half-rate mode the memory is written only on every other
// link clock, otherwise on every clock. On each write cycle up to WR_PIX
// queued pixels are written at consecutive addresses. This lets the
// memory run at half the link rate while the average pixel rate stays
// below WR_PIX per two link clocks.
//
// The writer also keeps the pixel pointers used for the video timing:
//   waddr  write address, wraps at DEPTH;
//   wpix   pixels written since the last flush (free-running count);
//   started goes high once, in the first line after a frame start, half
//          a line (hwidth/2 pixels) has been written: the reader may then
//          begin, so that read and write pointers start half a line apart.
// Pixels are dropped after a flush until the next frame start.
// The elastic buffer should never fill; if it does, ovf is raised and
// the extra pixels are lost.
//
// Follows the document: elastic buffer, half clock generator, half-rate
// mode select, read start at half a line. The strobe is used as a
// write enable on the link clock, where the document switches the
// memory's write clock between the link clock and the half clock: the
// memory sees the same writes.
module half_rate_writer #(
  parameter int DEPTH    = 2560,
  parameter int PIX_W    = 30,
  parameter int IN_PIX   = 4,
  parameter int WR_PIX   = 4,
  parameter int EB_DEPTH = 16,
  localparam int AW      = $clog2(DEPTH),
  localparam int CW      = $clog2(WR_PIX + 1),
  localparam int ICW     = $clog2(IN_PIX + 1)
) (
  input  logic                         clk,         // link symbol clock
  input  logic                         rst_n,
  input  logic                         half_rate,   // half-rate write mode
  input  logic                         flush,       // restart the stream
  input  logic                         frame_start, // first active line begins
  input  logic [15:0]                  hwidth,
  input  logic [ICW-1:0]               in_cnt,      // pixels offered this cycle
  input  logic [IN_PIX-1:0][PIX_W-1:0] in_pix,
  output logic                         we,
  output logic [AW-1:0]                waddr,
  output logic [CW-1:0]                wcount,
  output logic [WR_PIX-1:0][PIX_W-1:0] wdata,
  output logic [23:0]                  wpix,
  output logic                         started,
  output logic                         ovf
);
  localparam int EW = $clog2(EB_DEPTH);

  logic             half_clk;     // half clock generator
  logic             strobe;
  logic             active;       // accepting pixels (frame start seen)
  logic [PIX_W-1:0] eb [EB_DEPTH];
  logic [EW-1:0]    rd_p, wr_p;
  logic [EW:0]      level;
  logic [15:0]      line_pix;     // pixels taken in the first line

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) half_clk <= 1'b0; else half_clk <= ~half_clk;
  assign strobe = half_rate ? half_clk : 1'b1;

  // accept when active, or in the very cycle the frame starts
  wire            take  = active || frame_start;
  wire [ICW-1:0]  n_in  = take ? in_cnt : '0;
  wire [EW:0]     space = (EW+1)'(EB_DEPTH) - level;
  wire            fits  = (EW+1)'(n_in) <= space;
  wire [EW:0]     avail = level;
  wire [CW-1:0]   n_out = !strobe ? '0 :
                          (avail >= (EW+1)'(WR_PIX)) ? CW'(WR_PIX) : CW'(avail);

  always_ff @(posedge clk)
    for (int i = 0; i < WR_PIX; i++) wdata[i] <= eb[EW'(rd_p + EW'(i))];

  always_ff @(posedge clk) begin
    if (fits)
      for (int i = 0; i < IN_PIX; i++)
        if (i < 32'(n_in)) eb[EW'(wr_p + EW'(i))] <= in_pix[i];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_p <= '0; wr_p <= '0; level <= '0; we <= 1'b0; wcount <= '0;
      waddr <= '0; wpix <= '0; started <= 1'b0; active <= 1'b0; ovf <= 1'b0;
      line_pix <= '0;
    end else if (flush) begin
      rd_p <= '0; wr_p <= '0; level <= '0; we <= 1'b0; wcount <= '0;
      waddr <= '0; wpix <= '0; started <= 1'b0; active <= 1'b0; ovf <= 1'b0;
      line_pix <= '0;
    end else begin
      if (frame_start) active <= 1'b1;
      if (!fits) ovf <= 1'b1;
      wr_p  <= fits ? wr_p + EW'(n_in) : wr_p;
      rd_p  <= rd_p + EW'(n_out);
      level <= level + (fits ? (EW+1)'(n_in) : '0) - (EW+1)'(n_out);
      // memory write port is presented from registers, as in the
      // document's latch stage in front of the SRAM
      we     <= n_out != '0;
      wcount <= n_out;
      if (we) begin
        waddr <= (32'(waddr) + 32'(wcount) >= DEPTH) ? AW'(32'(waddr) + 32'(wcount) - DEPTH)
                                                   : AW'(32'(waddr) + 32'(wcount));
        wpix  <= wpix + 24'(wcount);
      end
      if (take && !started) begin
        line_pix <= line_pix + 16'(n_in);
        if (line_pix + 16'(n_in) >= (hwidth >> 1)) started <= 1'b1;
      end
    end
endmodule
