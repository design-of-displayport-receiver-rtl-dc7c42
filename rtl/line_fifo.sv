// line_fifo: single-line pixel buffer between the link symbol clock and
// the video stream clock.
//
// A dual-port memory of DEPTH pixels (default 2560 x 30 bit, one line of
// 2560x1600 at 10 bit per colour) split into BANKS (4) interleaved banks:
// pixel address a lives in bank a % BANKS, row a / BANKS. The write side
// stores up to WR_PIX consecutive pixels per write cycle and the read
// side fetches RD_PIX (2) consecutive pixels per video clock, which is
// how the half-rate video clock delivers two pixels per cycle. Any run
// of at most BANKS consecutive addresses touches each bank once, so every
// bank needs only one write and one read port.
//
// Write: on a rising wclk with we, pixels wdata[0..wcount-1] go to
// addresses waddr, waddr+1, ... (modulo DEPTH). Read: on a rising rclk
// with re, pixels at raddr, raddr+1 appear on rdata one cycle later.
// Addresses wrap at DEPTH; the pointers themselves are kept by the
// writer and the reader. Nothing stops a write from overtaking a read:
// detecting that is the job of the FIFO monitor.
//
// Follows the document: one line buffer, 2560 x 30 bit, four memory
// blocks, two pixels read per clock. Bank mapping and port widths are
// this design's choices.
module line_fifo #(
  parameter int DEPTH  = 2560,
  parameter int PIX_W  = 30,
  parameter int BANKS  = 4,
  parameter int WR_PIX = 4,
  parameter int RD_PIX = 2,
  localparam int AW    = $clog2(DEPTH),
  localparam int CW    = $clog2(WR_PIX + 1)
) (
  input  logic                        wclk,
  input  logic                        we,
  input  logic [AW-1:0]               waddr,
  input  logic [CW-1:0]               wcount,
  input  logic [WR_PIX-1:0][PIX_W-1:0] wdata,
  input  logic                        rclk,
  input  logic                        re,
  input  logic [AW-1:0]               raddr,
  output logic [RD_PIX-1:0][PIX_W-1:0] rdata
);
  localparam int ROWS = DEPTH / BANKS;
  localparam int RW   = $clog2(ROWS);
  localparam int BW   = $clog2(BANKS);

  function automatic logic [AW-1:0] wrap_add(input logic [AW-1:0] a, input int unsigned k);
    logic [AW:0] s;
    s = {1'b0, a} + (AW+1)'(k);
    return (s >= (AW+1)'(DEPTH)) ? AW'(s - (AW+1)'(DEPTH)) : s[AW-1:0];
  endfunction

  logic [BANKS-1:0][PIX_W-1:0] bank_q;
  logic [BW-1:0]               rsel_q;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [PIX_W-1:0] mem [ROWS];
    // write port: which of the written pixels falls into this bank
    wire [BW-1:0]    wi    = BW'(b) - waddr[BW-1:0];
    wire [AW-1:0]    wa    = wrap_add(waddr, 32'(wi));
    wire             wen   = we && (32'(wi) < 32'(wcount));
    always_ff @(posedge wclk)
      if (wen) mem[RW'(wa / AW'(BANKS))] <= wdata[wi];
    // read port
    wire [BW-1:0]    ri    = BW'(b) - raddr[BW-1:0];
    wire [AW-1:0]    ra    = wrap_add(raddr, 32'(ri));
    always_ff @(posedge rclk)
      if (re) bank_q[b] <= mem[RW'(ra / AW'(BANKS))];
  end

  always_ff @(posedge rclk)
    if (re) rsel_q <= raddr[BW-1:0];

  always_comb
    for (int j = 0; j < RD_PIX; j++)
      rdata[j] = bank_q[BW'(rsel_q + BW'(j))];
endmodule
