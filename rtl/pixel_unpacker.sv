// pixel_unpacker: active video data un-packer (RGB).
//
// Pixels are distributed over the active lanes in turn (pixel k on lane
// k mod L) and each lane carries its pixels as a bit stream, most
// significant bit first, R then G then B, 3*bpc bits per pixel
// (bpc = 6, 8 or 10 from MISC0[7:5] = 000, 001, 010). Each lane keeps a
// small bit collector: every active byte is appended, and as soon as
// 3*bpc bits are present one pixel is taken out. Because 3*bpc > 8, a
// lane produces at most one pixel per byte, and since all lanes receive
// the same number of bytes they produce pixels in the same clocks; the
// pixels of lanes 0..cnt-1 are then the next cnt pixels of the line.
// Components are left-aligned to 10 bits (pix = {R,G,B}, 30 bits).
// line_end clears the collectors (padding at the end of a line).
// One clock latency.
//
// Follows the document: pixel reconstruction for 6, 8 and 10 bit per
// colour RGB regardless of lane count, one pixel per FIFO address. The
// per-lane bit collector stands in for the document's window of five
// consecutive symbols.
module pixel_unpacker #(
  parameter int LANES = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2:0]             lane_cnt,
  input  logic [2:0]             bpc_code,   // MISC0[7:5]
  input  logic                   line_end,
  input  logic                   in_valid,
  input  logic [LANES-1:0][7:0]  in_data,
  output logic [$clog2(LANES+1)-1:0] out_cnt,
  output logic [LANES-1:0][29:0] out_pix
);
  localparam int CW = $clog2(LANES + 1);

  logic [LANES-1:0][37:0] col;     // collected bits, right-aligned
  logic [LANES-1:0][5:0]  nb;      // number of valid bits

  wire [3:0] bpc = (bpc_code == 3'b000) ? 4'd6 : (bpc_code == 3'b010) ? 4'd10 : 4'd8;
  wire [5:0] bpp = 6'(bpc) * 6'd3;

  function automatic logic [29:0] align10(input logic [29:0] raw, input logic [3:0] b);
    // raw holds 3*b bits right-aligned: R G B
    logic [9:0] r, g, bl;
    case (b)
      4'd6:    begin r = {raw[17:12], 4'b0}; g = {raw[11:6], 4'b0}; bl = {raw[5:0], 4'b0}; end
      4'd10:   begin r = raw[29:20]; g = raw[19:10]; bl = raw[9:0]; end
      default: begin r = {raw[23:16], 2'b0}; g = {raw[15:8], 2'b0}; bl = {raw[7:0], 2'b0}; end
    endcase
    return {r, g, bl};
  endfunction

  // next state of the collectors and the pixels taken out this clock
  logic [LANES-1:0][37:0] cat;     // collector with this clock's byte appended
  logic [LANES-1:0][5:0]  ncat;    // bits in cat
  logic [LANES-1:0]       take;    // a whole pixel is present
  logic [LANES-1:0][5:0]  nrem;    // bits left after taking the pixel
  logic [LANES-1:0][37:0] col_n;
  logic [LANES-1:0][5:0]  nb_n;
  logic [LANES-1:0][29:0] pix_n;
  logic [CW-1:0]          cnt_n;
  always_comb begin
    cnt_n = '0;
    for (int l = 0; l < LANES; l++) begin
      cat[l]  = {col[l][29:0], in_data[l]};
      ncat[l] = nb[l] + 6'd8;
      take[l] = ncat[l] >= bpp;
      nrem[l] = take[l] ? ncat[l] - bpp : ncat[l];
      if (line_end) begin
        col_n[l] = col[l]; nb_n[l] = '0; pix_n[l] = out_pix[l];
      end else if (in_valid && l < 32'(lane_cnt)) begin
        col_n[l] = cat[l] & ((38'd1 << nrem[l]) - 38'd1);
        nb_n[l]  = nrem[l];
        pix_n[l] = take[l] ? align10(30'(cat[l] >> (ncat[l] - bpp)), bpc) : out_pix[l];
        cnt_n    = cnt_n + CW'(take[l]);
      end else begin
        col_n[l] = col[l]; nb_n[l] = nb[l]; pix_n[l] = out_pix[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin col <= '0; nb <= '0; out_cnt <= '0; out_pix <= '0; end
    else begin
      col <= col_n; nb <= nb_n; out_cnt <= cnt_n; out_pix <= pix_n;
    end
endmodule
