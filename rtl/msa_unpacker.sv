// msa_unpacker: main stream attribute (MSA) un-packer.
//
// The MSA is a secondary-data packet (SS SS ... SE) sent in the vertical
// blanking period. Its 36 bytes form four groups of nine:
//   0..8    Mvid[23:0], Htotal, Vtotal, HSP|HSW[14:8], HSW[7:0]
//   9..17   Mvid[23:0], Hstart, Vstart, VSP|VSW[14:8], VSW[7:0]
//   18..26  Mvid[23:0], Hwidth, Vheight, 0, 0
//   27..35  Mvid[23:0], Nvid[23:0], MISC0, MISC1, 0
// (16-bit fields most significant byte first). With L active lanes,
// lane l carries groups l, l+L, ... one after the other, so a 4-lane
// link sends all four groups at once and a 1-lane link sends them in
// sequence. When SE arrives after all 36 bytes, the fields are published
// on msa and m_valid pulses; an incomplete packet is ignored.
//
// Follows the document: extraction of M, N, totals, active starts, sync
// widths and polarities for the video timing generator. The byte layout
// is the DisplayPort standard's, which the document does not print.
module msa_unpacker
  import dp_pkg::*;
#(
  parameter int LANES = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2:0]            lane_cnt,
  input  logic                  sec_start,   // SS SS seen
  input  logic                  sec_valid,
  input  logic [LANES-1:0][7:0] sec_data,
  input  logic                  sec_end,
  output msa_t                  msa,
  output logic                  m_valid      // one-clock pulse
);
  logic [35:0][7:0] buf_b;
  logic [5:0]       pos;                     // bytes per lane so far
  logic             inpkt;

  function automatic int gidx(input int lane, input int j, input int lc);
    return ((j / 9) * lc + lane) * 9 + (j % 9);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      buf_b <= '0; pos <= '0; inpkt <= 1'b0; msa <= '0; m_valid <= 1'b0;
    end else begin
      m_valid <= 1'b0;
      if (sec_start) begin
        inpkt <= 1'b1; pos <= '0;
      end else if (inpkt && sec_valid) begin
        for (int l = 0; l < LANES; l++)
          if (l < 32'(lane_cnt) && gidx(l, 32'(pos), 32'(lane_cnt)) < 36)
            buf_b[gidx(l, 32'(pos), 32'(lane_cnt))] <= sec_data[l];
        pos <= pos + 1'b1;
      end else if (sec_end) begin
        inpkt <= 1'b0;
        if (inpkt && 32'(pos) * 32'(lane_cnt) >= 36) begin
          m_valid      <= 1'b1;
          msa.mvid     <= {buf_b[0], buf_b[1], buf_b[2]};
          msa.htotal   <= {buf_b[3], buf_b[4]};
          msa.vtotal   <= {buf_b[5], buf_b[6]};
          msa.hsp      <= buf_b[7][7];
          msa.hsw      <= {buf_b[7][6:0], buf_b[8]};
          msa.hstart   <= {buf_b[12], buf_b[13]};
          msa.vstart   <= {buf_b[14], buf_b[15]};
          msa.vsp      <= buf_b[16][7];
          msa.vsw      <= {buf_b[16][6:0], buf_b[17]};
          msa.hwidth   <= {buf_b[21], buf_b[22]};
          msa.vheight  <= {buf_b[23], buf_b[24]};
          msa.nvid     <= {buf_b[30], buf_b[31], buf_b[32]};
          msa.misc0    <= buf_b[33];
        end
      end
    end
endmodule
