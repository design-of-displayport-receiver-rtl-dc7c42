// stream_unframer: un-framing controller and de-stuffer of the main link.
//
// Works on the de-skewed, descrambled symbols of all lanes, which carry
// the same control symbol in the same clock. Lane 0 decides the region:
//   BS ... BE   blanking; BS is followed on each lane by VB-ID, Mvid[7:0]
//               and Maud[7:0]; VB-ID bit 0 is the vertical-blanking flag;
//   BE ... BS   active video; pixel bytes are passed on (act_valid), except
//               between FS and FE, where the stuffing symbols are
//               dropped (de-stuffing);
//   SS ... SE   secondary data inside blanking; its bytes are passed to the
//               attribute un-packer (sec_valid), sec_start marks SS SS.
// line_end pulses on the BS that ends an active line, frame_start on the
// first BE after a blanking period with the vertical-blanking flag set.
// Outputs are registered (one clock).
//
// Follows the document: classification by the BS/BE/FS/FE/SS/SE control
// symbols, removal of the stuffing symbols, VB-ID. Enhanced framing
// (BS BF BF BS) is not handled; the byte order after BS is the standard
// one for non-enhanced framing.
module stream_unframer
  import dp_pkg::*;
#(
  parameter int LANES = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  sym_t [LANES-1:0]            din,
  output logic [LANES-1:0][7:0]       act_data,
  output logic                        act_valid,
  output logic [LANES-1:0][7:0]       sec_data,
  output logic                        sec_valid,
  output logic                        sec_start,
  output logic                        sec_end,
  output logic                        line_end,
  output logic                        frame_start,
  output logic [7:0]                  vbid
);
  typedef enum logic [1:0] { R_BLANK, R_ACTIVE, R_FILL, R_SEC } region_t;
  region_t    rgn;
  logic [1:0] after_bs;     // symbols left of VB-ID, Mvid, Maud
  logic       vb_seen;      // a blanking with vertical flag since last BE
  logic       ss_prev;

  wire  sym_t s0   = din[0];
  wire        isk  = s0.k;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rgn <= R_BLANK; after_bs <= '0; vb_seen <= 1'b0; ss_prev <= 1'b0; vbid <= '0;
      act_data <= '0; act_valid <= 1'b0; sec_data <= '0; sec_valid <= 1'b0;
      sec_start <= 1'b0; sec_end <= 1'b0; line_end <= 1'b0; frame_start <= 1'b0;
    end else begin
      act_valid <= 1'b0; sec_valid <= 1'b0; sec_start <= 1'b0; sec_end <= 1'b0;
      line_end <= 1'b0; frame_start <= 1'b0;
      ss_prev <= 1'b0;
      for (int i = 0; i < LANES; i++) begin
        act_data[i] <= din[i].d;
        sec_data[i] <= din[i].d;
      end
      if (!enable) begin
        rgn <= R_BLANK; after_bs <= '0;
      end else if (isk) begin
        case (s0.d)
          K_BS: begin
            if (rgn == R_ACTIVE || rgn == R_FILL) line_end <= 1'b1;
            rgn <= R_BLANK; after_bs <= 2'd3;
          end
          K_BE: begin
            if (vb_seen) frame_start <= 1'b1;
            vb_seen <= 1'b0;
            rgn <= R_ACTIVE;
          end
          K_FS: if (rgn == R_ACTIVE) rgn <= R_FILL;
          K_FE: if (rgn == R_FILL) rgn <= R_ACTIVE;
          K_SS: begin
            if (ss_prev) sec_start <= 1'b1;
            ss_prev <= 1'b1;
            if (rgn == R_BLANK) rgn <= R_SEC;
          end
          K_SE: if (rgn == R_SEC) begin rgn <= R_BLANK; sec_end <= 1'b1; end
          default: ;
        endcase
      end else begin
        case (rgn)
          R_BLANK: if (after_bs != 0) begin
            if (after_bs == 2'd3) begin
              vbid <= s0.d;
              if (s0.d[0]) vb_seen <= 1'b1;
            end
            after_bs <= after_bs - 2'd1;
          end
          R_ACTIVE: act_valid <= 1'b1;
          R_SEC:    sec_valid <= 1'b1;
          default: ;
        endcase
      end
    end
endmodule
