// bbpd_deser: half-rate bang-bang phase detector and 2:10 deserializer of
// one ADCDR lane.
//
// Four clocks 90 degrees apart at half the bit rate (clk[0]..clk[3])
// sample the equalized serial data: clk[0] and clk[2] at the bit
// centres (data samples), clk[1] and clk[3] at the bit boundaries (edge
// samples). Comparing each edge sample with the data bits on either
// side gives the early/late decision of an Alexander (bang-bang)
// detector:
//   edge differs from the earlier bit -> clock late  -> up
//   edge differs from the later bit   -> clock early -> dn
// The decisions of the clk[1] edge are sent out every half-rate cycle
// as the proportional path (pd_up/pd_dn).
// Every five half-rate cycles the ten data bits and the ten edge bits
// before them are delivered as d[9:0] / e[9:0] (d[0] received first,
// e[i] sampled on the boundary before d[i]) together with the link
// symbol clock clk_ls = clk[0] / 5. d and e change on the clk[0] edge
// two cycles before clk_ls rises, so they are stable around it.
//
// Follows the document: half-rate 4-phase sampling, XOR of data and edge
// samples, de-serialized data and edge words for the loop filter,
// divide-by-5 link clock. The exact gate network of the proportional
// output and the re-timing into clk[0] are this design's.
module bbpd_deser (
  input  logic       rst_n,
  input  logic       din,       // serial data from the equalizer
  input  logic [3:0] clk,       // half-rate quadrature clocks from the DCO
  output logic       pd_up,     // proportional path, clk[0] domain
  output logic       pd_dn,
  output logic [9:0] d,         // data word, d[0] first
  output logic [9:0] e,         // edge word, e[i] before d[i]
  output logic       clk_ls     // link symbol clock (clk[0] / 5)
);
  logic s1, s2, s3;
  always_ff @(posedge clk[1]) s1 <= din;
  always_ff @(posedge clk[2]) s2 <= din;
  always_ff @(posedge clk[3]) s3 <= din;

  // clk[0] domain: the data sample of this edge plus the samples of the
  // window that started on the previous edge
  logic       s0;          // data sampled on the previous clk[0] edge
  logic       e_prev;      // edge before s0 (s3 of the window before)
  logic [9:0] dsh, esh;
  logic [2:0] cnt;
  always_ff @(posedge clk[0] or negedge rst_n)
    if (!rst_n) begin
      s0 <= 1'b0; e_prev <= 1'b0; dsh <= '0; esh <= '0; cnt <= '0;
      d <= '0; e <= '0; clk_ls <= 1'b0; pd_up <= 1'b0; pd_dn <= 1'b0;
    end else begin
      // completed window: s0 (data), s1 (edge), s2 (data), s3 (edge, next)
      s0     <= din;
      e_prev <= s3;
      dsh    <= {s2, s0, dsh[9:2]};
      esh    <= {s1, e_prev, esh[9:2]};
      pd_up  <= (s0 ^ s1) & ~(s1 ^ s2);
      pd_dn  <= (s1 ^ s2) & ~(s0 ^ s1);
      cnt    <= (cnt == 3'd4) ? 3'd0 : cnt + 3'd1;
      if (cnt == 3'd4) begin
        d <= {s2, s0, dsh[9:2]};
        e <= {s1, e_prev, esh[9:2]};
      end
      clk_ls <= (cnt == 3'd1) || (cnt == 3'd2);
    end
endmodule
