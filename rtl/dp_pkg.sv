// dp_pkg: types and constants shared by the eDP receiver.
//
// Decoded link symbols travel as a 9-bit {k, byte} pair. The control
// character codes are the standard DisplayPort assignments of the
// 8b/10b K-codes (BS, BE, SS, SE, FS, FE, SR). The receiver design uses
// the names BS/BE/FS/FE/SS/SE for framing; the byte values themselves
// are this design's reading of the standard, not numbers printed in the
// design description.
package dp_pkg;

  typedef struct packed {
    logic       k;     // 1: control (K) character
    logic [7:0] d;     // byte value
  } sym_t;

  localparam logic [7:0] K_BS = 8'hBC;  // K28.5 blanking start
  localparam logic [7:0] K_BE = 8'hFB;  // K27.7 blanking end
  localparam logic [7:0] K_SS = 8'h5C;  // K28.2 secondary-data start
  localparam logic [7:0] K_SE = 8'hFD;  // K29.7 secondary-data end
  localparam logic [7:0] K_FS = 8'hFE;  // K30.7 fill start
  localparam logic [7:0] K_FE = 8'hF7;  // K23.7 fill end
  localparam logic [7:0] K_SR = 8'h1C;  // K28.0 scrambler reset

  // Timing fields carried by the main stream attribute packet.
  typedef struct packed {
    logic [23:0] mvid;
    logic [23:0] nvid;
    logic [15:0] htotal;
    logic [15:0] vtotal;
    logic [15:0] hstart;   // active start from leading edge of Hsync
    logic [15:0] vstart;
    logic        hsp;      // Hsync polarity, 1 = active low
    logic [14:0] hsw;
    logic        vsp;
    logic [14:0] vsw;
    logic [15:0] hwidth;   // active pixels per line
    logic [15:0] vheight;  // active lines
    logic [7:0]  misc0;
  } msa_t;

  localparam int PIX_W = 30;   // 10 bit per colour RGB

  // Link training / link status of the receiver.
  typedef enum logic [2:0] {
    LT_IDLE, LT_CR, LT_EQ, LT_NORMAL, LT_RECOVER, LT_IRQ
  } lt_state_t;

  // Link training mode: full (AUX driven), fast (no equalization phase),
  // none (pattern sequence only, no AUX transaction).
  typedef enum logic [1:0] { LT_FULL = 2'd0, LT_FAST = 2'd1, LT_NONE = 2'd2 } lt_mode_t;

endpackage
