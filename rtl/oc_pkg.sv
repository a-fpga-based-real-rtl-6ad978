// oc_pkg: types and constants shared by the orientation-calculation (OC)
// accelerator of a SIFT pipeline.
//
// Pixels of the Gaussian image are 8-bit unsigned, so a central difference
// dx = L(x+1,y) - L(x-1,y) or dy = L(x,y+1) - L(x,y-1) fits in 9 bits signed.
// Every memory word is 36 bits wide, the width of one port of the dual-port
// board memory. Three word layouts are used:
//   nbr_word_t : a Gaussian-memory word holding the four neighbours of one pixel,
//                so that one read yields both differences of that pixel;
//   fp_rec_t   : a feature-point record (position and pixel value);
//   ori_rec_t  : a result record (pixel value, position and orientation bin).
// The eight tangent thresholds are those of the binary tangent table
// (tan 10..80 degrees in 3.8 fixed point); the word layouts and the 8-bit
// pixel width are choices of this design.
package oc_pkg;

  localparam int PIX_W  = 8;           // Gaussian pixel width
  localparam int GRAD_W = PIX_W + 1;   // signed central difference
  localparam int ABS_W  = PIX_W;       // |dx|, |dy| (0..255)
  localparam int MAG_W  = 8;           // gradient magnitude 0..128
  localparam int NBINS  = 36;          // 10-degree orientation bins
  localparam int BIN_W  = 6;           // bin index 0..35
  localparam int QBIN_W = 4;           // first-quadrant bin 0..8
  localparam int NTHD   = 8;           // tangent thresholds a1..a8
  localparam int TAN_W  = 11;          // 3 integer + 8 fraction bits
  localparam int TAN_FRAC = 8;
  localparam int THD_W  = ABS_W + TAN_W;  // |dx| * tan, scaled by 2^8
  localparam int WORD_W = 36;          // DDR2 port width
  localparam int XW     = 10;          // x coordinate (VGA: 0..639)
  localparam int YW     = 9;           // y coordinate (VGA: 0..479)

  // tan(10k degrees), k = 1..8, in 3.8 fixed point (index 0 is 10 degrees):
  // 000.00101101 000.01011101 000.10010100 000.11010111
  // 001.00110001 001.10111100 010.10111111 101.10101100
  localparam logic [TAN_W-1:0] TAN_Q8 [NTHD] = '{
    11'b000_00101101, 11'b000_01011101, 11'b000_10010100, 11'b000_11010111,
    11'b001_00110001, 11'b001_10111100, 11'b010_10111111, 11'b101_10101100
  };

  typedef struct packed {
    logic [YW-1:0] y;
    logic [XW-1:0] x;
  } pos_t;

  // Gaussian-memory word at the address of pixel (x,y).
  typedef struct packed {
    logic [WORD_W-4*PIX_W-1:0] pad;
    logic [PIX_W-1:0] up;     // L(x, y-1)
    logic [PIX_W-1:0] down;   // L(x, y+1)
    logic [PIX_W-1:0] left;   // L(x-1, y)
    logic [PIX_W-1:0] right;  // L(x+1, y)
  } nbr_word_t;

  // FP-memory word describing one feature point.
  typedef struct packed {
    logic [WORD_W-PIX_W-YW-XW-1:0] pad;
    logic [PIX_W-1:0] val;
    pos_t             pos;
  } fp_rec_t;

  // Result word: one per major orientation.
  typedef struct packed {
    logic [WORD_W-PIX_W-YW-XW-BIN_W-1:0] pad;
    logic [PIX_W-1:0] val;
    pos_t             pos;
    logic [BIN_W-1:0] bin;
  } ori_rec_t;

  // Source of the port-A address (AddMUX select).
  typedef enum logic [1:0] {
    ASEL_FP  = 2'd0,   // FP-memory record
    ASEL_PIX = 2'd1,   // Gaussian-memory pixel from AddCtrlUnit
    ASEL_OUT = 2'd2    // result record write
  } asel_e;

endpackage
