// ocr_pkg: constants shared by the handwritten-word OCR accelerator.
//
// The accelerator recognises a 64x256 binary word image in two steps:
// density features (44 black-pixel counts over fixed windows) and a
// 44/80/50 feed-forward neural network evaluated by a single neuron.
// This package holds the image geometry, the network topology, the
// 16-bit fixed-point format (1 sign, 6 integer, 9 fraction bits) and the
// system address map.  The base addresses are those of the original
// Nios II system; the map is otherwise free to change.
package ocr_pkg;

  // Image and density windows
  localparam int IMG_H       = 64;    // rows
  localparam int IMG_W       = 256;   // columns, one bit per pixel
  localparam int ROW_BYTES   = IMG_W / 8;
  localparam int BLK         = 32;    // base window is 32x32
  localparam int N_BLOCKS    = 16;    // 2 block rows x 8 block columns
  localparam int N_FEATURES  = 44;    // 16 + 16 + 8 + 4

  // Widths of the density counts
  localparam int HALF_W      = 10;    // up to 512 pixels in a 16x32 half
  localparam int TOTAL_W     = 11;    // up to 1024 pixels in a 32x32 block
  localparam int FEAT_W      = 16;    // stored feature width

  // Neural network
  localparam int NN_IN       = 44;
  localparam int NN_HID      = 80;
  localparam int NN_OUT      = 50;
  localparam int FIX_W       = 16;    // S/I/F = 1/6/9
  localparam int FRAC        = 9;
  localparam int ONE_Q9      = 512;
  localparam int NORM_SHIFT  = 14;    // eq. (20)
  localparam int NORM_P_W    = 18;    // embedded multiplier input width
  localparam int TANSIG_MAX  = 1984;  // 3.875 in Q9; beyond this tansig is +-1
  localparam int LUT_DEPTH   = TANSIG_MAX + 1;

  // Address map (byte addresses)
  localparam logic [31:0] IMG_BASE     = 32'h0400_1000; // 2 KB image memory
  localparam logic [31:0] FE_CSR_BASE  = 32'h0400_4000; // feature extraction slave, 1 KB
  localparam logic [31:0] REC_CSR_BASE = 32'h0400_8000; // recognition slave, 1 KB
  localparam logic [31:0] FW_BASE      = 32'h0401_0000; // features and weights, 32 KB
  localparam logic [31:0] LUT_BASE     = 32'h0404_0000; // tansig table, up to 256 KB
  localparam int          IMG_BYTES    = 2048;
  localparam int          FW_BYTES     = 32768;

  // Recognition slave word map
  localparam int REC_REG_CTRL  = 0;
  localparam int REC_REG_NORM  = 64;   // 64 .. 64+N_IN-1: normalization constants
  localparam int REC_REG_OUT   = 128;  // 128 .. 128+N_OUT-1: network outputs

  // Default normalization constant: round(1023/1023 * 2^14)
  localparam logic [NORM_P_W-1:0] NORM_P_DEFAULT = 18'd16384;

endpackage
