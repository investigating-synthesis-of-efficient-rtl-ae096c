// density_feature_derive: the 28 density features built from other features.
//
// The 64x256 image is tiled by sixteen 32x32 blocks: block b covers block
// row b%2 and block column b/2, and its total is feature b+1.  The coarser
// windows are sums of these, so all of them follow in one combinational
// step from the 16 block totals and the 16 upper-half (16x32) sums:
//   features 17..32  16x64 windows, 4 bands of 16 rows x 4 groups of 64
//                    columns, numbered down each column group first
//                    (17 + 4*group + band).  An upper band is the sum of
//                    two upper halves; a lower band is the two block
//                    totals minus that.
//   features 33..40  32x64 windows: two block totals (33 + 2*group + row)
//   features 41..44  32x128 windows: two 32x64 features (41 + 2*group + row)
// features[i] holds feature i+1.  Combinational; the numbering follows the
// source design's window order.
module density_feature_derive
  import ocr_pkg::*;
(
  input  logic [TOTAL_W-1:0] blk_total [N_BLOCKS],
  input  logic [HALF_W-1:0]  blk_upper [N_BLOCKS],
  output logic [FEAT_W-1:0]  features  [N_FEATURES]
);

  always_comb begin
    logic [FEAT_W-1:0] up2, tot2;
    for (int i = 0; i < N_FEATURES; i++) features[i] = '0;

    // 32x32 windows
    for (int b = 0; b < N_BLOCKS; b++) features[b] = FEAT_W'(blk_total[b]);

    // 16x64 and 32x64 windows: column group g joins block columns 2g and 2g+1
    for (int g = 0; g < 4; g++) begin
      for (int r = 0; r < 2; r++) begin
        up2  = FEAT_W'(blk_upper[4*g + r]) + FEAT_W'(blk_upper[4*g + 2 + r]);
        tot2 = FEAT_W'(blk_total[4*g + r]) + FEAT_W'(blk_total[4*g + 2 + r]);
        features[16 + 4*g + 2*r]     = up2;          // upper 16-row band
        features[16 + 4*g + 2*r + 1] = tot2 - up2;   // lower 16-row band
        features[32 + 2*g + r]       = tot2;         // 32x64 window
      end
    end

    // 32x128 windows
    for (int q = 0; q < 2; q++)
      for (int r = 0; r < 2; r++)
        features[40 + 2*q + r] = features[32 + 4*q + r] + features[32 + 4*q + 2 + r];
  end

endmodule
