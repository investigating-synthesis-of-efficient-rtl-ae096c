// feature_normalizer: maps a raw density count into the network's input range.
//
// The network expects inputs in [-1, 1].  With every feature's minimum at
// zero, min-max scaling reduces to 2*x/Xmax - 1.  In Q9 fixed point this is
//   x_nrm = ((x_in * P) >> 14) - 512,   P = round(1023 / Xmax * 2^14),
// where P is a per-feature constant computed offline and kept in the
// recognition module.  P is limited to 18 bits so that the product fits one
// 18x18 embedded multiplier.  The formula is the source design's;
// the block is purely combinational so that a feature is normalized in the
// same cycle it arrives from memory.
module feature_normalizer
  import ocr_pkg::*;
#(
  parameter int SHIFT = NORM_SHIFT
) (
  input  logic [FIX_W-1:0]    x_in,   // raw, unsigned feature
  input  logic [NORM_P_W-1:0] p,      // per-feature scale
  output logic [FIX_W-1:0]    x_nrm   // signed Q9
);

  logic [FIX_W+NORM_P_W-1:0] prod;

  always_comb begin
    prod  = (FIX_W+NORM_P_W)'(x_in) * (FIX_W+NORM_P_W)'(p);
    x_nrm = FIX_W'(prod >> SHIFT) - FIX_W'(ONE_Q9);
  end

endmodule
