// neuron_dot: the arithmetic of the single shared neuron.
//
// All N inputs are multiplied by their weights at once (N parallel 16x16
// signed multipliers, meant for embedded multiplier blocks).  Each Q9 x Q9
// product is brought back to Q9 by keeping bits 24..9, and the N truncated
// products are summed in one combinational step.  The sum keeps its full
// width, FIX_W + clog2(N) bits, so it cannot overflow; the activation that
// follows decides how to saturate.  The source design fixes the parallel
// multiplies and the bit slice; the sum width is this design's choice.
module neuron_dot
  import ocr_pkg::*;
#(
  parameter int N     = NN_IN,
  parameter int SUM_W = FIX_W + $clog2(N)
) (
  input  logic signed [FIX_W-1:0] x [N],
  input  logic signed [FIX_W-1:0] w [N],
  output logic signed [SUM_W-1:0] sum
);

  logic signed [2*FIX_W-1:0] prod [N];

  always_comb begin
    sum = '0;
    for (int i = 0; i < N; i++) begin
      prod[i] = x[i] * w[i];
      sum += SUM_W'($signed(prod[i][FIX_W+FRAC-1:FRAC]));
    end
  end

endmodule
