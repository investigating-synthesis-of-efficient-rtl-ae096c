// block_half_sums: black-pixel count of one 32x32 image block.
//
// The 32 block rows sit in registers (one 32-bit word each).  Every row is
// reduced to its number of set bits in parallel, and the row counts are
// added in two independent halves, rows 0-15 and rows 16-31, as the
// feature extractor needs both the upper 16x32 half (for the 16x64
// windows) and the block total.  Purely combinational; the caller
// registers the results.  A pixel value of 1 is black.
module block_half_sums
  import ocr_pkg::*;
#(
  parameter int ROWS = BLK,
  parameter int COLS = BLK
) (
  input  logic [COLS-1:0]    rows [ROWS],
  output logic [HALF_W-1:0]  upper_sum,
  output logic [TOTAL_W-1:0] total_sum
);

  localparam int CNT_W = $clog2(COLS + 1);

  logic [CNT_W-1:0]  row_cnt [ROWS];
  logic [HALF_W-1:0] lower_sum;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      row_cnt[r] = '0;
      for (int c = 0; c < COLS; c++) row_cnt[r] += CNT_W'(rows[r][c]);
    end
    upper_sum = '0;
    lower_sum = '0;
    for (int r = 0; r < ROWS / 2; r++) begin
      upper_sum += HALF_W'(row_cnt[r]);
      lower_sum += HALF_W'(row_cnt[r + ROWS / 2]);
    end
    total_sum = TOTAL_W'(upper_sum) + TOTAL_W'(lower_sum);
  end

endmodule
