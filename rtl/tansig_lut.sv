// tansig_lut: on-chip ROM with the hidden layer's activation function.
//
// Entry i holds tansig(i/512) = tanh(i/512) in Q9, rounded to nearest, for
// i = 0 .. DEPTH-1 (0 to 3.875 at the default depth).  Only the positive
// half is stored: the caller takes the magnitude of the neuron sum, reads
// the entry and restores the sign, and treats magnitudes past the table as
// +-1.  The contents are computed at elaboration from tanh.
//
// Interface: a read-only Avalon-MM slave with word addressing, one-cycle
// read latency and readdatavalid; the entry is returned zero-extended to
// DATA_W bits.  The half table and its range follow the source design;
// the bus width and latency are this design's choices.
module tansig_lut
  import ocr_pkg::*;
#(
  parameter int DEPTH  = LUT_DEPTH,
  parameter int DATA_W = 32,
  parameter int ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] avs_address,
  input  logic              avs_read,
  output logic [DATA_W-1:0] avs_readdata,
  output logic              avs_readdatavalid
);

  typedef logic [FIX_W-1:0] table_t [DEPTH];

  function automatic table_t gen_table();
    table_t t;
    for (int i = 0; i < DEPTH; i++)
      t[i] = FIX_W'($rtoi($tanh(real'(i) / real'(ONE_Q9)) * real'(ONE_Q9) + 0.5));
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  always_ff @(posedge clk) begin
    avs_readdatavalid <= avs_read && !reset;
    avs_readdata      <= (32'(avs_address) < 32'(DEPTH)) ? DATA_W'(TABLE[avs_address]) : '0;
  end

endmodule
