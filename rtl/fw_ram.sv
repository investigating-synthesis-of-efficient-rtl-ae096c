// fw_ram: features-and-weights memory.
//
// 32 KB of on-chip memory shared by the feature extractor (which writes
// the 44 features), the host (which loads the network weights) and the
// recognition module (which reads features and weights).  The array is
// DATA_W bits wide so that the recognition module can fetch a whole bus
// word of packed 16-bit values per cycle.
//   Port A: 32-bit read/write port with byte enables, addressed by byte
//           offset; it reaches the 32-bit lane (a_address/4) mod
//           (DATA_W/32) of word a_address/(DATA_W/8).
//   Port B: DATA_W-bit read-only port, addressed by word.
// Both have a fixed read latency of one cycle with readdatavalid and never
// stall.  Size from the source design; the mixed-width ports are this
// design's choice.
module fw_ram
  import ocr_pkg::*;
#(
  parameter int BYTES  = FW_BYTES,
  parameter int DATA_W = 32,
  parameter int DEPTH  = BYTES / (DATA_W / 8),
  parameter int AW     = $clog2(BYTES),
  parameter int WAW    = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [AW-1:0]     a_address,     // byte offset
  input  logic              a_read,
  input  logic              a_write,
  input  logic [3:0]        a_byteenable,
  input  logic [31:0]       a_writedata,
  output logic [31:0]       a_readdata,
  output logic              a_readdatavalid,
  input  logic [WAW-1:0]    b_address,     // word index
  input  logic              b_read,
  output logic [DATA_W-1:0] b_readdata,
  output logic              b_readdatavalid
);

  localparam int LANES = DATA_W / 32;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [WAW-1:0]    a_word;
  int unsigned       a_lane, a_lane_q;
  logic [DATA_W-1:0] a_word_q;

  assign a_word = WAW'(a_address / AW'(DATA_W / 8));
  assign a_lane = 32'(a_address / AW'(4)) % LANES;

  always_ff @(posedge clk) begin
    if (a_write)
      for (int b = 0; b < 4; b++)
        if (a_byteenable[b]) mem[a_word][32*a_lane + 8*b +: 8] <= a_writedata[8*b +: 8];
    a_word_q   <= mem[a_word];
    a_lane_q   <= a_lane;
    b_readdata <= mem[b_address];
  end

  assign a_readdata = a_word_q[32*a_lane_q +: 32];

  always_ff @(posedge clk) begin
    if (reset) begin
      a_readdatavalid <= 1'b0;
      b_readdatavalid <= 1'b0;
    end else begin
      a_readdatavalid <= a_read;
      b_readdatavalid <= b_read;
    end
  end

endmodule
