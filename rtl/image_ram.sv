// image_ram: on-chip memory for one binary word image.
//
// Holds the 64x256 image, one bit per pixel, 1 = black: 2 KB as 512
// 32-bit words, row r at byte offset r*32, pixel columns 32c..32c+31 in
// word c of the row.  Port A is the host's read/write port with byte
// enables; port B is the feature extractor's read port.  Both are
// Avalon-MM style slaves with word addresses, a fixed read latency of one
// cycle and readdatavalid, and never stall.  The size is the source
// design's; the two-port arrangement is this design's choice.
module image_ram
  import ocr_pkg::*;
#(
  parameter int BYTES = IMG_BYTES,
  parameter int AW    = $clog2(BYTES / 4)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic [AW-1:0] a_address,
  input  logic          a_read,
  input  logic          a_write,
  input  logic [3:0]    a_byteenable,
  input  logic [31:0]   a_writedata,
  output logic [31:0]   a_readdata,
  output logic          a_readdatavalid,
  input  logic [AW-1:0] b_address,
  input  logic          b_read,
  output logic [31:0]   b_readdata,
  output logic          b_readdatavalid
);

  logic [31:0] mem [BYTES / 4];

  always_ff @(posedge clk) begin
    if (a_write)
      for (int b = 0; b < 4; b++)
        if (a_byteenable[b]) mem[a_address][8*b +: 8] <= a_writedata[8*b +: 8];
    a_readdata <= mem[a_address];
    b_readdata <= mem[b_address];
  end

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
