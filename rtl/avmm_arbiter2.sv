// avmm_arbiter2: two Avalon-MM masters sharing one slave.
//
// Part of the system interconnect.  Each cycle at most one master's
// request (read or write) is passed to the slave; when both request, the
// grant alternates (round robin) and the other master sees waitrequest
// and must hold its request.  The slave is assumed to answer reads after
// exactly one cycle and never to stall, so the arbiter remembers which
// master issued the read of the previous cycle and routes readdatavalid
// to it.  The source design relies on the bus fabric's arbitration; the
// round-robin scheme is this design's choice.
module avmm_arbiter2 #(
  parameter int AW = 32
) (
  input  logic          clk,
  input  logic          reset,
  // master 0
  input  logic [AW-1:0] m0_address,
  input  logic          m0_read,
  input  logic          m0_write,
  input  logic [3:0]    m0_byteenable,
  input  logic [31:0]   m0_writedata,
  output logic [31:0]   m0_readdata,
  output logic          m0_readdatavalid,
  output logic          m0_waitrequest,
  // master 1
  input  logic [AW-1:0] m1_address,
  input  logic          m1_read,
  input  logic          m1_write,
  input  logic [3:0]    m1_byteenable,
  input  logic [31:0]   m1_writedata,
  output logic [31:0]   m1_readdata,
  output logic          m1_readdatavalid,
  output logic          m1_waitrequest,
  // slave
  output logic [AW-1:0] s_address,
  output logic          s_read,
  output logic          s_write,
  output logic [3:0]    s_byteenable,
  output logic [31:0]   s_writedata,
  input  logic [31:0]   s_readdata,
  input  logic          s_readdatavalid
);

  logic req0, req1, grant1, last1, resp1;

  assign req0   = m0_read | m0_write;
  assign req1   = m1_read | m1_write;
  assign grant1 = req1 && (!req0 || !last1);

  assign m0_waitrequest = req0 && grant1;
  assign m1_waitrequest = req1 && !grant1;

  always_comb begin
    if (grant1) begin
      s_address = m1_address;  s_read = m1_read;  s_write = m1_write;
      s_byteenable = m1_byteenable;  s_writedata = m1_writedata;
    end else begin
      s_address = m0_address;  s_read = m0_read;  s_write = m0_write;
      s_byteenable = m0_byteenable;  s_writedata = m0_writedata;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      last1 <= 1'b0;
      resp1 <= 1'b0;
    end else begin
      if (req0 || req1) last1 <= grant1;
      resp1 <= grant1;
    end
  end

  assign m0_readdata      = s_readdata;
  assign m1_readdata      = s_readdata;
  assign m0_readdatavalid = s_readdatavalid && !resp1;
  assign m1_readdatavalid = s_readdatavalid &&  resp1;

endmodule
