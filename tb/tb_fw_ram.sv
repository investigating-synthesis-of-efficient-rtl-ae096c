// tb_fw_ram: the features-and-weights memory at its default 32-bit width
// and at 256 bits.  Random 32-bit writes with byte enables go in through
// the narrow port; every word is then read back through both ports and
// compared with a byte-level shadow copy, so lane placement in the wide
// memory is checked too.
module tb_fw_ram;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;
  logic [7:0] shadow [32768];

  always #5 clk = ~clk;

  // 32-bit instance
  logic [14:0]  a_address = '0;
  logic         a_read = 0, a_write = 0;
  logic [3:0]   a_byteenable = '0;
  logic [31:0]  a_writedata = '0, a_readdata, a_readdata_w;
  logic         a_readdatavalid, a_readdatavalid_w;
  logic [12:0]  b_address = '0;
  logic [9:0]   b_address_w = '0;
  logic         b_read = 0;
  logic [31:0]  b_readdata;
  logic [255:0] b_readdata_w;
  logic         b_readdatavalid, b_readdatavalid_w;

  fw_ram #(.DATA_W(32)) dut32 (
    .clk, .reset, .a_address, .a_read, .a_write, .a_byteenable, .a_writedata,
    .a_readdata, .a_readdatavalid, .b_address, .b_read, .b_readdata, .b_readdatavalid);
  fw_ram #(.DATA_W(256)) dut256 (
    .clk, .reset, .a_address, .a_read, .a_write, .a_byteenable, .a_writedata,
    .a_readdata(a_readdata_w), .a_readdatavalid(a_readdatavalid_w),
    .b_address(b_address_w), .b_read, .b_readdata(b_readdata_w), .b_readdatavalid(b_readdatavalid_w));

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int byte_addr, input logic [3:0] be, input logic [31:0] d);
    @(negedge clk);
    a_address = 15'(byte_addr); a_byteenable = be; a_writedata = d; a_write = 1;
    for (int b = 0; b < 4; b++) if (be[b]) shadow[byte_addr + b] = d[8*b +: 8];
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    for (int w = 0; w < 8192; w++) wr(4 * w, 4'hF, $urandom);
    for (int t = 0; t < 3000; t++) wr(4 * ($urandom % 8192), 4'($urandom), $urandom);
    @(negedge clk);
    a_write = 0;
    // narrow port read back, both widths
    for (int t = 0; t < 2000; t++) begin
      int w;
      logic [31:0] e;
      w = $urandom % 8192;
      for (int b = 0; b < 4; b++) e[8*b +: 8] = shadow[4 * w + b];
      @(negedge clk);
      a_address = 15'(4 * w); a_read = 1;
      @(negedge clk);
      a_read = 0;
      checks += 2;
      if (!a_readdatavalid || a_readdata != e) begin failures++; $display("32-bit port A word %0d", w); end
      if (!a_readdatavalid_w || a_readdata_w != e) begin failures++; $display("256-bit port A word %0d", w); end
    end
    // wide port read back
    for (int t = 0; t < 1024; t++) begin
      logic [255:0] e;
      logic [31:0]  e32;
      for (int b = 0; b < 32; b++) e[8*b +: 8] = shadow[32 * t + b];
      for (int b = 0; b < 4; b++) e32[8*b +: 8] = shadow[4 * t + b];
      @(negedge clk);
      b_address_w = 10'(t); b_address = 13'(t); b_read = 1;
      @(negedge clk);
      b_read = 0;
      checks += 2;
      if (!b_readdatavalid_w || b_readdata_w != e) begin failures++; $display("256-bit port B word %0d", t); end
      if (!b_readdatavalid || b_readdata != e32) begin failures++; $display("32-bit port B word %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
