// tb_image_ram: writes random words with random byte enables through port
// A, keeps a shadow copy, and reads every word back through both ports,
// checking data and the one-cycle readdatavalid.
module tb_image_ram;
  logic        clk = 0, reset = 1;
  logic [8:0]  a_address = '0, b_address = '0;
  logic        a_read = 0, a_write = 0, b_read = 0;
  logic [3:0]  a_byteenable = '0;
  logic [31:0] a_writedata = '0, a_readdata, b_readdata;
  logic        a_readdatavalid, b_readdatavalid;
  logic [31:0] shadow [512];
  int checks = 0, failures = 0;

  image_ram dut (.clk, .reset, .a_address, .a_read, .a_write, .a_byteenable, .a_writedata,
                 .a_readdata, .a_readdatavalid, .b_address, .b_read, .b_readdata, .b_readdatavalid);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      a_address = 9'(i); a_byteenable = 4'hF; a_writedata = $urandom; a_write = 1;
      shadow[i] = a_writedata;
    end
    for (int t = 0; t < 1000; t++) begin
      int i;
      i = $urandom % 512;
      @(negedge clk);
      a_address = 9'(i); a_byteenable = 4'($urandom); a_writedata = $urandom; a_write = 1;
      for (int b = 0; b < 4; b++) if (a_byteenable[b]) shadow[i][8*b +: 8] = a_writedata[8*b +: 8];
    end
    @(negedge clk);
    a_write = 0;
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      a_address = 9'(i); a_read = 1;
      b_address = 9'(511 - i); b_read = 1;
      @(negedge clk);
      a_read = 0; b_read = 0;
      checks += 2;
      if (!a_readdatavalid || a_readdata != shadow[i]) begin
        failures++; $display("port A word %0d: %h expected %h", i, a_readdata, shadow[i]);
      end
      if (!b_readdatavalid || b_readdata != shadow[511 - i]) begin
        failures++; $display("port B word %0d: %h expected %h", 511 - i, b_readdata, shadow[511 - i]);
      end
      checks++;
      @(negedge clk);
      if (a_readdatavalid || b_readdatavalid) begin failures++; $display("readdatavalid held high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
