// tb_tansig_lut: reads every entry of the table through the slave port
// and compares with round(tanh(i/512)*512); also checks a few values
// worked out by hand and the one-cycle read latency.
module tb_tansig_lut;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic [10:0] avs_address = '0;
  logic        avs_read = 0;
  logic [31:0] avs_readdata;
  logic        avs_readdatavalid;
  int checks = 0, failures = 0;

  tansig_lut dut (.clk, .reset, .avs_address, .avs_read, .avs_readdata, .avs_readdatavalid);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(input int i, output int v);
    avs_address <= 11'(i);
    avs_read    <= 1'b1;
    @(posedge clk);
    avs_read    <= 1'b0;
    @(posedge clk);
    checks++;
    if (!avs_readdatavalid) begin failures++; $display("no readdatavalid for %0d", i); end
    v = int'(avs_readdata);
  endtask

  initial begin
    int v;
    // tanh(0)=0, tanh(0.5)=0.46212 -> 236.6, tanh(1)=0.76159 -> 389.9,
    // tanh(2)=0.96403 -> 493.6, tanh(3.875)=0.99914 -> 511.6
    int idx [5] = '{0, 256, 512, 1024, 1984};
    int hand [5] = '{0, 237, 390, 494, 512};
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    foreach (idx[k]) begin
      rd(idx[k], v);
      checks++;
      if (v != hand[k]) begin failures++; $display("entry %0d = %0d expected %0d", idx[k], v, hand[k]); end
    end
    for (int i = 0; i < LUT_DEPTH; i++) begin
      rd(i, v);
      checks++;
      if (v != tansig_ref(i)) begin failures++; $display("entry %0d = %0d expected %0d", i, v, tansig_ref(i)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
