// tb_density_feature_extract: runs the feature extraction module against a
// model of the image memory and of the features memory.
// Checks: every read address follows the block walk (row step 0x20,
// blocks down each block column), the 44 written features equal direct
// window counts, features go to consecutive words from 0x04010000, the
// control bit reads 1 while busy and the run takes 591 cycles without
// wait states.  A last run inserts random wait states on the writes.
module tb_density_feature_extract;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic [7:0]  avs_address = '0;
  logic        avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic        avs_readdatavalid, avs_waitrequest;
  logic [31:0] m_address, m_writedata, m_readdata;
  logic        m_read, m_write, m_readdatavalid, m_waitrequest, busy;
  logic [3:0]  m_byteenable;

  int checks = 0, failures = 0;
  image_t img;
  int ref_f [44];
  int written [44];
  bit written_ok [44];
  int n_reads, n_writes;
  bit stall_en = 0;

  density_feature_extract dut (
    .clk, .reset,
    .avs_s0_address(avs_address), .avs_s0_read(avs_read), .avs_s0_write(avs_write),
    .avs_s0_writedata(avs_writedata), .avs_s0_readdata(avs_readdata),
    .avs_s0_readdatavalid(avs_readdatavalid), .avs_s0_waitrequest(avs_waitrequest),
    .avm_m0_address(m_address), .avm_m0_read(m_read), .avm_m0_write(m_write),
    .avm_m0_byteenable(m_byteenable), .avm_m0_writedata(m_writedata),
    .avm_m0_readdata(m_readdata), .avm_m0_readdatavalid(m_readdatavalid),
    .avm_m0_waitrequest(m_waitrequest), .busy(busy));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory models: image reads answer after one cycle; feature writes may stall
  always_ff @(posedge clk) begin
    m_readdatavalid <= 1'b0;
    if (m_read && !m_waitrequest) begin
      int b, r;
      logic [31:0] exp_a;
      b = n_reads / 32;
      r = n_reads % 32;
      exp_a = 32'h0400_1000 + 32'((b % 2) * 1024 + (b / 2) * 4 + r * 32);
      checks++;
      if (m_address != exp_a) begin
        failures++;
        $display("read %0d address %h expected %h", n_reads, m_address, exp_a);
      end
      m_readdata      <= img[(m_address - 32'h0400_1000) >> 2];
      m_readdatavalid <= 1'b1;
      n_reads++;
    end
    if (m_write && !m_waitrequest) begin
      int k;
      k = int'((m_address - 32'h0401_0000) >> 2);
      checks++;
      if (k != n_writes || m_byteenable != 4'hF) begin
        failures++;
        $display("write %0d to word %0d byteenable %b", n_writes, k, m_byteenable);
      end
      if (k >= 0 && k < 44) begin
        written[k] = int'(m_writedata);
        written_ok[k] = 1;
      end
      n_writes++;
    end
  end

  always_ff @(posedge clk) m_waitrequest <= stall_en && ($urandom % 3 == 0);

  // Slave accesses are driven on the falling edge
  task automatic csr_read(output logic [31:0] v);
    @(negedge clk);
    avs_address = 8'd0;
    avs_read    = 1'b1;
    @(negedge clk);
    avs_read    = 1'b0;
    v = avs_readdata;
  endtask

  task automatic run(input int pct, input bit check_time);
    int cycles;
    logic [31:0] v;
    random_image(img, pct);
    density_ref(img, ref_f);
    n_reads = 0;
    n_writes = 0;
    foreach (written_ok[i]) written_ok[i] = 0;
    @(negedge clk);
    avs_address   = 8'd0;
    avs_writedata = 32'd1;
    avs_write     = 1'b1;
    @(posedge clk);
    #1;
    avs_write     = 1'b0;
    cycles = 0;
    #1;
    while (busy) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    csr_read(v);
    checks++;
    if (v[0] !== 1'b0) begin failures++; $display("control bit still set after run"); end
    for (int f = 0; f < 44; f++) begin
      checks++;
      if (!written_ok[f] || written[f] != ref_f[f]) begin
        failures++;
        $display("feature %0d: wrote %0d expected %0d", f + 1, written[f], ref_f[f]);
      end
    end
    checks += 2;
    if (n_reads != 512) begin failures++; $display("%0d reads, expected 512", n_reads); end
    if (n_writes != 44) begin failures++; $display("%0d writes, expected 44", n_writes); end
    if (check_time) begin
      checks++;
      if (cycles != 591) begin failures++; $display("run took %0d cycles, expected 591", cycles); end
    end
    $display("image density %0d%%: %0d cycles", pct, cycles);
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    csr_read(v);
    checks++;
    if (v[0] !== 1'b0) begin failures++; $display("control bit set after reset"); end
    // the control bit reads 1 during a run
    fork
      run(0, 1);
      begin
        repeat (20) @(posedge clk);
        csr_read(v);
        checks++;
        if (v[0] !== 1'b1) begin failures++; $display("control bit not set while busy"); end
      end
    join
    run(100, 1);
    run(12, 1);
    run(30, 1);
    stall_en = 1;
    run(20, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
