// tb_ocr_system: end-to-end test of the accelerator at its default
// configuration, driven the way the control processor drives it.
//
// The host loads the 44/80/50 network weights into the features-and-weights
// memory and the normalization constants (from each window's pixel count)
// into the recognition module.  Then, for each of three word images, it
// writes the image, starts feature extraction, keeps reading the features
// memory while the extractor runs (so that the two masters collide in the
// arbiter), reads back and checks the 44 features, starts recognition,
// and checks the 50 outputs against the reference network.  The
// recognition run must take the 7906 cycles of the cycle equation.
//
// Mechanisms that must each occur at least once: the feature extractor
// stalled by the arbiter, the host stalled by the arbiter, a saturated
// hidden sum (tansig = +-1), a negative hidden sum (sign restored after the
// table) and a host read of an unmapped address.
module tb_ocr_system;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic [31:0] host_address = '0, host_writedata = '0, host_readdata;
  logic        host_read = 0, host_write = 0, host_readdatavalid, host_waitrequest;
  logic [3:0]  host_byteenable = 4'hF;
  logic        fe_busy, rec_busy;

  int checks = 0, failures = 0;
  int n_fe_stall = 0, n_host_stall = 0, n_sat = 0, n_neg = 0, n_unmapped = 0;

  ocr_system dut (
    .clk, .reset, .host_address, .host_read, .host_write, .host_byteenable, .host_writedata,
    .host_readdata, .host_readdatavalid, .host_waitrequest, .fe_busy, .rec_busy);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors
  always @(posedge clk) begin
    if (dut.u_fe.avm_m0_write && dut.u_fe.avm_m0_waitrequest) n_fe_stall++;
    if ((host_read || host_write) && host_waitrequest) n_host_stall++;
    if (dut.u_rec.lut_wait && dut.u_rec.avm_m0_readdatavalid) begin
      if (dut.u_rec.cur_sat) n_sat++;
      if (dut.u_rec.cur_hsum < 0) n_neg++;
    end
  end

  // Host bus functional model, driven on the falling edge
  task automatic hwrite(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    host_address = a; host_writedata = d; host_write = 1; host_byteenable = 4'hF;
    #1;
    while (host_waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    host_write = 0;
  endtask

  task automatic hread(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    host_address = a; host_read = 1;
    #1;
    while (host_waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    host_read = 0;
    while (!host_readdatavalid) @(negedge clk);
    d = host_readdata;
  endtask

  // Back-to-back reads of n words; the data are not used
  task automatic hread_burst(input logic [31:0] a, input int n);
    int accepted;
    accepted = 0;
    @(negedge clk);
    host_address = a; host_read = 1;
    while (accepted < n) begin
      #1;
      if (!host_waitrequest) begin
        accepted++;
        host_address = a + 32'(4 * (accepted % 44));
      end
      @(negedge clk);
    end
    host_read = 0;
    repeat (2) @(negedge clk);
  endtask

  int w1 [80][44];
  int w2 [50][80];
  int p [44];
  image_t img;

  initial begin
    logic [31:0] v;
    int feat_ref [44], feat_hw [44], out_ref [50], rs, rn, cycles, best;
    int r0, nr, c0, nc;

    repeat (4) @(posedge clk);
    reset = 0;

    // unmapped address reads as 0
    hread(32'h0000_0100, v);
    n_unmapped++;
    checks++;
    if (v != 0) begin failures++; $display("unmapped read gave %h", v); end

    // network: weights one 16-bit value per 32-bit word
    for (int j = 0; j < 80; j++)
      for (int i = 0; i < 44; i++) begin
        w1[j][i] = (j == 0) ? 400 : (j == 1) ? -400 : int'($urandom % 801) - 400;
        hwrite(FW_BASE + 32'(4 * (44 + 44 * j + i)), 32'(w1[j][i]) & 32'hFFFF);
      end
    for (int k = 0; k < 50; k++)
      for (int j = 0; j < 80; j++) begin
        w2[k][j] = int'($urandom % 1201) - 600;
        hwrite(FW_BASE + 32'(4 * (44 + 80 * 44 + 80 * k + j)), 32'(w2[k][j]) & 32'hFFFF);
      end
    for (int f = 0; f < 44; f++) begin
      window(f + 1, r0, nr, c0, nc);
      p[f] = norm_p(nr * nc);
      hwrite(REC_CSR_BASE + 32'(4 * (64 + f)), 32'(p[f]));
    end

    for (int im = 0; im < 3; im++) begin
      random_image(img, 4 + 8 * im);
      for (int w = 0; w < 512; w++) hwrite(IMG_BASE + 32'(4 * w), img[w]);
      // image read back spot check
      hread(IMG_BASE + 32'h44, v);
      checks++;
      if (v != img[17]) begin failures++; $display("image word 17 reads %h", v); end

      // feature extraction, with the host reading the features memory meanwhile
      hwrite(FE_CSR_BASE, 32'd1);
      cycles = 0;
      while (fe_busy) begin
        hread_burst(FW_BASE, 8);
        cycles++;
      end
      hread(FE_CSR_BASE, v);
      checks++;
      if (v[0]) begin failures++; $display("feature control bit still set"); end
      density_ref(img, feat_ref);
      for (int f = 0; f < 44; f++) begin
        hread(FW_BASE + 32'(4 * f), v);
        feat_hw[f] = int'(v);
        checks++;
        if (feat_hw[f] != feat_ref[f]) begin
          failures++;
          $display("image %0d feature %0d: %0d expected %0d", im, f + 1, feat_hw[f], feat_ref[f]);
        end
      end

      // recognition
      nn_ref(feat_ref, p, w1, w2, out_ref, rs, rn);
      @(negedge clk);
      host_address = REC_CSR_BASE; host_writedata = 32'd1; host_write = 1;
      @(posedge clk);
      #1;
      host_write = 0;
      cycles = 0;
      while (rec_busy) begin
        @(posedge clk);
        #1;
        cycles++;
      end
      checks++;
      if (cycles != rec_cycles(44, 80, 50, 16)) begin
        failures++;
        $display("recognition took %0d cycles, expected %0d", cycles, rec_cycles(44, 80, 50, 16));
      end
      best = 0;
      for (int k = 0; k < 50; k++) begin
        hread(REC_CSR_BASE + 32'(4 * (128 + k)), v);
        checks++;
        if (int'(v) != out_ref[k]) begin
          failures++;
          $display("image %0d output %0d: %0d expected %0d", im, k, int'(v), out_ref[k]);
        end
        if (int'(v) > out_ref[best]) best = k;
      end
      $display("image %0d: recognition %0d cycles, strongest output %0d", im, cycles, best);
    end

    checks += 5;
    if (n_fe_stall == 0)   begin failures++; $display("feature extractor never stalled"); end
    if (n_host_stall == 0) begin failures++; $display("host never stalled"); end
    if (n_sat == 0)        begin failures++; $display("no saturated hidden sum"); end
    if (n_neg == 0)        begin failures++; $display("no negative hidden sum"); end
    if (n_unmapped == 0)   begin failures++; $display("no unmapped read"); end
    $display("mechanisms: extractor stalls %0d, host stalls %0d, saturated %0d, negative %0d, unmapped reads %0d",
             n_fe_stall, n_host_stall, n_sat, n_neg, n_unmapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
