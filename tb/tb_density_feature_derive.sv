// tb_density_feature_derive: random images; the block totals and upper
// halves are counted directly in the testbench, and all 44 derived
// features are compared with window counts from the reference model.
module tb_density_feature_derive;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  logic [TOTAL_W-1:0] blk_total [N_BLOCKS];
  logic [HALF_W-1:0]  blk_upper [N_BLOCKS];
  logic [FEAT_W-1:0]  features  [N_FEATURES];
  int checks = 0, failures = 0;
  image_t img;
  int ref_f [44];

  density_feature_derive dut (.blk_total(blk_total), .blk_upper(blk_upper), .features(features));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 40; t++) begin
      random_image(img, (t == 0) ? 100 : (t == 1) ? 0 : 5 + 2 * t);
      for (int b = 0; b < 16; b++) begin
        int up, tot;
        up = 0; tot = 0;
        for (int y = 0; y < 32; y++)
          for (int x = 0; x < 32; x++) begin
            if (pixel(img, 32 * (b % 2) + y, 32 * (b / 2) + x)) begin
              tot++;
              if (y < 16) up++;
            end
          end
        blk_total[b] = TOTAL_W'(tot);
        blk_upper[b] = HALF_W'(up);
      end
      density_ref(img, ref_f);
      #1;
      for (int f = 0; f < 44; f++) begin
        checks++;
        if (int'(features[f]) != ref_f[f]) begin
          failures++;
          $display("image %0d feature %0d: %0d expected %0d", t, f + 1, features[f], ref_f[f]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
