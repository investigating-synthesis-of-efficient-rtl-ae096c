// tb_feature_normalizer: random features and scale constants against the
// normalization formula, and the end points: 0 maps to -1.0 (-512) and
// x = Xmax maps to just under +1.0 (510 or 511, as P is rounded) for several Xmax.
module tb_feature_normalizer;
  import ocr_pkg::*;
  import ocr_ref_pkg::*;

  logic [15:0] x_in, x_nrm;
  logic [17:0] p;
  int checks = 0, failures = 0;

  feature_normalizer dut (.x_in(x_in), .p(p), .x_nrm(x_nrm));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int expect_v);
    #1;
    checks++;
    if (int'(signed'(x_nrm)) != expect_v) begin
      failures++;
      $display("x=%0d p=%0d: got %0d expected %0d", x_in, p, signed'(x_nrm), expect_v);
    end
  endtask

  initial begin
    int xmax [6] = '{64, 100, 512, 1024, 2048, 4096};
    foreach (xmax[i]) begin
      p = 18'(norm_p(xmax[i]));
      x_in = 0;              check(-512);
      x_in = 16'(xmax[i]);
      #1;
      checks++;
      if (signed'(x_nrm) < 16'sd510 || signed'(x_nrm) > 16'sd511) begin
        failures++;
        $display("x=Xmax=%0d: got %0d, expected 510 or 511", xmax[i], signed'(x_nrm));
      end
      x_in = 16'(xmax[i] / 2); check(normalize_ref(xmax[i] / 2, int'(p)));
    end
    for (int t = 0; t < 2000; t++) begin
      int xm;
      xm   = 64 + $urandom % 4033;
      p    = 18'(norm_p(xm));
      x_in = 16'($urandom % (xm + 1));
      check(normalize_ref(int'(x_in), int'(p)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
