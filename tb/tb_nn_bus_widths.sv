// tb_nn_bus_widths: the recognition module with wider memory buses, VALS
// = DATA_W/16 values per read: 64, 128, 256, 512 and 1024 bits, plus the
// default 32-bit bus.  Each run must give exact outputs and the cycle
// count of the cycle equation; the run time at a 45 MHz clock, rounded to
// whole microseconds, must equal the measured times of the original
// implementations, 175, 50, 30, 19, 15 and 12 us, within 1 us (the 32-bit
// figure of 175 us is 7906 cycles = 175.7 us truncated rather than
// rounded).
module tb_nn_bus_widths;
  logic clk = 0, reset = 1;
  logic done [6];
  int c [6], f [6], cy [6], s [6], n [6];
  int us_expect [6] = '{175, 50, 30, 19, 15, 12};
  int widths [6] = '{32, 64, 128, 256, 512, 1024};
  int checks, failures;

  always #5 clk = ~clk;

  nn_run_harness #(.DATA_W(32),   .VALS(1),  .RUNS(1)) h32   (.clk, .reset, .done(done[0]), .checks(c[0]), .failures(f[0]), .cycles(cy[0]), .sat_seen(s[0]), .neg_seen(n[0]));
  nn_run_harness #(.DATA_W(64),   .VALS(4),  .RUNS(1)) h64   (.clk, .reset, .done(done[1]), .checks(c[1]), .failures(f[1]), .cycles(cy[1]), .sat_seen(s[1]), .neg_seen(n[1]));
  nn_run_harness #(.DATA_W(128),  .VALS(8),  .RUNS(1)) h128  (.clk, .reset, .done(done[2]), .checks(c[2]), .failures(f[2]), .cycles(cy[2]), .sat_seen(s[2]), .neg_seen(n[2]));
  nn_run_harness #(.DATA_W(256),  .VALS(16), .RUNS(1)) h256  (.clk, .reset, .done(done[3]), .checks(c[3]), .failures(f[3]), .cycles(cy[3]), .sat_seen(s[3]), .neg_seen(n[3]));
  nn_run_harness #(.DATA_W(512),  .VALS(32), .RUNS(1)) h512  (.clk, .reset, .done(done[4]), .checks(c[4]), .failures(f[4]), .cycles(cy[4]), .sat_seen(s[4]), .neg_seen(n[4]));
  nn_run_harness #(.DATA_W(1024), .VALS(64), .RUNS(1)) h1024 (.clk, .reset, .done(done[5]), .checks(c[5]), .failures(f[5]), .cycles(cy[5]), .sat_seen(s[5]), .neg_seen(n[5]));

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5]);
    checks = 0;
    failures = 0;
    for (int i = 0; i < 6; i++) begin
      int us;
      us = int'($floor(real'(cy[i]) / 45.0 + 0.5));
      checks += c[i] + 1;
      failures += f[i];
      if (us < us_expect[i] - 1 || us > us_expect[i] + 1) begin
        failures++;
        $display("bus %0d: %0d us, expected %0d", widths[i], us, us_expect[i]);
      end
      $display("bus %4d bits: %5d cycles, %3d us at 45 MHz", widths[i], cy[i], us);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
