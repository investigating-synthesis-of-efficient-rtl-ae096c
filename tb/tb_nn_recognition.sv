// tb_nn_recognition: the recognition module at its default configuration
// (44/80/50 network, 32-bit bus, one value per word).  Two runs without
// wait states check outputs and the 7906-cycle run time; a second
// instance runs with random wait states and must give the same kind of
// exact outputs.  Saturated and negative hidden sums must both occur.
module tb_nn_recognition;
  logic clk = 0, reset = 1;
  logic done0, done1;
  int c0, f0, cy0, s0, n0, c1, f1, cy1, s1, n1;
  int checks, failures;

  always #5 clk = ~clk;

  nn_run_harness #(.DATA_W(32), .VALS(1), .STALL(0)) h0 (
    .clk, .reset, .done(done0), .checks(c0), .failures(f0), .cycles(cy0), .sat_seen(s0), .neg_seen(n0));
  nn_run_harness #(.DATA_W(32), .VALS(1), .STALL(1)) h1 (
    .clk, .reset, .done(done1), .checks(c1), .failures(f1), .cycles(cy1), .sat_seen(s1), .neg_seen(n1));

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    wait (done0 && done1);
    checks   = c0 + c1 + 2;
    failures = f0 + f1;
    if (s0 == 0) begin failures++; $display("no saturated hidden sum"); end
    if (n0 == 0) begin failures++; $display("no negative hidden sum"); end
    $display("default bus: %0d cycles (%0d saturated, %0d negative hidden sums); with wait states: %0d cycles",
             cy0, s0, n0, cy1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
