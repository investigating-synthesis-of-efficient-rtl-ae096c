// tb_block_half_sums: checks the two half-block pixel counts against
// $countones over random 32x32 blocks of varying density, plus the empty
// and the full block.
module tb_block_half_sums;
  import ocr_pkg::*;

  logic [31:0]        rows [32];
  logic [HALF_W-1:0]  upper_sum;
  logic [TOTAL_W-1:0] total_sum;
  int checks = 0, failures = 0;

  block_half_sums dut (.rows(rows), .upper_sum(upper_sum), .total_sum(total_sum));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    int up, tot;
    up = 0; tot = 0;
    for (int r = 0; r < 32; r++) begin
      if (r < 16) up += $countones(rows[r]);
      tot += $countones(rows[r]);
    end
    #1;
    checks += 2;
    if (int'(upper_sum) != up) begin failures++; $display("upper %0d expected %0d", upper_sum, up); end
    if (int'(total_sum) != tot) begin failures++; $display("total %0d expected %0d", total_sum, tot); end
  endtask

  initial begin
    for (int r = 0; r < 32; r++) rows[r] = '0;
    check();
    for (int r = 0; r < 32; r++) rows[r] = '1;
    check();
    for (int t = 0; t < 500; t++) begin
      for (int r = 0; r < 32; r++) rows[r] = $urandom & $urandom | ((t % 3 == 0) ? $urandom : 0);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
