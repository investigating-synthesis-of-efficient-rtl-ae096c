// tb_avmm_arbiter2: two random masters share a one-cycle-latency memory
// through the arbiter.  Each master keeps its request until waitrequest is
// low, as Avalon requires.  Checks: read data reach the master that asked
// and equal the last write to that word; at most one request reaches the
// slave per cycle; under contention the grant alternates, so both masters
// see stalls and neither starves.
module tb_avmm_arbiter2;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;

  logic [7:0]  m_address [2];
  logic        m_read [2], m_write [2];
  logic [3:0]  m_byteenable [2];
  logic [31:0] m_writedata [2], m_readdata [2];
  logic        m_readdatavalid [2], m_waitrequest [2];
  logic [7:0]  s_address;
  logic        s_read, s_write, s_readdatavalid;
  logic [3:0]  s_byteenable;
  logic [31:0] s_writedata, s_readdata;
  logic [31:0] mem [256];
  logic [31:0] shadow [256];
  int stalls [2], done_ops [2];

  always #5 clk = ~clk;

  avmm_arbiter2 #(.AW(8)) dut (
    .clk, .reset,
    .m0_address(m_address[0]), .m0_read(m_read[0]), .m0_write(m_write[0]), .m0_byteenable(m_byteenable[0]),
    .m0_writedata(m_writedata[0]), .m0_readdata(m_readdata[0]), .m0_readdatavalid(m_readdatavalid[0]),
    .m0_waitrequest(m_waitrequest[0]),
    .m1_address(m_address[1]), .m1_read(m_read[1]), .m1_write(m_write[1]), .m1_byteenable(m_byteenable[1]),
    .m1_writedata(m_writedata[1]), .m1_readdata(m_readdata[1]), .m1_readdatavalid(m_readdatavalid[1]),
    .m1_waitrequest(m_waitrequest[1]),
    .s_address, .s_read, .s_write, .s_byteenable, .s_writedata, .s_readdata, .s_readdatavalid);

  // Slave memory
  always_ff @(posedge clk) begin
    s_readdatavalid <= s_read && !reset;
    s_readdata      <= mem[s_address];
    if (s_write) mem[s_address] <= s_writedata;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] expq [2][$];
  int both_req, slave_reqs;

  // Each master uses its own half of the memory (words 0..127 for master 0,
  // 128..255 for master 1), so expected read data do not depend on the
  // order between masters.
  for (genvar m = 0; m < 2; m++) begin : g_m
    initial begin
      m_read[m] = 0; m_write[m] = 0; m_address[m] = '0; m_byteenable[m] = 4'hF; m_writedata[m] = '0;
      stalls[m] = 0; done_ops[m] = 0;
      @(negedge reset);
      for (int t = 0; t < 600; t++) begin
        int a;
        bit is_wr;
        @(negedge clk);
        a = 128 * m + int'($urandom % 128);
        is_wr = (t < 128) || ($urandom % 2);
        if (t < 128) a = 128 * m + t;
        m_address[m]   = 8'(a);
        m_read[m]      = !is_wr;
        m_write[m]     = is_wr;
        m_writedata[m] = $urandom;
        #1;
        while (m_waitrequest[m]) begin
          stalls[m]++;
          @(negedge clk);
          #1;
        end
        if (is_wr) shadow[a] = m_writedata[m];
        else expq[m].push_back(shadow[a]);
        done_ops[m]++;
      end
      @(negedge clk);
      m_read[m] = 0; m_write[m] = 0;
    end

    always @(posedge clk) begin
      if (m_readdatavalid[m]) begin
        checks++;
        if (expq[m].size() == 0) begin
          failures++;
          $display("master %0d: unexpected read data", m);
        end else begin
          logic [31:0] e;
          e = expq[m].pop_front();
          if (m_readdata[m] != e) begin
            failures++;
            $display("master %0d: read %h expected %h", m, m_readdata[m], e);
          end
        end
      end
    end
  end

  // At most one request passes per cycle; count contention
  always @(negedge clk) begin
    #2;
    if (!reset) begin
      if ((m_read[0] || m_write[0]) && (m_read[1] || m_write[1])) both_req++;
      if (s_read || s_write) slave_reqs++;
      if ((m_read[0] || m_write[0]) && (m_read[1] || m_write[1]) && (m_waitrequest[0] == m_waitrequest[1])) begin
        failures++;
        $display("both or neither master granted at %0t", $time);
      end
    end
  end

  initial begin
    both_req = 0;
    slave_reqs = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    wait (done_ops[0] == 600 && done_ops[1] == 600);
    repeat (4) @(posedge clk);
    checks += 4;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin failures++; $display("reads left unanswered"); end
    if (stalls[0] == 0 || stalls[1] == 0) begin failures++; $display("a master never stalled: %0d %0d", stalls[0], stalls[1]); end
    if (both_req == 0) begin failures++; $display("no contention happened"); end
    if (stalls[0] > 2 * stalls[1] + 50 || stalls[1] > 2 * stalls[0] + 50) begin
      failures++; $display("unfair arbitration: stalls %0d %0d", stalls[0], stalls[1]);
    end
    $display("contended cycles %0d, stalls %0d / %0d", both_req, stalls[0], stalls[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
