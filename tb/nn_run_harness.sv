// nn_run_harness: drives one nn_recognition instance through complete runs.
//
// Holds a model of the features-and-weights memory laid out for the
// instance's bus (VALS 16-bit values per DATA_W-bit word, every vector
// padded to whole words; for one value per word the unused upper bits are
// filled with random data that must be ignored) and of the tansig table,
// both answering one cycle after a read.  With STALL=1 the memory inserts
// random wait states.  Each run loads random normalization constants
// through the slave, starts the module, counts the cycles until the
// control bit clears, reads the 50 outputs and compares them with the
// reference network.  Without stalls the cycle count must equal the cycle
// equation for B = 16*VALS.
module nn_run_harness
  import ocr_pkg::*;
  import ocr_ref_pkg::*;
#(
  parameter int DATA_W = 32,
  parameter int VALS   = 1,
  parameter bit STALL  = 0,
  parameter int RUNS   = 2
) (
  input  logic clk,
  input  logic reset,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cycles,
  output int   sat_seen,
  output int   neg_seen
);

  localparam int BYTES = DATA_W / 8;
  localparam int NF    = (44 + VALS - 1) / VALS;
  localparam int NH    = (80 + VALS - 1) / VALS;

  logic [7:0]        avs_address = '0;
  logic              avs_read = 0, avs_write = 0;
  logic [31:0]       avs_writedata = '0, avs_readdata;
  logic              avs_readdatavalid, avs_waitrequest;
  logic [31:0]       m_address;
  logic              m_read, m_readdatavalid, m_waitrequest, busy;
  logic [DATA_W-1:0] m_readdata;

  logic [DATA_W-1:0] fw [int];
  int feat [44];
  int p [44];
  int w1 [80][44];
  int w2 [50][80];
  int ref_out [50];

  nn_recognition #(.DATA_W(DATA_W), .VALS(VALS)) dut (
    .clk, .reset,
    .avs_s0_address(avs_address), .avs_s0_read(avs_read), .avs_s0_write(avs_write),
    .avs_s0_writedata(avs_writedata), .avs_s0_readdata(avs_readdata),
    .avs_s0_readdatavalid(avs_readdatavalid), .avs_s0_waitrequest(avs_waitrequest),
    .avm_m0_address(m_address), .avm_m0_read(m_read), .avm_m0_readdata(m_readdata),
    .avm_m0_readdatavalid(m_readdatavalid), .avm_m0_waitrequest(m_waitrequest), .busy(busy));

  // Memory model
  always_ff @(posedge clk) begin
    m_readdatavalid <= 1'b0;
    if (m_read && !m_waitrequest) begin
      m_readdatavalid <= 1'b1;
      if (m_address >= 32'h0404_0000) begin
        m_readdata <= DATA_W'(tansig_ref(int'((m_address - 32'h0404_0000) / BYTES)));
      end else begin
        int wi;
        wi = int'((m_address - 32'h0401_0000) / BYTES);
        m_readdata <= fw.exists(wi) ? fw[wi] : '0;
      end
    end
  end

  always_ff @(posedge clk) m_waitrequest <= STALL && ($urandom % 4 == 0);

  task automatic put(input int word0, input int i, input int v);
    int wi;
    wi = word0 + i / VALS;
    if (!fw.exists(wi)) begin
      fw[wi] = '0;
      for (int k = 0; k < DATA_W / 32; k++) fw[wi][32*k +: 32] = $urandom;
      if (VALS > 1) fw[wi] = '0;
    end
    fw[wi][16 * (i % VALS) +: 16] = 16'(v);
  endtask

  // Slave accesses are driven on the falling edge
  task automatic csr_write(input int a, input int v);
    @(negedge clk);
    avs_address   = 8'(a);
    avs_writedata = 32'(v);
    avs_write     = 1'b1;
    @(negedge clk);
    avs_write     = 1'b0;
  endtask

  task automatic csr_read(input int a, output logic [31:0] v);
    @(negedge clk);
    avs_address = 8'(a);
    avs_read    = 1'b1;
    @(negedge clk);
    avs_read    = 1'b0;
    if (!avs_readdatavalid) begin
      checks++;
      failures++;
      $display("slave read without readdatavalid");
    end
    v = avs_readdata;
  endtask

  initial begin
    logic [31:0] v;
    int n_sat, n_neg, expect_cycles;
    done = 0; checks = 0; failures = 0; cycles = 0; sat_seen = 0; neg_seen = 0;
    expect_cycles = rec_cycles(44, 80, 50, 16 * VALS);
    @(negedge reset);
    repeat (2) @(posedge clk);
    csr_read(0, v);
    checks++;
    if (v[0] !== 1'b0) begin failures++; $display("control bit set after reset"); end
    for (int run = 0; run < RUNS; run++) begin
      fw.delete();
      for (int i = 0; i < 44; i++) begin
        int xmax;
        xmax    = 64 << ($urandom % 7);
        p[i]    = norm_p(xmax);
        feat[i] = $urandom % (xmax + 1);
        put(0, i, feat[i]);
      end
      for (int j = 0; j < 80; j++)
        for (int i = 0; i < 44; i++) begin
          w1[j][i] = int'($urandom % 801) - 400;
          put(NF + j * NF, i, w1[j][i]);
        end
      for (int k = 0; k < 50; k++)
        for (int j = 0; j < 80; j++) begin
          w2[k][j] = int'($urandom % 1201) - 600;
          put(NF + 80 * NF + k * NH, j, w2[k][j]);
        end
      nn_ref(feat, p, w1, w2, ref_out, n_sat, n_neg);
      sat_seen += n_sat;
      neg_seen += n_neg;
      for (int i = 0; i < 44; i++) csr_write(64 + i, p[i]);
      csr_read(64 + 7, v);
      checks++;
      if (int'(v) != p[7]) begin failures++; $display("constant 7 reads %0d, wrote %0d", v, p[7]); end

      csr_write(0, 1);
      cycles = 0;
      #1;
      while (busy) begin
        @(posedge clk);
        #1;
        cycles++;
      end
      if (!STALL) begin
        checks++;
        if (cycles != expect_cycles) begin
          failures++;
          $display("bus %0d bits: %0d cycles, equation gives %0d", DATA_W, cycles, expect_cycles);
        end
      end
      for (int k = 0; k < 50; k++) begin
        csr_read(128 + k, v);
        checks++;
        if (int'(v) != ref_out[k]) begin
          failures++;
          $display("bus %0d bits run %0d output %0d: %0d expected %0d", DATA_W, run, k, int'(v), ref_out[k]);
        end
      end
    end
    done = 1;
  end

endmodule
