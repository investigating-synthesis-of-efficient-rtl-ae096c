// nn_recognition: neural-network recognition peripheral.
//
// Evaluates a feed-forward network with N_IN inputs, N_HID tansig hidden
// neurons and N_OUT linear output neurons (44/80/50 by default) using one
// physical neuron.  The neuron does all of its multiplies at once
// (neuron_dot, N_IN multipliers for the hidden layer and N_HID for the
// output layer), and the network is walked one neuron at a time.  All
// values are 16-bit signed fixed point with 9 fraction bits.
//
// Memory layout.  Features and weights live in one memory read through the
// Avalon-MM master, VALS 16-bit values per DATA_W-bit bus word (value v in
// bits 16v+15..16v).  Every vector starts on a word boundary and is padded
// to whole words: NF = ceil(N_IN/VALS), NH = ceil(N_HID/VALS).
//   words 0 .. NF-1                       raw features
//   words NF + j*NF ..                    weights of hidden neuron j
//   words NF + N_HID*NF + k*NH ..         weights of output neuron k
// Word addresses are FW_BASE_ADDR + word*DATA_W/8.  The tansig table entry
// i is at LUT_BASE_ADDR + i*DATA_W/8 in the low 16 bits.
//
// Flow.  Writing 1 to control bit 0 (slave word 0) starts a run and the
// bit reads 1 until the outputs are ready.
//   1. Read the features; each is normalized as it arrives with its
//      constant P (feature_normalizer).                      NF+1 cycles
//   2. For each hidden neuron read its weights (NF+1 cycles); its sum is
//      formed in the next cycle, overlapped with the next neuron's reads.
//   3. One cycle for the last hidden sum, then two cycles per hidden
//      neuron: read the table at |sum| (or the last entry if |sum| is past
//      it), then store +-entry, or +-1.0 when saturated.   2*N_HID+1 cycles
//   4. For each output neuron read its weights (NH+1 cycles) and form its
//      sum in one more cycle.
// With zero wait states and one-cycle read latency a run therefore takes
//   (NF+1)*(N_HID+1) + 2*N_HID + 1 + (NH+2)*N_OUT
// cycles from the write that sets the control bit to the edge that clears
// it: 7906 at the defaults.  This is the source design's cycle equation
// with B = 16*VALS.  Wait states on the bus stretch it.
//
// Slave (word addresses, one-cycle read latency, never stalls):
//   0            control, bit 0 = start / busy
//   64 .. 107    normalization constants P, 18 bits, read/write
//   128 .. 177   output sums, 32-bit signed, read only
//
// From the source design: the single neuron with parallel multiplies, the
// normalization formula, the half tansig table with sign restore, the
// layout padding and the cycle budget.  This design's choices: the slave
// register map, the reset values of P (scale for Xmax = 1023), 32-bit
// outputs, no bias terms (the source describes weights only) and one
// table entry per bus word.
module nn_recognition
  import ocr_pkg::*;
#(
  parameter int          N_IN          = NN_IN,
  parameter int          N_HID         = NN_HID,
  parameter int          N_OUT         = NN_OUT,
  parameter int          DATA_W        = 32,
  parameter int          VALS          = 1,
  parameter logic [31:0] FW_BASE_ADDR  = FW_BASE,
  parameter logic [31:0] LUT_BASE_ADDR = LUT_BASE,
  parameter int          TANSIG_LIMIT  = TANSIG_MAX
) (
  input  logic              clk,
  input  logic              reset,
  // control slave
  input  logic [7:0]        avs_s0_address,
  input  logic              avs_s0_read,
  input  logic              avs_s0_write,
  input  logic [31:0]       avs_s0_writedata,
  output logic [31:0]       avs_s0_readdata,
  output logic              avs_s0_readdatavalid,
  output logic              avs_s0_waitrequest,
  // memory master (read only)
  output logic [31:0]       avm_m0_address,
  output logic              avm_m0_read,
  input  logic [DATA_W-1:0] avm_m0_readdata,
  input  logic              avm_m0_readdatavalid,
  input  logic              avm_m0_waitrequest,
  output logic              busy
);

  localparam int BYTES   = DATA_W / 8;
  localparam int NF      = (N_IN + VALS - 1) / VALS;
  localparam int NH      = (N_HID + VALS - 1) / VALS;
  localparam int HSUM_W  = FIX_W + $clog2(N_IN);
  localparam int OSUM_W  = FIX_W + $clog2(N_HID);
  localparam int BEAT_W  = $clog2(NF + NH + 2);
  localparam int HW_BASE = NF;                 // first hidden weight word
  localparam int OW_BASE = NF + N_HID * NF;    // first output weight word

  if (VALS * FIX_W > DATA_W) begin : g_bad_vals
    $error("nn_recognition: VALS 16-bit values do not fit in DATA_W");
  end
  if (N_OUT > 64 || N_IN > 64) begin : g_bad_map
    $error("nn_recognition: slave register map holds at most 64 constants and 64 outputs");
  end

  typedef enum logic [2:0] {S_IDLE, S_FEAT, S_W1, S_LUT, S_W2, S_MAC2} state_t;

  state_t                   state;
  logic                     ctrl;
  logic [BEAT_W-1:0]        issued, received, nbeats;
  logic [$clog2(N_HID+1)-1:0] hid_idx;
  logic [$clog2(N_OUT+1)-1:0] out_idx;
  logic                     mac1_pending;
  logic [$clog2(N_HID+1)-1:0] mac1_idx;
  logic                     lut_wait;        // LUT read issued, waiting for data

  logic [NORM_P_W-1:0]      norm_p [N_IN];
  logic signed [FIX_W-1:0]  x_nrm  [N_IN];
  logic signed [FIX_W-1:0]  wbuf   [N_HID];
  logic signed [FIX_W-1:0]  w1_vec [N_IN];
  logic signed [HSUM_W-1:0] hsum   [N_HID];
  logic signed [FIX_W-1:0]  hact   [N_HID];
  logic signed [31:0]       outs   [N_OUT];

  logic signed [HSUM_W-1:0] dot1;
  logic signed [OSUM_W-1:0] dot2;
  logic [FIX_W-1:0]         lane_nrm [VALS];
  logic [FIX_W-1:0]         lane_raw [VALS];
  logic [NORM_P_W-1:0]      lane_p   [VALS];

  // Magnitude of the hidden sum being activated and its table index
  logic signed [HSUM_W-1:0] cur_hsum;
  logic [HSUM_W-1:0]        cur_mag;
  logic                     cur_sat;
  logic [31:0]              lut_index;

  logic [7:0] norm_sel, out_sel;

  assign norm_sel           = avs_s0_address - 8'(REC_REG_NORM);
  assign out_sel            = avs_s0_address - 8'(REC_REG_OUT);
  assign busy               = ctrl;
  assign avs_s0_waitrequest = 1'b0;

  always_comb
    for (int i = 0; i < N_IN; i++) w1_vec[i] = wbuf[i];

  neuron_dot #(.N(N_IN))  u_dot1 (.x(x_nrm), .w(w1_vec), .sum(dot1));
  neuron_dot #(.N(N_HID)) u_dot2 (.x(hact),  .w(wbuf),   .sum(dot2));

  // One normalizer per bus lane
  for (genvar v = 0; v < VALS; v++) begin : g_norm
    always_comb begin
      int idx;
      idx         = int'(received) * VALS + v;
      lane_raw[v] = avm_m0_readdata[FIX_W*v +: FIX_W];
      lane_p[v]   = (idx < N_IN) ? norm_p[idx] : '0;
    end
    feature_normalizer u_norm (.x_in(lane_raw[v]), .p(lane_p[v]), .x_nrm(lane_nrm[v]));
  end

  always_comb begin
    cur_hsum  = hsum[hid_idx];
    cur_mag   = cur_hsum[HSUM_W-1] ? HSUM_W'(-cur_hsum) : HSUM_W'(cur_hsum);
    cur_sat   = cur_mag > HSUM_W'(TANSIG_LIMIT);
    lut_index = cur_sat ? 32'(TANSIG_LIMIT) : 32'(cur_mag);
  end

  // Master request
  always_comb begin
    avm_m0_read    = 1'b0;
    avm_m0_address = '0;
    case (state)
      S_FEAT: begin
        avm_m0_read    = issued < nbeats;
        avm_m0_address = FW_BASE_ADDR + 32'(issued) * 32'(BYTES);
      end
      S_W1: begin
        avm_m0_read    = issued < nbeats;
        avm_m0_address = FW_BASE_ADDR + (32'(HW_BASE) + 32'(hid_idx) * 32'(NF) + 32'(issued)) * 32'(BYTES);
      end
      S_W2: begin
        avm_m0_read    = issued < nbeats;
        avm_m0_address = FW_BASE_ADDR + (32'(OW_BASE) + 32'(out_idx) * 32'(NH) + 32'(issued)) * 32'(BYTES);
      end
      S_LUT: begin
        avm_m0_read    = !mac1_pending && !lut_wait;
        avm_m0_address = LUT_BASE_ADDR + lut_index * 32'(BYTES);
      end
      default: ;
    endcase
  end

  // Control slave
  always_ff @(posedge clk) begin
    if (reset) begin
      avs_s0_readdatavalid <= 1'b0;
      avs_s0_readdata      <= '0;
      for (int i = 0; i < N_IN; i++) norm_p[i] <= NORM_P_DEFAULT;
    end else begin
      avs_s0_readdatavalid <= avs_s0_read;
      avs_s0_readdata      <= '0;
      if (avs_s0_address == 8'(REC_REG_CTRL))
        avs_s0_readdata <= {31'b0, ctrl};
      else if (avs_s0_address >= 8'(REC_REG_NORM) && avs_s0_address < 8'(REC_REG_NORM + N_IN))
        avs_s0_readdata <= 32'(norm_p[norm_sel[$clog2(N_IN)-1:0]]);
      else if (avs_s0_address >= 8'(REC_REG_OUT) && avs_s0_address < 8'(REC_REG_OUT + N_OUT))
        avs_s0_readdata <= outs[out_sel[$clog2(N_OUT)-1:0]];
      if (avs_s0_write && state == S_IDLE &&
          avs_s0_address >= 8'(REC_REG_NORM) && avs_s0_address < 8'(REC_REG_NORM + N_IN))
        norm_p[norm_sel[$clog2(N_IN)-1:0]] <= avs_s0_writedata[NORM_P_W-1:0];
    end
  end

  // Sequencer
  always_ff @(posedge clk) begin
    if (reset) begin
      state        <= S_IDLE;
      ctrl         <= 1'b0;
      issued       <= '0;
      received     <= '0;
      nbeats       <= '0;
      hid_idx      <= '0;
      out_idx      <= '0;
      mac1_pending <= 1'b0;
      mac1_idx     <= '0;
      lut_wait     <= 1'b0;
      for (int i = 0; i < N_IN; i++) x_nrm[i] <= '0;
      for (int i = 0; i < N_HID; i++) begin
        wbuf[i] <= '0;
        hsum[i] <= '0;
        hact[i] <= '0;
      end
      for (int k = 0; k < N_OUT; k++) outs[k] <= '0;
    end else begin
      if (avm_m0_read && !avm_m0_waitrequest && state != S_LUT) issued <= issued + 1'b1;

      // Hidden sum of the neuron whose weights just completed
      if (mac1_pending) begin
        hsum[mac1_idx] <= dot1;
        mac1_pending   <= 1'b0;
      end

      case (state)
        S_IDLE: begin
          if (avs_s0_write && avs_s0_address == 8'(REC_REG_CTRL) && avs_s0_writedata[0]) begin
            ctrl     <= 1'b1;
            state    <= S_FEAT;
            issued   <= '0;
            received <= '0;
            nbeats   <= BEAT_W'(NF);
            hid_idx  <= '0;
            out_idx  <= '0;
          end
        end

        S_FEAT: if (avm_m0_readdatavalid) begin
          for (int v = 0; v < VALS; v++)
            if (int'(received) * VALS + v < N_IN) x_nrm[int'(received) * VALS + v] <= lane_nrm[v];
          received <= received + 1'b1;
          if (received == nbeats - 1'b1) begin
            state    <= S_W1;
            issued   <= '0;
            received <= '0;
          end
        end

        S_W1: if (avm_m0_readdatavalid) begin
          for (int v = 0; v < VALS; v++)
            if (int'(received) * VALS + v < N_IN)
              wbuf[int'(received) * VALS + v] <= avm_m0_readdata[FIX_W*v +: FIX_W];
          received <= received + 1'b1;
          if (received == nbeats - 1'b1) begin
            mac1_pending <= 1'b1;
            mac1_idx     <= hid_idx;
            issued       <= '0;
            received     <= '0;
            if (hid_idx == ($bits(hid_idx))'(N_HID - 1)) begin
              state   <= S_LUT;
              hid_idx <= '0;
              lut_wait <= 1'b0;
            end else begin
              hid_idx <= hid_idx + 1'b1;
            end
          end
        end

        S_LUT: begin
          if (!mac1_pending) begin
            if (!lut_wait) begin
              if (!avm_m0_waitrequest) lut_wait <= 1'b1;
            end else if (avm_m0_readdatavalid) begin
              lut_wait <= 1'b0;
              if (cur_sat)
                hact[hid_idx] <= cur_hsum[HSUM_W-1] ? -FIX_W'(ONE_Q9) : FIX_W'(ONE_Q9);
              else
                hact[hid_idx] <= cur_hsum[HSUM_W-1] ? -avm_m0_readdata[FIX_W-1:0]
                                                    :  avm_m0_readdata[FIX_W-1:0];
              if (hid_idx == ($bits(hid_idx))'(N_HID - 1)) begin
                state    <= S_W2;
                issued   <= '0;
                received <= '0;
                nbeats   <= BEAT_W'(NH);
                for (int i = 0; i < N_HID; i++) wbuf[i] <= '0;
              end else begin
                hid_idx <= hid_idx + 1'b1;
              end
            end
          end
        end

        S_W2: if (avm_m0_readdatavalid) begin
          for (int v = 0; v < VALS; v++)
            if (int'(received) * VALS + v < N_HID)
              wbuf[int'(received) * VALS + v] <= avm_m0_readdata[FIX_W*v +: FIX_W];
          received <= received + 1'b1;
          if (received == nbeats - 1'b1) state <= S_MAC2;
        end

        S_MAC2: begin
          outs[out_idx] <= 32'(dot2);
          issued   <= '0;
          received <= '0;
          if (out_idx == ($bits(out_idx))'(N_OUT - 1)) begin
            state <= S_IDLE;
            ctrl  <= 1'b0;
          end else begin
            out_idx <= out_idx + 1'b1;
            state   <= S_W2;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Read data may only arrive for a read that was accepted
  always_ff @(posedge clk)
    if (!reset && avm_m0_readdatavalid && (state == S_FEAT || state == S_W1 || state == S_W2))
      assert (received < issued) else $error("nn_recognition: unexpected read data");

endmodule
