// density_feature_extract: density feature extraction peripheral.
//
// Computes the 44 density features of a 64x256 binary word image held in
// on-chip memory and writes them to the features-and-weights memory.
//
// Operation.  The host sets bit 0 of the control register (slave word 0).
// For each of the sixteen 32x32 blocks the module reads the 32 block rows
// through its Avalon-MM master; a block row is one 32-bit word, and rows
// of the same block are ROW_BYTES (0x20) apart.  Block b starts at
// IMG_BASE + (b%2)*32*ROW_BYTES + (b/2)*4, so the block order matches the
// feature order (down each block column first).  Once the 32 rows are in
// the row registers, block_half_sums gives the upper-half and total counts
// in one cycle.  After the last block, density_feature_derive forms the
// other 28 features in one cycle, and the 44 features are written one per
// bus word, zero-extended, to FEAT_BASE + FEAT_STRIDE*k.  The module then
// clears the control bit, which the host polls.  FEAT_STRIDE=2 packs
// features as 16-bit halves (with byte enables) for the wide-bus
// recognition variants; 4 is the standard layout.
//
// Timing (zero wait states, one-cycle read latency): 1 cycle to see the
// start bit, 34 cycles per block
// (32 pipelined reads, last data, count), 1 cycle to derive, 44 write
// cycles, 1 cycle to finish: 591 cycles from start to the control bit
// clearing.  Slave reads return data one cycle later with readdatavalid;
// the slave never stalls.  The master honours waitrequest on every
// transfer and accepts read data whenever readdatavalid is high.
//
// The block walk, the two-halves sum, the one-cycle derivation and the
// sequential save follow the source design; the exact cycle budget, the
// register map beyond the start bit and the stride option are this
// design's choices.
module density_feature_extract
  import ocr_pkg::*;
#(
  parameter logic [31:0] IMG_BASE_ADDR  = IMG_BASE,
  parameter logic [31:0] FEAT_BASE_ADDR = FW_BASE,
  parameter int          FEAT_STRIDE    = 4
) (
  input  logic        clk,
  input  logic        reset,
  // control slave
  input  logic [7:0]  avs_s0_address,
  input  logic        avs_s0_read,
  input  logic        avs_s0_write,
  input  logic [31:0] avs_s0_writedata,
  output logic [31:0] avs_s0_readdata,
  output logic        avs_s0_readdatavalid,
  output logic        avs_s0_waitrequest,
  // memory master
  output logic [31:0] avm_m0_address,
  output logic        avm_m0_read,
  output logic        avm_m0_write,
  output logic [3:0]  avm_m0_byteenable,
  output logic [31:0] avm_m0_writedata,
  input  logic [31:0] avm_m0_readdata,
  input  logic        avm_m0_readdatavalid,
  input  logic        avm_m0_waitrequest,
  output logic        busy
);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_SUM, S_DERIVE, S_SAVE, S_DONE} state_t;

  state_t            state;
  logic              ctrl_start;
  logic [3:0]        block;
  logic [5:0]        issued;      // rows requested in this block
  logic [5:0]        received;    // rows returned in this block
  logic [5:0]        feat_idx;
  logic [BLK-1:0]    row_reg   [BLK];
  logic [TOTAL_W-1:0] blk_total [N_BLOCKS];
  logic [HALF_W-1:0]  blk_upper [N_BLOCKS];
  logic [FEAT_W-1:0]  feat_reg  [N_FEATURES];
  logic [FEAT_W-1:0]  feat_comb [N_FEATURES];
  logic [HALF_W-1:0]  sum_upper;
  logic [TOTAL_W-1:0] sum_total;
  logic [31:0]        block_base;
  logic [31:0]        feat_addr;

  block_half_sums u_sums (.rows(row_reg), .upper_sum(sum_upper), .total_sum(sum_total));
  density_feature_derive u_derive (.blk_total(blk_total), .blk_upper(blk_upper), .features(feat_comb));

  assign busy               = ctrl_start;
  assign avs_s0_waitrequest = 1'b0;

  // Block b: block row b%2, block column b/2
  assign block_base = IMG_BASE_ADDR + 32'(block[0]) * 32'(BLK * ROW_BYTES) + 32'(block[3:1]) * 32'd4;
  assign feat_addr  = FEAT_BASE_ADDR + 32'(feat_idx) * 32'(FEAT_STRIDE);

  always_comb begin
    avm_m0_read       = 1'b0;
    avm_m0_write      = 1'b0;
    avm_m0_address    = '0;
    avm_m0_byteenable = 4'hF;
    avm_m0_writedata  = '0;
    if (state == S_READ && issued < 6'(BLK)) begin
      avm_m0_read    = 1'b1;
      avm_m0_address = block_base + 32'(issued) * 32'(ROW_BYTES);
    end else if (state == S_SAVE) begin
      avm_m0_write   = 1'b1;
      avm_m0_address = {feat_addr[31:2], 2'b00};
      if (FEAT_STRIDE == 2 && feat_addr[1]) begin
        avm_m0_byteenable = 4'b1100;
        avm_m0_writedata  = {feat_reg[feat_idx], 16'h0000};
      end else begin
        avm_m0_byteenable = (FEAT_STRIDE == 2) ? 4'b0011 : 4'b1111;
        avm_m0_writedata  = 32'(feat_reg[feat_idx]);
      end
    end
  end

  // Control slave: word 0 = control register
  always_ff @(posedge clk) begin
    if (reset) begin
      avs_s0_readdatavalid <= 1'b0;
      avs_s0_readdata      <= '0;
    end else begin
      avs_s0_readdatavalid <= avs_s0_read;
      avs_s0_readdata      <= (avs_s0_address == 8'd0) ? {31'b0, ctrl_start} : '0;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= S_IDLE;
      ctrl_start <= 1'b0;
      block      <= '0;
      issued     <= '0;
      received   <= '0;
      feat_idx   <= '0;
      for (int r = 0; r < BLK; r++) row_reg[r] <= '0;
      for (int b = 0; b < N_BLOCKS; b++) begin
        blk_total[b] <= '0;
        blk_upper[b] <= '0;
      end
      for (int f = 0; f < N_FEATURES; f++) feat_reg[f] <= '0;
    end else begin
      if (avs_s0_write && avs_s0_address == 8'd0 && state == S_IDLE)
        ctrl_start <= avs_s0_writedata[0];

      case (state)
        S_IDLE: if (ctrl_start) begin
          state    <= S_READ;
          block    <= '0;
          issued   <= '0;
          received <= '0;
        end
        S_READ: begin
          if (avm_m0_read && !avm_m0_waitrequest) issued <= issued + 6'd1;
          if (avm_m0_readdatavalid) begin
            row_reg[received[4:0]] <= avm_m0_readdata;
            received <= received + 6'd1;
            if (received == 6'(BLK - 1)) state <= S_SUM;
          end
        end
        S_SUM: begin
          blk_total[block] <= sum_total;
          blk_upper[block] <= sum_upper;
          issued   <= '0;
          received <= '0;
          if (block == 4'(N_BLOCKS - 1)) state <= S_DERIVE;
          else begin
            block <= block + 4'd1;
            state <= S_READ;
          end
        end
        S_DERIVE: begin
          feat_reg <= feat_comb;
          feat_idx <= '0;
          state    <= S_SAVE;
        end
        S_SAVE: if (!avm_m0_waitrequest) begin
          if (feat_idx == 6'(N_FEATURES - 1)) state <= S_DONE;
          else feat_idx <= feat_idx + 6'd1;
        end
        S_DONE: begin
          ctrl_start <= 1'b0;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
