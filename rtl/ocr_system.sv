// ocr_system: handwritten Arabic word recognition accelerator.
//
// The OCR peripherals of a soft-processor system, joined by their own
// Avalon-MM interconnect and driven by a host (normally the processor's
// data master) through the host_* port.  Per word image the host:
//   1. writes the 64x256 binary image into the image memory (IMG_BASE);
//   2. sets bit 0 of the feature extractor's control register
//      (FE_CSR_BASE) and polls it until it reads 0; the 44 density
//      features are then in the features-and-weights memory (FW_BASE);
//   3. sets bit 0 of the recognition control register (REC_CSR_BASE) and
//      polls it; the 50 output sums are then readable at REC_CSR_BASE +
//      4*(128+k).  The largest output names the recognised word.
// Network weights (and optionally the per-feature normalization constants
// at REC_CSR_BASE + 4*(64+i)) are loaded once beforehand.
//
// Interconnect:
//   host         -> image memory port A, both control slaves, and
//                   features memory port A through the arbiter
//   feature ext. -> image memory port B (reads), features memory port A
//                   through the arbiter (writes)
//   recognition  -> features memory port B (REC_DATA_W wide) and the
//                   tansig table (reads)
// Every slave answers a read one cycle after accepting it; only the
// arbitrated features-memory port can assert waitrequest.  Reads from
// unmapped host addresses return 0.  One clock drives everything.
//
// REC_DATA_W and REC_VALS select the recognition bus width (32-bit bus
// with one value per word by default; 16*REC_VALS otherwise), and the
// feature extractor then packs its features to match.  The component
// set, base addresses and connection pattern follow the source system;
// the host port, the single clock and the arbitration are this design's.
module ocr_system
  import ocr_pkg::*;
#(
  parameter int REC_DATA_W = 32,
  parameter int REC_VALS   = 1
) (
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] host_address,
  input  logic        host_read,
  input  logic        host_write,
  input  logic [3:0]  host_byteenable,
  input  logic [31:0] host_writedata,
  output logic [31:0] host_readdata,
  output logic        host_readdatavalid,
  output logic        host_waitrequest,
  output logic        fe_busy,
  output logic        rec_busy
);

  localparam int REC_BYTES   = REC_DATA_W / 8;
  localparam int FEAT_STRIDE = (REC_VALS == 1) ? 4 : 2;
  localparam int FW_AW       = $clog2(FW_BYTES);
  localparam int FW_WAW      = $clog2(FW_BYTES / REC_BYTES);
  localparam int IMG_AW      = $clog2(IMG_BYTES / 4);
  localparam int LUT_AW      = $clog2(LUT_DEPTH);

  function automatic logic in_region(logic [31:0] a, logic [31:0] base, int bytes);
    return (a >= base) && (a < base + 32'(bytes));
  endfunction

  // ---------------- host decode ----------------
  logic h_img, h_fe, h_rec, h_fw, h_none;
  assign h_img  = in_region(host_address, IMG_BASE, IMG_BYTES);
  assign h_fe   = in_region(host_address, FE_CSR_BASE, 1024);
  assign h_rec  = in_region(host_address, REC_CSR_BASE, 1024);
  assign h_fw   = in_region(host_address, FW_BASE, FW_BYTES);
  assign h_none = !(h_img || h_fe || h_rec || h_fw);

  // ---------------- feature extraction ----------------
  logic [31:0] fe_m_address, fe_m_writedata, fe_m_readdata, fe_s_readdata;
  logic        fe_m_read, fe_m_write, fe_m_readdatavalid, fe_m_waitrequest;
  logic [3:0]  fe_m_byteenable;
  logic        fe_s_readdatavalid, fe_s_waitrequest;
  logic        fe_m_fw;

  density_feature_extract #(
    .IMG_BASE_ADDR (IMG_BASE),
    .FEAT_BASE_ADDR(FW_BASE),
    .FEAT_STRIDE   (FEAT_STRIDE)
  ) u_fe (
    .clk, .reset,
    .avs_s0_address      (host_address[9:2]),
    .avs_s0_read         (host_read && h_fe),
    .avs_s0_write        (host_write && h_fe),
    .avs_s0_writedata    (host_writedata),
    .avs_s0_readdata     (fe_s_readdata),
    .avs_s0_readdatavalid(fe_s_readdatavalid),
    .avs_s0_waitrequest  (fe_s_waitrequest),
    .avm_m0_address      (fe_m_address),
    .avm_m0_read         (fe_m_read),
    .avm_m0_write        (fe_m_write),
    .avm_m0_byteenable   (fe_m_byteenable),
    .avm_m0_writedata    (fe_m_writedata),
    .avm_m0_readdata     (fe_m_readdata),
    .avm_m0_readdatavalid(fe_m_readdatavalid),
    .avm_m0_waitrequest  (fe_m_waitrequest),
    .busy                (fe_busy)
  );

  assign fe_m_fw = in_region(fe_m_address, FW_BASE, FW_BYTES);

  // ---------------- image memory ----------------
  logic [31:0] img_a_readdata, img_b_readdata;
  logic        img_a_readdatavalid, img_b_readdatavalid;

  image_ram u_img (
    .clk, .reset,
    .a_address      (IMG_AW'((host_address - IMG_BASE) >> 2)),
    .a_read         (host_read && h_img),
    .a_write        (host_write && h_img),
    .a_byteenable   (host_byteenable),
    .a_writedata    (host_writedata),
    .a_readdata     (img_a_readdata),
    .a_readdatavalid(img_a_readdatavalid),
    .b_address      (IMG_AW'((fe_m_address - IMG_BASE) >> 2)),
    .b_read         (fe_m_read && !fe_m_fw),
    .b_readdata     (img_b_readdata),
    .b_readdatavalid(img_b_readdatavalid)
  );

  // ---------------- features memory, narrow port arbitration ----------------
  logic [31:0]    arb0_readdata, arb1_readdata, fwa_readdata, fwa_writedata;
  logic           arb0_readdatavalid, arb1_readdatavalid, arb0_waitrequest, arb1_waitrequest;
  logic [FW_AW-1:0] fwa_address;
  logic           fwa_read, fwa_write, fwa_readdatavalid;
  logic [3:0]     fwa_byteenable;

  avmm_arbiter2 #(.AW(FW_AW)) u_arb (
    .clk, .reset,
    .m0_address      (FW_AW'(host_address - FW_BASE)),
    .m0_read         (host_read && h_fw),
    .m0_write        (host_write && h_fw),
    .m0_byteenable   (host_byteenable),
    .m0_writedata    (host_writedata),
    .m0_readdata     (arb0_readdata),
    .m0_readdatavalid(arb0_readdatavalid),
    .m0_waitrequest  (arb0_waitrequest),
    .m1_address      (FW_AW'(fe_m_address - FW_BASE)),
    .m1_read         (fe_m_read && fe_m_fw),
    .m1_write        (fe_m_write && fe_m_fw),
    .m1_byteenable   (fe_m_byteenable),
    .m1_writedata    (fe_m_writedata),
    .m1_readdata     (arb1_readdata),
    .m1_readdatavalid(arb1_readdatavalid),
    .m1_waitrequest  (arb1_waitrequest),
    .s_address       (fwa_address),
    .s_read          (fwa_read),
    .s_write         (fwa_write),
    .s_byteenable    (fwa_byteenable),
    .s_writedata     (fwa_writedata),
    .s_readdata      (fwa_readdata),
    .s_readdatavalid (fwa_readdatavalid)
  );

  assign fe_m_readdata      = fe_m_fw ? arb1_readdata : img_b_readdata;
  assign fe_m_readdatavalid = img_b_readdatavalid || arb1_readdatavalid;
  assign fe_m_waitrequest   = fe_m_fw && arb1_waitrequest;

  // ---------------- recognition ----------------
  logic [31:0]           rec_m_address, rec_s_readdata;
  logic                  rec_m_read, rec_m_readdatavalid, rec_m_lut;
  logic [REC_DATA_W-1:0] rec_m_readdata, fwb_readdata, lut_readdata;
  logic                  fwb_readdatavalid, lut_readdatavalid;
  logic                  rec_s_readdatavalid, rec_s_waitrequest;

  nn_recognition #(
    .DATA_W       (REC_DATA_W),
    .VALS         (REC_VALS),
    .FW_BASE_ADDR (FW_BASE),
    .LUT_BASE_ADDR(LUT_BASE)
  ) u_rec (
    .clk, .reset,
    .avs_s0_address      (host_address[9:2]),
    .avs_s0_read         (host_read && h_rec),
    .avs_s0_write        (host_write && h_rec),
    .avs_s0_writedata    (host_writedata),
    .avs_s0_readdata     (rec_s_readdata),
    .avs_s0_readdatavalid(rec_s_readdatavalid),
    .avs_s0_waitrequest  (rec_s_waitrequest),
    .avm_m0_address      (rec_m_address),
    .avm_m0_read         (rec_m_read),
    .avm_m0_readdata     (rec_m_readdata),
    .avm_m0_readdatavalid(rec_m_readdatavalid),
    .avm_m0_waitrequest  (1'b0),
    .busy                (rec_busy)
  );

  assign rec_m_lut = (rec_m_address >= LUT_BASE);

  fw_ram #(.DATA_W(REC_DATA_W)) u_fw (
    .clk, .reset,
    .a_address      (fwa_address),
    .a_read         (fwa_read),
    .a_write        (fwa_write),
    .a_byteenable   (fwa_byteenable),
    .a_writedata    (fwa_writedata),
    .a_readdata     (fwa_readdata),
    .a_readdatavalid(fwa_readdatavalid),
    .b_address      (FW_WAW'((rec_m_address - FW_BASE) / REC_BYTES)),
    .b_read         (rec_m_read && !rec_m_lut),
    .b_readdata     (fwb_readdata),
    .b_readdatavalid(fwb_readdatavalid)
  );

  tansig_lut #(.DATA_W(REC_DATA_W)) u_lut (
    .clk, .reset,
    .avs_address      (LUT_AW'((rec_m_address - LUT_BASE) / REC_BYTES)),
    .avs_read         (rec_m_read && rec_m_lut),
    .avs_readdata     (lut_readdata),
    .avs_readdatavalid(lut_readdatavalid)
  );

  assign rec_m_readdata      = lut_readdatavalid ? lut_readdata : fwb_readdata;
  assign rec_m_readdatavalid = lut_readdatavalid || fwb_readdatavalid;

  // ---------------- host response ----------------
  logic none_valid;

  always_ff @(posedge clk) begin
    if (reset) none_valid <= 1'b0;
    else       none_valid <= host_read && h_none;
  end

  assign host_waitrequest   = h_fw && arb0_waitrequest;
  assign host_readdatavalid = img_a_readdatavalid || fe_s_readdatavalid || rec_s_readdatavalid ||
                              arb0_readdatavalid || none_valid;
  always_comb begin
    host_readdata = '0;
    if (img_a_readdatavalid)      host_readdata = img_a_readdata;
    else if (fe_s_readdatavalid)  host_readdata = fe_s_readdata;
    else if (rec_s_readdatavalid) host_readdata = rec_s_readdata;
    else if (arb0_readdatavalid)  host_readdata = arb0_readdata;
  end

endmodule
