// biglittle_top: the BigLittle MCMC accelerator.
//
// A small Little MCA performs burn-in on a down-scaled frame with few labels;
// its converged state is then scaled up by nearest-neighbour copying (factor
// 2 or 10, chosen by scale_sel) over a static interconnect into a large Big
// MCA, which continues Gibbs sampling at full resolution.  The two MCAs work
// on consecutive frames at the same time.  frame_sched sequences them.
//
// Host interface:
//   cfg_little, cfg_big   run-time configuration of each MCA, held constant
//   scale_sel             0: SCALE0 (2x), 1: SCALE1 (10x)
//   randomize, start      pulses: randomise the Little state / start a frame
//   big_release               pulse: the held Big result has been read, the next
//                         frame may be transferred into the Big MCA
//   little_img_*, big_img_*  raster-order streams of (img1, img2) pixel pairs;
//                         *_first marks the first pixel, accepted while *_ready
//   readout               pulse, while the Big MCA is idle: stream the Big
//                         labels out on ro_valid/ro_row/ro_col/ro_label
//   little_idle, big_idle, frame_done  status
// The Little frame is the full frame down-scaled; when it is smaller than the
// Little grid (10x) the host pads it, and the padded variables are sampled
// like any other.  Default sizes are the document's 720p design: Big MCA 60 x 8
// SPEs, Little MCA 30 x 4, both with 12 x 160 tiles, 256 Big labels.  The
// Little label width (6 bits) is this design's choice.
module biglittle_top
  import mca_pkg::*;
#(
  parameter int unsigned QL_ROWS   = 30,
  parameter int unsigned QL_COLS   = 4,
  parameter int unsigned NL_ROWS   = 12,
  parameter int unsigned NL_COLS   = 160,
  parameter int unsigned QB_ROWS   = 60,
  parameter int unsigned QB_COLS   = 8,
  parameter int unsigned NB_ROWS   = 12,
  parameter int unsigned NB_COLS   = 160,
  parameter int unsigned LW_LITTLE = 6,
  parameter int unsigned LW_BIG    = 8,
  parameter int unsigned SCALE0    = 2,
  parameter int unsigned SCALE1    = 10,
  localparam int unsigned GW  = 13,
  localparam int unsigned ALW = $clog2(NL_ROWS * NL_COLS),
  localparam int unsigned ABW = $clog2(NB_ROWS * NB_COLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  mca_cfg_t          cfg_little,
  input  mca_cfg_t          cfg_big,
  input  logic              scale_sel,
  input  logic              randomize,
  input  logic              start,
  input  logic              big_release,
  input  logic              little_img_valid,
  input  logic              little_img_first,
  input  logic [PIX_W-1:0]  little_img1,
  input  logic [PIX_W-1:0]  little_img2,
  output logic              little_img_ready,
  input  logic              big_img_valid,
  input  logic              big_img_first,
  input  logic [PIX_W-1:0]  big_img1,
  input  logic [PIX_W-1:0]  big_img2,
  output logic              big_img_ready,
  input  logic              readout,
  output logic              ro_valid,
  output logic [GW-1:0]     ro_row,
  output logic [GW-1:0]     ro_col,
  output logic [LW_BIG-1:0] ro_label,
  output logic              little_idle,
  output logic              big_idle,
  output logic              frame_done
);
  // ---------------------------------------------------------------- scheduler
  logic little_rand_go, little_sample_go, little_done, little_busy;
  logic xfer_go, xfer_done, big_sample_go, big_done, big_busy;

  frame_sched u_sched (
    .clk, .rst_n, .randomize, .start, .big_release,
    .little_rand_go, .little_sample_go, .little_done,
    .xfer_go, .xfer_done, .big_sample_go, .big_done,
    .little_idle, .big_idle, .frame_done
  );

  // ---------------------------------------------------------------- Little MCA
  logic [QL_ROWS-1:0][QL_COLS-1:0]                l_ext_en;
  logic [QL_ROWS-1:0][QL_COLS-1:0][ALW-1:0]       l_ext_addr;
  logic [QL_ROWS-1:0][QL_COLS-1:0][LW_LITTLE-1:0] l_ext_rdata;
  logic                                           l_ro_valid;
  logic [GW-1:0]                                  l_ro_row, l_ro_col;
  logic [LW_LITTLE-1:0]                           l_ro_label;
  logic                                           l_img_ready;

  mca #(
    .Q_ROWS(QL_ROWS), .Q_COLS(QL_COLS), .N_ROWS(NL_ROWS), .N_COLS(NL_COLS),
    .LABEL_W(LW_LITTLE), .SEED(32'h5EED_0001)
  ) u_little (
    .clk, .rst_n, .cfg(cfg_little),
    .start_rand(little_rand_go), .start_sample(little_sample_go), .start_readout(1'b0),
    .busy(little_busy), .done(little_done),
    .img_valid(little_img_valid && little_idle), .img_first(little_img_first),
    .img1_pix(little_img1), .img2_pix(little_img2), .img_ready(l_img_ready),
    .ro_valid(l_ro_valid), .ro_row(l_ro_row), .ro_col(l_ro_col), .ro_label(l_ro_label),
    .ext_en(l_ext_en), .ext_we('0), .ext_addr(l_ext_addr), .ext_wdata('0),
    .ext_rdata(l_ext_rdata)
  );
  assign little_img_ready = l_img_ready && little_idle;

  // ---------------------------------------------------------------- scale-up
  su_wr_t [QL_ROWS-1:0][QL_COLS-1:0] su_wr;
  logic   [QL_ROWS-1:0][QL_COLS-1:0] su_done;
  logic   [3:0]                      scale;
  assign scale = scale_sel ? 4'(SCALE1) : 4'(SCALE0);

  for (genvar a = 0; a < QL_ROWS; a++) begin : g_disp_row
    for (genvar b = 0; b < QL_COLS; b++) begin : g_disp_col
      scaleup_dispatch #(
        .NL_ROWS(NL_ROWS), .NL_COLS(NL_COLS), .NB_ROWS(NB_ROWS), .NB_COLS(NB_COLS),
        .QB_ROWS(QB_ROWS), .QB_COLS(QB_COLS), .LW_LITTLE(LW_LITTLE), .LW_BIG(LW_BIG)
      ) u_disp (
        .clk, .rst_n, .start(xfer_go), .scale, .app(cfg_big.app),
        .num_labels(cfg_big.num_labels), .tile_row(8'(a)), .tile_col(8'(b)),
        .rd_en(l_ext_en[a][b]), .rd_addr(l_ext_addr[a][b]), .rd_data(l_ext_rdata[a][b]),
        .wr(su_wr[a][b]), .busy(), .done(su_done[a][b])
      );
    end
  end
  // every dispatcher runs the same schedule length
  assign xfer_done = su_done[0][0];

  logic [QB_ROWS-1:0][QB_COLS-1:0]             rx_en;
  logic [QB_ROWS-1:0][QB_COLS-1:0][ABW-1:0]    rx_addr;
  logic [QB_ROWS-1:0][QB_COLS-1:0][LW_BIG-1:0] rx_label;

  scaleup_net #(
    .QL_ROWS(QL_ROWS), .QL_COLS(QL_COLS), .NL_ROWS(NL_ROWS), .NL_COLS(NL_COLS),
    .QB_ROWS(QB_ROWS), .QB_COLS(QB_COLS), .NB_ROWS(NB_ROWS), .NB_COLS(NB_COLS),
    .SCALE0(SCALE0), .SCALE1(SCALE1), .LW_BIG(LW_BIG)
  ) u_net (
    .little_wr(su_wr), .scale_sel, .rx_en, .rx_addr, .rx_label
  );

  // ---------------------------------------------------------------- Big MCA
  logic [QB_ROWS-1:0][QB_COLS-1:0][LW_BIG-1:0] b_ext_rdata;
  logic                                        b_img_ready;

  mca #(
    .Q_ROWS(QB_ROWS), .Q_COLS(QB_COLS), .N_ROWS(NB_ROWS), .N_COLS(NB_COLS),
    .LABEL_W(LW_BIG), .SEED(32'h5EED_0002)
  ) u_big (
    .clk, .rst_n, .cfg(cfg_big),
    .start_rand(1'b0), .start_sample(big_sample_go), .start_readout(readout && big_idle),
    .busy(big_busy), .done(big_done),
    .img_valid(big_img_valid && big_idle), .img_first(big_img_first),
    .img1_pix(big_img1), .img2_pix(big_img2), .img_ready(b_img_ready),
    .ro_valid, .ro_row, .ro_col, .ro_label,
    .ext_en(rx_en), .ext_we(rx_en), .ext_addr(rx_addr), .ext_wdata(rx_label),
    .ext_rdata(b_ext_rdata)
  );
  assign big_img_ready = b_img_ready && big_idle;
endmodule
