// mca: MCMC accelerator, a Q x R grid of SPEs that together Gibbs-sample an
// H x W image (H = Q*N, W = R*M), each SPE owning one N x M tile.
//
// All SPEs receive the same commands and therefore run in lockstep; each
// exchanges label states directly with its north, south, west and east
// neighbours (share_out -> nb_in), which lets every label bank stay
// single-ported.  Image data enters as one raster-order stream of pixel pairs
// (img1, img2) which the MCA broadcasts, with its row and column, to all
// SPEs; each keeps what its tile needs.  img_first marks the first pixel of a
// frame; the stream is accepted while img_ready (the MCA is idle).
// Commands (one-cycle pulses, accepted while idle): start_rand randomises
// every label state, start_sample runs cfg.iters Gibbs iterations,
// start_readout streams the label states out in raster order on
// ro_valid/ro_row/ro_col/ro_label, one per cycle after a one-cycle latency.
// done pulses when a command completes.  While idle and not reading out,
// the ext_* arrays give each SPE's label bank to the outside (scale-up).
// Grid, neighbour links and the image stream follow Fig. 4 of the document;
// the command set, raster read-out and per-SPE seeds are this design's.
module mca
  import mca_pkg::*;
#(
  parameter int unsigned Q_ROWS  = 60,
  parameter int unsigned Q_COLS  = 8,
  parameter int unsigned N_ROWS  = 12,
  parameter int unsigned N_COLS  = 160,
  parameter int unsigned LABEL_W = 8,
  parameter logic [31:0] SEED    = 32'h1234_5678,
  localparam int unsigned AW = $clog2(N_ROWS * N_COLS),
  localparam int unsigned GW = 13
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mca_cfg_t                 cfg,
  input  logic                     start_rand,
  input  logic                     start_sample,
  input  logic                     start_readout,
  output logic                     busy,
  output logic                     done,
  // image stream
  input  logic                     img_valid,
  input  logic                     img_first,
  input  logic [PIX_W-1:0]         img1_pix,
  input  logic [PIX_W-1:0]         img2_pix,
  output logic                     img_ready,
  // result read-out
  output logic                     ro_valid,
  output logic [GW-1:0]            ro_row,
  output logic [GW-1:0]            ro_col,
  output logic [LABEL_W-1:0]       ro_label,
  // external label-bank access, one port per SPE
  input  logic [Q_ROWS-1:0][Q_COLS-1:0]              ext_en,
  input  logic [Q_ROWS-1:0][Q_COLS-1:0]              ext_we,
  input  logic [Q_ROWS-1:0][Q_COLS-1:0][AW-1:0]      ext_addr,
  input  logic [Q_ROWS-1:0][Q_COLS-1:0][LABEL_W-1:0] ext_wdata,
  output logic [Q_ROWS-1:0][Q_COLS-1:0][LABEL_W-1:0] ext_rdata
);
  localparam int unsigned IMG_H = Q_ROWS * N_ROWS;
  localparam int unsigned IMG_W = Q_COLS * N_COLS;
  localparam int unsigned QW = $clog2(Q_ROWS) > 0 ? $clog2(Q_ROWS) : 1;
  localparam int unsigned RW = $clog2(Q_COLS) > 0 ? $clog2(Q_COLS) : 1;
  localparam int unsigned LRW = $clog2(N_ROWS) > 0 ? $clog2(N_ROWS) : 1;
  localparam int unsigned LCW = $clog2(N_COLS) > 0 ? $clog2(N_COLS) : 1;

  // ---------------------------------------------------------------- image raster counters
  logic [GW-1:0] irow, icol, cur_row, cur_col;
  always_comb begin
    cur_row = img_first ? '0 : irow;
    cur_col = img_first ? '0 : icol;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irow <= '0;
      icol <= '0;
    end else if (img_valid && img_ready) begin
      if (32'(cur_col) == IMG_W - 1) begin
        icol <= '0;
        irow <= cur_row + GW'(1);
      end else begin
        icol <= cur_col + GW'(1);
        irow <= cur_row;
      end
    end
  end

  // ---------------------------------------------------------------- read-out sequencer
  logic             ro_act, ro_act_d;
  logic [QW-1:0]    ro_q, ro_q_d;
  logic [RW-1:0]    ro_r, ro_r_d;
  logic [LRW-1:0]   ro_i;
  logic [LCW-1:0]   ro_j;
  logic             ro_last;
  logic [GW-1:0]    ro_row_d, ro_col_d;

  assign ro_last = (32'(ro_q) == Q_ROWS - 1) && (32'(ro_i) == N_ROWS - 1) &&
                   (32'(ro_r) == Q_COLS - 1) && (32'(ro_j) == N_COLS - 1);

  logic spe_busy, spe_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_act <= 1'b0; ro_act_d <= 1'b0;
      ro_q <= '0; ro_r <= '0; ro_i <= '0; ro_j <= '0;
      ro_q_d <= '0; ro_r_d <= '0; ro_row_d <= '0; ro_col_d <= '0;
    end else begin
      ro_act_d <= ro_act;
      ro_q_d   <= ro_q;
      ro_r_d   <= ro_r;
      ro_row_d <= GW'(32'(ro_q) * N_ROWS + 32'(ro_i));
      ro_col_d <= GW'(32'(ro_r) * N_COLS + 32'(ro_j));
      if (!ro_act) begin
        if (start_readout && !spe_busy) begin
          ro_act <= 1'b1;
          ro_q <= '0; ro_r <= '0; ro_i <= '0; ro_j <= '0;
        end
      end else begin
        // raster order: column inside tile, tile column, row inside tile, tile row
        if (32'(ro_j) != N_COLS - 1) ro_j <= ro_j + LCW'(1);
        else begin
          ro_j <= '0;
          if (32'(ro_r) != Q_COLS - 1) ro_r <= ro_r + RW'(1);
          else begin
            ro_r <= '0;
            if (32'(ro_i) != N_ROWS - 1) ro_i <= ro_i + LRW'(1);
            else begin
              ro_i <= '0;
              ro_q <= ro_q + QW'(1);
            end
          end
        end
        if (ro_last) ro_act <= 1'b0;
      end
    end
  end

  assign ro_valid = ro_act_d;
  assign ro_row   = ro_row_d;
  assign ro_col   = ro_col_d;
  assign ro_label = ext_rdata[ro_q_d][ro_r_d];

  // ---------------------------------------------------------------- SPE grid
  logic [Q_ROWS-1:0][Q_COLS-1:0][LABEL_W-1:0] share;
  logic [Q_ROWS-1:0][Q_COLS-1:0]              busy_v, done_v;

  for (genvar q = 0; q < Q_ROWS; q++) begin : g_row
    for (genvar r = 0; r < Q_COLS; r++) begin : g_col
      logic [NDIR-1:0][LABEL_W-1:0] nb;
      logic [NDIR-1:0]              nbp;
      logic                         e_en, e_we;
      logic [AW-1:0]                e_addr;

      assign nb[DIR_N]  = (q > 0)          ? share[(q > 0) ? q - 1 : 0][r] : '0;
      assign nb[DIR_S]  = (q < Q_ROWS - 1) ? share[(q < Q_ROWS - 1) ? q + 1 : q][r] : '0;
      assign nb[DIR_W]  = (r > 0)          ? share[q][(r > 0) ? r - 1 : 0] : '0;
      assign nb[DIR_E]  = (r < Q_COLS - 1) ? share[q][(r < Q_COLS - 1) ? r + 1 : r] : '0;
      assign nbp[DIR_N] = (q > 0);
      assign nbp[DIR_S] = (q < Q_ROWS - 1);
      assign nbp[DIR_W] = (r > 0);
      assign nbp[DIR_E] = (r < Q_COLS - 1);

      // during read-out every SPE reads the same local address
      assign e_en   = ro_act ? 1'b1 : ext_en[q][r];
      assign e_we   = ro_act ? 1'b0 : ext_we[q][r];
      assign e_addr = ro_act ? AW'(32'(ro_i) * N_COLS + 32'(ro_j)) : ext_addr[q][r];

      spe #(
        .N_ROWS(N_ROWS), .N_COLS(N_COLS), .LABEL_W(LABEL_W), .IMG_H(IMG_H), .IMG_W(IMG_W)
      ) u_spe (
        .clk, .rst_n, .cfg,
        .tile_row(8'(q)), .tile_col(8'(r)),
        .seed(SEED ^ (32'(q * Q_COLS + r + 1) * 32'h9E37_79B9)),
        .start_rand(start_rand && !busy), .start_sample(start_sample && !busy),
        .busy(busy_v[q][r]), .done(done_v[q][r]),
        .img_valid(img_valid && img_ready), .img_row(cur_row), .img_col(cur_col),
        .img1_pix, .img2_pix,
        .share_out(share[q][r]), .nb_in(nb), .nb_present(nbp),
        .ext_en(e_en), .ext_we(e_we), .ext_addr(e_addr), .ext_wdata(ext_wdata[q][r]),
        .ext_rdata(ext_rdata[q][r])
      );
    end
  end

  // lockstep: all SPEs share one schedule, so SPE (0,0) speaks for the grid
  assign spe_busy  = busy_v[0][0];
  assign spe_done  = done_v[0][0];
  assign busy      = spe_busy || ro_act;
  assign done      = spe_done || (ro_act && ro_last);
  assign img_ready = !busy;

  // the lockstep assumption, checked in simulation
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (busy_v == '0 || busy_v == '1))
    else $error("mca: SPEs out of lockstep");
endmodule
