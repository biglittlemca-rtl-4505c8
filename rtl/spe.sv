// spe: stochastic processing element.  It holds one N x M tile of the image
// and of the Markov random field and Gibbs-samples it with its SPU, in
// lockstep with the other SPEs of its MCA.
//
// Memories (all single-ported, one access per cycle):
//   IMG1   N*M pixels of the first image, the pixels being labelled.
//   IMG2   every second-image pixel a label of the tile can point at: for
//          stereo N x (M + 2**L - 1) (the tile plus 2**L - 1 columns to its
//          left), for optical flow (N+2r) x (M+2r) with r = 2**(L/2-1) - 1.
//          Depth is the larger of the two.
//   LABEL  N*M label states.
// These sizes are the document's (Sec. 4.2.1, Fig. 7).
//
// Image loading: while idle, the SPE watches the broadcast stream
// (img_valid, img_row, img_col, img1_pix, img2_pix) in global coordinates and
// keeps the pixels that fall in its tile (IMG1) or its IMG2 window.
// Neighbour exchange: to fetch a neighbour label that lies in the adjacent
// tile, every SPE reads the wrapped-around address of its own LABEL bank at
// the same cycle and drives the result on share_out; the SPE that needs it
// takes it from nb_in of that side one cycle later.  nb_present marks sides
// with a neighbouring SPE; at the image border the neighbour term is dropped.
// Labels pointing outside the image (a disparity beyond the left edge, a flow
// vector leaving the frame) get probability zero.
// ext_*: access to the LABEL bank from outside while idle (result read-out,
// scale-up writes), read data one cycle after ext_en.
// The datapath arrangement follows Fig. 4 of the document; the slot timing is
// described in spe_sched, the exchange protocol and the out-of-image rule are
// this design's.
module spe
  import mca_pkg::*;
#(
  parameter int unsigned N_ROWS  = 12,
  parameter int unsigned N_COLS  = 160,
  parameter int unsigned LABEL_W = 8,
  parameter int unsigned IMG_H   = 720,
  parameter int unsigned IMG_W   = 1280,
  localparam int unsigned RW   = $clog2(N_ROWS) > 0 ? $clog2(N_ROWS) : 1,
  localparam int unsigned CW   = $clog2(N_COLS) > 0 ? $clog2(N_COLS) : 1,
  localparam int unsigned AW   = $clog2(N_ROWS * N_COLS),
  localparam int unsigned NL   = 1 << LABEL_W,
  localparam int unsigned HW   = LABEL_W / 2,
  localparam int unsigned RAD  = (1 << (HW - 1)) - 1,          // flow radius r
  localparam int unsigned W2S  = N_COLS + NL - 1,                // stereo IMG2 width
  localparam int unsigned W2F  = N_COLS + 2 * RAD,               // flow IMG2 width
  localparam int unsigned D2S  = N_ROWS * W2S,
  localparam int unsigned D2F  = (N_ROWS + 2 * RAD) * W2F,
  localparam int unsigned D2   = (D2S > D2F) ? D2S : D2F,
  localparam int unsigned A2W  = $clog2(D2),
  localparam int unsigned TRW  = 8,                               // tile index width
  localparam int unsigned GW   = 13                               // global coordinate width
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  mca_cfg_t                     cfg,
  input  logic [TRW-1:0]               tile_row,
  input  logic [TRW-1:0]               tile_col,
  input  logic [31:0]                  seed,
  // control
  input  logic                         start_rand,
  input  logic                         start_sample,
  output logic                         busy,
  output logic                         done,
  // image stream
  input  logic                         img_valid,
  input  logic [GW-1:0]                img_row,
  input  logic [GW-1:0]                img_col,
  input  logic [PIX_W-1:0]             img1_pix,
  input  logic [PIX_W-1:0]             img2_pix,
  // neighbour label exchange
  output logic [LABEL_W-1:0]           share_out,
  input  logic [NDIR-1:0][LABEL_W-1:0] nb_in,
  input  logic [NDIR-1:0]              nb_present,
  // external LABEL access
  input  logic                         ext_en,
  input  logic                         ext_we,
  input  logic [AW-1:0]                ext_addr,
  input  logic [LABEL_W-1:0]           ext_wdata,
  output logic [LABEL_W-1:0]           ext_rdata
);
  // signed copies of the sizes for address arithmetic
  localparam int SN   = int'(N_ROWS);
  localparam int SM   = int'(N_COLS);
  localparam int SNL  = int'(NL);
  localparam int SR   = int'(RAD);
  localparam int SW2S = int'(W2S);
  localparam int SW2F = int'(W2F);
  localparam int SH   = int'(IMG_H);
  localparam int SWD  = int'(IMG_W);

  // ---------------------------------------------------------------- scheduler
  logic               rnd_en, smp, f_valid, a_valid, a_bank, b_valid, b_bank, w_valid;
  logic [AW-1:0]      rnd_addr;
  logic [LABEL_W-1:0] cyc;
  logic [RW-1:0]      f_i, a_i, w_i;
  logic [CW-1:0]      f_j, a_j, w_j;

  spe_sched #(.N_ROWS(N_ROWS), .N_COLS(N_COLS), .LABEL_W(LABEL_W)) u_sched (
    .clk, .rst_n, .start_rand, .start_sample, .iters(cfg.iters), .busy, .done,
    .rnd_en, .rnd_addr, .smp, .cyc,
    .f_valid, .f_i, .f_j, .a_valid, .a_bank, .a_i, .a_j,
    .b_valid, .b_bank, .w_valid, .w_i, .w_j
  );

  // ---------------------------------------------------------------- random numbers
  logic        seeded;
  logic [31:0] rnd;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seeded <= 1'b0;
    else        seeded <= 1'b1;
  end
  prng u_prng (.clk, .rst_n, .load(!seeded), .seed, .step(busy), .rnd);

  // random legal label for randomisation
  logic [LABEL_W-1:0] rand_label;
  logic [24:0]        rprod;
  logic [HW-1:0]      rx, ry;
  always_comb begin
    rprod = 25'(rnd[31:16]) * 25'(cfg.num_labels);
    rx    = HW'((32'(rnd[31:24]) * (2 * RAD + 1)) >> 8);
    ry    = HW'((32'(rnd[23:16]) * (2 * RAD + 1)) >> 8);
    if (cfg.app == APP_STEREO) rand_label = LABEL_W'(rprod >> 16);
    else                       rand_label = {rx, ry};
  end

  // ---------------------------------------------------------------- image load
  int             lr, lc;                 // position relative to the tile origin
  logic           in_tile, in_w2;
  logic [AW-1:0]  img1_waddr;
  logic [A2W-1:0] img2_waddr;
  always_comb begin
    lr = int'(img_row) - int'(tile_row) * SN;
    lc = int'(img_col) - int'(tile_col) * SM;
    in_tile    = (lr >= 0) && (lr < SN) && (lc >= 0) && (lc < SM);
    img1_waddr = AW'(lr * SM + lc);
    if (cfg.app == APP_STEREO) begin
      in_w2      = (lr >= 0) && (lr < SN) && (lc >= -(SNL - 1)) && (lc < SM);
      img2_waddr = A2W'(lr * SW2S + lc + SNL - 1);
    end else begin
      in_w2      = (lr >= -SR) && (lr < SN + SR) && (lc >= -SR) && (lc < SM + SR);
      img2_waddr = A2W'((lr + SR) * SW2F + lc + SR);
    end
  end

  // ---------------------------------------------------------------- stage A address
  int             ga_i, ga_j, fy, fx;
  logic [HW-1:0]  lhx, lhy;
  logic           iss_legal;
  logic [A2W-1:0] iss_addr;
  always_comb begin
    ga_i = int'(tile_row) * SN + int'(a_i);
    ga_j = int'(tile_col) * SM + int'(a_j);
    lhx  = cyc[LABEL_W-1 -: HW];
    lhy  = cyc[HW-1:0];
    fy   = ga_i + int'(lhy) - SR;
    fx   = ga_j + int'(lhx) - SR;
    if (cfg.app == APP_STEREO) begin
      iss_legal = (int'(cyc) < int'(cfg.num_labels)) && (ga_j >= int'(cyc));
      iss_addr  = A2W'(int'(a_i) * SW2S + int'(a_j) + SNL - 1 - int'(cyc));
    end else begin
      iss_legal = (int'(lhx) <= 2 * SR) && (int'(lhy) <= 2 * SR) &&
                  (fy >= 0) && (fy < SH) && (fx >= 0) && (fx < SWD);
      iss_addr  = A2W'((int'(a_i) + int'(lhy)) * SW2F + int'(a_j) + int'(lhx));
    end
  end

  // ---------------------------------------------------------------- memories
  logic               l_en, l_we;
  logic [AW-1:0]      l_addr;
  logic [LABEL_W-1:0] l_wdata, l_rdata;
  logic               i1_en, i1_we, i2_en, i2_we;
  logic [AW-1:0]      i1_addr;
  logic [A2W-1:0]     i2_addr;
  logic [PIX_W-1:0]   i1_rdata, i2_rdata;

  logic [LABEL_W-1:0] result_q;
  logic [RW-1:0]      nb_row;
  logic [CW-1:0]      nb_col;
  logic               nb_local;

  // neighbour address for the fetch of direction cyc[1:0]
  always_comb begin
    nb_row   = f_i;
    nb_col   = f_j;
    nb_local = 1'b1;
    unique case (dir_e'(cyc[1:0]))
      DIR_N: if (f_i == '0) begin nb_row = RW'(N_ROWS - 1); nb_local = 1'b0; end
             else nb_row = f_i - RW'(1);
      DIR_S: if (32'(f_i) == N_ROWS - 1) begin nb_row = '0; nb_local = 1'b0; end
             else nb_row = f_i + RW'(1);
      DIR_W: if (f_j == '0) begin nb_col = CW'(N_COLS - 1); nb_local = 1'b0; end
             else nb_col = f_j - CW'(1);
      DIR_E: if (32'(f_j) == N_COLS - 1) begin nb_col = '0; nb_local = 1'b0; end
             else nb_col = f_j + CW'(1);
    endcase
  end

  always_comb begin
    l_en = 1'b0; l_we = 1'b0; l_addr = '0; l_wdata = '0;
    i1_en = 1'b0; i1_we = 1'b0; i1_addr = '0;
    i2_en = 1'b0; i2_we = 1'b0; i2_addr = '0;
    if (rnd_en) begin
      l_en = 1'b1; l_we = 1'b1; l_addr = rnd_addr; l_wdata = rand_label;
    end else if (smp) begin
      if (f_valid && cyc < LABEL_W'(4)) begin
        l_en = 1'b1; l_addr = AW'(32'(nb_row) * N_COLS + 32'(nb_col));
      end else if (w_valid && cyc == LABEL_W'(4)) begin
        l_en = 1'b1; l_we = 1'b1; l_addr = AW'(32'(w_i) * N_COLS + 32'(w_j)); l_wdata = result_q;
      end
      if (f_valid && cyc == '0) begin
        i1_en = 1'b1; i1_addr = AW'(32'(f_i) * N_COLS + 32'(f_j));
      end
      if (a_valid && iss_legal) begin
        i2_en = 1'b1; i2_addr = iss_addr;
      end
    end else begin
      l_en = ext_en; l_we = ext_we; l_addr = ext_addr; l_wdata = ext_wdata;
      if (img_valid && in_tile) begin
        i1_en = 1'b1; i1_we = 1'b1; i1_addr = img1_waddr;
      end
      if (img_valid && in_w2) begin
        i2_en = 1'b1; i2_we = 1'b1; i2_addr = img2_waddr;
      end
    end
  end

  spram #(.DEPTH(N_ROWS * N_COLS), .WIDTH(LABEL_W)) u_label (
    .clk, .en(l_en), .we(l_we), .addr(l_addr), .wdata(l_wdata), .rdata(l_rdata));
  spram #(.DEPTH(N_ROWS * N_COLS), .WIDTH(PIX_W)) u_img1 (
    .clk, .en(i1_en), .we(i1_we), .addr(i1_addr), .wdata(img1_pix), .rdata(i1_rdata));
  spram #(.DEPTH(D2), .WIDTH(PIX_W)) u_img2 (
    .clk, .en(i2_en), .we(i2_we), .addr(i2_addr), .wdata(img2_pix), .rdata(i2_rdata));

  assign share_out = l_rdata;
  assign ext_rdata = l_rdata;

  // ---------------------------------------------------------------- fetch capture
  logic [NDIR-1:0][LABEL_W-1:0] nb_next, nb_cur;
  logic [NDIR-1:0]              nbp_next, nbp_cur;
  logic [PIX_W-1:0]             img1_next, img1_cur;
  logic                         fetch_d, local_d;
  logic [1:0]                   dir_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fetch_d <= 1'b0; local_d <= 1'b0; dir_d <= '0;
      nb_next <= '0; nbp_next <= '0; img1_next <= '0;
      nb_cur  <= '0; nbp_cur  <= '0; img1_cur  <= '0;
    end else begin
      fetch_d <= smp && f_valid && (cyc < LABEL_W'(4));
      local_d <= nb_local;
      dir_d   <= cyc[1:0];
      if (fetch_d) begin
        nb_next[dir_d]  <= local_d ? l_rdata : nb_in[dir_d];
        nbp_next[dir_d] <= local_d | nb_present[dir_d];
        if (dir_d == 2'd0) img1_next <= i1_rdata;
      end
      // pixel f of the previous slot becomes pixel a at cycle 0 of this one
      if (smp && cyc == '0) begin
        nb_cur   <= nb_next;
        nbp_cur  <= nbp_next;
        img1_cur <= img1_next;
      end
    end
  end

  // ---------------------------------------------------------------- SPU
  logic               sa_valid, sa_first, sa_bank, sa_legal;
  logic [LABEL_W-1:0] sa_label;
  logic               s_valid;
  logic [LABEL_W-1:0] s_label;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sa_valid <= 1'b0; sa_first <= 1'b0; sa_bank <= 1'b0; sa_legal <= 1'b0; sa_label <= '0;
    end else begin
      sa_valid <= a_valid;
      sa_first <= (cyc == '0);
      sa_bank  <= a_bank;
      sa_legal <= iss_legal;
      sa_label <= cyc;
    end
  end

  spu #(.LABEL_W(LABEL_W)) u_spu (
    .clk, .rst_n, .cfg,
    .a_valid(sa_valid), .a_first(sa_first), .a_bank(sa_bank), .a_label(sa_label),
    .a_legal(sa_legal), .a_img1(img1_cur), .a_img2(i2_rdata),
    .a_nb_label(nb_cur), .a_nb_present(nbp_cur),
    .b_valid, .b_first(cyc == '0), .b_last(cyc == LABEL_W'(NL - 1)), .b_bank,
    .b_label(cyc), .rnd(rnd[15:0]),
    .sample_valid(s_valid), .sample_label(s_label)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       result_q <= '0;
    else if (s_valid) result_q <= s_label;
  end
endmodule
