// tb_spe: one SPE that owns the whole 4 x 8 image (no neighbouring SPEs).
// 1. Streams two images in, randomises, and checks every label is legal.
// 2. Stereo, near-greedy temperature: after one iteration each label must be
//    a minimum of the Eq. 1 energy 2**alpha*(img2[x-d] - img1[x])**2 plus
//    2**beta times the squared label differences to the neighbours it saw,
//    over the legal disparities d < num_labels, d <= x (reference here).
// 3. Optical flow, same idea over the 3 x 3 motion vectors inside the image.
// 4. Stereo with smoothness only (flat images): labels must minimise the sum
//    of squared differences to the neighbours, checked phase by phase.
// Also checks the sampling run length 2*iters*(K+3)*NL cycles.
// Eq. 1, the IMG2 window sizes and the flow label encoding are the document's;
// the checkerboard schedule and run length are this design's.  No ports;
// 10 ns clock; watchdog after 200,000 cycles.
module tb_spe;
  import mca_pkg::*;
  localparam int N = 4, M = 8, LW = 4, NL = 16, R = 1, K = N * M / 2;
  logic clk = 0, rst_n = 0;
  mca_cfg_t cfg;
  logic start_rand = 0, start_sample = 0, busy, done;
  logic img_valid = 0;
  logic [12:0] img_row = '0, img_col = '0;
  logic [7:0] img1_pix = '0, img2_pix = '0;
  logic [LW-1:0] share_out;
  logic [3:0][LW-1:0] nb_in;
  logic [3:0] nb_present = '0;
  logic ext_en = 0, ext_we = 0;
  logic [4:0] ext_addr = '0;
  logic [LW-1:0] ext_wdata = '0, ext_rdata;
  int checks = 0, failures = 0;

  spe #(.N_ROWS(N), .N_COLS(M), .LABEL_W(LW), .IMG_H(N), .IMG_W(M)) dut (
    .clk, .rst_n, .cfg, .tile_row(8'd0), .tile_col(8'd0), .seed(32'hC0FFEE),
    .start_rand, .start_sample, .busy, .done,
    .img_valid, .img_row, .img_col, .img1_pix, .img2_pix,
    .share_out, .nb_in, .nb_present,
    .ext_en, .ext_we, .ext_addr, .ext_wdata, .ext_rdata);
  assign nb_in = {4{share_out}};
  always #5 clk = ~clk;

  logic [7:0] im1 [N][M];
  logic [7:0] im2 [N][M];
  int lab [N][M];
  int pre [N][M];

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input bit flat);
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
      im1[y][x] = flat ? 8'd50 : 8'($urandom);
      im2[y][x] = flat ? 8'd50 : 8'($urandom);
    end
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
      @(negedge clk);
      img_valid = 1; img_row = 13'(y); img_col = 13'(x); img1_pix = im1[y][x]; img2_pix = im2[y][x];
    end
    @(negedge clk); img_valid = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < N * M; a++) begin
      @(negedge clk); ext_en = 1; ext_we = 0; ext_addr = 5'(a);
      @(negedge clk); ext_en = 0;
      lab[a / M][a % M] = int'(ext_rdata);
    end
  endtask

  task automatic run(input logic rnd);
    int cycles = 0;
    @(negedge clk); if (rnd) start_rand = 1; else start_sample = 1;
    @(negedge clk); start_rand = 0; start_sample = 0;
    while (busy) begin cycles++; @(negedge clk); end
    if (!rnd) expect_true(cycles == 2 * int'(cfg.iters) * (K + 3) * NL, "sampling run length");
    else      expect_true(cycles == N * M, "randomisation length");
  endtask

  function automatic int data_e(int y, int x, int l);
    int yy, xx, d;
    if (cfg.app == APP_STEREO) begin yy = y; xx = x - l; end
    else begin yy = y + (l % 4) - R; xx = x + (l / 4) - R; end
    d = int'(im2[yy][xx]) - int'(im1[y][x]);
    return d * d;
  endfunction

  function automatic logic legal(int y, int x, int l);
    if (cfg.app == APP_STEREO) return l < int'(cfg.num_labels) && l <= x;
    return (l / 4) <= 2 * R && (l % 4) <= 2 * R && y + (l % 4) - R >= 0 && y + (l % 4) - R < N &&
           x + (l / 4) - R >= 0 && x + (l / 4) - R < M;
  endfunction

  function automatic int smooth_e(int y, int x, int l, bit use_pre);
    int s = 0, n;
    int dy[4] = '{-1, 1, 0, 0};
    int dx[4] = '{0, 0, -1, 1};
    for (int k = 0; k < 4; k++) begin
      if (y + dy[k] < 0 || y + dy[k] >= N || x + dx[k] < 0 || x + dx[k] >= M) continue;
      n = use_pre ? pre[y + dy[k]][x + dx[k]] : lab[y + dy[k]][x + dx[k]];
      if (cfg.app == APP_STEREO) s += (l - n) * (l - n);
      else s += (l / 4 - n / 4) * (l / 4 - n / 4) + (l % 4 - n % 4) * (l % 4 - n % 4);
    end
    return s;
  endfunction

  // Eq. 1 with the neighbours each pixel saw in a one-iteration run: red
  // pixels (sampled first) saw the labels in pre, black ones the new red ones
  function automatic int full_e(int y, int x, int l);
    return (data_e(y, x, l) << cfg.alpha) + (smooth_e(y, x, l, (y + x) % 2 == 0) << cfg.beta);
  endfunction

  // is label l of pixel (y,x) a minimum of the data (sm=0) or smoothness (sm=1) energy
  function automatic logic is_min(int y, int x, int l, bit sm, bit use_pre);
    int m = -1, e;
    for (int k = 0; k < NL; k++) if (legal(y, x, k)) begin
      e = sm ? smooth_e(y, x, k, use_pre) : full_e(y, x, k);
      if (m < 0 || e < m) m = e;
    end
    if (!legal(y, x, l)) return 1'b0;
    e = sm ? smooth_e(y, x, l, use_pre) : full_e(y, x, l);
    return e == m;
  endfunction

  initial begin
    cfg = '0;
    cfg.app = APP_STEREO; cfg.alpha = 3'd1; cfg.beta = 3'd0; cfg.tinv = 8'd255;
    cfg.num_labels = 9'd6; cfg.iters = 10'd1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 1 + 2: stereo
    load(0);
    run(1);
    read_all();
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) expect_true(lab[y][x] < 6, "random label legal");
    pre = lab;
    run(0);
    read_all();
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++)
      expect_true(is_min(y, x, lab[y][x], 0, 0), $sformatf("stereo (%0d,%0d) label %0d", y, x, lab[y][x]));
    // 3: optical flow (labels: upper 2 bits horizontal, lower 2 bits vertical)
    cfg.app = APP_FLOW;
    load(0);
    run(1);
    read_all();
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++)
      expect_true((lab[y][x] / 4) <= 2 && (lab[y][x] % 4) <= 2, "random flow label legal");
    pre = lab;
    run(0);
    read_all();
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++)
      expect_true(is_min(y, x, lab[y][x], 0, 0), $sformatf("flow (%0d,%0d) label %0d", y, x, lab[y][x]));
    // 4: smoothness only, flat images, stereo with every disparity legal
    cfg.app = APP_STEREO; cfg.alpha = 3'd0; cfg.beta = 3'd1; cfg.num_labels = 9'd1;
    load(1);
    // preset labels through the external port
    for (int a = 0; a < N * M; a++) begin
      pre[a / M][a % M] = $urandom_range(15);
      @(negedge clk); ext_en = 1; ext_we = 1; ext_addr = 5'(a); ext_wdata = LW'(pre[a / M][a % M]);
    end
    @(negedge clk); ext_en = 0; ext_we = 0;
    cfg.num_labels = 9'd16;
    run(0);
    read_all();
    // red pixels were sampled against the preset black ones, black against the new red ones
    for (int y = 0; y < N; y++) for (int x = 0; x < M; x++) begin
      if ((y + x) % 2 == 0) begin
        // legality for stereo also needs l <= x; smoothness-only run keeps that rule
        expect_true(is_min(y, x, lab[y][x], 1, 1), $sformatf("smooth red (%0d,%0d)", y, x));
      end else begin
        expect_true(is_min(y, x, lab[y][x], 1, 0), $sformatf("smooth black (%0d,%0d)", y, x));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
