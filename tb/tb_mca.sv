// tb_mca: a 2 x 2 grid of 2 x 4 tiles (image 4 x 8), stereo, 16 labels.
// Streams an image pair in, randomises, reads the state out, runs one Gibbs
// iteration at a near-greedy temperature and reads out again.  Every red
// pixel must minimise Eq. 1 given the initial black labels, every black pixel
// given the new red ones; many of these neighbours sit in another SPE, so the
// check covers the lockstep label exchange.  Also checks that the read-out
// delivers each pixel once and the run length 2*iters*(K+3)*NL.
// Eq. 1 and the lockstep exchange are the document's; the checkerboard order
// and run length are this design's schedule.  No ports; 10 ns clock;
// watchdog after 100,000 cycles.
module tb_mca;
  import mca_pkg::*;
  localparam int Q = 2, RC = 2, N = 2, M = 4, LW = 4, NL = 16, H = Q * N, W = RC * M, K = N * M / 2;
  logic clk = 0, rst_n = 0;
  mca_cfg_t cfg;
  logic start_rand = 0, start_sample = 0, start_readout = 0, busy, done;
  logic img_valid = 0, img_first = 0, img_ready;
  logic [7:0] img1_pix = '0, img2_pix = '0;
  logic ro_valid;
  logic [12:0] ro_row, ro_col;
  logic [LW-1:0] ro_label;
  logic [Q-1:0][RC-1:0] ext_en = '0, ext_we = '0;
  logic [Q-1:0][RC-1:0][2:0] ext_addr = '0;
  logic [Q-1:0][RC-1:0][LW-1:0] ext_wdata = '0, ext_rdata;
  int checks = 0, failures = 0;

  mca #(.Q_ROWS(Q), .Q_COLS(RC), .N_ROWS(N), .N_COLS(M), .LABEL_W(LW)) dut (.*);
  always #5 clk = ~clk;

  logic [7:0] im1 [H][W];
  logic [7:0] im2 [H][W];
  int lab [H][W];
  int pre [H][W];
  int seen [H][W];

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ro_valid) begin
    lab[ro_row][ro_col] <= int'(ro_label);
    seen[ro_row][ro_col] <= seen[ro_row][ro_col] + 1;
  end

  task automatic cmd(input int which);
    int cycles = 0;
    @(negedge clk);
    start_rand = (which == 0); start_sample = (which == 1); start_readout = (which == 2);
    @(negedge clk); start_rand = 0; start_sample = 0; start_readout = 0;
    while (busy) begin cycles++; @(negedge clk); end
    repeat (2) @(negedge clk);
    if (which == 1) expect_true(cycles == 2 * int'(cfg.iters) * (K + 3) * NL, "run length");
  endtask

  task automatic readout();
    foreach (seen[y, x]) seen[y][x] = 0;
    cmd(2);
    foreach (seen[y, x]) expect_true(seen[y][x] == 1, "read-out coverage");
  endtask

  function automatic int energy(int y, int x, int l, bit use_pre);
    int d, s = 0, n;
    int dy[4] = '{-1, 1, 0, 0};
    int dx[4] = '{0, 0, -1, 1};
    d = int'(im2[y][x - l]) - int'(im1[y][x]);
    for (int k = 0; k < 4; k++) begin
      if (y + dy[k] < 0 || y + dy[k] >= H || x + dx[k] < 0 || x + dx[k] >= W) continue;
      n = use_pre ? pre[y + dy[k]][x + dx[k]] : lab[y + dy[k]][x + dx[k]];
      s += (l - n) * (l - n);
    end
    return 2 * d * d + 2 * s;   // alpha = beta = 1
  endfunction

  function automatic logic is_min(int y, int x, int l, bit use_pre);
    int m = -1, e;
    for (int k = 0; k <= x && k < NL; k++) begin
      e = energy(y, x, k, use_pre);
      if (m < 0 || e < m) m = e;
    end
    if (l > x) return 1'b0;
    return energy(y, x, l, use_pre) == m;
  endfunction

  initial begin
    cfg = '0;
    cfg.app = APP_STEREO; cfg.alpha = 3'd1; cfg.beta = 3'd1; cfg.tinv = 8'd255;
    cfg.num_labels = 9'd16; cfg.iters = 10'd1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // small pixel values so that smoothness and data terms compete
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      im1[y][x] = 8'($urandom_range(12)); im2[y][x] = 8'($urandom_range(12));
    end
    expect_true(img_ready, "image port ready when idle");
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk);
      img_valid = 1; img_first = (y == 0 && x == 0); img1_pix = im1[y][x]; img2_pix = im2[y][x];
    end
    @(negedge clk); img_valid = 0; img_first = 0;
    cmd(0);
    readout();
    foreach (lab[y, x]) pre[y][x] = lab[y][x];
    cmd(1);
    readout();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      if ((y + x) % 2 == 0) expect_true(is_min(y, x, lab[y][x], 1), $sformatf("red (%0d,%0d) = %0d", y, x, lab[y][x]));
      else                  expect_true(is_min(y, x, lab[y][x], 0), $sformatf("black (%0d,%0d) = %0d", y, x, lab[y][x]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
