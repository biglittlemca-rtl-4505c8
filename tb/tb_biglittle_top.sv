// tb_biglittle_top: end-to-end run of a small BigLittle accelerator: Little
// MCA 2 x 1 SPEs, Big MCA 4 x 2 SPEs, 2 x 4 tiles, 16 Little and 64 Big
// labels, scale factors 2 and 4 (standing in for 2 and 10).
// Three frames: stereo at 2x, stereo at 4x (low-resolution frame padded), and
// optical flow at 2x; the second frame's burn-in overlaps the first frame's
// full-resolution sampling.  Checks:
//  - every scale-up write carries the rescaled label of its nearest-neighbour
//    Little source (taken from the Little label banks at transfer time) and
//    every Big pixel is written exactly once per transfer;
//  - after one full-resolution iteration at a near-greedy temperature, each
//    read-out label minimises the Eq. 1 energy given the neighbour labels it
//    saw (scaled-up labels for the first colour, final labels for the second);
//  - each mechanism happened: randomisation, Little burn-in, both scale
//    networks, Big sampling, neighbour exchange across Big SPEs, overlap of
//    the two MCAs, both applications, read-out.
// The energy reference is Eq. 1 of the document; the label rescaling it expects
// (disparity times S, flow components times S clamped to the Big radius) and
// the frame handshake are this design's own.  No ports; 10 ns clock;
// a watchdog ends the run with a failure after 400,000 cycles.
module tb_biglittle_top;
  import mca_pkg::*;
  localparam int QLR = 2, QLC = 1, QBR = 4, QBC = 2, NR = 2, NC = 4, LWL = 4, LWB = 6;
  localparam int HL = QLR * NR, WL = QLC * NC, HB = QBR * NR, WB = QBC * NC;
  logic clk = 0, rst_n = 0;
  mca_cfg_t cfg_little, cfg_big;
  logic scale_sel = 0, randomize = 0, start = 0, big_release = 0;
  logic little_img_valid = 0, little_img_first = 0, little_img_ready;
  logic [7:0] little_img1 = '0, little_img2 = '0;
  logic big_img_valid = 0, big_img_first = 0, big_img_ready;
  logic [7:0] big_img1 = '0, big_img2 = '0;
  logic readout = 0, ro_valid;
  logic [12:0] ro_row, ro_col;
  logic [LWB-1:0] ro_label;
  logic little_idle, big_idle, frame_done;
  int checks = 0, failures = 0;

  biglittle_top #(.QL_ROWS(QLR), .QL_COLS(QLC), .NL_ROWS(NR), .NL_COLS(NC), .QB_ROWS(QBR), .QB_COLS(QBC),
                  .NB_ROWS(NR), .NB_COLS(NC), .LW_LITTLE(LWL), .LW_BIG(LWB), .SCALE0(2), .SCALE1(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_rand = 0, n_little = 0, n_x2 = 0, n_x4 = 0, n_big = 0, n_frames = 0, n_overlap = 0;
  int n_exchange = 0, n_readout = 0, n_stereo = 0, n_flow = 0;
  always @(posedge clk) begin
    if (dut.little_rand_go) n_rand++;
    if (dut.little_sample_go) n_little++;
    if (dut.xfer_go) begin if (scale_sel) n_x4++; else n_x2++; end
    if (dut.big_sample_go) begin n_big++; if (cfg_big.app == APP_STEREO) n_stereo++; else n_flow++; end
    if (frame_done) n_frames++;
    if (dut.little_busy && dut.u_sched.bs == dut.u_sched.B_SAMPLE && dut.u_sched.ls == dut.u_sched.L_SAMPLE) n_overlap++;
    // a Big SPE taking a neighbour label from the SPE to its north
    if (dut.u_big.g_row[1].g_col[0].u_spe.fetch_d && !dut.u_big.g_row[1].g_col[0].u_spe.local_d) n_exchange++;
  end

  // ------------------------------------------------------------ scale-up checking
  int sel_scale;
  int snap [HL][WL];
  int wcount [HB][WB];
  int lab [HB][WB];
  int seen [HB][WB];
  int pre [HB][WB];    // labels written by the scale-up, before Big sampling

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic int scaled(int l, int s);
    if (cfg_big.app == APP_STEREO) return clampi(l * s, 0, int'(cfg_big.num_labels) - 1);
    return (clampi(((l >> 2) - 1) * s, -3, 3) + 3) * 8 + (clampi(((l & 3) - 1) * s, -3, 3) + 3);
  endfunction

  // snapshot the Little label banks when a transfer starts
  always @(posedge clk) if (dut.xfer_go) begin
    for (int y = 0; y < HL; y++) for (int x = 0; x < WL; x++) begin
      case (y / NR)
        0: snap[y][x] = int'(dut.u_little.g_row[0].g_col[0].u_spe.u_label.mem[(y % NR) * NC + x]);
        default: snap[y][x] = int'(dut.u_little.g_row[1].g_col[0].u_spe.u_label.mem[(y % NR) * NC + x]);
      endcase
    end
    foreach (wcount[y, x]) wcount[y][x] = 0;
  end

  for (genvar q = 0; q < QBR; q++) begin : g_q
    for (genvar r = 0; r < QBC; r++) begin : g_r
      always @(posedge clk) if (dut.rx_en[q][r]) begin
        int y, x;
        y = q * NR + int'(dut.rx_addr[q][r]) / NC;
        x = r * NC + int'(dut.rx_addr[q][r]) % NC;
        wcount[y][x]++;
        pre[y][x] = int'(dut.rx_label[q][r]);
        expect_true(int'(dut.rx_label[q][r]) == scaled(snap[y / sel_scale][x / sel_scale], sel_scale),
                    $sformatf("scale-up label at (%0d,%0d)", y, x));
      end
    end
  end

  always @(posedge clk) if (ro_valid) begin
    lab[ro_row][ro_col] <= int'(ro_label);
    seen[ro_row][ro_col] <= seen[ro_row][ro_col] + 1;
  end

  // ------------------------------------------------------------ images and reference
  logic [7:0] b1 [HB][WB];
  logic [7:0] b2 [HB][WB];

  task automatic load_little();
    for (int y = 0; y < HL; y++) for (int x = 0; x < WL; x++) begin
      @(negedge clk);
      while (!little_img_ready) @(negedge clk);
      little_img_valid = 1; little_img_first = (y == 0 && x == 0);
      little_img1 = 8'($urandom_range(20)); little_img2 = 8'($urandom_range(20));
    end
    @(negedge clk); little_img_valid = 0; little_img_first = 0;
  endtask

  task automatic load_big();
    foreach (b1[y, x]) begin b1[y][x] = 8'($urandom); b2[y][x] = 8'($urandom); end
    for (int y = 0; y < HB; y++) for (int x = 0; x < WB; x++) begin
      @(negedge clk);
      while (!big_img_ready) @(negedge clk);
      big_img_valid = 1; big_img_first = (y == 0 && x == 0); big_img1 = b1[y][x]; big_img2 = b2[y][x];
    end
    @(negedge clk); big_img_valid = 0; big_img_first = 0;
  endtask

  function automatic logic legal(int y, int x, int l);
    if (cfg_big.app == APP_STEREO) return l < int'(cfg_big.num_labels) && l <= x;
    return (l / 8) <= 6 && (l % 8) <= 6 && y + (l % 8) - 3 >= 0 && y + (l % 8) - 3 < HB &&
           x + (l / 8) - 3 >= 0 && x + (l / 8) - 3 < WB;
  endfunction
  function automatic int data_e(int y, int x, int l);
    int d;
    if (cfg_big.app == APP_STEREO) d = int'(b2[y][x - l]) - int'(b1[y][x]);
    else d = int'(b2[y + (l % 8) - 3][x + (l / 8) - 3]) - int'(b1[y][x]);
    return d * d;
  endfunction
  // full Eq. 1 energy with the neighbour labels the pixel saw: with one
  // iteration, colour-0 pixels (sampled first) saw the scaled-up labels and
  // colour-1 pixels saw the final colour-0 labels
  function automatic int energy(int y, int x, int l);
    int s = 0, n, ny, nx;
    int dy[4] = '{-1, 1, 0, 0};
    int dx[4] = '{0, 0, -1, 1};
    for (int k = 0; k < 4; k++) begin
      ny = y + dy[k]; nx = x + dx[k];
      if (ny < 0 || ny >= HB || nx < 0 || nx >= WB) continue;
      n = ((y + x) % 2 == 0) ? pre[ny][nx] : lab[ny][nx];
      if (cfg_big.app == APP_STEREO) s += (l - n) * (l - n);
      else s += ((l / 8) - (n / 8)) * ((l / 8) - (n / 8)) + ((l % 8) - (n % 8)) * ((l % 8) - (n % 8));
    end
    return (data_e(y, x, l) << cfg_big.alpha) + (s << cfg_big.beta);
  endfunction
  function automatic logic is_min(int y, int x, int l);
    int m = -1;
    for (int k = 0; k < 64; k++) if (legal(y, x, k) && (m < 0 || energy(y, x, k) < m)) m = energy(y, x, k);
    return legal(y, x, l) && energy(y, x, l) == m;
  endfunction

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  task automatic check_frame(input string name);
    foreach (wcount[y, x]) expect_true(wcount[y][x] == 1, $sformatf("%s: Big pixel (%0d,%0d) written %0d times", name, y, x, wcount[y][x]));
    foreach (seen[y, x]) seen[y][x] = 0;
    pulse(readout);
    repeat (HB * WB + 5) @(negedge clk);
    n_readout++;
    foreach (seen[y, x]) expect_true(seen[y][x] == 1, "read-out coverage");
    foreach (lab[y, x])
      expect_true(is_min(y, x, lab[y][x]), $sformatf("%s: (%0d,%0d) = %0d", name, y, x, lab[y][x]));
  endtask

  initial begin
    cfg_little = '0;
    cfg_little.app = APP_STEREO; cfg_little.alpha = 3'd1; cfg_little.beta = 3'd1;
    cfg_little.tinv = 8'd12; cfg_little.num_labels = 9'd8; cfg_little.iters = 10'd3;
    cfg_big = '0;
    cfg_big.app = APP_STEREO; cfg_big.alpha = 3'd1; cfg_big.beta = 3'd0;
    cfg_big.tinv = 8'd255; cfg_big.num_labels = 9'd48; cfg_big.iters = 10'd1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // frame A: stereo, 2x
    load_little();
    load_big();
    pulse(randomize);
    wait (little_idle); @(negedge clk);
    sel_scale = 2; scale_sel = 0;
    pulse(start);
    wait (dut.u_sched.bs == dut.u_sched.B_SAMPLE); @(negedge clk);
    // frame B burn-in overlaps frame A full-resolution sampling
    scale_sel = 1;
    load_little();
    pulse(randomize);
    wait (little_idle); @(negedge clk);
    pulse(start);
    wait (frame_done); @(negedge clk);
    sel_scale = 4;
    check_frame("stereo 2x");
    // frame A's result is read; load frame B's full-resolution image, then big_release
    load_big();
    pulse(big_release);
    wait (frame_done); @(negedge clk);
    check_frame("stereo 4x");
    pulse(big_release);
    // frame C: optical flow, 2x
    cfg_little.app = APP_FLOW; cfg_big.app = APP_FLOW;
    scale_sel = 0; sel_scale = 2;
    load_little();
    load_big();
    pulse(randomize);
    wait (little_idle); @(negedge clk);
    pulse(start);
    wait (frame_done); @(negedge clk);
    check_frame("flow 2x");
    // every mechanism must have happened
    expect_true(n_rand == 3, "randomisation");
    expect_true(n_little == 3, "Little burn-in");
    expect_true(n_x2 == 2, "2x scale-up network");
    expect_true(n_x4 == 1, "second scale-up network");
    expect_true(n_big == 3 && n_frames == 3, "Big sampling and frame completion");
    expect_true(n_overlap > 0, "burn-in overlapping full-resolution sampling");
    expect_true(n_exchange > 0, "neighbour exchange between Big SPEs");
    expect_true(n_stereo == 2 && n_flow == 1, "both applications");
    expect_true(n_readout == 3, "read-out");
    $display("rand %0d little %0d x2 %0d x4 %0d big %0d frames %0d overlap %0d exchange %0d readout %0d",
             n_rand, n_little, n_x2, n_x4, n_big, n_frames, n_overlap, n_exchange, n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
