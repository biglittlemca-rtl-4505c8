// tb_scaleup_dispatch: one Little SPE with a 2 x 4 tile at grid position
// (1, 0), scaling into a 4 x 2 grid of 2 x 4 Big tiles.  For scale 2 and 4,
// stereo and optical flow, every write must land on a Big pixel whose
// nearest-neighbour source lies in this tile, carry the rescaled source label,
// and every Big pixel covered by the tile must be written exactly once.
// Also checks the schedule length of S*S + 2 cycles per variable.
// Nearest-neighbour scale-up with a static schedule is the document's; the
// label rescaling, the serial order and the cycle count are this design's.
// No ports; 10 ns clock; watchdog after 20,000 cycles.
module tb_scaleup_dispatch;
  import mca_pkg::*;
  localparam int NLR = 2, NLC = 4, NBR = 2, NBC = 4, QBR = 4, QBC = 2, LWL = 4, LWB = 6;
  int TR = 1, TC = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] scale;
  app_e app;
  logic [8:0] num_labels;
  logic rd_en;
  logic [2:0] rd_addr;
  logic [LWL-1:0] rd_data;
  su_wr_t wr;
  logic busy, done;
  int checks = 0, failures = 0;

  scaleup_dispatch #(.NL_ROWS(NLR), .NL_COLS(NLC), .NB_ROWS(NBR), .NB_COLS(NBC),
                     .QB_ROWS(QBR), .QB_COLS(QBC), .LW_LITTLE(LWL), .LW_BIG(LWB)) dut (
    .clk, .rst_n, .start, .scale, .app, .num_labels, .tile_row(8'(TR)), .tile_col(8'(TC)),
    .rd_en, .rd_addr, .rd_data, .wr, .busy, .done);
  always #5 clk = ~clk;

  logic [LWL-1:0] mem [NLR * NLC];
  always @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int scaled(int l, int s);
    if (app == APP_STEREO) return clampi(l * s, 0, int'(num_labels) - 1);
    // little radius 1 (2-bit halves), big radius 3 (3-bit halves)
    return (clampi(((l >> 2) - 1) * s, -3, 3) + 3) * 8 + (clampi(((l & 3) - 1) * s, -3, 3) + 3);
  endfunction

  task automatic one(input int s, input app_e a);
    int cnt [QBR * NBR][QBC * NBC];
    int cycles = 0, y, x, ly, lx, expw = 0;
    scale = 4'(s); app = a; num_labels = 9'd40;
    foreach (mem[i]) mem[i] = (a == APP_STEREO) ? LWL'($urandom) : LWL'({2'($urandom_range(2)), 2'($urandom_range(2))});
    foreach (cnt[i, j]) cnt[i][j] = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) begin
      cycles++;
      if (wr.valid) begin
        y = int'(wr.dq) * NBR + int'(wr.row);
        x = int'(wr.dr) * NBC + int'(wr.col);
        expect_true(int'(wr.row) < NBR && int'(wr.col) < NBC && int'(wr.dq) < QBR && int'(wr.dr) < QBC, "destination in range");
        ly = y / s - TR * NLR;
        lx = x / s - TC * NLC;
        expect_true(ly >= 0 && ly < NLR && lx >= 0 && lx < NLC, "source inside tile");
        if (ly >= 0 && ly < NLR && lx >= 0 && lx < NLC)
          expect_true(int'(wr.label) == scaled(int'(mem[ly * NLC + lx]), s),
                      $sformatf("label at (%0d,%0d): %0d vs %0d", y, x, wr.label, scaled(int'(mem[ly * NLC + lx]), s)));
        if (y < QBR * NBR && x < QBC * NBC) cnt[y][x]++;
      end
      @(negedge clk);
    end
    expect_true(cycles == NLR * NLC * (s * s + 2), "schedule length");
    foreach (cnt[yy, xx]) begin
      int src_y = yy / s - TR * NLR, src_x = xx / s - TC * NLC;
      if (src_y >= 0 && src_y < NLR && src_x >= 0 && src_x < NLC) begin
        expect_true(cnt[yy][xx] == 1, $sformatf("pixel (%0d,%0d) written %0d times", yy, xx, cnt[yy][xx]));
        expw++;
      end else expect_true(cnt[yy][xx] == 0, "foreign pixel written");
    end
    expect_true(expw > 0 || TR * NLR * s >= QBR * NBR, "tile covers some Big pixels");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(2, APP_STEREO);
    one(2, APP_FLOW);
    TR = 0;   // at 4x only the first Little tile row reaches the Big grid
    one(4, APP_STEREO);
    one(4, APP_FLOW);
    TR = 1;   // at 4x this tile lies beyond the Big grid: nothing may be written
    one(4, APP_STEREO);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
