// tb_frame_sched: plays the MCAs with fixed latencies and checks the
// sequencing: randomise, Little burn-in, transfer only when the Big MCA is
// idle, Big sampling after the transfer, and the next frame's burn-in
// overlapping the previous frame's Big sampling, and no transfer while the
// previous result is held (before big_release).
// The overlap of burn-in and full-resolution sampling is the document's; the
// handshakes (randomize, start, big_release) are this design's.  No ports;
// 10 ns clock; watchdog after 3,000 cycles.
module tb_frame_sched;
  logic clk = 0, rst_n = 0, randomize = 0, start = 0, big_release = 0;
  logic little_rand_go, little_sample_go, little_done = 0, xfer_go, xfer_done = 0, big_sample_go, big_done = 0;
  logic little_idle, big_idle, frame_done;
  int checks = 0, failures = 0;

  frame_sched dut (.*);
  always #5 clk = ~clk;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("%t: %s", $time, what); end
  endtask

  // simple MCA models: fixed durations
  int lcnt = -1, xcnt = -1, bcnt = -1;
  int n_rand = 0, n_little = 0, n_xfer = 0, n_big = 0, n_frames = 0, overlap = 0;
  logic lsample_busy = 0, bsample_busy = 0, held = 0;
  int rel_cnt = 0, n_release = 0;
  // host: releases each result 30 cycles after frame_done
  always @(posedge clk) begin
    big_release <= 0;
    if (held && !big_release) begin
      rel_cnt <= rel_cnt + 1;
      if (rel_cnt == 30) begin big_release <= 1; rel_cnt <= 0; n_release++; end
    end
  end
  always @(posedge clk) begin
    little_done <= 0; xfer_done <= 0; big_done <= 0;
    if (little_rand_go)  begin lcnt <= 5;  n_rand++; end
    if (little_sample_go) begin lcnt <= 20; n_little++; lsample_busy <= 1; end
    if (xfer_go) begin
      xcnt <= 8; n_xfer++;
      expect_true(!bsample_busy, "transfer while Big samples");
    end
    if (big_sample_go) begin bcnt <= 50; n_big++; bsample_busy <= 1; end
    if (lcnt > 0) lcnt <= lcnt - 1;
    if (lcnt == 1) begin little_done <= 1; lsample_busy <= 0; end
    if (xcnt > 0) xcnt <= xcnt - 1;
    if (xcnt == 1) xfer_done <= 1;
    if (bcnt > 0) bcnt <= bcnt - 1;
    if (bcnt == 1) begin big_done <= 1; bsample_busy <= 0; end
    if (frame_done) begin n_frames++; held <= 1; end
    if (xfer_go) expect_true(!held, "transfer over a held result");
    if (big_release) held <= 0;
    if (lsample_busy && bsample_busy) overlap++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); randomize = 1;
    @(negedge clk); randomize = 0;
    expect_true(!little_idle, "Little busy randomising");
    wait (little_idle); @(negedge clk);
    for (int f = 0; f < 3; f++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      expect_true(!little_idle, "start accepted");
      wait (little_idle); @(negedge clk);
    end
    wait (big_idle && little_idle); repeat (3) @(negedge clk);
    expect_true(n_rand == 1, "one randomisation");
    expect_true(n_little == 3 && n_xfer == 3 && n_big == 3, "three frames through each stage");
    expect_true(n_frames == 3, "three frame_done pulses");
    expect_true(overlap > 0, "burn-in overlaps full-resolution sampling");
    expect_true(n_release >= 2, "results held until big_release");
    $display("frames %0d overlap cycles %0d", n_frames, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
