// tb_spu_sampler: a single non-zero weight must always be drawn; with weights
// 4:2:1:1 (and zeros in between) the drawn frequencies must match within a
// few percent over many draws; out_valid must follow the last label by one cycle.
// The sampler is named by the document; the reservoir rule checked here is
// this design's.  No ports; 10 ns clock; watchdog after 200,000 cycles.
module tb_spu_sampler;
  import mca_pkg::*;
  localparam int LW = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, first = 0, last = 0;
  logic [W_W-1:0] weight = '0;
  logic [LW-1:0] label = '0;
  logic [15:0] u = '0;
  logic out_valid;
  logic [LW-1:0] out_label;
  int checks = 0, failures = 0;

  spu_sampler #(.LABEL_W(LW)) dut (.clk, .rst_n, .in_valid, .first, .last, .weight, .label, .u, .out_valid, .out_label);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run one pixel: w[l] for l = 0..15, returns the drawn label
  task automatic draw(input int w[16], output int got);
    for (int l = 0; l < 16; l++) begin
      @(negedge clk);
      in_valid = 1; first = (l == 0); last = (l == 15);
      weight = W_W'(w[l]); label = LW'(l); u = 16'($urandom);
    end
    @(negedge clk);
    in_valid = 0; first = 0; last = 0;
    checks++;
    if (!out_valid) begin failures++; $display("out_valid missing"); end
    got = int'(out_label);
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("out_valid longer than one cycle"); end
  endtask

  initial begin
    int w[16], got, cnt[16];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      int k;
      k = $urandom_range(15);
      foreach (w[i]) w[i] = 0;
      w[k] = $urandom_range(1, 32768);
      draw(w, got);
      checks++;
      if (got != k) begin failures++; $display("single weight at %0d, drew %0d", k, got); end
    end
    foreach (w[i]) begin w[i] = 0; cnt[i] = 0; end
    w[1] = 32768; w[5] = 16384; w[9] = 8192; w[14] = 8192;
    for (int t = 0; t < 4000; t++) begin
      draw(w, got);
      cnt[got]++;
    end
    checks++;
    if (cnt[1] + cnt[5] + cnt[9] + cnt[14] != 4000) begin failures++; $display("zero-weight label drawn"); end
    checks++;
    if (cnt[1] < 1800 || cnt[1] > 2200) begin failures++; $display("p(1) off: %0d", cnt[1]); end
    checks++;
    if (cnt[5] < 850 || cnt[5] > 1150) begin failures++; $display("p(5) off: %0d", cnt[5]); end
    checks++;
    if (cnt[9] < 400 || cnt[9] > 600) begin failures++; $display("p(9) off: %0d", cnt[9]); end
    checks++;
    if (cnt[14] < 400 || cnt[14] > 600) begin failures++; $display("p(14) off: %0d", cnt[14]); end
    $display("counts %0d %0d %0d %0d", cnt[1], cnt[5], cnt[9], cnt[14]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
