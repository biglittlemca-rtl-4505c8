// tb_spe_sched: checks the SPE schedule on a 4 x 6 tile with 8-cycle slots:
// randomisation visits every address once; each sampling phase fetches every
// pixel of its checkerboard colour once, in row order, colours alternating;
// pixels move f -> a -> b -> w one slot apart with write-back at cycle 4;
// a run lasts 2*iters*(K+3)*NL cycles.
// The checkerboard order follows the document's chromatic schedule; the slot
// structure and its timing are this design's.  No ports; 10 ns clock;
// watchdog after 10,000 cycles.
module tb_spe_sched;
  localparam int N = 4, M = 6, LW = 3, NL = 8, K = N * M / 2, ITERS = 3;
  logic clk = 0, rst_n = 0, start_rand = 0, start_sample = 0;
  logic [9:0] iters = 10'(ITERS);
  logic busy, done, rnd_en, smp, f_valid, a_valid, a_bank, b_valid, b_bank, w_valid;
  logic [4:0] rnd_addr;
  logic [LW-1:0] cyc;
  logic [1:0] f_i, a_i, w_i;
  logic [2:0] f_j, a_j, w_j;
  int checks = 0, failures = 0;

  spe_sched #(.N_ROWS(N), .N_COLS(M), .LABEL_W(LW)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_true(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("%t: %s", $time, what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen [N*M];
    int busy_cycles, nphase, fcount, wcount, prev_f;
    int fq[$];
    int wq[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // randomisation
    @(negedge clk); start_rand = 1;
    @(negedge clk); start_rand = 0;
    foreach (seen[i]) seen[i] = 0;
    busy_cycles = 0;
    while (busy) begin
      if (rnd_en) seen[rnd_addr]++;
      busy_cycles++;
      @(negedge clk);
    end
    foreach (seen[i]) expect_true(seen[i] == 1, "rand address coverage");
    expect_true(busy_cycles == N * M, "rand duration");
    // sampling
    @(negedge clk); start_sample = 1;
    @(negedge clk); start_sample = 0;
    busy_cycles = 0; fcount = 0; wcount = 0; prev_f = -1;
    while (busy) begin
      busy_cycles++;
      if (smp && cyc == 0 && f_valid) begin
        int ph, idx;
        ph  = fcount / K;
        idx = int'(f_i) * M + int'(f_j);
        expect_true(((int'(f_i) + int'(f_j)) % 2) == (ph % 2), "pixel colour");
        if (fcount % K != 0) expect_true(idx > prev_f, "row order");
        prev_f = idx;
        fq.push_back(idx);
        fcount++;
      end
      if (smp && cyc == 4 && w_valid) begin
        int exp_w;
        exp_w = fq.pop_front();
        expect_true(int'(w_i) * M + int'(w_j) == exp_w, "write-back follows fetch");
        wcount++;
      end
      if (smp && cyc == 0 && a_valid && b_valid) expect_true(a_bank != b_bank, "ping-pong banks");
      if (done) expect_true(busy_cycles == 2 * ITERS * (K + 3) * NL, "run duration");
      @(negedge clk);
    end
    expect_true(fcount == 2 * ITERS * K, "fetch count");
    expect_true(wcount == 2 * ITERS * K, "write count");
    $display("busy %0d cycles, %0d fetches", busy_cycles, fcount);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
