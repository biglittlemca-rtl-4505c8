// tb_prng: compares the generator with a software xorshift32 sequence, checks
// seeding (including the zero seed) and that the state holds without step.
// The document only says the SPU uses pseudo-random numbers; xorshift32 is
// this design's generator.  No ports; 10 ns clock; watchdog after 5,000 cycles.
module tb_prng;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] seed = '0, rnd;
  int checks = 0, failures = 0;

  prng dut (.clk, .rst_n, .load, .seed, .step, .rnd);
  always #5 clk = ~clk;

  function automatic logic [31:0] xs(input logic [31:0] x);
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  task automatic chk(input logic [31:0] exp, input string what);
    checks++;
    if (rnd !== exp) begin failures++; $display("%s: got %h exp %h", what, rnd, exp); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(32'h1, "reset");
    @(negedge clk); load = 1; seed = 32'hDEADBEEF;
    @(negedge clk); load = 0; m = 32'hDEADBEEF;
    chk(m, "seed");
    for (int i = 0; i < 500; i++) begin
      step = ($urandom_range(3) != 0);
      @(negedge clk);
      if (step) m = xs(m);
      chk(m, "sequence");
    end
    step = 0;
    @(negedge clk); load = 1; seed = 32'h0;
    @(negedge clk); load = 0;
    chk(32'h1, "zero seed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
