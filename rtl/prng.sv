// prng: 32-bit xorshift pseudo-random number generator.
//
// The samplers of the accelerator use pseudo-random rather than true random
// numbers, as the document describes; the generator type is this design's
// choice (Marsaglia xorshift32: x ^= x<<13; x ^= x>>17; x ^= x<<5).
// load copies seed into the state (a zero seed is replaced by 1, since zero
// is the one fixed point); step advances one state per cycle.  rnd is the
// current state, so a new value is available every cycle that step is high.
module prng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [31:0] seed,
  input  logic        step,
  output logic [31:0] rnd
);
  logic [31:0] s, t1, t2, t3;

  always_comb begin
    t1 = s ^ (s << 13);
    t2 = t1 ^ (t1 >> 17);
    t3 = t2 ^ (t2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= 32'h1;
    else if (load) s <= (seed == 32'd0) ? 32'h1 : seed;
    else if (step) s <= t3;
  end

  assign rnd = s;
endmodule
