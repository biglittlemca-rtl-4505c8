// spu_e2p: energy-to-probability conversion, the second SPU stage.
//
// The Gibbs conditional is p(l) ~ exp(-E(l)/T) = 2**(-(E(l)-Emin)*log2(e)/T)
// once the smallest energy of the pixel, Emin, is factored out.  The stage
// computes the exponent x = ((E - Emin) * tinv) >> 4, with tinv =
// round(16*log2(e)/T), and returns the weight 2**15 >> x, or 0 once x
// reaches 16 or the label is not a legal one.  The best label therefore
// always weighs 2**15.  The document names this stage and says it uses
// integer approximations; the power-of-two approximation is this design's.
// Purely combinational.
module spu_e2p
  import mca_pkg::*;
(
  input  logic [E_W-1:0] energy,
  input  logic [E_W-1:0] emin,
  input  logic           legal,
  input  logic [7:0]     tinv,
  output logic [W_W-1:0] weight
);
  logic [E_W-1:0]   delta;
  logic [E_W+7:0]   scaled;
  logic [E_W+3:0]   x;

  always_comb begin
    delta  = energy - emin;
    scaled = (E_W+8)'(delta) * (E_W+8)'(tinv);
    x      = scaled[E_W+7:4];
    if (!legal || energy < emin || x >= (E_W+4)'(16)) weight = '0;
    else                                              weight = W_W'(16'h8000 >> x[3:0]);
  end
endmodule
