// spu_energy: energy of one candidate label for one pixel (Eq. 1 of the
// Gibbs model), the first of the three SPU stages.
//
//   E(l) = 2**alpha * (img2(l) - img1)**2 + 2**beta * sum_n ||l - n||**2
//
// img2 is the IMG2 pixel that label l points at (read by the caller), img1
// the pixel being sampled, n the labels of the present north, south, west
// and east neighbours.  For stereo ||l - n||**2 = (l - n)**2; for optical
// flow it is the squared distance of the two motion vectors,
// (lx - nx)**2 + (ly - ny)**2, taken on the label halves (both carry the same
// bias, so it cancels).  Neighbours outside the image (nb_present = 0) are
// left out of the sum.  The formula is the document's; the shifts for the
// powers of two and the integer widths are this design's.  Purely
// combinational.
module spu_energy
  import mca_pkg::*;
#(
  parameter int unsigned LABEL_W = 8
) (
  input  app_e                       app,
  input  logic [2:0]                 alpha,
  input  logic [2:0]                 beta,
  input  logic [LABEL_W-1:0]         label,
  input  logic [PIX_W-1:0]           img1,
  input  logic [PIX_W-1:0]           img2,
  input  logic [NDIR-1:0][LABEL_W-1:0] nb_label,
  input  logic [NDIR-1:0]            nb_present,
  output logic [E_W-1:0]             energy
);
  localparam int unsigned HW = LABEL_W / 2;

  logic signed [PIX_W:0]     pdiff;
  logic [2*PIX_W-1:0]        dsq;
  logic [E_W-1:0]            data_term, smooth_sum, smooth_term;
  logic signed [LABEL_W:0]   ld;
  logic signed [HW:0]        dx, dy;
  logic [2*LABEL_W+1:0]      nsq;

  always_comb begin
    pdiff     = $signed({1'b0, img2}) - $signed({1'b0, img1});
    dsq       = (2*PIX_W)'(pdiff * pdiff);
    data_term = E_W'(dsq) << alpha;
    smooth_sum = '0;
    for (int d = 0; d < NDIR; d++) begin
      ld  = '0;
      dx  = '0;
      dy  = '0;
      nsq = '0;
      if (app == APP_STEREO) begin
        ld  = $signed({1'b0, label}) - $signed({1'b0, nb_label[d]});
        nsq = (2*LABEL_W+2)'(ld * ld);
      end else begin
        dx  = $signed({1'b0, label[LABEL_W-1 -: HW]}) - $signed({1'b0, nb_label[d][LABEL_W-1 -: HW]});
        dy  = $signed({1'b0, label[HW-1:0]}) - $signed({1'b0, nb_label[d][HW-1:0]});
        nsq = (2*LABEL_W+2)'(dx * dx) + (2*LABEL_W+2)'(dy * dy);
      end
      if (nb_present[d]) smooth_sum = smooth_sum + E_W'(nsq);
    end
    smooth_term = smooth_sum << beta;
    energy      = data_term + smooth_term;
  end
endmodule
