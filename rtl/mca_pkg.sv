// mca_pkg: types and constants shared by the BigLittle MCMC accelerator.
//
// The accelerator Gibbs-samples a grid Markov random field for stereo
// matching (one horizontal disparity per pixel) and optical flow (a 2-D
// motion vector per pixel).  Pixels are 8 bits.  A label is LABEL_W bits:
// for stereo it is the disparity itself, for optical flow the upper half
// holds the horizontal and the lower half the vertical component, each
// biased by the radius r = 2**(LABEL_W/2-1) - 1 (component value v means an
// offset of v - r).  These encodings follow the document; the bias and the
// widths of the configuration fields below are this design's own choices.
package mca_pkg;

  localparam int PIX_W = 8;    // pixel width (8-bit SPE datatype)
  localparam int E_W   = 26;   // energy width, enough for alpha,beta <= 7
  localparam int W_W   = 16;   // unnormalised probability (weight) width
  localparam int NDIR  = 4;    // north, south, west, east neighbours

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_S = 2'd1, DIR_W = 2'd2, DIR_E = 2'd3} dir_e;

  typedef enum logic {APP_STEREO = 1'b0, APP_FLOW = 1'b1} app_e;

  // Run-time configuration, written once before a run and held constant.
  typedef struct packed {
    app_e        app;         // stereo matching or optical flow
    logic [2:0]  alpha;       // data-term weight 2**alpha (Eq. 1)
    logic [2:0]  beta;        // smoothness weight 2**beta (Eq. 1)
    logic [7:0]  tinv;        // round(16*log2(e)/T), inverse temperature in 4.4 fixed point
    logic [8:0]  num_labels;  // stereo: disparities 0..num_labels-1 are sampled
    logic [9:0]  iters;       // Gibbs iterations per run
  } mca_cfg_t;

  // Scale-up write travelling from a Little SPE to the Big SPEs of its group.
  // Widths cover the document's largest grids (Big MCA 60 x 8 of 12 x 160 tiles).
  typedef struct packed {
    logic       valid;
    logic [7:0] dq;      // destination Big SPE row
    logic [7:0] dr;      // destination Big SPE column
    logic [7:0] row;     // local row inside the destination tile
    logic [9:0] col;     // local column inside the destination tile
    logic [7:0] label;   // full-resolution label
  } su_wr_t;

endpackage
