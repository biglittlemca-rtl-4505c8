// scaleup_net: the Little-to-Big scale-up interconnect.
//
// Because the Big grid's dimensions are integer multiples of the Little
// grid's and only fixed scale factors are supported, every Big SPE receives
// scale-up writes from exactly one Little SPE per factor, and different
// Little SPEs feed disjoint sets of Big SPEs.  One static single-hop network
// is therefore built per factor (SCALE0, SCALE1): Big SPE (q, r) listens to
// Little SPE (q*NB_ROWS / (S*NL_ROWS), r*NB_COLS / (S*NL_COLS)), and
// scale_sel picks the active network at run time.  A Big SPE accepts a write
// addressed to its own grid position and turns it into a label-bank write.
// Purely combinational.  The structure is that of Fig. 5 of the document;
// the write format is this design's.
module scaleup_net
  import mca_pkg::*;
#(
  parameter int unsigned QL_ROWS = 30,
  parameter int unsigned QL_COLS = 4,
  parameter int unsigned NL_ROWS = 12,
  parameter int unsigned NL_COLS = 160,
  parameter int unsigned QB_ROWS = 60,
  parameter int unsigned QB_COLS = 8,
  parameter int unsigned NB_ROWS = 12,
  parameter int unsigned NB_COLS = 160,
  parameter int unsigned SCALE0  = 2,
  parameter int unsigned SCALE1  = 10,
  parameter int unsigned LW_BIG  = 8,
  localparam int unsigned AW = $clog2(NB_ROWS * NB_COLS)
) (
  input  su_wr_t [QL_ROWS-1:0][QL_COLS-1:0]              little_wr,
  input  logic                                            scale_sel,
  output logic   [QB_ROWS-1:0][QB_COLS-1:0]              rx_en,
  output logic   [QB_ROWS-1:0][QB_COLS-1:0][AW-1:0]      rx_addr,
  output logic   [QB_ROWS-1:0][QB_COLS-1:0][LW_BIG-1:0]  rx_label
);
  for (genvar q = 0; q < QB_ROWS; q++) begin : g_row
    for (genvar r = 0; r < QB_COLS; r++) begin : g_col
      localparam int unsigned A0 = q * NB_ROWS / (SCALE0 * NL_ROWS);
      localparam int unsigned B0 = r * NB_COLS / (SCALE0 * NL_COLS);
      localparam int unsigned A1 = q * NB_ROWS / (SCALE1 * NL_ROWS);
      localparam int unsigned B1 = r * NB_COLS / (SCALE1 * NL_COLS);
      su_wr_t w0, w1, w;
      assign w0 = (A0 < QL_ROWS && B0 < QL_COLS) ?
                  little_wr[(A0 < QL_ROWS) ? A0 : 0][(B0 < QL_COLS) ? B0 : 0] : '0;
      assign w1 = (A1 < QL_ROWS && B1 < QL_COLS) ?
                  little_wr[(A1 < QL_ROWS) ? A1 : 0][(B1 < QL_COLS) ? B1 : 0] : '0;
      assign w  = scale_sel ? w1 : w0;
      assign rx_en[q][r]    = w.valid && (32'(w.dq) == q) && (32'(w.dr) == r);
      assign rx_addr[q][r]  = AW'(32'(w.row) * NB_COLS + 32'(w.col));
      assign rx_label[q][r] = LW_BIG'(w.label);
    end
  end
endmodule
