// scaleup_dispatch: the static scale-up schedule of one Little SPE.
//
// After low-resolution burn-in, every Little label is copied, by nearest-
// neighbour scaling, onto the S x S full-resolution pixels it stands for in
// the Big MCA (S = 2 or 10).  For each variable (i, j) of its tile the unit
// reads the label from the Little SPE's bank (rd_en/rd_addr, data one cycle
// later), scales it, and then issues S*S writes, one per cycle, on wr: the
// destination Big SPE (dq, dr) and the local row/column inside that SPE's
// tile.  Writes whose destination lies outside the Big grid (padding of the
// low-resolution frame) are dropped.  Each variable takes S*S + 2 cycles.
// Labels are displacements and shrink with the image, so they are scaled
// back up: stereo l -> min(S*l, num_labels-1); optical flow scales each
// component offset by S and clamps it to the Big radius.
// The dispatch from the Little side, the nearest-neighbour copy and the
// label rescaling follow the document; the serial order and the clamping are
// this design's.
module scaleup_dispatch
  import mca_pkg::*;
#(
  parameter int unsigned NL_ROWS  = 12,   // Little tile
  parameter int unsigned NL_COLS  = 160,
  parameter int unsigned NB_ROWS  = 12,   // Big tile
  parameter int unsigned NB_COLS  = 160,
  parameter int unsigned QB_ROWS  = 60,   // Big grid
  parameter int unsigned QB_COLS  = 8,
  parameter int unsigned LW_LITTLE = 6,
  parameter int unsigned LW_BIG    = 8,
  localparam int unsigned AW = $clog2(NL_ROWS * NL_COLS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [3:0]           scale,        // S
  input  app_e                 app,
  input  logic [8:0]           num_labels,   // Big stereo label count
  input  logic [7:0]           tile_row,     // this Little SPE's grid position
  input  logic [7:0]           tile_col,
  output logic                 rd_en,
  output logic [AW-1:0]        rd_addr,
  input  logic [LW_LITTLE-1:0] rd_data,
  output su_wr_t               wr,
  output logic                 busy,
  output logic                 done
);
  localparam int HL = int'(LW_LITTLE / 2);
  localparam int HB = int'(LW_BIG / 2);
  localparam int RL = (1 << (HL - 1)) - 1;   // Little flow radius
  localparam int RB = (1 << (HB - 1)) - 1;   // Big flow radius

  typedef enum logic [1:0] {D_IDLE, D_READ, D_WAIT, D_DISP} state_e;
  state_e state;

  int unsigned         vi, vj, dy, dx;
  logic [LW_BIG-1:0]   lab_q, lab_s;
  int                  sf, ox, oy, sx, sy, ls;
  int                  gy, gx;

  // scaled label
  always_comb begin
    sf = int'(scale);
    ox = int'(rd_data[LW_LITTLE-1 -: HL]) - RL;
    oy = int'(rd_data[HL-1:0]) - RL;
    sx = ox * sf;
    sy = oy * sf;
    if (sx >  RB) sx =  RB;
    if (sx < -RB) sx = -RB;
    if (sy >  RB) sy =  RB;
    if (sy < -RB) sy = -RB;
    ls = int'(rd_data) * sf;
    if (ls > int'(num_labels) - 1) ls = int'(num_labels) - 1;
    if (ls < 0) ls = 0;
    if (app == APP_STEREO) lab_s = LW_BIG'(ls);
    else                   lab_s = {HB'(sx + RB), HB'(sy + RB)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      vi <= 0; vj <= 0; dy <= 0; dx <= 0;
      lab_q <= '0;
    end else begin
      case (state)
        D_IDLE: if (start) begin
          state <= D_READ;
          vi <= 0; vj <= 0;
        end
        D_READ: state <= D_WAIT;
        D_WAIT: begin
          lab_q <= lab_s;
          dy <= 0; dx <= 0;
          state <= D_DISP;
        end
        D_DISP: begin
          if (dx + 1 < int'(scale)) dx <= dx + 1;
          else begin
            dx <= 0;
            if (dy + 1 < int'(scale)) dy <= dy + 1;
            else begin
              state <= D_READ;
              if (vj + 1 < NL_COLS) vj <= vj + 1;
              else begin
                vj <= 0;
                if (vi + 1 < NL_ROWS) vi <= vi + 1;
                else state <= D_IDLE;
              end
            end
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign rd_en   = (state == D_READ);
  assign rd_addr = AW'(vi * NL_COLS + vj);
  assign busy    = (state != D_IDLE);
  assign done    = (state == D_DISP) && (dx + 1 >= int'(scale)) && (dy + 1 >= int'(scale)) &&
                   (vj + 1 >= NL_COLS) && (vi + 1 >= NL_ROWS);

  always_comb begin
    gy = int'(scale) * (int'(tile_row) * int'(NL_ROWS) + int'(vi)) + int'(dy);
    gx = int'(scale) * (int'(tile_col) * int'(NL_COLS) + int'(vj)) + int'(dx);
    wr.valid = (state == D_DISP) && (gy / int'(NB_ROWS) < int'(QB_ROWS)) &&
               (gx / int'(NB_COLS) < int'(QB_COLS));
    wr.dq    = 8'(gy / int'(NB_ROWS));
    wr.dr    = 8'(gx / int'(NB_COLS));
    wr.row   = 8'(gy % int'(NB_ROWS));
    wr.col   = 10'(gx % int'(NB_COLS));
    wr.label = 8'(lab_q);
  end
endmodule
