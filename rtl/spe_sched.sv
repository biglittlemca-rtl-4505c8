// spe_sched: the scheduler of one SPE.  It sequences label randomisation and
// Gibbs sampling of the SPE's N x M tile; the SPE datapath decodes its
// outputs into memory accesses.
//
// Randomise (start_rand): one cycle per variable, rnd_en with rnd_addr.
// Sample (start_sample): iters iterations, each a red and a black phase of the
// checkerboard ("chromatic") schedule, so that no pixel is sampled while a
// neighbour is.  A phase walks its K = N*M/2 pixels row by row in slots of
// NL = 2**LABEL_W cycles; cyc counts the cycles of a slot.  Four pixels
// overlap in a slot s:
//   f: pixel s    - neighbour labels and IMG1 are fetched (cycles 0..4)
//   a: pixel s-1  - IMG2 is read and the energy of label cyc computed
//   b: pixel s-2  - energies are converted and sampled, label cyc
//   w: pixel s-3  - the drawn label is written back (cycle 4)
// A phase therefore lasts (K+3)*NL cycles and a run 2*iters*(K+3)*NL + 1.
// busy covers a whole operation, done pulses in its last cycle.  All SPEs of
// an MCA start together and so stay in lockstep, which the neighbour exchange
// relies on.  The checkerboard order follows the document; slot layout and
// overlap are this design's.  N*M must be even and M even, so that every row
// has M/2 pixels of each colour.
module spe_sched #(
  parameter int unsigned N_ROWS  = 12,
  parameter int unsigned N_COLS  = 160,
  parameter int unsigned LABEL_W = 8,
  localparam int unsigned RW = $clog2(N_ROWS) > 0 ? $clog2(N_ROWS) : 1,
  localparam int unsigned CW = $clog2(N_COLS) > 0 ? $clog2(N_COLS) : 1,
  localparam int unsigned AW = $clog2(N_ROWS * N_COLS),
  localparam int unsigned K  = N_ROWS * N_COLS / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_rand,
  input  logic               start_sample,
  input  logic [9:0]         iters,
  output logic               busy,
  output logic               done,
  // randomisation
  output logic               rnd_en,
  output logic [AW-1:0]      rnd_addr,
  // sampling
  output logic               smp,        // sampling in progress
  output logic [LABEL_W-1:0] cyc,
  output logic               f_valid,
  output logic [RW-1:0]      f_i,
  output logic [CW-1:0]      f_j,
  output logic               a_valid,
  output logic               a_bank,
  output logic [RW-1:0]      a_i,
  output logic [CW-1:0]      a_j,
  output logic               b_valid,
  output logic               b_bank,
  output logic               w_valid,
  output logic [RW-1:0]      w_i,
  output logic [CW-1:0]      w_j
);
  localparam int unsigned SW = $clog2(K + 3) + 1;

  typedef enum logic [1:0] {S_IDLE, S_RAND, S_SAMPLE} state_e;
  state_e state;

  logic [AW-1:0]      raddr;
  logic [LABEL_W-1:0] cyc_q;
  logic [SW-1:0]      slot;
  logic               color;
  logic [9:0]         iter;
  logic [RW-1:0]      pi, ai, bi, wi;
  logic [CW-1:0]      pj, aj, bj, wj;
  logic               av, bv, wv;
  logic               slot_end, phase_end, run_end;

  assign slot_end  = (cyc_q == LABEL_W'((1 << LABEL_W) - 1));
  assign phase_end = slot_end && (slot == SW'(K + 2));
  assign run_end   = phase_end && color && (iter == iters - 10'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      raddr <= '0;
      cyc_q <= '0;
      slot  <= '0;
      color <= 1'b0;
      iter  <= '0;
      pi <= '0; pj <= '0;
      ai <= '0; aj <= '0; av <= 1'b0;
      bi <= '0; bj <= '0; bv <= 1'b0;
      wi <= '0; wj <= '0; wv <= 1'b0;
    end else begin
      case (state)
        S_IDLE: begin
          raddr <= '0;
          cyc_q <= '0;
          slot  <= '0;
          color <= 1'b0;
          iter  <= '0;
          pi    <= '0;
          pj    <= '0;
          av <= 1'b0; bv <= 1'b0; wv <= 1'b0;
          if (start_rand)                        state <= S_RAND;
          else if (start_sample && iters != '0)  state <= S_SAMPLE;
        end
        S_RAND: begin
          raddr <= raddr + AW'(1);
          if (raddr == AW'(N_ROWS * N_COLS - 1)) state <= S_IDLE;
        end
        S_SAMPLE: begin
          cyc_q <= cyc_q + LABEL_W'(1);
          if (slot_end) begin
            // shift the pixel pipeline f -> a -> b -> w
            ai <= pi; aj <= pj; av <= (slot < SW'(K));
            bi <= ai; bj <= aj; bv <= av;
            wi <= bi; wj <= bj; wv <= bv;
            if (slot < SW'(K)) begin
              if (32'(pj) + 2 < N_COLS) pj <= pj + CW'(2);
              else begin
                pi <= pi + RW'(1);
                pj <= CW'((32'(pi) + 1 + 32'(color)) & 1);
              end
            end
            slot <= slot + SW'(1);
            if (phase_end) begin
              slot  <= '0;
              color <= ~color;
              pi    <= '0;
              pj    <= color ? CW'(0) : CW'(1);   // first pixel of the next colour
              av <= 1'b0; bv <= 1'b0; wv <= 1'b0;
              if (color) iter <= iter + 10'd1;
              if (run_end) state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign done     = (state == S_RAND && raddr == AW'(N_ROWS * N_COLS - 1)) ||
                    (state == S_SAMPLE && run_end);
  assign rnd_en   = (state == S_RAND);
  assign rnd_addr = raddr;
  assign smp      = (state == S_SAMPLE);
  assign cyc      = cyc_q;
  assign f_valid  = smp && (slot < SW'(K));
  assign f_i      = pi;
  assign f_j      = pj;
  assign a_valid  = smp && av;
  assign a_bank   = ~slot[0];            // pixel s-1 parity
  assign a_i      = ai;
  assign a_j      = aj;
  assign b_valid  = smp && bv;
  assign b_bank   = slot[0];             // pixel s-2 parity
  assign w_valid  = smp && wv;
  assign w_i      = wi;
  assign w_j      = wj;

  initial begin
    assert (N_COLS % 2 == 0) else $error("spe_sched: N_COLS must be even");
    assert ((1 << LABEL_W) >= 8) else $error("spe_sched: slots need at least 8 cycles");
  end
endmodule
