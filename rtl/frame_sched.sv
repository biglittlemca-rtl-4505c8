// frame_sched: the accelerator-level scheduler that sequences a frame through
// the Little MCA, the scale-up network and the Big MCA.
//
// randomize (pulse) asks the Little MCA to randomise its label states; start
// (pulse) starts low-resolution burn-in of a frame on the Little MCA.  When
// the Little MCA finishes, its state is held until the Big MCA is idle; then
// the scale-up transfer runs, after which the Little MCA is free for the next
// frame while the Big MCA samples this one at full resolution, so that burn-in
// of one frame overlaps full-resolution sampling of the previous one.
// frame_done pulses when the Big MCA finishes; its labels are then held until
// the host has read them out and loaded the next full-resolution image, and
// pulses big_release.  Each *_go output is a
// one-cycle command pulse; the matching *_done input is the pulse that ends
// it.  little_idle and big_idle tell the host when it may stream a new image
// into that MCA (big_idle also covers the held-result state, when read-out is
// allowed).  The overlap and the two control inputs follow the document;
// the handshakes are this design's.
module frame_sched (
  input  logic clk,
  input  logic rst_n,
  input  logic randomize,
  input  logic start,
  input  logic big_release,
  output logic little_rand_go,
  output logic little_sample_go,
  input  logic little_done,
  output logic xfer_go,
  input  logic xfer_done,
  output logic big_sample_go,
  input  logic big_done,
  output logic little_idle,
  output logic big_idle,
  output logic frame_done
);
  typedef enum logic [2:0] {L_IDLE, L_RAND, L_SAMPLE, L_HOLD, L_XFER} lstate_e;
  typedef enum logic [1:0] {B_IDLE, B_XFER, B_SAMPLE, B_DONE} bstate_e;
  lstate_e ls;
  bstate_e bs;

  logic xfer_start;
  assign xfer_start = (ls == L_HOLD) && (bs == B_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ls <= L_IDLE;
      bs <= B_IDLE;
    end else begin
      case (ls)
        L_IDLE:   if (randomize) ls <= L_RAND;
                  else if (start) ls <= L_SAMPLE;
        L_RAND:   if (little_done) ls <= L_IDLE;
        L_SAMPLE: if (little_done) ls <= L_HOLD;
        L_HOLD:   if (xfer_start) ls <= L_XFER;
        L_XFER:   if (xfer_done) ls <= L_IDLE;
        default:  ls <= L_IDLE;
      endcase
      case (bs)
        B_IDLE:   if (xfer_start) bs <= B_XFER;
        B_XFER:   if (xfer_done) bs <= B_SAMPLE;
        B_SAMPLE: if (big_done) bs <= B_DONE;
        B_DONE:   if (big_release) bs <= B_IDLE;
        default:  bs <= B_IDLE;
      endcase
    end
  end

  assign little_rand_go   = (ls == L_IDLE) && randomize;
  assign little_sample_go = (ls == L_IDLE) && !randomize && start;
  assign xfer_go          = xfer_start;
  assign big_sample_go    = (bs == B_XFER) && xfer_done;
  assign little_idle      = (ls == L_IDLE);
  assign big_idle         = (bs == B_IDLE) || (bs == B_DONE);
  assign frame_done       = (bs == B_SAMPLE) && big_done;
endmodule
