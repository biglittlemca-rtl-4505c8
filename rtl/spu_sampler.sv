// spu_sampler: draws one label from a stream of unnormalised probabilities,
// the third SPU stage.
//
// The weights of one pixel arrive one per cycle (in_valid, first on the first
// label, last on the final one).  The unit keeps the running sum S of the
// weights and a current choice; label l with weight w replaces the choice when
// u * S_l < w * 2**16, u being a fresh 16-bit uniform number.  This
// single-pass weighted reservoir rule leaves label l chosen with probability
// w_l / S_total, so one label per cycle is consumed and no second pass over
// the labels is needed.  One cycle after the last label, out_valid pulses with
// out_label.  The document only names the sampler; this rule is this design's.
module spu_sampler
  import mca_pkg::*;
#(
  parameter int unsigned LABEL_W = 8,
  localparam int unsigned SW = W_W + LABEL_W   // sum of up to 2**LABEL_W weights
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               first,
  input  logic               last,
  input  logic [W_W-1:0]     weight,
  input  logic [LABEL_W-1:0] label,
  input  logic [15:0]        u,
  output logic               out_valid,
  output logic [LABEL_W-1:0] out_label
);
  logic [SW-1:0]      sum_q, sum_n;
  logic [LABEL_W-1:0] sel_q;
  logic [SW+15:0]     lhs, rhs;
  logic               take;

  always_comb begin
    sum_n = (first ? '0 : sum_q) + SW'(weight);
    lhs   = (SW+16)'(u) * (SW+16)'(sum_n);
    rhs   = (SW+16)'(weight) << 16;
    take  = first || ((weight != '0) && (lhs < rhs));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q     <= '0;
      sel_q     <= '0;
      out_valid <= 1'b0;
      out_label <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sum_q <= sum_n;
        if (take) sel_q <= label;
        if (last) begin
          out_valid <= 1'b1;
          out_label <= take ? label : sel_q;
        end
      end
    end
  end
endmodule
