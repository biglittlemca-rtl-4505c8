// spu: stochastic processing unit, the Gibbs sampling functional unit of an
// SPE.  It chains the three stages the document describes: energy
// computation (spu_energy), energy-to-probability conversion (spu_e2p) and the
// sampler (spu_sampler), and sustains one label per clock cycle.
//
// Two pixels are in flight at once.  Stream A feeds the labels of pixel k, one
// per cycle, with the IMG2 pixel each label points at; their energies are
// written into energy bank a_bank and the bank's minimum is tracked.  Stream B
// replays the stored energies of pixel k-1 from the other bank (ping-pong),
// converts them against that bank's now final minimum and samples.  Stream B
// may start on a bank once the A stream of that bank has delivered its last
// label at least one cycle earlier.  The energy read is registered: a B
// request for label l is converted and sampled in the next cycle, and the drawn
// label appears on sample_valid/sample_label one cycle after the last one.
// Banks, minimum tracking and this two-stream pipeline are this design's
// choices; the stage functions follow the document.
module spu
  import mca_pkg::*;
#(
  parameter int unsigned LABEL_W = 8,
  localparam int unsigned NL = 1 << LABEL_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  mca_cfg_t                    cfg,
  // stream A: energy computation
  input  logic                        a_valid,
  input  logic                        a_first,
  input  logic                        a_bank,
  input  logic [LABEL_W-1:0]          a_label,
  input  logic                        a_legal,
  input  logic [PIX_W-1:0]            a_img1,
  input  logic [PIX_W-1:0]            a_img2,
  input  logic [NDIR-1:0][LABEL_W-1:0] a_nb_label,
  input  logic [NDIR-1:0]             a_nb_present,
  // stream B: conversion and sampling
  input  logic                        b_valid,
  input  logic                        b_first,
  input  logic                        b_last,
  input  logic                        b_bank,
  input  logic [LABEL_W-1:0]          b_label,
  input  logic [15:0]                 rnd,
  output logic                        sample_valid,
  output logic [LABEL_W-1:0]          sample_label
);
  // energy banks: one legal flag plus the energy per label
  logic [E_W:0]   ebuf [2][NL];
  logic [E_W-1:0] emin [2];
  logic [E_W-1:0] a_energy;

  spu_energy #(.LABEL_W(LABEL_W)) u_energy (
    .app(cfg.app), .alpha(cfg.alpha), .beta(cfg.beta),
    .label(a_label), .img1(a_img1), .img2(a_img2),
    .nb_label(a_nb_label), .nb_present(a_nb_present),
    .energy(a_energy)
  );

  always_ff @(posedge clk) begin
    if (a_valid) ebuf[a_bank][a_label] <= {a_legal, a_energy};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      emin[0] <= '1;
      emin[1] <= '1;
    end else if (a_valid) begin
      if (a_first)                          emin[a_bank] <= a_legal ? a_energy : '1;
      else if (a_legal && a_energy < emin[a_bank]) emin[a_bank] <= a_energy;
    end
  end

  // stream B, registered energy read
  logic               r_valid, r_first, r_last, r_bank;
  logic [LABEL_W-1:0] r_label;
  logic [E_W:0]       r_entry;
  logic [W_W-1:0]     r_weight;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_valid <= 1'b0;
      r_first <= 1'b0;
      r_last  <= 1'b0;
      r_bank  <= 1'b0;
      r_label <= '0;
    end else begin
      r_valid <= b_valid;
      r_first <= b_first;
      r_last  <= b_last;
      r_bank  <= b_bank;
      r_label <= b_label;
    end
  end

  always_ff @(posedge clk) begin
    if (b_valid) r_entry <= ebuf[b_bank][b_label];
  end

  spu_e2p u_e2p (
    .energy(r_entry[E_W-1:0]), .emin(emin[r_bank]), .legal(r_entry[E_W]),
    .tinv(cfg.tinv), .weight(r_weight)
  );

  spu_sampler #(.LABEL_W(LABEL_W)) u_sampler (
    .clk, .rst_n,
    .in_valid(r_valid), .first(r_first), .last(r_last),
    .weight(r_weight), .label(r_label), .u(rnd),
    .out_valid(sample_valid), .out_label(sample_label)
  );
endmodule
