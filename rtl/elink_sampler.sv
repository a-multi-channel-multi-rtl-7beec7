// elink_sampler: samples every phase of a replica delay line, flags where the
// data edges are, and selects the output sample.
//
// On each sampling-clock edge (a clk edge with sample_en high) all NUM_PHASES
// delayed copies of the input are captured.  Neighbouring phases are T_bit/8
// apart, so a data transition that falls on the clock edge leaves the phase
// sampled right at the transition undecided ("random") while the phases on
// either side of it differ.  The edge flag of phase k therefore compares the
// two phases around it:
//     e[k] = sampled[k-1] ^ sampled[k+1]          (k = 1 .. NUM_PHASES-2)
// which is 1 for every transition that falls at phase k, random for the phases
// next to it and 0 further away.  e[0] and e[NUM_PHASES-1] are always 0.
// ser_data_out is the sample of the selected phase.
//
//   clk, rst_n     fast clock and asynchronous active-low reset
//   sample_en      one cycle per bit: the sampling-clock edge
//   phase          asynchronous delayed copies of the input
//   sel            selected phase
//   sampled        the registered samples
//   edges          edge flags, valid while edges_valid is high
//   ser_data_out   recovered bit, updated one cycle after sample_en
//
// Sampling all phases, comparing samples and muxing the selected one follow
// the published circuit; comparing phases k-1 and k+1 for e[k] is read from
// the published pattern (e[1] 0, e[2] random, e[3] 1, e[4] random, e[5] 0).
// The single register stage and the valid strobe are this design's choices.
`timescale 1ps/1ps
module elink_sampler
  import elink_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sample_en,
  input  logic [NUM_PHASES-1:0] phase,
  input  logic [PHASE_W-1:0]    sel,
  output logic [NUM_PHASES-1:0] sampled,
  output logic [NUM_PHASES-1:0] edges,
  output logic                  edges_valid,
  output logic                  ser_data_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sampled     <= '0;
      edges_valid <= 1'b0;
    end else begin
      edges_valid <= sample_en;
      if (sample_en) sampled <= phase;
    end
  end

  always_comb begin
    edges = '0;
    for (int k = 1; k < NUM_PHASES - 1; k++) edges[k] = sampled[k-1] ^ sampled[k+1];
  end

  assign ser_data_out = (int'(sel) < NUM_PHASES) ? sampled[sel] : 1'b0;

endmodule
