// elink_phase_aligner: one eLink input channel, from serial input to
// recovered bit.
//
// The input passes a replica delay line whose 15 phases are T_bit/8 apart and
// span 1.75 bit periods.  All phases are sampled on the bit clock; the edge
// flags of the samples drive the phase-selection state machine, which picks
// the phase farthest from the data transitions (or uses the static phase),
// and the sample of that phase is the recovered bit.  The enable control
// powers down the parts of the delay line that the current mode does not
// need.
//
//   clk, rst_n     1.28 GHz clock, asynchronous active-low reset
//   sample_en      sampling-clock edge (one cycle per bit)
//   ser_in         serial data from the input receiver, arbitrary phase
//   rate           data rate; mode, static_phase: phase-selection setup
//   cell_delay_ps  cell delay from the shared reference DLL
//   ser_data       recovered bit, valid one cycle after sample_en
//   phase_sel      phase in use; locked: see elink_phase_selector
//   cell_en, buf_en  delay-line enables (brought out to observe power saving)
//   window_done    end of a phase-selection window
//
// The structure (replica line, sampling of all phases, edge detection,
// selection FSM, output selection) follows the published phase aligner.
// The sampler's raw samples (`sampled`) are not used here; they are kept on
// the sampler's interface for observation, so lint reports them unused.
// Lint also reports ser_in as both clocked and event-driven: it feeds the
// behavioural delay line whose taps the sampler's flip-flops capture.
`timescale 1ps/1ps
module elink_phase_aligner
  import elink_pkg::*;
#(
  parameter int unsigned WINDOW       = 32,
  parameter int unsigned LOCK_WINDOWS = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sample_en,
  input  logic                 ser_in,
  input  rate_e                rate,
  input  mode_e                mode,
  input  logic [PHASE_W-1:0]   static_phase,
  input  int unsigned          cell_delay_ps,
  output logic                 ser_data,
  output logic [PHASE_W-1:0]   phase_sel,
  output logic                 locked,
  output logic [NUM_CELLS-1:0] cell_en,
  output logic [NUM_CELLS-1:0] buf_en,
  output logic                 window_done
);

  logic [NUM_PHASES-1:0] phase;
  logic [NUM_PHASES-1:0] sampled;
  logic [NUM_PHASES-1:0] edges;
  logic                  edges_valid;
  logic                  power_save;

  elink_dl_ctrl u_ctrl (
    .rate      (rate),
    .power_save(power_save),
    .phase_sel (phase_sel),
    .cell_en   (cell_en),
    .buf_en    (buf_en)
  );

  elink_delay_line u_line (
    .in           (ser_in),
    .rate         (rate),
    .cell_en      (cell_en),
    .buf_en       (buf_en),
    .cell_delay_ps(cell_delay_ps),
    .phase        (phase)
  );

  elink_sampler u_sampler (
    .clk         (clk),
    .rst_n       (rst_n),
    .sample_en   (sample_en),
    .phase       (phase),
    .sel         (phase_sel),
    .sampled     (sampled),
    .edges       (edges),
    .edges_valid (edges_valid),
    .ser_data_out(ser_data)
  );

  elink_phase_selector #(
    .WINDOW      (WINDOW),
    .LOCK_WINDOWS(LOCK_WINDOWS)
  ) u_fsm (
    .clk         (clk),
    .rst_n       (rst_n),
    .edges_valid (edges_valid),
    .edges       (edges),
    .mode        (mode),
    .static_phase(static_phase),
    .phase_sel   (phase_sel),
    .locked      (locked),
    .power_save  (power_save),
    .window_done (window_done)
  );

endmodule
