// elink_receiver: all eLink input channels of the transceiver, NUM_GROUPS
// ePortRx groups of four channels each (28 channels by default).
//
// The groups are independent: each has its own reference DLL, phase
// aligners, phase selection, deserialiser and PRBS7 checkers, and its own
// data rate.  The uplink speed (10.24 or 5.12 Gbit/s) is common to all.  All
// groups run on the same 1.28 GHz clock and produce their frames on the same
// 40 MHz period.  Ports are the group ports, one array entry per group
// (see elink_group for their meaning and timing).
`timescale 1ps/1ps
module elink_receiver
  import elink_pkg::*;
#(
  parameter int unsigned NUM_GROUPS   = 7,
  parameter int unsigned WINDOW       = 32,
  parameter int unsigned LOCK_WINDOWS = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    up10g,
  input  rate_e                   rate         [NUM_GROUPS],
  input  mode_e                   mode         [NUM_GROUPS][CH_PER_GROUP],
  input  logic [PHASE_W-1:0]      static_phase [NUM_GROUPS][CH_PER_GROUP],
  input  logic [CH_PER_GROUP-1:0] ser_in       [NUM_GROUPS],
  input  logic                    prbs_clear,
  output logic [FRAME_BITS-1:0]   frame        [NUM_GROUPS],
  output logic [FRAME_BITS-1:0]   ch_word      [NUM_GROUPS][CH_PER_GROUP],
  output logic [NUM_GROUPS-1:0]   frame_valid,
  output logic [PHASE_W-1:0]      phase_sel    [NUM_GROUPS][CH_PER_GROUP],
  output logic [CH_PER_GROUP-1:0] locked       [NUM_GROUPS],
  output logic [NUM_GROUPS-1:0]   dll_locked,
  output logic [NUM_CELLS-1:0]    cell_en      [NUM_GROUPS][CH_PER_GROUP],
  output logic [NUM_CELLS-1:0]    buf_en       [NUM_GROUPS][CH_PER_GROUP],
  output logic [CH_PER_GROUP-1:0] window_done  [NUM_GROUPS],
  output logic [31:0]             prbs_bits    [NUM_GROUPS][CH_PER_GROUP],
  output logic [31:0]             prbs_errs    [NUM_GROUPS][CH_PER_GROUP]
);

  for (genvar g = 0; g < NUM_GROUPS; g++) begin : g_grp
    elink_group #(
      .WINDOW      (WINDOW),
      .LOCK_WINDOWS(LOCK_WINDOWS)
    ) u_grp (
      .clk         (clk),
      .rst_n       (rst_n),
      .rate        (rate[g]),
      .up10g       (up10g),
      .mode        (mode[g]),
      .static_phase(static_phase[g]),
      .ser_in      (ser_in[g]),
      .prbs_clear  (prbs_clear),
      .frame       (frame[g]),
      .ch_word     (ch_word[g]),
      .frame_valid (frame_valid[g]),
      .phase_sel   (phase_sel[g]),
      .locked      (locked[g]),
      .dll_locked  (dll_locked[g]),
      .cell_en     (cell_en[g]),
      .buf_en      (buf_en[g]),
      .window_done (window_done[g]),
      .prbs_bits   (prbs_bits[g]),
      .prbs_errs   (prbs_errs[g])
    );
  end

endmodule
