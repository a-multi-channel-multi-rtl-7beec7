// elink_group: one ePortRx group of four eLink input channels.
//
// Four phase aligners share one reference DLL, which keeps every delay cell
// at T_bit/8 over process, voltage and temperature.  Each aligner recovers the
// bits of its channel at the sampling instant chosen by its own phase
// selection; the deserialiser packs the recovered bits of the channels in use
// into one 40 MHz frame (1 x 1280, 2 x 640 or 4 x 320 Mbit/s at a 10.24 Gbit/s
// uplink; 1 x 640, 2 x 320 or 4 x 160 Mbit/s at 5.12 Gbit/s).  A PRBS7 checker
// per channel counts bit errors of the recovered stream.
//
// Clocking: a single 1.28 GHz clock.  A 5-bit counter gives the position in
// the 40 MHz period; the bit clock of the group's rate is the enable
// cnt % cycles_per_bit(rate) == 0, and the deserialiser's divided clocks are
// enables of the same counter.  Recovered bits appear one cycle after the
// sampling edge; a frame appears on frame_valid once per 32 cycles.
//
//   clk, rst_n        1.28 GHz clock, asynchronous active-low reset
//   rate, up10g       data rate of the group, uplink speed (10.24 / 5.12 G)
//   mode, static_phase  per-channel phase-selection setup
//   ser_in            serial inputs (single-ended, after the input receiver)
//   prbs_clear        clears the PRBS7 counters
//   frame, ch_word, frame_valid   deserialised data (see elink_deserializer)
//   phase_sel, locked per-channel phase selection status
//   dll_locked        reference DLL in lock
//   cell_en, buf_en   per-channel delay-line enables
//   window_done       per-channel end-of-decision-window strobes
//   prbs_bits, prbs_errs  per-channel PRBS7 counters
//
// The group of four channels with a shared DLL and one deserialiser follows
// the published block; single-clock operation with enables is this design's
// choice.
// Lint reports the serial inputs and the delay-line taps as signals used both
// by event-driven logic (the behavioural delay cells) and by flip-flops (the
// sampler); that is how an analog delay line feeding samplers is modelled.
`timescale 1ps/1ps
module elink_group
  import elink_pkg::*;
#(
  parameter int unsigned WINDOW       = 32,
  parameter int unsigned LOCK_WINDOWS = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  rate_e                   rate,
  input  logic                    up10g,
  input  mode_e                   mode         [CH_PER_GROUP],
  input  logic [PHASE_W-1:0]      static_phase [CH_PER_GROUP],
  input  logic [CH_PER_GROUP-1:0] ser_in,
  input  logic                    prbs_clear,
  output logic [FRAME_BITS-1:0]   frame,
  output logic [FRAME_BITS-1:0]   ch_word      [CH_PER_GROUP],
  output logic                    frame_valid,
  output logic [PHASE_W-1:0]      phase_sel    [CH_PER_GROUP],
  output logic [CH_PER_GROUP-1:0] locked,
  output logic                    dll_locked,
  output logic [NUM_CELLS-1:0]    cell_en      [CH_PER_GROUP],
  output logic [NUM_CELLS-1:0]    buf_en       [CH_PER_GROUP],
  output logic [CH_PER_GROUP-1:0] window_done,
  output logic [31:0]             prbs_bits    [CH_PER_GROUP],
  output logic [31:0]             prbs_errs    [CH_PER_GROUP]
);

  logic [4:0]              cnt;
  logic                    sample_en;
  logic                    bit_valid;
  int unsigned             cell_delay_ps;
  logic [CH_PER_GROUP-1:0] ser_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      bit_valid <= 1'b0;
    end else begin
      cnt       <= cnt + 1'b1;
      bit_valid <= sample_en;
    end
  end

  assign sample_en = (int'(cnt) % int'(cycles_per_bit(rate))) == 0;

  elink_dll u_dll (
    .clk_fast     (clk),
    .rst_n        (rst_n),
    .rate         (rate),
    .cell_delay_ps(cell_delay_ps),
    .locked       (dll_locked)
  );

  for (genvar c = 0; c < CH_PER_GROUP; c++) begin : g_ch
    elink_phase_aligner #(
      .WINDOW      (WINDOW),
      .LOCK_WINDOWS(LOCK_WINDOWS)
    ) u_pa (
      .clk          (clk),
      .rst_n        (rst_n),
      .sample_en    (sample_en),
      .ser_in       (ser_in[c]),
      .rate         (rate),
      .mode         (mode[c]),
      .static_phase (static_phase[c]),
      .cell_delay_ps(cell_delay_ps),
      .ser_data     (ser_data[c]),
      .phase_sel    (phase_sel[c]),
      .locked       (locked[c]),
      .cell_en      (cell_en[c]),
      .buf_en       (buf_en[c]),
      .window_done  (window_done[c])
    );

    elink_prbs7_checker u_prbs (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (bit_valid && channel_active(rate, up10g, c)),
      .din    (ser_data[c]),
      .clear  (prbs_clear),
      .bit_cnt(prbs_bits[c]),
      .err_cnt(prbs_errs[c])
    );
  end

  elink_deserializer u_deser (
    .clk        (clk),
    .rst_n      (rst_n),
    .rate       (rate),
    .up10g      (up10g),
    .cnt        (cnt),
    .ch_data    (ser_data),
    .frame      (frame),
    .ch_word    (ch_word),
    .frame_valid(frame_valid)
  );

endmodule
