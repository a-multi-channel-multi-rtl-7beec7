// elink_delay_line: behavioural model of one replica delay line (not
// synthesizable logic: it stands for the full-custom analog delay line).
//
// NUM_CELLS delay cells are chained; cell k delays the data by cell_delay_ps,
// the value the reference DLL locks to T_bit/8 (T_bit/16 at 160 Mbit/s).
// Of the NUM_CELLS cell outputs only 14 are presented, together with the
// undelayed input, as the 15 phases 0..14:
//   - 320/640/1280 Mbit/s: phase p = output of cell p   (cells 1..14)
//   - 160 Mbit/s:          phase p = output of cell 2p  (cells 2,4,..,28)
// so the phases are T_bit/8 apart and span 1.75 T_bit at every rate.
//
//   in            serial data from the input receiver
//   rate          data rate of the channel (selects which outputs are presented)
//   cell_en[k]    power enable of cell k+1
//   buf_en[k]     output enable of cell k+1
//   cell_delay_ps delay of one full cell (the DLL control), picoseconds
//   phase[p]      the 15 delayed copies of the input
//
// The cell count, the even-output scheme at 160 Mbit/s and the enables follow
// the published line.  Phase 0 being the undelayed input is this model's
// reading of the 15 phases (0..14) against 14 presented outputs.
`timescale 1ps/1ps
module elink_delay_line
  import elink_pkg::*;
#(
  parameter int unsigned NCELLS = NUM_CELLS
) (
  input  logic                  in,
  input  rate_e                 rate,
  input  logic [NCELLS-1:0]     cell_en,
  input  logic [NCELLS-1:0]     buf_en,
  input  int unsigned           cell_delay_ps,
  output logic [NUM_PHASES-1:0] phase
);

  logic [NCELLS:0] chain;   // chain[k] = output of cell k, chain[0] = input
  logic [NCELLS:0] tap;     // tap[k]   = gated tap of cell k, tap[0] = input
  int unsigned     half_ps;

  assign half_ps  = cell_delay_ps / 2;
  assign chain[0] = in;
  assign tap[0]   = in;

  for (genvar k = 1; k <= NCELLS; k++) begin : g_cell
    elink_delay_cell u_cell (
      .in           (chain[k-1]),
      .cell_en      (cell_en[k-1]),
      .buf_en       (buf_en[k-1]),
      .half_delay_ps(half_ps),
      .out          (chain[k]),
      .tap          (tap[k])
    );
  end

  always_comb begin
    for (int p = 0; p < NUM_PHASES; p++) begin
      if (rate == RATE_160) phase[p] = (2 * p <= NCELLS) ? tap[2 * p] : 1'b0;
      else                  phase[p] = (p <= NCELLS) ? tap[p] : 1'b0;
    end
  end

endmodule
