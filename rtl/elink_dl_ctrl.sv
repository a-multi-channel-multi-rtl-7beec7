// elink_dl_ctrl: cell and output-buffer enables of one replica delay line.
//
// The line has NCELLS cells; which of them matter depends on the data rate
// and on whether all phases are watched:
//   - all phases (automatic search and tracking): cells 1..14 are powered at
//     320/640/1280 Mbit/s and cells 1..28 at 160 Mbit/s; the output buffers of
//     the presented cells (1..14, or the even cells 2..28) are on.
//   - power save (static phase, or phase frozen after start-up): only the
//     cells up to the one whose output is the selected phase are powered, so
//     the signal stops there, and only that cell's output buffer is on.
// Cells beyond the last one used are always powered down.  The logic is
// purely combinational.
//
//   rate        data rate of the channel
//   power_save  from the phase selector
//   phase_sel   selected phase 0..14 (phase 0 is the undelayed input)
//   cell_en[k]  power enable of cell k+1
//   buf_en[k]   output enable of cell k+1
//
// Which outputs are presented and the two power-saving measures (outputs
// disabled except the one required, propagation stopped) follow the published
// description; applying them also after a frozen start-up is this design's
// reading of "combination of static and automatic modes".
`timescale 1ps/1ps
module elink_dl_ctrl
  import elink_pkg::*;
#(
  parameter int unsigned NCELLS = NUM_CELLS
) (
  input  rate_e              rate,
  input  logic               power_save,
  input  logic [PHASE_W-1:0] phase_sel,
  output logic [NCELLS-1:0]  cell_en,
  output logic [NCELLS-1:0]  buf_en
);

  always_comb begin
    int unsigned last_cell;
    int unsigned sel_tap;
    last_cell = (rate == RATE_160) ? 2 * (NUM_PHASES - 1) : NUM_PHASES - 1;
    sel_tap   = phase_to_tap(rate, int'(phase_sel));
    for (int unsigned k = 1; k <= NCELLS; k++) begin
      if (power_save) begin
        cell_en[k-1] = (k <= sel_tap);
        buf_en[k-1]  = (k == sel_tap);
      end else begin
        cell_en[k-1] = (k <= last_cell);
        buf_en[k-1]  = (k <= last_cell) && ((rate != RATE_160) || (k % 2 == 0));
      end
    end
  end

endmodule
