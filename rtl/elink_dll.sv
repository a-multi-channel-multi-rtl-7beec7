// elink_dll: behavioural model of the reference DLL shared by the four
// replica delay lines of a group (not synthesizable logic: the real DLL is a
// phase detector, charge pump and loop filter driving a master delay line).
//
// The master line has MASTER_CELLS cells and is fed by the bit-rate clock.
// Once per reference period the phase detector compares the edge that has
// travelled through the master line with the next reference edge; the charge
// pump and low-pass filter turn the difference into a new cell delay.  The
// loop is modelled as a first-order update
//     d <- d + (T_ref - MASTER_CELLS*d) / 2**GAIN_SHIFT
// clamped to the range the cell can reach (MIN_DELAY_PS..MAX_DELAY_PS), so in
// lock MASTER_CELLS*d = T_ref, i.e. d = T_bit/8.  The replica lines receive d
// (in the circuit: the shared control voltage).
//
//   clk_fast      1.28 GHz clock; the bit-rate reference is derived from its
//                 measured period: T_ref = T_fast * cycles_per_bit(rate), and
//                 at 160 Mbit/s the reference is 320 MHz, so that cells of
//                 T_bit/16 let the even outputs be T_bit/8 apart
//   rst_n         restarts the loop from MIN_DELAY_PS
//   rate          data rate of the group
//   cell_delay_ps delay of one cell (the loop's control)
//   locked        high once the phase error stayed within LOCK_TOL_PS for
//                 LOCK_COUNT consecutive reference periods
//
// The master line, PD, CP and LPF follow the published block diagram; the
// loop equation, the gain, the lock detector and the 160 Mbit/s reference are
// this model's choices.  The delay range 50..400 ps reads the published cell
// delay-versus-control-voltage curves (target band about 0.1 to 0.39 ns).
`timescale 1ps/1ps
module elink_dll
  import elink_pkg::*;
#(
  parameter int unsigned MASTER_CELLS = STEPS_PER_UI,
  parameter int unsigned MIN_DELAY_PS = 50,
  parameter int unsigned MAX_DELAY_PS = 400,
  parameter int unsigned GAIN_SHIFT   = 4,
  parameter int unsigned LOCK_TOL_PS  = 8,
  parameter int unsigned LOCK_COUNT   = 16
) (
  input  logic        clk_fast,
  input  logic        rst_n,
  input  rate_e       rate,
  output int unsigned cell_delay_ps,
  output logic        locked
);

  realtime     last_edge;
  int unsigned cyc;        // fast cycles since the last reference edge
  int unsigned good;       // consecutive periods within tolerance
  int          d;          // cell delay, ps
  int unsigned div;

  initial begin
    last_edge = 0;
    cyc       = 0;
    good      = 0;
    d         = int'(MIN_DELAY_PS);
    locked    = 1'b0;
  end

  assign cell_delay_ps = unsigned'(d);
  assign div = (rate == RATE_160) ? 4 : cycles_per_bit(rate);

  always @(posedge clk_fast or negedge rst_n) begin
    if (!rst_n) begin
      cyc    <= 0;
      good   <= 0;
      d      <= int'(MIN_DELAY_PS);
      locked <= 1'b0;
    end else begin
      automatic realtime now  = $realtime;
      automatic int      tref = int'((now - last_edge) * div);
      last_edge <= now;
      if (cyc + 1 >= div) begin
        // phase detector: error between the master-line edge and T_ref
        automatic int err = tref - int'(MASTER_CELLS) * d;
        cyc <= 0;
        if (tref > 0 && tref < 100000) begin
          automatic int nd = d + err / (1 << GAIN_SHIFT);
          if (err > 0 && nd == d) nd = d + 1;
          if (err < 0 && nd == d) nd = d - 1;
          if (nd < int'(MIN_DELAY_PS)) nd = int'(MIN_DELAY_PS);
          if (nd > int'(MAX_DELAY_PS)) nd = int'(MAX_DELAY_PS);
          d <= nd;
          if (err <= int'(LOCK_TOL_PS) && err >= -int'(LOCK_TOL_PS)) begin
            if (good + 1 >= LOCK_COUNT) locked <= 1'b1;
            else good <= good + 1;
          end else begin
            good   <= 0;
            locked <= 1'b0;
          end
        end
      end else begin
        cyc <= cyc + 1;
      end
    end
  end

endmodule
