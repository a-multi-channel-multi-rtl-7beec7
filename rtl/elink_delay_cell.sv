// elink_delay_cell: behavioural model of one full-custom delay cell
// (not synthesizable logic: the real cell is an analog current-starved
// inverter pair whose delay is set by the DLL control voltage).
//
// A cell is two identical half cells in series; each half delays its input by
// half_delay_ps, so the whole cell delays by 2*half_delay_ps.  The reference
// DLL sets that delay to T_bit/8.  The control voltage of the real cell is
// represented here by the delay value itself.
//
//   in        data from the previous cell
//   cell_en   power enable: when low the cell is powered down and its output
//             to the next cell is held low, so nothing propagates further
//   buf_en    output-buffer enable: when low the tap output is held low
//             (the NAND output stage of the cell is disabled)
//   out       delayed data to the next cell
//   tap       delayed data to the sampler, gated by buf_en
//
// Delays are transport delays in picoseconds.  The split into two halves, the
// power-down and the output-disable follow the published cell; the exact
// behaviour of a disabled output (held low) is this model's choice.
// The delay comes from an input, so lint cannot prove it non-zero and warns
// about a possible #0; the half cells react to every input change rather than
// to a clock, which lint also reports where the cell's input is sampled by
// flip-flops elsewhere (the serial input reaches both the line and, through
// it, the sampler).  Both are the intended behaviour of a delay model.
`timescale 1ps/1ps
module elink_delay_cell (
  input  logic        in,
  input  logic        cell_en,
  input  logic        buf_en,
  input  int unsigned half_delay_ps,
  output logic        out,
  output logic        tap
);

  logic half1;
  logic half2;

  initial begin
    half1 = 1'b0;
    half2 = 1'b0;
  end

  always @(in or cell_en) half1 <= #(half_delay_ps) (in & cell_en);
  always @(half1 or cell_en) half2 <= #(half_delay_ps) (half1 & cell_en);

  assign out = half2;
  assign tap = half2 & buf_en;

endmodule
