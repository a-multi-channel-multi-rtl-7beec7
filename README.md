# Multi-rate eLink receiver with automatic phase alignment

This is a SystemVerilog model of the receive side of the lpGBT eLinks.
lpGBT is the radiation-hard link chip used by detector front ends. It receives up to 28 serial
inputs, the eLinks, from front-end chips. It sends their contents upstream in a 10.24 Gbit/s or
5.12 Gbit/s uplink frame.

## The problem it solves

The lpGBT supplies the clock to every front end, so each eLink's bit rate is known exactly and no
clock recovery is needed. What is unknown is the phase of each input against the internal sampling
clock. That phase depends on cable length, board layout, supply voltage and temperature, and it
drifts. So each input is passed through its own adjustable delay. The delay is picked so that the
sampling clock falls in the middle of the bit, and it is moved as the input wanders.

Supported rates are 160, 320, 640 and 1280 Mbit/s. Channels come in groups of four (an "ePortRx
group"). A group delivers one 40 MHz frame, whose channel layout depends on the uplink speed:

| uplink       | per group                             |
|--------------|---------------------------------------|
| 10.24 Gbit/s | 1 x 1280, 2 x 640 or 4 x 320 Mbit/s   |
| 5.12 Gbit/s  | 1 x 640, 2 x 320 or 4 x 160 Mbit/s    |

Seven groups make the 28 channels.

## How a channel is aligned

**Delay line.** Each channel has a line of 28 delay cells. Each cell is built from two equal half
cells and has a power-down input (`cell_en`) and an output enable (`buf_en`). A cell delays by
T_bit/8, so the line spans 1.75 bit periods. Only 14 cell outputs are used. Together with the
undelayed input they give phases 0..14, one eighth of a bit apart:

- at 320, 640 and 1280 Mbit/s the outputs of cells 1..14 are used;
- at 160 Mbit/s the cells run at T_bit/16 and the even cells 2, 4, ..., 28 are used.

**Reference DLL.** One DLL per group sets the cell delay. It locks a master line of 8 cells to one
bit period and hands the same control to the group's four channel lines. The DLL and the cells are
analog in silicon. Here they are behavioural models that use simulation delays, and are not
synthesizable.

**Edge detection.** All 15 phases are registered at the same sampling instant. The edge flag of
phase k is `s[k-1] xor s[k+1]`. It is 1 when a data transition lies between the two neighbouring
phases. Around a transition, the flags read 0 far before it, "random" close to it, 1 at it,
"random" again, and 0 far after it.

**Phase selection FSM.** The flags are noisy because of jitter and metastability, so the FSM
filters them:

- It counts the flags of each phase over a window of 32 bit periods that contain an edge.
- A phase whose count reaches 3/4 of the largest count is taken as a data edge.
- The sampling candidates lie half a bit (4 phase steps) on either side of an edge.

The FSM has three modes:

- **static**: the user chooses the phase. The delay line runs only up to that cell, and only that
  cell's output is enabled, to save power.
- **automatic tracking**:
  - At start-up the FSM picks a candidate in phases 4..11, so that there is room to drift both
    ways.
  - It declares lock after 4 windows that agree.
  - From then on it moves the phase one step per window towards the nearest centre.
  - When the phase would run off the end of the line, it jumps by 8 phases (one bit). Because the
    line is 1.75 bits long, that jump is always possible.
- **fixed with automatic start-up**: it starts like automatic mode. Once locked, the phase is frozen
  and the line powers down as in static mode.

The FSM state, the selected phase and the lock counter are triplicated and majority voted, to
survive single-event upsets.

**Deserializer.** This is a binary demultiplexing tree with register pairs at 640, 320, 160, 80
and 40 MHz:

- At each level, one register of a pair takes data on the rising edge and the other on the falling
  edge. Each level therefore halves the rate and doubles the number of streams.
- A slower channel joins the tree through a multiplexer at the level that matches its rate.
- At the bottom, 32 streams at 40 MHz form the frame.

Here all divided clocks are clock enables of the single 1.28 GHz clock. In each channel's word the
oldest bit is in the MSB.

**PRBS7 checker.** Each channel has a PRBS7 checker for bit-error-rate tests (x^7 + x^6 + 1). It
synchronises itself to the incoming data and counts bits and errors.

## Files

| file | what it is |
|------|------------|
| `rtl/elink_pkg.sv` | shared types (rate, mode) and constants |
| `rtl/elink_receiver.sv` | top: 7 groups |
| `rtl/elink_group.sv` | one group: DLL, 4 channel aligners, 4 PRBS checkers, deserializer, bit timing |
| `rtl/elink_phase_aligner.sv` | one channel: delay-line control, delay line, sampler, FSM |
| `rtl/elink_dll.sv` | reference DLL (behavioural) |
| `rtl/elink_delay_line.sv`, `rtl/elink_delay_cell.sv` | delay line and cell (behavioural) |
| `rtl/elink_dl_ctrl.sv` | cell and output enables from mode, rate and phase |
| `rtl/elink_sampler.sv` | phase sampling, edge flags, output mux |
| `rtl/elink_phase_selector.sv` | phase selection FSM with TMR |
| `rtl/elink_deserializer.sv` | multi-rate demultiplexing tree |
| `rtl/elink_prbs7_checker.sv` | PRBS7 bit and error counters |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_prbs_source.sv` (a jittery, drifting PRBS7 transmitter) |

## Interface of the top (`elink_receiver`)

- `clk`: 1.28 GHz. `rst_n`: active-low, asynchronous.
- `up10g`: 1 for a 10.24 Gbit/s uplink, 0 for 5.12 Gbit/s.
- Per group:
  - `rate`: 0..3 for 160, 320, 640 or 1280 Mbit/s.
  - Per channel: `mode` and `static_phase`.
  - `ser_in[4]`: the serial inputs.
  - `prbs_clear`: restarts the PRBS counters.
- Outputs per group:
  - `frame` (32 bits), `frame_valid` (one cycle every 32), and `ch_word` per channel;
  - `phase_sel`, `locked`, `dll_locked`, `cell_en`, `buf_en` and `window_done`;
  - `prbs_bits` and `prbs_errs`.

Parameters: `NUM_GROUPS` (7), `WINDOW` (32 edges per filter window) and `LOCK_WINDOWS` (4).

## Simulating

The testbenches use `timescale 1ps/1ps` and timing control, for example with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/elink_pkg.sv tb/tb_elink_receiver_small.sv --top tb_elink_receiver_small
./obj_dir/Vtb_elink_receiver_small
```

Each testbench prints `TB_RESULT checks=N failures=M` at the end. The end-to-end tests feed every
channel from its own PRBS7 transmitter, with a random phase and jitter.

- `tb_elink_receiver_small`: 2 groups; runs in well under a minute.
- `tb_elink_receiver`: the full 28 channels; takes a few minutes.

Both check:

- DLL lock;
- start-up lock within phases 4..11;
- tracking of a drifting input, including one bit slip;
- static and frozen modes with power saving;
- every rate at both uplink speeds;
- error-free PRBS data through the checkers and through the deserialised frames.

`tb_elink_phase_scan` repeats the bit-error-rate scan used to qualify the receiver. It runs a
jittery 1.28 Gbit/s input, steps the static phase through 0..14 and counts errors at each phase. It
checks the following against the known input timing:

- phases in the open eye are error-free;
- phases on the transition have errors;
- at least four phases are clean;
- the phase that automatic mode picks lies in the clean region.

## What is not here

- The differential input receivers and the lpGBT clock generation. The serial inputs and the
  1.28 GHz clock are ports.
- The chip's configuration registers. The top exposes the configuration as plain inputs.
- The retiming latches and clock gating of a real divided-clock deserializer.
- Real analog behaviour of the DLL and delay cells: noise, mismatch and radiation effects.

## Where this model makes its own choices

The overall structure is the published one: replica delay lines slaved to a DLL, sampling of all
phases, edge flags, a filtering FSM with three modes and a demultiplexing tree. So are the main
numbers: 28 cells, 15 phases, T_bit/8 steps, the 4..11 start-up range and four channels per group.
The following details are this design's own:

- **Edge filter.** The 32-edge window and the 3/4-of-peak threshold are this design's choice.
- **Lock rule.** Lock needs 4 windows that agree within one step, modulo one bit.
- **Tracking speed.** The phase moves at most one step per window.
- **DLL loop.** The loop is modelled as a first-order update with a simple lock detector.
- **DLL at 160 Mbit/s.** The DLL then locks to a 320 MHz reference, so that the cells are T_bit/16.
- **Channel placement.** At 4 x 160 Mbit/s, the tree register where each channel enters is chosen
  here.
- **Word bit order.** In each channel's word the oldest bit is in the MSB.
- **PRBS7 polynomial.** The checker uses x^7 + x^6 + 1.
- **Enable masks.** Outside power saving, the cells beyond the last used output are switched off.
