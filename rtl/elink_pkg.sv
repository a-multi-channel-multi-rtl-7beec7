// elink_pkg: types and constants shared by the eLink receiver.
//
// The receiver takes up to four serial eLinks per group (28 per chip) whose
// frequency is known but whose phase is not, delays each one by a selectable
// number of T_bit/8 steps so that it can be sampled safely by the internal
// clock, and deserialises the result into 40 MHz frames.
//
// Numbers that come from the published description: 28 channels, data rates
// of 160/320/640/1280 Mbit/s, 28 delay cells of T_bit/8 with 14 presented
// outputs (15 phases counting the undelayed input), 1.75 T_bit coverage,
// start-up window of phases 4 to 11, three operating modes, groups of four
// channels.  Encodings of the enumerations are this design's own choice.
`timescale 1ps/1ps
package elink_pkg;

  // Data rate of the channels of one group.
  typedef enum logic [1:0] {
    RATE_160  = 2'd0,
    RATE_320  = 2'd1,
    RATE_640  = 2'd2,
    RATE_1280 = 2'd3
  } rate_e;

  // Phase-selection mode of one channel.
  typedef enum logic [1:0] {
    MODE_STATIC     = 2'd0,   // user-chosen phase, unused delay cells off
    MODE_AUTO       = 2'd1,   // continuous automatic phase tracking
    MODE_FIXED_AUTO = 2'd2    // automatic start-up, phase frozen after lock
  } mode_e;

  localparam int unsigned NUM_CELLS   = 28;  // delay cells per replica line
  localparam int unsigned NUM_PHASES  = 15;  // phase 0 (no delay) .. phase 14
  localparam int unsigned PHASE_W     = 4;   // bits of a phase index
  localparam int unsigned STEPS_PER_UI = 8;  // phase steps per bit period
  localparam int unsigned INIT_MIN    = 4;   // start-up window, lowest phase
  localparam int unsigned INIT_MAX    = 11;  // start-up window, highest phase
  localparam int unsigned CH_PER_GROUP = 4;
  localparam int unsigned FRAME_BITS  = 32;  // bits per 40 MHz frame at 10.24 Gbit/s uplink

  // Fast-clock cycles (1.28 GHz) per bit at a given data rate.
  function automatic int unsigned cycles_per_bit(rate_e r);
    case (r)
      RATE_1280: return 1;
      RATE_640:  return 2;
      RATE_320:  return 4;
      default:   return 8;
    endcase
  endfunction

  // Delay-line tap presented as phase p: every cell at the high rates,
  // every second cell at 160 Mbit/s.
  function automatic int unsigned phase_to_tap(rate_e r, int unsigned p);
    return (r == RATE_160) ? 2 * p : p;
  endfunction

  // Level of the deserialiser tree at which a channel of this rate enters:
  // 0 = 1280, 1 = 640, 2 = 320, 3 = 160 Mbit/s.
  function automatic int unsigned entry_level(rate_e r);
    return 3 - int'(r);
  endfunction

  // Channels in use: the group carries at most 1280 Mbit/s (10.24 Gbit/s
  // uplink) or 640 Mbit/s (5.12 Gbit/s uplink) in total, so it holds 1, 2 or
  // 4 channels: channel 0 alone, channels 0 and 2, or all four.  A rate the
  // uplink cannot carry (1280 at 5.12 G, 160 at 10.24 G) enables nothing.
  function automatic logic channel_active(rate_e r, logic up10g, int unsigned ch);
    int unsigned lvl, nch;
    lvl = entry_level(r);
    if (up10g && lvl > 2) return 1'b0;
    if (!up10g && lvl < 1) return 1'b0;
    nch = up10g ? (1 << lvl) : (1 << (lvl - 1));
    case (nch)
      1:       return ch == 0;
      2:       return (ch % 2) == 0;
      default: return 1'b1;
    endcase
  endfunction

  // Index, among the 2**level streams of that tree level, that channel ch
  // feeds.  At 5.12 Gbit/s only the first half of the tree is used.
  function automatic int unsigned entry_stream(rate_e r, logic up10g, int unsigned ch);
    int unsigned lvl;
    lvl = entry_level(r);
    return up10g ? ((ch << lvl) >> 2) : ((ch << (lvl - 1)) >> 2);
  endfunction

endpackage
