// elink_deserializer: multi-rate, multi-channel deserialiser of one group.
//
// A binary demultiplexing tree turns the recovered serial bits of up to four
// channels into one frame of FRAME_BITS bits per 40 MHz period.  Level 0 is
// a 1.28 Gbit/s register; each level L = 1..5 below it is clocked at
// 1280/2**L MHz and has 2**L registers: register 2j takes stream j of level
// L-1 on the rising edge of that clock, register 2j+1 on the falling edge,
// so every level halves the bit rate and doubles the number of streams.
// Level 5 (40 MHz, 32 streams) is retimed into the frame register.
// A channel whose rate is 1280/2**L Mbit/s enters the tree through a
// multiplexer in front of one register of level L instead of coming down from
// above; the group therefore carries
//   10.24 Gbit/s uplink: 1 x 1280 (ch 0), 2 x 640 (ch 0, 2), 4 x 320 Mbit/s
//    5.12 Gbit/s uplink: 1 x 640  (ch 0), 2 x 320 (ch 0, 2), 4 x 160 Mbit/s
// and at 5.12 Gbit/s only the first half of the frame is used.
//
// Here the divided clocks are clock enables of the 1.28 GHz clock: level L's
// rising edge is the cycle with cnt % 2**L == 0 and its falling edge the
// cycle with cnt % 2**L == 2**(L-1), cnt being the position in the 40 MHz
// period (0..31, 0 = 40 MHz edge).  Channel bits must change one cycle after
// their sampling edge (cnt % cycles_per_bit == 0), as the sampler delivers
// them.  Bit b of the tree's leaves under one channel's entry register holds
// the bit received bitrev(b) bit periods after the oldest one, so the frame
// register reorders them: a channel's word has its oldest bit in the MSB.
//
//   clk, rst_n     1.28 GHz clock, asynchronous active-low reset
//   rate, up10g    group configuration
//   cnt            40 MHz phase counter
//   ch_data[c]     recovered bit of channel c
//   frame          FRAME_BITS bits; channel c's word is at bits
//                  [FRAME_BITS-1-e*W -: W], e = its entry index, W = 32/2**L
//   ch_word[c]     the same word right-aligned (unused bits 0)
//   frame_valid    one-cycle strobe when frame and ch_word change
//
// The tree with rising/falling-edge registers at 640, 320, 160, 80 and 40 MHz
// and the channel multiplexers follow the published schematic, which omits the
// retiming latches and clock gating.  Clock enables instead of divided clocks,
// the exact channel-to-register assignment at 160 Mbit/s and the bit order of
// the words are this design's choices.
`timescale 1ps/1ps
module elink_deserializer
  import elink_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  rate_e                   rate,
  input  logic                    up10g,
  input  logic [4:0]              cnt,
  input  logic [CH_PER_GROUP-1:0] ch_data,
  output logic [FRAME_BITS-1:0]   frame,
  output logic [FRAME_BITS-1:0]   ch_word [CH_PER_GROUP],
  output logic                    frame_valid
);

  localparam int unsigned LEVELS = 5;

  // tree[L][s]: stream s of level L (only bits 0 .. 2**L-1 exist)
  logic [FRAME_BITS-1:0] tree [LEVELS+1];

  // channel multiplexers: for every register of every level, the channel
  // that enters there (if any)
  logic [FRAME_BITS-1:0] ins_en  [LEVELS+1];
  logic [FRAME_BITS-1:0] ins_bit [LEVELS+1];
  int unsigned           lvl;
  int unsigned           wbits;

  assign lvl   = entry_level(rate);
  assign wbits = FRAME_BITS >> lvl;

  always_comb begin
    for (int L = 0; L <= LEVELS; L++) begin
      ins_en[L]  = '0;
      ins_bit[L] = '0;
    end
    for (int c = 0; c < CH_PER_GROUP; c++) begin
      if (channel_active(rate, up10g, c)) begin
        ins_en[lvl][entry_stream(rate, up10g, c)]  = 1'b1;
        ins_bit[lvl][entry_stream(rate, up10g, c)] = ch_data[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int L = 0; L <= LEVELS; L++) tree[L] <= '0;
    end else begin
      tree[0][0] <= ins_en[0][0] ? ins_bit[0][0] : 1'b0;
      for (int L = 1; L <= LEVELS; L++) begin
        for (int s = 0; s < (1 << L); s++) begin
          // rising edge for even registers, falling edge for odd ones
          if ((int'(cnt) % (1 << L)) == ((s % 2 == 0) ? 0 : (1 << (L - 1))))
            tree[L][s] <= ins_en[L][s] ? ins_bit[L][s] : tree[L-1][s / 2];
        end
      end
    end
  end

  // retiming into the frame register on the 40 MHz edge, undoing the
  // bit-reversed order of the leaves under each entry register
  function automatic int unsigned bitrev(int unsigned v, int unsigned n);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < LEVELS; i++) if (i < n && v[i]) r |= 1 << (n - 1 - i);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      frame       <= '0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= (cnt == 5'd0);
      if (cnt == 5'd0) begin
        for (int s = 0; s < FRAME_BITS; s++) begin
          automatic int unsigned sub = s % wbits;
          automatic int unsigned blk = s - sub;
          frame[FRAME_BITS - 1 - (blk + bitrev(sub, LEVELS - lvl))] <= tree[LEVELS][s];
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < CH_PER_GROUP; c++) begin
      ch_word[c] = '0;
      if (channel_active(rate, up10g, c)) begin
        for (int i = 0; i < FRAME_BITS; i++)
          if (i < int'(wbits))
            ch_word[c][i] = frame[FRAME_BITS - 1 - entry_stream(rate, up10g, c) * wbits - (wbits - 1) + i];
      end
    end
  end

endmodule
