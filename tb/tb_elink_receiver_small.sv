// tb_elink_receiver_small: the same end-to-end test as tb_elink_receiver, on a
// receiver reduced to 2 groups (8 channels) so that it runs quickly; each
// channel is fed by its own PRBS7 transmitter with a random phase and jitter.
//
// Part 1, 10.24 Gbit/s uplink, groups at 1280/320/640/320/640/320/1280 Mbit/s;
// part 2, 5.12 Gbit/s uplink, groups at 160/640/320/160/160/160/160 Mbit/s
// (only the first NG groups exist).  In each part the DLLs must lock, then
// the channels are released into their modes: mostly automatic tracking,
// group 1 channel 1 static (phase 7), group 1 channel 2 fixed after automatic
// start-up.  Checked: every automatic channel locks inside phases 4..11, give
// or take one tracking step; the static and frozen channels power down the
// unused delay cells; after clearing, the internal PRBS7 checkers of all
// automatic and frozen channels count bits and no errors; the deserialised
// words, read back to back, obey the PRBS7 recurrence; frames come every 32
// cycles.  In part 1 the input of group 0 channel 0 drifts by more than a bit
// period, so its phase must track step by step and finally slip by a bit.
// Every mechanism (DLL lock, start-up lock, tracking step, bit slip, frozen
// phase, static power saving, each rate and uplink speed, frames) is counted
// and must have happened at least once.
`timescale 1ps/1ps
module tb_elink_receiver_small;
  import elink_pkg::*;
  localparam int TCLK = 780;
  localparam int NG = 2;
  localparam int NC = CH_PER_GROUP;
  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  up10g = 1'b1;
  rate_e                 rate         [NG];
  mode_e                 mode         [NG][NC];
  logic [PHASE_W-1:0]    static_phase [NG][NC];
  logic [NC-1:0]         ser_in       [NG];
  logic                  prbs_clear = 1'b0;
  logic [FRAME_BITS-1:0] frame        [NG];
  logic [FRAME_BITS-1:0] ch_word      [NG][NC];
  logic [NG-1:0]         frame_valid;
  logic [PHASE_W-1:0]    phase_sel    [NG][NC];
  logic [NC-1:0]         locked       [NG];
  logic [NG-1:0]         dll_locked;
  logic [NUM_CELLS-1:0]  cell_en      [NG][NC];
  logic [NUM_CELLS-1:0]  buf_en       [NG][NC];
  logic [NC-1:0]         window_done  [NG];
  logic [31:0]           prbs_bits    [NG][NC];
  logic [31:0]           prbs_errs    [NG][NC];
  int checks = 0, failures = 0;

  int unsigned tbit_ps   [NG];
  int          offset_ps [NG][NC];
  int unsigned jitter_ps [NG];

  // mechanism counters
  int n_dll_lock, n_startup_lock, n_track_step, n_bit_slip, n_frozen,
      n_static_save, n_frames, n_rate[4], n_up10g, n_up5g;

  elink_receiver #(.NUM_GROUPS(NG)) dut (.*);

  for (genvar g = 0; g < NG; g++) begin : g_src
    for (genvar c = 0; c < NC; c++) begin : g_ch
      tb_prbs_source #(.SEED(7'(g * 4 + c + 1))) u_src (
        .tbit_ps(tbit_ps[g]), .offset_ps(offset_ps[g][c]),
        .jitter_ps(jitter_ps[g]), .dout(ser_in[g][c]));
    end
  end

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // tracking steps and bit slips seen on the phase outputs of locked
  // automatic channels
  logic [PHASE_W-1:0] prev_sel [NG][NC];
  logic               prev_lk  [NG][NC];
  always @(posedge clk) begin
    for (int g = 0; g < NG; g++) begin
      if (frame_valid[g] && rst_n) n_frames++;
      for (int c = 0; c < NC; c++) begin
        if (rst_n && mode[g][c] == MODE_AUTO && prev_lk[g][c] && locked[g][c]
            && phase_sel[g][c] != prev_sel[g][c]) begin
          int dd;
          dd = int'(phase_sel[g][c]) - int'(prev_sel[g][c]);
          if (dd == 1 || dd == -1) n_track_step++;
          else if (dd >= 4 || dd <= -4) n_bit_slip++;
        end
        prev_sel[g][c] <= phase_sel[g][c];
        prev_lk[g][c]  <= locked[g][c];
      end
    end
  end

  function automatic bit is_static(int g, int c);
    return g == 1 && c == 1;
  endfunction
  function automatic bit is_fixed(int g, int c);
    return g == 1 && c == 2;
  endfunction

  // group rates of the two parts (the first NG entries are used)
  localparam rate_e PART1 [7] = '{RATE_1280, RATE_320, RATE_640, RATE_320, RATE_640, RATE_320, RATE_1280};
  localparam rate_e PART2 [7] = '{RATE_160, RATE_640, RATE_320, RATE_160, RATE_160, RATE_160, RATE_160};

  task automatic run_part(logic u, rate_e plan [7], bit drift);
    rate_e rs [NG];
    int    maxcpb, last_fv;
    logic  hist [NG][NC][$];
    for (int g = 0; g < NG; g++) rs[g] = plan[g];
    rst_n = 1'b0;
    up10g = u;
    maxcpb = 1;
    for (int g = 0; g < NG; g++) begin
      rate[g]      = rs[g];
      tbit_ps[g]   = TCLK * cycles_per_bit(rs[g]);
      jitter_ps[g] = tbit_ps[g] / 40;
      if (cycles_per_bit(rs[g]) > maxcpb) maxcpb = cycles_per_bit(rs[g]);
      n_rate[rs[g]]++;
      for (int c = 0; c < NC; c++) begin
        mode[g][c]         = MODE_STATIC;
        static_phase[g][c] = 4'd7;
        offset_ps[g][c]    = $urandom % tbit_ps[g];
      end
    end
    if (u) n_up10g++; else n_up5g++;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    // the DLLs lock first
    fork
      begin
        wait (&dll_locked);
      end
      begin
        repeat (20000) @(negedge clk);
      end
    join_any
    disable fork;
    for (int g = 0; g < NG; g++) begin
      chk($sformatf("group %0d DLL locked", g), dll_locked[g]);
      if (dll_locked[g]) n_dll_lock++;
    end
    // release the channels into their modes
    @(negedge clk);
    for (int g = 0; g < NG; g++)
      for (int c = 0; c < NC; c++)
        mode[g][c] = is_static(g, c) ? MODE_STATIC : (is_fixed(g, c) ? MODE_FIXED_AUTO : MODE_AUTO);
    repeat (8 * 32 * 2 * 2 * maxcpb) @(negedge clk);
    for (int g = 0; g < NG; g++)
      for (int c = 0; c < NC; c++) begin
        if (!channel_active(rs[g], u, c)) continue;
        if (is_static(g, c)) begin
          chk($sformatf("g%0d ch%0d static power save", g, c),
              $countones(cell_en[g][c]) == phase_to_tap(rs[g], 7) && $countones(buf_en[g][c]) == 1);
          n_static_save++;
          continue;
        end
        chk($sformatf("g%0d ch%0d locked", g, c), locked[g][c]);
        chk($sformatf("g%0d ch%0d phase %0d in 3..12", g, c, phase_sel[g][c]),
            phase_sel[g][c] >= 3 && phase_sel[g][c] <= 12);
        if (locked[g][c]) n_startup_lock++;
        if (is_fixed(g, c)) begin
          chk($sformatf("g%0d ch%0d frozen power save", g, c),
              $countones(buf_en[g][c]) == 1 && $countones(cell_en[g][c]) < 14);
          n_frozen++;
        end
      end
    // drift of group 0 channel 0 beyond the delay range
    if (drift) begin
      int start_steps;
      start_steps = n_track_step;
      for (int k = 0; k < 14; k++) begin
        offset_ps[0][0] = offset_ps[0][0] + int'(tbit_ps[0]) / 8;
        repeat (3 * 32 * 2 * cycles_per_bit(rs[0])) @(negedge clk);
      end
      chk("drifting input tracked", n_track_step - start_steps >= 4);
      chk("drift beyond the line slipped a bit", n_bit_slip > 0);
      repeat (4 * 32 * 2 * cycles_per_bit(rs[0])) @(negedge clk);
    end
    // error-free data
    @(negedge clk) prbs_clear = 1'b1;
    @(negedge clk) prbs_clear = 1'b0;
    last_fv = -1;
    for (int cyc = 0; cyc < 32 * 40 * maxcpb; cyc++) begin
      @(negedge clk);
      if (frame_valid[0]) begin
        if (last_fv >= 0) chk("frame every 32 cycles", cyc - last_fv == 32);
        last_fv = cyc;
        if (cyc > 64)
          for (int g = 0; g < NG; g++)
            for (int c = 0; c < NC; c++)
              if (channel_active(rs[g], u, c)) begin
                int w;
                w = FRAME_BITS >> entry_level(rs[g]);
                for (int i = w - 1; i >= 0; i--) hist[g][c].push_back(ch_word[g][c][i]);
              end
      end
    end
    for (int g = 0; g < NG; g++)
      for (int c = 0; c < NC; c++) begin
        int viol;
        if (!channel_active(rs[g], u, c) || is_static(g, c)) continue;
        chk($sformatf("g%0d ch%0d checker bits %0d", g, c, prbs_bits[g][c]), prbs_bits[g][c] > 100);
        chk($sformatf("g%0d ch%0d checker errors %0d", g, c, prbs_errs[g][c]), prbs_errs[g][c] == 0);
        viol = 0;
        for (int n = 7; n < hist[g][c].size(); n++)
          if (hist[g][c][n] != (hist[g][c][n-7] ^ hist[g][c][n-6])) viol++;
        chk($sformatf("g%0d ch%0d words obey PRBS7 (%0d violations in %0d bits)", g, c, viol, hist[g][c].size()),
            viol == 0 && hist[g][c].size() > 100);
      end
  endtask

  initial begin
    for (int g = 0; g < NG; g++) begin
      rate[g] = RATE_320;
      tbit_ps[g] = 4 * TCLK;
      jitter_ps[g] = 0;
      for (int c = 0; c < NC; c++) begin
        mode[g][c] = MODE_STATIC;
        static_phase[g][c] = 4'd7;
        offset_ps[g][c] = 0;
      end
    end
    run_part(1'b1, PART1, 1'b1);
    run_part(1'b0, PART2, 1'b0);
    $display("mechanisms: dll_lock=%0d startup_lock=%0d track_step=%0d bit_slip=%0d frozen=%0d static_save=%0d frames=%0d",
             n_dll_lock, n_startup_lock, n_track_step, n_bit_slip, n_frozen, n_static_save, n_frames);
    $display("rates: 160=%0d 320=%0d 640=%0d 1280=%0d  uplink 10G=%0d 5G=%0d",
             n_rate[RATE_160], n_rate[RATE_320], n_rate[RATE_640], n_rate[RATE_1280], n_up10g, n_up5g);
    chk("mechanism: DLL lock", n_dll_lock > 0);
    chk("mechanism: start-up lock", n_startup_lock > 0);
    chk("mechanism: tracking step", n_track_step > 0);
    chk("mechanism: bit slip", n_bit_slip > 0);
    chk("mechanism: frozen phase", n_frozen > 0);
    chk("mechanism: static power saving", n_static_save > 0);
    chk("mechanism: frames", n_frames > 0);
    for (int r = 0; r < 4; r++) chk($sformatf("mechanism: rate %0d used", r), n_rate[r] > 0);
    chk("mechanism: 10.24 G uplink", n_up10g > 0);
    chk("mechanism: 5.12 G uplink", n_up5g > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
