// tb_elink_group: one group, four PRBS7 transmitters with different, unknown
// phases and some jitter.  For each configuration (10.24 G: 1x1280, 2x640,
// 4x320; 5.12 G: 1x640, 4x160) it resets the group, waits for the DLL, puts
// the channels into automatic mode and checks: every channel in use locks
// with a phase in the start-up range 4..11
// (give or take one tracking step), the internal PRBS7 checkers count
// bits and no errors, the 40 MHz frames arrive every 32 cycles, and the
// deserialised words of every channel, read back to back, obey the PRBS7
// recurrence (checked here, independently of the design's checker).
`timescale 1ps/1ps
module tb_elink_group;
  import elink_pkg::*;
  localparam int TCLK = 780;
  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  rate_e                   rate = RATE_1280;
  logic                    up10g = 1'b1;
  mode_e                   mode         [CH_PER_GROUP];
  logic [PHASE_W-1:0]      static_phase [CH_PER_GROUP];
  logic [CH_PER_GROUP-1:0] ser_in;
  logic                    prbs_clear = 1'b0;
  logic [FRAME_BITS-1:0]   frame;
  logic [FRAME_BITS-1:0]   ch_word      [CH_PER_GROUP];
  logic                    frame_valid;
  logic [PHASE_W-1:0]      phase_sel    [CH_PER_GROUP];
  logic [CH_PER_GROUP-1:0] locked;
  logic                    dll_locked;
  logic [NUM_CELLS-1:0]    cell_en      [CH_PER_GROUP];
  logic [NUM_CELLS-1:0]    buf_en       [CH_PER_GROUP];
  logic [CH_PER_GROUP-1:0] window_done;
  logic [31:0]             prbs_bits    [CH_PER_GROUP];
  logic [31:0]             prbs_errs    [CH_PER_GROUP];
  int checks = 0, failures = 0;

  int unsigned tbit_ps = TCLK;
  int          offset_ps [CH_PER_GROUP];
  int unsigned jitter_ps = 0;

  elink_group dut (.*);

  tb_prbs_source #(.SEED(7'h11)) s0 (.tbit_ps(tbit_ps), .offset_ps(offset_ps[0]), .jitter_ps(jitter_ps), .dout(ser_in[0]));
  tb_prbs_source #(.SEED(7'h22)) s1 (.tbit_ps(tbit_ps), .offset_ps(offset_ps[1]), .jitter_ps(jitter_ps), .dout(ser_in[1]));
  tb_prbs_source #(.SEED(7'h33)) s2 (.tbit_ps(tbit_ps), .offset_ps(offset_ps[2]), .jitter_ps(jitter_ps), .dout(ser_in[2]));
  tb_prbs_source #(.SEED(7'h44)) s3 (.tbit_ps(tbit_ps), .offset_ps(offset_ps[3]), .jitter_ps(jitter_ps), .dout(ser_in[3]));

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

  task automatic run_cfg(rate_e r, logic u);
    int w, nact, last_fv, nfr, viol, nbits;
    logic hist [CH_PER_GROUP][$];
    rst_n = 1'b0;
    rate  = r;
    up10g = u;
    tbit_ps = TCLK * cycles_per_bit(r);
    jitter_ps = tbit_ps / 40;
    for (int c = 0; c < CH_PER_GROUP; c++) begin
      mode[c] = MODE_STATIC;
      static_phase[c] = 4'd7;
      offset_ps[c] = $urandom % tbit_ps;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wait (dll_locked);
    for (int c = 0; c < CH_PER_GROUP; c++) mode[c] = MODE_AUTO;
    // lock: 8 windows of 32 transitions, about 2 bits per transition
    repeat (8 * 32 * 2 * 2 * cycles_per_bit(r)) @(negedge clk);
    nact = 0;
    for (int c = 0; c < CH_PER_GROUP; c++) if (channel_active(r, u, c)) begin
      nact++;
      chk($sformatf("rate %0d ch%0d locked", r, c), locked[c]);
      chk($sformatf("rate %0d ch%0d phase %0d in 3..12", r, c, phase_sel[c]),
          phase_sel[c] >= 3 && phase_sel[c] <= 12);
    end
    w = (u ? 32 : 16) / nact;
    @(negedge clk) prbs_clear = 1'b1;
    @(negedge clk) prbs_clear = 1'b0;
    last_fv = -1;
    nfr = 0;
    for (int cyc = 0; cyc < 32 * 60; cyc++) begin
      @(negedge clk);
      if (frame_valid) begin
        if (last_fv >= 0) chk("frame every 32 cycles", cyc - last_fv == 32);
        last_fv = cyc;
        nfr++;
        if (nfr > 2)
          for (int c = 0; c < CH_PER_GROUP; c++)
            if (channel_active(r, u, c))
              for (int i = w - 1; i >= 0; i--) hist[c].push_back(ch_word[c][i]);
      end
    end
    for (int c = 0; c < CH_PER_GROUP; c++) if (channel_active(r, u, c)) begin
      viol = 0;
      for (int n = 7; n < hist[c].size(); n++)
        if (hist[c][n] != (hist[c][n-7] ^ hist[c][n-6])) viol++;
      nbits = (32 * 60) / cycles_per_bit(r);
      chk($sformatf("rate %0d ch%0d PRBS7 checker bits %0d", r, c, prbs_bits[c]),
          prbs_bits[c] >= 32'(nbits - 2) && prbs_bits[c] <= 32'(nbits + 2));
      chk($sformatf("rate %0d ch%0d PRBS7 checker errors %0d", r, c, prbs_errs[c]), prbs_errs[c] == 0);
      chk($sformatf("rate %0d ch%0d words PRBS7 (%0d bits, %0d violations)", r, c, hist[c].size(), viol),
          viol == 0 && hist[c].size() > 100);
    end
  endtask

  initial begin
    run_cfg(RATE_1280, 1'b1);
    run_cfg(RATE_640,  1'b1);
    run_cfg(RATE_320,  1'b1);
    run_cfg(RATE_640,  1'b0);
    run_cfg(RATE_160,  1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
