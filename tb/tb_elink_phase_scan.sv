// tb_elink_phase_scan: bit-error-rate scan over the static phases at
// 1.28 Gbit/s, the measurement made on the real receiver to find the open
// eye and to judge radiation damage ("no errors for at least four phases").
//
// One jittery PRBS7 transmitter (fixed phase offset, uniform jitter of
// +/-JIT ps) feeds channel 0 of two groups running at 1280 Mbit/s on a
// 10.24 Gbit/s uplink.  Group A is in static mode; the test steps its phase
// through 0..14 and, for each, clears the internal PRBS7 checker, lets
// NBITS bits through and reads the bit and error counters.  Group B runs the
// same input in automatic mode.
//
// Expected values are worked out from the timing alone: phase p samples the
// input p cell delays (T_bit/8) before the clock edge, so its distance from
// the nearest data transition is known.  Checked: a phase further than
// JIT + MARGIN ps from a transition has no errors; a phase closer than
// JIT/2 - MARGIN ps has errors; at least four phases are error-free; every
// phase counted NBITS bits; and the phase chosen by automatic mode in
// group B is error-free in the scan.
`timescale 1ps/1ps
module tb_elink_phase_scan;
  import elink_pkg::*;
  localparam int TCLK   = 780;
  localparam int OFFSET = 200;
  localparam int JIT    = 120;
  localparam int MARGIN = 40;
  localparam int NBITS  = 1500;

  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  logic                    ser;
  logic                    prbs_clear = 1'b0;
  mode_e                   mode_a [CH_PER_GROUP];
  mode_e                   mode_b [CH_PER_GROUP];
  logic [PHASE_W-1:0]      sphase [CH_PER_GROUP];
  logic [FRAME_BITS-1:0]   frame_a, frame_b;
  logic [FRAME_BITS-1:0]   word_a [CH_PER_GROUP];
  logic [FRAME_BITS-1:0]   word_b [CH_PER_GROUP];
  logic                    fv_a, fv_b;
  logic [PHASE_W-1:0]      psel_a [CH_PER_GROUP];
  logic [PHASE_W-1:0]      psel_b [CH_PER_GROUP];
  logic [CH_PER_GROUP-1:0] lock_a, lock_b;
  logic                    dll_a, dll_b;
  logic [NUM_CELLS-1:0]    cen_a [CH_PER_GROUP];
  logic [NUM_CELLS-1:0]    cen_b [CH_PER_GROUP];
  logic [NUM_CELLS-1:0]    ben_a [CH_PER_GROUP];
  logic [NUM_CELLS-1:0]    ben_b [CH_PER_GROUP];
  logic [CH_PER_GROUP-1:0] wd_a, wd_b;
  logic [31:0]             bits_a [CH_PER_GROUP];
  logic [31:0]             bits_b [CH_PER_GROUP];
  logic [31:0]             errs_a [CH_PER_GROUP];
  logic [31:0]             errs_b [CH_PER_GROUP];
  int checks = 0, failures = 0;

  int unsigned tbit_ps   = TCLK;
  int          offset_ps = OFFSET;
  int unsigned jitter_ps = JIT;

  tb_prbs_source #(.SEED(7'h3C)) src (.tbit_ps(tbit_ps), .offset_ps(offset_ps), .jitter_ps(jitter_ps), .dout(ser));

  elink_group grp_a (
    .clk(clk), .rst_n(rst_n), .rate(RATE_1280), .up10g(1'b1), .mode(mode_a),
    .static_phase(sphase), .ser_in({3'b000, ser}), .prbs_clear(prbs_clear),
    .frame(frame_a), .ch_word(word_a), .frame_valid(fv_a), .phase_sel(psel_a),
    .locked(lock_a), .dll_locked(dll_a), .cell_en(cen_a), .buf_en(ben_a),
    .window_done(wd_a), .prbs_bits(bits_a), .prbs_errs(errs_a)
  );

  elink_group grp_b (
    .clk(clk), .rst_n(rst_n), .rate(RATE_1280), .up10g(1'b1), .mode(mode_b),
    .static_phase(sphase), .ser_in({3'b000, ser}), .prbs_clear(prbs_clear),
    .frame(frame_b), .ch_word(word_b), .frame_valid(fv_b), .phase_sel(psel_b),
    .locked(lock_b), .dll_locked(dll_b), .cell_en(cen_b), .buf_en(ben_b),
    .window_done(wd_b), .prbs_bits(bits_b), .prbs_errs(errs_b)
  );

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #200_000_000;
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

  // distance in ps between the sampling instant of phase p and the nearest
  // nominal data transition (clock rising edges at TCLK/2 + k*TCLK)
  function automatic int edge_dist(int p);
    int t;
    t = ((TCLK / 2 - p * TCLK / int'(STEPS_PER_UI) - OFFSET) % TCLK + 2 * TCLK) % TCLK;
    return (t < TCLK - t) ? t : TCLK - t;
  endfunction

  initial begin
    int errs [NUM_PHASES];
    int nclean, auto_phase;
    for (int c = 0; c < CH_PER_GROUP; c++) begin
      mode_a[c] = MODE_STATIC;
      mode_b[c] = MODE_STATIC;
      sphase[c] = '0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    wait (dll_a && dll_b);
    mode_b[0] = MODE_AUTO;
    for (int p = 0; p < NUM_PHASES; p++) begin
      sphase[0] = PHASE_W'(p);
      repeat (40) @(negedge clk);
      prbs_clear = 1'b1;
      @(negedge clk);
      prbs_clear = 1'b0;
      repeat (NBITS) @(negedge clk);
      errs[p] = int'(errs_a[0]);
      $display("phase %2d: distance %3d ps, bits %0d, errors %0d", p, edge_dist(p), bits_a[0], errs_a[0]);
      chk($sformatf("phase %0d bit count", p), bits_a[0] == 32'(NBITS));
      if (edge_dist(p) > JIT + MARGIN)
        chk($sformatf("phase %0d in the open eye is error-free", p), errs[p] == 0);
      if (edge_dist(p) < JIT / 2 - MARGIN)
        chk($sformatf("phase %0d on the data edge has errors", p), errs[p] > 0);
    end
    nclean = 0;
    for (int p = 0; p < NUM_PHASES; p++) if (errs[p] == 0) nclean++;
    chk("at least four error-free phases", nclean >= 4);
    chk("automatic mode locked", lock_b[0]);
    auto_phase = int'(psel_b[0]);
    $display("error-free phases %0d, automatic mode chose phase %0d", nclean, auto_phase);
    chk("automatic phase inside the start-up range", auto_phase >= INIT_MIN - 1 && auto_phase <= INIT_MAX + 1);
    chk("automatic phase error-free in the scan", errs[auto_phase] == 0);
    chk("automatic channel error-free", errs_b[0] == 0 && bits_b[0] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
