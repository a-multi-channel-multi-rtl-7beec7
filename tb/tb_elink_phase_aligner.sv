// tb_elink_phase_aligner: one channel with its delay line, driven by a PRBS7
// transmitter at a known phase.  From the sampling-edge times and the chosen
// input offset the test computes where the data edge lies in the line
// (phase P) and hence the expected start-up phase: in 4..11 and P+4 or P+5
// modulo 8, since a transition between two phases flags both.  It checks
// the lock, the phase, error-free recovered data (checked here against the
// PRBS7 recurrence), tracking of a slowly drifting input delay, the frozen
// phase of the fixed mode, and the power-saving enables of the static mode.
// Rates 1280 and 160 Mbit/s are exercised (160 uses the even cells).
`timescale 1ps/1ps
module tb_elink_phase_aligner;
  import elink_pkg::*;
  localparam int TCLK = 780;
  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  logic                 sample_en;
  logic                 ser_in;
  rate_e                rate = RATE_1280;
  mode_e                mode = MODE_STATIC;
  logic [PHASE_W-1:0]   static_phase = 4'd7;
  int unsigned          cell_delay_ps = 97;
  logic                 ser_data;
  logic [PHASE_W-1:0]   phase_sel;
  logic                 locked;
  logic [NUM_CELLS-1:0] cell_en, buf_en;
  logic                 window_done;
  int checks = 0, failures = 0;

  int unsigned tbit_ps = TCLK;
  int          offset_ps = 0;
  int unsigned jitter_ps = 0;

  logic [4:0] cnt;
  logic       bit_valid;
  logic [6:0] hist;
  int         bit_errs, bits_seen;
  realtime    t_sample;

  elink_phase_aligner dut (.*);
  tb_prbs_source src (.tbit_ps(tbit_ps), .offset_ps(offset_ps), .jitter_ps(jitter_ps), .dout(ser_in));

  always #(TCLK / 2) clk = ~clk;

  assign sample_en = (int'(cnt) % int'(cycles_per_bit(rate))) == 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      bit_valid <= 1'b0;
    end else begin
      cnt       <= cnt + 1'b1;
      bit_valid <= sample_en;
      if (sample_en) t_sample = $realtime;
    end
  end

  // independent check of the recovered data against the PRBS7 recurrence
  always @(posedge clk) begin
    if (rst_n && bit_valid) begin
      bits_seen <= bits_seen + 1;
      if (ser_data != (hist[6] ^ hist[5])) bit_errs <= bit_errs + 1;
      hist <= {hist[5:0], ser_data};
    end
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic chk2(string what, int got, int a, int b);
    checks++;
    if (got != a && got != b) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d or %0d", what, got, a, b);
    end
  endtask

  // an edge between phases P and P+1 puts the centre half a bit away, at
  // P+4.5 modulo 8; the start-up phase is one of its neighbours in 4..11
  function automatic bit centre_ok(int P, int sel);
    int m;
    m = (sel - P) % 8;
    if (m < 0) m += 8;
    return sel >= 4 && sel <= 11 && (m == 4 || m == 5);
  endfunction

  task automatic wait_windows(int n);
    repeat (n) @(posedge window_done);
    @(negedge clk);
  endtask

  task automatic clean_errors(int nbits);
    @(negedge clk);
    bit_errs  = 0;
    bits_seen = 0;
    wait (bits_seen >= nbits);
    @(negedge clk);
  endtask

  // offset that puts the data edge 0.25 step after phase P at the sampling edge
  function automatic int offset_for(int P);
    int v, step;
    step = (rate == RATE_160) ? 2 * int'(cell_delay_ps) : int'(cell_delay_ps);
    v = int'(t_sample) - (P * step + step / 4);
    v = v % int'(tbit_ps);
    if (v < 0) v += int'(tbit_ps);
    return v;
  endfunction

  task automatic restart(rate_e r, int unsigned d);
    rst_n = 1'b0;
    rate  = r;
    tbit_ps = TCLK * cycles_per_bit(r);
    cell_delay_ps = d;
    hist = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    int P;
    hist = '0;
    bit_errs = 0;
    bits_seen = 0;
    // ---------------- automatic start-up for a range of input phases
    for (P = 1; P <= 13; P += 3) begin
      restart(RATE_1280, 97);
      mode = MODE_STATIC;
      offset_ps = offset_for(P);
      repeat (20) @(negedge clk);
      mode = MODE_AUTO;
      wait_windows(8);
      chk($sformatf("locked, edge at %0d", P), locked, 1);
      chk($sformatf("start-up phase %0d, edge at %0d", phase_sel, P), int'(centre_ok(P, phase_sel)), 1);
      clean_errors(300);
      chk($sformatf("bit errors, edge at %0d", P), bit_errs, 0);
      chk("all delay cells used", $countones(cell_en), 14);
    end
    // ---------------- tracking a drifting delay (edge moves up the line)
    begin
      int s0;
      s0 = phase_sel;
      for (int k = 0; k < 3; k++) begin
        offset_ps = offset_ps - int'(cell_delay_ps);  // data earlier: edge moves up
        wait_windows(3);
      end
      chk("tracked three steps", phase_sel, s0 + 3);
      clean_errors(300);
      chk("bit errors while tracking", bit_errs, 0);
    end
    // ---------------- fixed phase with automatic start-up
    restart(RATE_1280, 97);
    offset_ps = offset_for(3);
    repeat (20) @(negedge clk);
    mode = MODE_FIXED_AUTO;
    wait_windows(8);
    chk("fixed mode locked", locked, 1);
    chk("fixed mode phase", int'(centre_ok(3, phase_sel)), 1);
    P = phase_sel;
    chk("fixed mode powers down unused cells", $countones(cell_en), P);
    chk("fixed mode one output", $countones(buf_en), 1);
    offset_ps = offset_ps - 2 * int'(cell_delay_ps);
    repeat (400) @(negedge clk);
    chk("fixed mode phase frozen", phase_sel, P);
    // ---------------- 160 Mbit/s: even cells, 390 ps each
    restart(RATE_160, 390);
    mode = MODE_STATIC;
    offset_ps = offset_for(9);
    repeat (20) @(negedge clk);
    mode = MODE_AUTO;
    wait_windows(8);
    chk("160 locked", locked, 1);
    chk("160 start-up phase", int'(centre_ok(9, phase_sel)), 1);
    clean_errors(200);
    chk("160 bit errors", bit_errs, 0);
    chk("160 uses all 28 cells", $countones(cell_en), 28);
    chk("160 presents 14 outputs", $countones(buf_en), 14);
    // ---------------- static mode with a chosen phase
    mode = MODE_STATIC;
    static_phase = 4'd6;
    repeat (200) @(negedge clk);
    chk("static phase", phase_sel, 6);
    chk("static cells up to tap 12", $countones(cell_en), 12);
    clean_errors(200);
    chk("static bit errors", bit_errs, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
