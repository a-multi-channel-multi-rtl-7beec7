// tb_elink_phase_selector: drives synthetic edge flags, as the sampler would
// produce them for random data whose transitions fall at phase P (flag at P
// always set on a transition, flags at P-1 and P+1 random, the same again one
// bit period = 8 phases away), and checks the selected phase against values
// worked out by hand from the rules: start-up centre P+4 or P-4 within 4..11,
// lock after LOCK_WINDOWS agreeing windows, one step per window while
// tracking, a jump of a bit period when the centre leaves the delay range,
// frozen phase in fixed mode, static phase in static mode, the decision
// window length, and recovery from an upset in one of the three copies of
// the phase register.
`timescale 1ps/1ps
module tb_elink_phase_selector;
  import elink_pkg::*;
  localparam int unsigned WINDOW = 32;
  localparam int unsigned LOCK_WINDOWS = 4;
  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  edges_valid = 1'b0;
  logic [NUM_PHASES-1:0] edges = '0;
  mode_e                 mode = MODE_STATIC;
  logic [PHASE_W-1:0]    static_phase = 4'd6;
  logic [PHASE_W-1:0]    phase_sel;
  logic                  locked, power_save, window_done;
  int checks = 0, failures = 0;
  int wins = 0;

  elink_phase_selector #(.WINDOW(WINDOW), .LOCK_WINDOWS(LOCK_WINDOWS)) dut (.*);

  always #390 clk = ~clk;
  always @(posedge clk) if (window_done) wins++;

  initial begin
    #500_000_000;
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

  // one bit period of flags for an edge at phase p (p may be outside 0..14)
  function automatic logic [NUM_PHASES-1:0] flags(int p, bit trans);
    logic [NUM_PHASES-1:0] f;
    f = '0;
    if (trans) begin
      for (int q = p - 16; q <= p + 16; q += 8) begin
        if (q >= 1 && q <= NUM_PHASES - 2) f[q] = 1'b1;
        if (q - 1 >= 1 && q - 1 <= NUM_PHASES - 2) f[q-1] = $urandom % 2;
        if (q + 1 >= 1 && q + 1 <= NUM_PHASES - 2) f[q+1] = $urandom % 2;
      end
    end
    return f;
  endfunction

  // feed data with edges at p until n more windows have ended
  task automatic windows(int p, int n);
    int target;
    target = wins + n;
    while (wins < target) begin
      @(negedge clk);
      edges_valid = 1'b1;
      edges       = flags(p, $urandom % 2);
      @(posedge clk);
      #1;
    end
    @(negedge clk);
    edges_valid = 1'b0;
    edges       = '0;
  endtask

  initial begin
    int t0, ntr;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // ---- static mode
    repeat (3) @(negedge clk);
    chk("static phase", phase_sel, 6);
    chk("static locked", locked, 1);
    chk("static power save", power_save, 1);
    windows(3, 2);
    chk("static ignores data", phase_sel, 6);
    // ---- window length: WINDOW transitions per decision
    mode = MODE_AUTO;
    @(negedge clk);
    ntr = 0;
    t0  = wins;
    while (wins == t0) begin
      @(negedge clk);
      edges_valid = 1'b1;
      edges       = flags(3, 1'b1);
      ntr++;
      @(posedge clk);
      #1;
    end
    chk("transitions per window", ntr, WINDOW);
    edges_valid = 1'b0;
    // ---- automatic start-up: edge at 3 -> centre 7 (the edge at 11 agrees)
    windows(3, LOCK_WINDOWS + 1);
    chk("search centre", phase_sel, 7);
    chk("auto locked", locked, 1);
    chk("auto keeps all phases", power_save, 0);
    // ---- tracking, one phase per window
    windows(2, 1);
    chk("track step 1", phase_sel, 6);
    windows(0, 1);
    chk("track one step per window", phase_sel, 5);
    windows(0, 1);
    chk("track reaches 4", phase_sel, 4);
    windows(-1, 1);
    chk("track leaves start-up range", phase_sel, 3);
    windows(-4, 3);
    chk("track to phase 0", phase_sel, 0);
    // centre now 7 (edge at 3): more than half a bit away -> jump
    windows(3, 1);
    chk("bit slip jump", phase_sel, 7);
    // ---- upset in one copy of the phase register is outvoted and repaired
    @(negedge clk);
    dut.sel_q[1] = 4'd12;
    #1;
    chk("TMR output", phase_sel, 7);
    @(negedge clk);
    chk("TMR repaired", dut.sel_q[1], 7);
    // ---- fixed phase with automatic start-up: edge at 10 -> centre 6
    mode = MODE_FIXED_AUTO;
    @(negedge clk);
    windows(10, 1);
    chk("fixed not yet locked", locked, 0);
    windows(10, LOCK_WINDOWS);
    chk("fixed centre", phase_sel, 6);
    chk("fixed locked", locked, 1);
    chk("fixed power save", power_save, 1);
    windows(12, 3);
    chk("fixed frozen", phase_sel, 6);
    // ---- start-up with the edge late in the line: edge 9 -> centre 5
    mode = MODE_AUTO;
    @(negedge clk);
    windows(9, LOCK_WINDOWS + 1);
    chk("search centre from late edge", phase_sel, 5);
    // ---- back to static
    mode = MODE_STATIC;
    static_phase = 4'd13;
    repeat (3) @(negedge clk);
    chk("static again", phase_sel, 13);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
