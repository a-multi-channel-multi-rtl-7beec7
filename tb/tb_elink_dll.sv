// tb_elink_dll: runs the DLL model on a 1.28 GHz clock at every data rate and
// checks that it locks and that the cell delay then is T_bit/8 (T_bit/16 at
// 160 Mbit/s) within the lock tolerance, that lock is lost and regained when
// the rate changes, and that the delay stays inside the cell's range.
`timescale 1ps/1ps
module tb_elink_dll;
  import elink_pkg::*;
  logic        clk_fast = 1'b0;
  logic        rst_n = 1'b0;
  rate_e       rate = RATE_1280;
  int unsigned cell_delay_ps;
  logic        locked;
  int checks = 0, failures = 0;

  elink_dll dut (.*);

  always #390 clk_fast = ~clk_fast;   // 780 ps period

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp, int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d +- %0d", what, got, exp, tol);
    end
  endtask

  task automatic lock_at(rate_e r, int exp_ps);
    int n;
    rate = r;
    @(posedge clk_fast);
    n = 0;
    while (locked && n < 4) begin @(posedge clk_fast); n++; end
    n = 0;
    while (!locked && n < 20000) begin @(posedge clk_fast); n++; end
    chk($sformatf("rate %0d locks", r), int'(locked), 1, 0);
    chk($sformatf("rate %0d cell delay", r), int'(cell_delay_ps), exp_ps, 2);
  endtask

  initial begin
    repeat (3) @(posedge clk_fast);
    chk("reset delay", int'(cell_delay_ps), 50, 0);
    rst_n = 1'b1;
    lock_at(RATE_1280, 97);   // 780/8
    lock_at(RATE_640, 195);   // 1560/8
    lock_at(RATE_320, 390);   // 3120/8
    lock_at(RATE_160, 390);   // 6240/16
    lock_at(RATE_1280, 97);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
