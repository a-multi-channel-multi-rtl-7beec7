// tb_elink_prbs7_checker: feeds a PRBS7 stream generated here from its
// recurrence (bit n = bit n-7 XOR bit n-6), checks that the checker
// synchronises and counts no error, then flips single bits and checks that
// each flip is counted three times, and that an all-zero input is all errors.
`timescale 1ps/1ps
module tb_elink_prbs7_checker;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en = 1'b0;
  logic        din = 1'b0;
  logic        clear = 1'b0;
  logic [31:0] bit_cnt, err_cnt;
  int          checks = 0, failures = 0;
  logic        seq [0:2047];

  elink_prbs7_checker dut (.*);

  always #390 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic send(logic b);
    @(negedge clk);
    en  = 1'b1;
    din = b;
    @(negedge clk);
    en  = 1'b0;
  endtask

  initial begin
    for (int n = 0; n < 7; n++) seq[n] = 1'b1;
    for (int n = 7; n < 2048; n++) seq[n] = seq[n-7] ^ seq[n-6];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20; n++) send(seq[n]);
    check("bits after 20", bit_cnt, 20);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check("bits cleared", bit_cnt, 0);
    for (int n = 20; n < 520; n++) send(seq[n]);
    check("bits counted", bit_cnt, 500);
    check("no errors on clean PRBS7", err_cnt, 0);
    send(~seq[520]);
    for (int n = 521; n < 600; n++) send(seq[n]);
    check("one flipped bit", err_cnt, 3);
    send(~seq[600]);
    for (int n = 601; n < 700; n++) send(seq[n]);
    check("two flipped bits", err_cnt, 6);
    for (int n = 0; n < 7; n++) send(1'b0);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    for (int n = 0; n < 50; n++) send(1'b0);
    check("dead input counted as errors", err_cnt, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
