// tb_elink_delay_cell: measures the delay of the cell model from input edge
// to output edge for several control settings (expected: two half-cell
// delays), and checks power-down (output stays low) and output disable (tap
// stays low while the chain output still toggles).
`timescale 1ps/1ps
module tb_elink_delay_cell;
  logic        in = 1'b0;
  logic        cell_en = 1'b1;
  logic        buf_en = 1'b1;
  int unsigned half_delay_ps = 50;
  logic        out, tap;
  int checks = 0, failures = 0;
  realtime t_in, t_out, t_tap;

  elink_delay_cell dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge out or negedge out) t_out = $realtime;
  always @(posedge tap or negedge tap) t_tap = $realtime;

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    for (int h = 25; h <= 200; h += 35) begin
      half_delay_ps = h;
      #1000;
      t_in = $realtime;
      in   = ~in;
      #1000;
      chk("out delay", int'(t_out - t_in), 2 * h);
      chk("tap delay", int'(t_tap - t_in), 2 * h);
      chk("out value", out, in);
    end
    // output disabled: tap low, chain continues
    buf_en = 1'b0;
    in = 1'b1;
    #1000;
    chk("tap disabled", tap, 0);
    chk("chain with tap disabled", out, 1);
    // powered down: nothing propagates
    buf_en  = 1'b1;
    cell_en = 1'b0;
    #1000;
    in = 1'b0;
    #500;
    in = 1'b1;
    #1000;
    chk("powered down out", out, 0);
    chk("powered down tap", tap, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
