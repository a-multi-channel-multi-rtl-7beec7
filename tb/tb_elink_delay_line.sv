// tb_elink_delay_line: sends an edge into the line model and measures when it
// reaches each presented phase: phase p must be p cell delays late at the
// high rates, 2p cell delays at 160 Mbit/s; checks that disabled outputs stay
// low and that a powered-down cell stops the edge.
`timescale 1ps/1ps
module tb_elink_delay_line;
  import elink_pkg::*;
  logic                  in = 1'b0;
  rate_e                 rate = RATE_1280;
  logic [NUM_CELLS-1:0]  cell_en = '1;
  logic [NUM_CELLS-1:0]  buf_en = '1;
  int unsigned           cell_delay_ps = 98;
  logic [NUM_PHASES-1:0] phase;
  int checks = 0, failures = 0;
  realtime t_ph [NUM_PHASES];
  realtime t_in;

  elink_delay_line dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar p = 0; p < NUM_PHASES; p++) begin : g_mon
    always @(posedge phase[p]) t_ph[p] = $realtime;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic edge_test(rate_e r, int unsigned d);
    rate = r;
    cell_delay_ps = d;
    in = 1'b0;
    #10000;
    t_in = $realtime;
    in = 1'b1;
    #20000;
    for (int p = 0; p < NUM_PHASES; p++)
      chk($sformatf("rate %0d phase %0d delay", r, p), int'(t_ph[p] - t_in),
          int'(d) * ((r == RATE_160) ? 2 * p : p));
  endtask

  initial begin
    edge_test(RATE_1280, 98);
    edge_test(RATE_640, 196);
    edge_test(RATE_320, 390);
    edge_test(RATE_160, 390);
    // outputs disabled except phase 5
    rate = RATE_320;
    buf_en = '0;
    buf_en[4] = 1'b1;
    in = 1'b0;
    #10000;
    in = 1'b1;
    #10000;
    chk("enabled output", phase[5], 1);
    chk("disabled outputs", int'(phase & ~15'b100001), 0);
    // cells beyond 5 powered down
    buf_en = '1;
    cell_en = 28'h000001F;
    in = 1'b0;
    #10000;
    in = 1'b1;
    #10000;
    chk("cell 5 still passes", phase[5], 1);
    chk("cell 6 stopped", phase[6], 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
