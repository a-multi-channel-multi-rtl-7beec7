// tb_elink_dl_ctrl: for every rate, power-save setting and phase, checks the
// delay-line enables against the rules worked out here: all phases need cells
// 1..14 (1..28 at 160 Mbit/s) with the presented outputs on; power save needs
// only the cells up to the selected tap and that tap's output.
`timescale 1ps/1ps
module tb_elink_dl_ctrl;
  import elink_pkg::*;
  rate_e                 rate;
  logic                  power_save;
  logic [PHASE_W-1:0]    phase_sel;
  logic [NUM_CELLS-1:0]  cell_en, buf_en;
  int checks = 0, failures = 0;

  elink_dl_ctrl dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      for (int ps = 0; ps < 2; ps++) begin
        for (int p = 0; p < NUM_PHASES; p++) begin
          logic [NUM_CELLS-1:0] exp_cell, exp_buf;
          int tapi;
          rate       = rate_e'(r);
          power_save = ps[0];
          phase_sel  = PHASE_W'(p);
          #10;
          tapi = (r == 0) ? 2 * p : p;
          exp_cell = '0;
          exp_buf  = '0;
          if (ps == 1) begin
            for (int c = 1; c <= tapi; c++) exp_cell[c-1] = 1'b1;
            if (tapi > 0) exp_buf[tapi-1] = 1'b1;
          end else if (r == 0) begin
            exp_cell = '1;
            for (int c = 2; c <= 28; c += 2) exp_buf[c-1] = 1'b1;
          end else begin
            exp_cell = 28'h0003FFF;
            exp_buf  = 28'h0003FFF;
          end
          checks++;
          if (cell_en !== exp_cell || buf_en !== exp_buf) begin
            failures++;
            $display("FAIL rate=%0d ps=%0d p=%0d cell=%h/%h buf=%h/%h",
                     r, ps, p, cell_en, exp_cell, buf_en, exp_buf);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
