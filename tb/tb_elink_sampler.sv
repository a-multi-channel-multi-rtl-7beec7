// tb_elink_sampler: presents delayed-phase patterns as they look when a data
// transition falls between phases P-1 and P (phases below P already show the
// new bit, the others the old one) and checks the samples, the edge flags
// (expected at phases P-1 and P only) and the selected output bit.  Also
// checks that nothing is sampled without sample_en.
`timescale 1ps/1ps
module tb_elink_sampler;
  import elink_pkg::*;
  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic                  sample_en = 1'b0;
  logic [NUM_PHASES-1:0] phase = '0;
  logic [PHASE_W-1:0]    sel = '0;
  logic [NUM_PHASES-1:0] sampled, edges;
  logic                  edges_valid, ser_data_out;
  int checks = 0, failures = 0;

  elink_sampler dut (.*);

  always #390 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [NUM_PHASES-1:0] got, logic [NUM_PHASES-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int trial = 0; trial < 200; trial++) begin
      logic newb, oldb;
      int   P;
      logic [NUM_PHASES-1:0] pat, exp_e;
      oldb = trial[0];
      newb = ~oldb;
      P    = 1 + ($urandom % (NUM_PHASES - 1));   // 1..14
      for (int i = 0; i < NUM_PHASES; i++) pat[i] = (i < P) ? newb : oldb;
      exp_e = '0;
      for (int k = 1; k < NUM_PHASES - 1; k++) if (k == P - 1 || k == P) exp_e[k] = 1'b1;
      @(negedge clk);
      phase     = pat;
      sel       = PHASE_W'($urandom % NUM_PHASES);
      sample_en = 1'b1;
      @(negedge clk);
      sample_en = 1'b0;
      chk("sampled", sampled, pat);
      chk("edges", edges, exp_e);
      checks++;
      if (ser_data_out !== pat[sel] || edges_valid !== 1'b1) begin
        failures++;
        $display("FAIL output sel=%0d got %b", sel, ser_data_out);
      end
      // without sample_en nothing changes
      phase = ~pat;
      @(negedge clk);
      chk("hold", sampled, pat);
      checks++;
      if (edges_valid !== 1'b0) begin
        failures++;
        $display("FAIL edges_valid without sample_en");
      end
    end
    // a steady input: no edges at all
    @(negedge clk);
    phase = '1;
    sample_en = 1'b1;
    @(negedge clk);
    sample_en = 1'b0;
    chk("no edge on steady data", edges, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
