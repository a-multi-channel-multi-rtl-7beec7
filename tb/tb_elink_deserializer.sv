// tb_elink_deserializer: for each of the six group configurations
// (10.24 G: 1x1280, 2x640, 4x320; 5.12 G: 1x640, 2x320, 4x160) drives random
// bit streams into the channels in use, each bit held for its bit period and
// changing one cycle after its sampling edge as the sampler delivers it.  It
// checks that a frame strobe comes every 32 cycles (40 MHz), that each
// channel's word has the width 32/(channels) or 16/(channels), and that the
// words of consecutive frames are consecutive pieces of the channel's stream,
// oldest bit first, at one fixed latency; unused channels must read 0.
`timescale 1ps/1ps
module tb_elink_deserializer;
  import elink_pkg::*;
  logic                    clk = 1'b0;
  logic                    rst_n = 1'b0;
  rate_e                   rate;
  logic                    up10g;
  logic [4:0]              cnt;
  logic [CH_PER_GROUP-1:0] ch_data;
  logic [FRAME_BITS-1:0]   frame;
  logic [FRAME_BITS-1:0]   ch_word [CH_PER_GROUP];
  logic                    frame_valid;
  int checks = 0, failures = 0;

  logic stream [CH_PER_GROUP][0:4095];
  int   bitno  [CH_PER_GROUP];

  elink_deserializer dut (.*);

  always #390 clk = ~clk;

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel drivers: bit n is presented from one cycle after sampling edge n
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int c = 0; c < CH_PER_GROUP; c++) bitno[c] <= 0;
      ch_data <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if ((int'(cnt) % int'(cycles_per_bit(rate))) == 0) begin
        for (int c = 0; c < CH_PER_GROUP; c++) begin
          ch_data[c] <= stream[c][bitno[c] % 4096];
          bitno[c]   <= bitno[c] + 1;
        end
      end
    end
  end

  task automatic run_cfg(rate_e r, logic u);
    int  w, nact, last_fv, nw;
    logic [31:0] words [CH_PER_GROUP][0:63];
    rate  = r;
    up10g = u;
    for (int c = 0; c < CH_PER_GROUP; c++)
      for (int n = 0; n < 4096; n++) stream[c][n] = $urandom % 2;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    nact = 0;
    for (int c = 0; c < CH_PER_GROUP; c++) if (channel_active(r, u, c)) nact++;
    w = (u ? 32 : 16) / nact;
    checks++;
    if (w != (FRAME_BITS >> entry_level(r))) begin
      failures++;
      $display("FAIL word width %0d", w);
    end
    nw      = 0;
    last_fv = -1;
    for (int cyc = 0; cyc < 32 * 40; cyc++) begin
      @(negedge clk);
      if (frame_valid) begin
        if (last_fv >= 0) begin
          checks++;
          if (cyc - last_fv != 32) begin
            failures++;
            $display("FAIL frame spacing %0d", cyc - last_fv);
          end
        end
        last_fv = cyc;
        if (cyc > 32 * 4) begin
          for (int c = 0; c < CH_PER_GROUP; c++) words[c][nw] = ch_word[c];
          nw++;
        end
      end
    end
    for (int c = 0; c < CH_PER_GROUP; c++) begin
      int b0;
      if (!channel_active(r, u, c)) begin
        checks++;
        if (words[c][0] !== '0 || words[c][nw-1] !== '0) begin
          failures++;
          $display("FAIL unused channel %0d not 0", c);
        end
        continue;
      end
      // the latency: where the first four words sit in the stream
      b0 = -1;
      for (int b = 0; b < 1024 && b0 < 0; b++) begin
        bit ok;
        ok = 1'b1;
        for (int f = 0; f < 4; f++)
          for (int i = 0; i < w; i++)
            if (words[c][f][w-1-i] !== stream[c][b + f * w + i]) ok = 1'b0;
        if (ok) b0 = b;
      end
      checks++;
      if (b0 < 0) begin
        failures++;
        $display("FAIL rate=%0d up10g=%0d ch%0d: words not found in stream", r, u, c);
        continue;
      end
      for (int f = 4; f < nw; f++) begin
        logic [31:0] exp;
        exp = '0;
        for (int i = 0; i < w; i++) exp[w-1-i] = stream[c][b0 + f * w + i];
        checks++;
        if (exp !== words[c][f]) begin
          failures++;
          $display("FAIL rate=%0d up10g=%0d ch%0d frame %0d got %h expected %h", r, u, c, f, words[c][f], exp);
        end
      end
    end
  endtask

  initial begin
    run_cfg(RATE_1280, 1'b1);
    run_cfg(RATE_640,  1'b1);
    run_cfg(RATE_320,  1'b1);
    run_cfg(RATE_640,  1'b0);
    run_cfg(RATE_320,  1'b0);
    run_cfg(RATE_160,  1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
