// tb_prbs_source: test-bench model of a front-end eLink transmitter.  Sends
// the PRBS7 sequence (bit n = bit n-7 XOR bit n-6) with bit period tbit_ps;
// bit transitions happen at n*tbit_ps + offset_ps.  offset_ps may change at
// any time; the change takes effect at the next bit, which models a drifting
// input delay.  jitter_ps adds a uniformly distributed random shift of up to
// +-jitter_ps to every transition (not accumulated).
`timescale 1ps/1ps
module tb_prbs_source #(
  parameter logic [6:0] SEED = 7'h5A
) (
  input  int unsigned tbit_ps,
  input  int          offset_ps,
  input  int unsigned jitter_ps,
  output logic        dout
);
  logic [6:0] hist;
  longint     nominal;   // nominal time of the next transition
  longint     jit;
  int         applied;   // offset already included in nominal
  logic       nb;

  initial begin
    dout    = 1'b0;
    hist    = (SEED == 0) ? 7'h7F : SEED;
    applied = offset_ps;
    nominal = longint'(offset_ps) + longint'(tbit_ps);
    #(nominal);
    forever begin
      nb      = hist[6] ^ hist[5];
      hist    = {hist[5:0], nb};
      dout    = nb;
      nominal = nominal + longint'(tbit_ps) + longint'(offset_ps - applied);
      applied = offset_ps;
      jit     = (jitter_ps == 0) ? 0
              : longint'($urandom % (2 * jitter_ps + 1)) - longint'(jitter_ps);
      if (nominal + jit > $time) #(nominal + jit - $time);
      else #1;
    end
  end
endmodule
