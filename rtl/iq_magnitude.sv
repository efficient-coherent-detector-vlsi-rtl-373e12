// iq_magnitude: magnitude estimate |I + jQ| of one received sample.
//
// Uses max(|I|,|Q|) + ceil(min(|I|,|Q|)/2). For a >= b >= 0,
// (a + b/2)^2 >= a^2 + b^2 whenever a >= 3b/4, so the estimate never falls
// below the true magnitude and exceeds it by at most 12%. An upper bound is
// what the best-metric speculation needs: the speculated best metric must not
// drop below a real path's metric. The estimator itself is this design's
// choice. Purely combinational.
module iq_magnitude
  import cpm_pkg::*;
(
  input  iq_t               i_s,
  input  iq_t               q_s,
  output logic [IQ_W:0]     mag
);
  logic [IQ_W-1:0] ai, aq, mx, mn;

  always_comb begin
    ai  = i_s[IQ_W-1] ? IQ_W'(-i_s) : IQ_W'(i_s);   // -2^(IQ_W-1) maps to 2^(IQ_W-1)
    aq  = q_s[IQ_W-1] ? IQ_W'(-q_s) : IQ_W'(q_s);
    mx  = (ai > aq) ? ai : aq;
    mn  = (ai > aq) ? aq : ai;
    mag = (IQ_W+1)'(mx) + (IQ_W+1)'((mn + 1'b1) >> 1);
  end
endmodule
