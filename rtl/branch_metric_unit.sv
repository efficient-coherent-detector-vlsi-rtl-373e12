// branch_metric_unit: coherent branch metric of one trellis branch.
//
// For the branch that extends trellis state (theta, alpha[n-1..n-L+1]) with
// candidate symbol alpha[n], the ideal noiseless CPM phase at sample i
// (i = 1..N, at time nT + iT/N) is
//   phi_i = theta*2*pi/5 + 2*pi*h * sum_{j=0}^{L-1} alpha[n-j] q((j + i/N) T).
// The metric is sum_i A_i cos(phi_i - phihat_i) where A_i e^{j phihat_i} is
// the received sample I_i + jQ_i. That equals sum_i Re{(I_i + jQ_i)e^{-j phi_i}}
// = sum_i (I_i cos phi_i + Q_i sin phi_i), which is what is computed here, so
// no polar conversion of the samples is needed (an implementation choice).
// The phase sum is done in a PH_W-bit one-turn word that wraps naturally, the
// upper LUT_AW bits (rounded) address a cos/sin table, and each sample's
// product sum is divided by 2^(LUT_W-1) so that the metric is on the same
// scale as the sample magnitude (slightly below it, never above).
//
// Purely combinational. Ports:
//   theta  phase state 0..4        corr  previous L-1 symbols, corr[0] newest
//   cand   candidate symbol code   smp   the N I-Q samples of this symbol
//   bm     signed branch metric
module branch_metric_unit
  import cpm_pkg::*;
(
  input  theta_t                 theta,
  input  sym_t [L_PULSE-2:0]     corr,
  input  sym_t                   cand,
  input  iq_sym_t                smp,
  output bm_t                    bm
);

  localparam int unsigned PROD_W = IQ_W + LUT_W + 1;

  phase_t                     phi  [N_OS];
  logic [LUT_AW-1:0]          idx  [N_OS];
  logic signed [PROD_W-1:0]   acc  [N_OS];

  always_comb begin
    bm = '0;
    for (int i = 0; i < N_OS; i++) begin
      phi[i] = THETA_PH[theta];
      phi[i] = phase_t'(phi[i] + phase_t'(sym_alpha(cand) * QTAB[i]));
      for (int j = 1; j < L_PULSE; j++)
        phi[i] = phase_t'(phi[i] + phase_t'(sym_alpha(corr[j-1]) * QTAB[j*N_OS + i]));
      idx[i] = LUT_AW'((phi[i] + phase_t'(2 ** (PH_W - LUT_AW - 1))) >> (PH_W - LUT_AW));
      acc[i] = PROD_W'(smp.i[i] * COS_LUT[idx[i]]) + PROD_W'(smp.q[i] * SIN_LUT[idx[i]]);
      bm = bm + bm_t'(acc[i] >>> (LUT_W - 1));
    end
  end

endmodule
