// processing_element: PE_i of the SPEC-T decoder, serving one survivor.
//
// Path extension: the survivor held in the companion register array PD_i is
// extended by all M = 4 symbols. One branch_metric_unit per symbol computes
// bm, and each extended path's metric difference to the speculated best
// metric becomes
//   d' = d + inc - bm - (e_apply ? E : 0),
// clamped to [0, 2^D_W - 1]. inc is the speculation increment (sum of sample
// magnitudes); E is the correction supplied every v depths.
//
// Path purge of the extended paths (evaluated on the registered d' held in
// PD_i, so the purge can be repeated with a new threshold without extending
// again): an extended path stays alive when the parent is valid, d' <= T and,
// when `pb_en` is set, the parent agrees with the released symbols. The
// released symbols rel[k] = alpha[m-L-k] (k = 0..v-1) belong to the snapshot
// of depth m = n - v; in the parent's history (hist[p] = alpha[n-1-p]) they
// sit at p = L + v - 1 + k. `agree` reports that comparison so the decoder can
// skip the agreement purge when no path agrees at all.
//
// Combinational. The path is a packed struct {valid, theta, hist[HIST], d}.
module processing_element
  import cpm_pkg::*;
#(
  parameter int unsigned V    = 8,
  parameter int unsigned HIST = L_PULSE + 2 * V
)(
  input  logic                     p_valid,
  input  theta_t                   p_theta,
  input  sym_t [HIST-1:0]          p_hist,
  input  metric_t                  p_d,
  input  iq_sym_t                  smp,
  input  mag_t                     inc,
  input  logic                     e_apply,
  input  metric_t                  e_val,
  output metric_t [M_ARY-1:0]      ext_d,     // extended metrics, to PD_i
  input  metric_t [M_ARY-1:0]      reg_d,     // registered extended metrics
  input  thr_t                     thr,
  input  logic                     pb_en,
  input  sym_t [V-1:0]             rel,
  output logic                     agree,
  output logic [M_ARY-1:0]         alive
);
  localparam int unsigned XW = D_W + 3;
  bm_t bm [M_ARY];

  for (genvar s = 0; s < M_ARY; s++) begin : g_bm
    branch_metric_unit u_bmu (
      .theta(p_theta), .corr(p_hist[L_PULSE-2:0]), .cand(sym_t'(s)),
      .smp(smp), .bm(bm[s]));
  end

  always_comb begin
    logic signed [XW-1:0] x;
    for (int s = 0; s < M_ARY; s++) begin
      x = $signed({3'b000, p_d}) + $signed(XW'(inc)) - XW'(bm[s])
          - (e_apply ? $signed({3'b000, e_val}) : XW'(0));
      if (x < 0)                                ext_d[s] = '0;
      else if (x > $signed(XW'(2 ** D_W - 1)))  ext_d[s] = '1;
      else                                      ext_d[s] = metric_t'(x);
    end
  end

  always_comb begin
    agree = 1'b1;
    for (int k = 0; k < V; k++)
      if (p_hist[L_PULSE + V - 1 + k] != rel[k]) agree = 1'b0;
    for (int s = 0; s < M_ARY; s++)
      alive[s] = p_valid && (reg_d[s] <= metric_t'(thr)) && (!pb_en || agree);
  end
endmodule
