// specT_decoder: SPEC-T trellis decoder for the CPM coherent detector.
//
// A reduced-search (T-algorithm) decoder whose serial best-metric search is
// moved out of the recursion. The detection module keeps up to M_MAX
// survivors, one per PE_i / PD_i pair, and for each symbol period (depth):
//   1. extends every survivor by the 4 symbols (processing_element), with
//      metrics kept as differences to a speculated best metric that grows by
//      the sum of sample magnitudes (best_metric_spec);
//   2. purges extended paths whose difference exceeds the threshold T; if
//      more than M_MAX or fewer than M_MIN survive, T changes by 10% and the
//      purge of the depth is repeated (threshold_controller);
//   3. moves extra survivors from congested PD_i to empty ones over the
//      token bus, one per cycle (token_bus), then commits.
// Every v depths (correction point) the survivors' metric differences and v
// of their path symbols are handed to the correction module, which finds
// E = min difference and the best path's symbols; at the next correction
// point E is subtracted from all differences (lagged correction), paths that
// disagree with the released symbols are purged, and the symbols are output.
//
// Sequencer, one state per clock cycle:
//   IDLE   accept a symbol's N I-Q samples (in_valid/in_ready); at a
//          correction point wait here (stall) while the search still runs
//   EXT    register extended metrics           PURGE  1 + repeats cycles
//   REDIST 1 cycle per broadcast, then commit  SNAP   correction points only
// so a depth takes 4 + repeats + broadcasts cycles (+1 at a correction
// point) when input is always available.
//
// Output: out_valid pulses with v released symbols, out_sym[0] oldest. Depths
// count from 0 and every v-th one (m = v-1, 2v-1, ...) is a correction point.
// The block released after the snapshot of correction point m holds symbols
// alpha[m-L-v+1 .. m-L]; symbols before depth 0 are the start-up history
// INIT_SYM.
// Event outputs are one-cycle pulses for monitoring: threshold cut/raise
// (ev_repeat = either, one per repeated purge), broadcast, dropped path,
// stall cycle, agreement purge applied/skipped.
//
// Following the SPEC-T description: the detection/correction split, the
// speculation rule, the purge rules, M_MIN/M_MAX with 10% threshold steps, token bus behaviour.
// This design's choices: word widths, metric-difference representation,
// v, M_MAX, M_MIN, initial T, one clock for everything (SPEC-T allows
// a faster bus clock), start state, and the loop guards described in
// threshold_controller and token_bus.
module specT_decoder
  import cpm_pkg::*;
#(
  parameter int unsigned M_MAX    = 32,
  parameter int unsigned M_MIN    = 8,
  parameter int unsigned V        = 8,
  parameter int unsigned T_INIT   = 256,
  parameter int unsigned MAX_REP  = 64,
  parameter sym_t        INIT_SYM = 2'd0
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  output logic              in_ready,
  input  iq_sym_t           in_smp,
  output logic              out_valid,
  output sym_t [V-1:0]      out_sym,
  // status
  output thr_t              thr,
  output logic [$clog2(M_MAX+1)-1:0] n_surv,
  output logic [23:0]       gamma_b,
  output logic              depth_done,
  // event pulses
  output logic              ev_t_down,
  output logic              ev_t_up,
  output logic              ev_repeat,
  output logic              ev_bcast,
  output logic              ev_drop,
  output logic              ev_stall,
  output logic              ev_pb_apply,
  output logic              ev_pb_skip
);
  localparam int unsigned NPD   = M_MAX;
  localparam int unsigned HIST  = L_PULSE + 2 * V;
  localparam int unsigned PKT_W = 2 * HIST + D_W + 4;
  localparam int unsigned CNT_W = $clog2(M_ARY * NPD + 1);
  localparam int unsigned DC_W  = (V > 1) ? $clog2(V) : 1;

  typedef enum logic [2:0] {S_IDLE, S_EXT, S_PURGE, S_REDIST, S_SNAP} state_t;
  state_t state;

  // registered per-depth context
  iq_sym_t        smp_q;
  logic           corr_pt_q, e_apply_q;
  metric_t        e_q;
  sym_t [V-1:0]   rel_q;
  logic [DC_W-1:0] dcnt;

  // per-PD signals
  logic [NPD-1:0]                 p_valid, agree, is_empty, is_cong, bt_g, rt_g;
  theta_t   [NPD-1:0]             p_theta;
  sym_t     [NPD-1:0][HIST-1:0]   p_hist;
  metric_t  [NPD-1:0]             p_d;
  metric_t  [NPD-1:0][M_ARY-1:0]  ext_d, reg_d;
  logic     [NPD-1:0][M_ARY-1:0]  alive;
  logic     [NPD-1:0][PKT_W-1:0]  bc_path;
  logic     [PKT_W-1:0]           bus;
  sym_t     [NPD-1:0][V-1:0]      snap_sym;

  logic  tb_active, tb_drop;
  logic  fire, corr_pt, pb_en, any_agree, any_disagree;
  logic  eval, accept, repeat_req;
  logic  ext_load, pur_load, commit, snap;
  logic [CNT_W-1:0] n_alive, n_cand;
  mag_t  inc;

  // correction module interface
  logic          c_busy, c_res_valid;
  metric_t       c_e;
  sym_t [V-1:0]  c_rel;

  // ---------------- sequencer ----------------
  assign corr_pt  = (dcnt == DC_W'(V - 1));
  assign in_ready = (state == S_IDLE) && !(corr_pt && c_busy);
  assign fire     = in_valid && in_ready;
  assign ext_load = (state == S_EXT);
  assign eval     = (state == S_PURGE);
  assign pur_load = eval && accept;
  assign commit   = (state == S_REDIST) && !tb_active;
  assign snap     = (state == S_SNAP);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      dcnt      <= '0;
      corr_pt_q <= 1'b0;
      e_apply_q <= 1'b0;
      e_q       <= '0;
      rel_q     <= '0;
      smp_q     <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (fire) begin
          smp_q     <= in_smp;
          corr_pt_q <= corr_pt;
          e_apply_q <= corr_pt && c_res_valid;
          e_q       <= c_e;
          rel_q     <= c_rel;
          state     <= S_EXT;
        end
        S_EXT:    state <= S_PURGE;
        S_PURGE:  if (accept) state <= S_REDIST;
        S_REDIST: if (commit) begin
          state <= corr_pt_q ? S_SNAP : S_IDLE;
          dcnt  <= corr_pt_q ? '0 : dcnt + 1'b1;
        end
        S_SNAP:   state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  // ---------------- detection module ----------------
  best_metric_spec u_spec (
    .clk(clk), .rst(rst), .smp(smp_q), .upd(commit),
    .e_apply(e_apply_q), .e_val(e_q), .inc(inc), .gamma_b(gamma_b));

  assign any_agree    = |(agree & p_valid);
  assign any_disagree = |(~agree & p_valid);
  assign pb_en        = corr_pt_q && e_apply_q && any_agree;

  for (genvar g = 0; g < NPD; g++) begin : g_pe
    processing_element #(.V(V), .HIST(HIST)) u_pe (
      .p_valid(p_valid[g]), .p_theta(p_theta[g]), .p_hist(p_hist[g]), .p_d(p_d[g]),
      .smp(smp_q), .inc(inc), .e_apply(e_apply_q), .e_val(e_q),
      .ext_d(ext_d[g]), .reg_d(reg_d[g]), .thr(thr),
      .pb_en(pb_en), .rel(rel_q), .agree(agree[g]), .alive(alive[g]));

    path_register #(.V(V), .HIST(HIST), .ROOT(g == 0), .INIT_SYM(INIT_SYM)) u_pd (
      .clk(clk), .init(rst),
      .ext_load(ext_load), .ext_d(ext_d[g]),
      .pur_load(pur_load), .alive_in(alive[g]),
      .bt_grant(bt_g[g]), .rt_grant(rt_g[g]), .commit(commit), .bus_path(bus),
      .p_valid(p_valid[g]), .p_theta(p_theta[g]), .p_hist(p_hist[g]), .p_d(p_d[g]),
      .reg_d(reg_d[g]), .is_empty(is_empty[g]), .is_congested(is_cong[g]),
      .bc_path(bc_path[g]));

    for (genvar k = 0; k < V; k++) begin : g_snap
      assign snap_sym[g][k] = p_hist[g][L_PULSE + k];
    end
  end

  logic [NPD-1:0] tb_cong, tb_empty;
  assign tb_cong  = (state == S_REDIST) ? is_cong  : '0;
  assign tb_empty = (state == S_REDIST) ? is_empty : '0;

  token_bus #(.NPD(NPD), .PKT_W(PKT_W)) u_bus (
    .congested(tb_cong), .empty(tb_empty), .pkt(bc_path),
    .bt_grant(bt_g), .rt_grant(rt_g), .bus(bus), .active(tb_active), .drop(tb_drop));

  always_comb begin
    n_alive = '0;
    n_cand  = '0;
    n_surv  = '0;
    for (int g = 0; g < NPD; g++) begin
      for (int s = 0; s < M_ARY; s++) n_alive = n_alive + CNT_W'(alive[g][s]);
      n_cand = n_cand + (p_valid[g] ? CNT_W'(M_ARY) : '0);
      n_surv = n_surv + ($bits(n_surv))'(p_valid[g]);
    end
  end

  threshold_controller #(
    .CNT_W(CNT_W), .M_MAX(M_MAX), .M_MIN(M_MIN), .T_INIT(T_INIT), .MAX_REP(MAX_REP)
  ) u_thr (
    .clk(clk), .init(rst), .eval(eval), .n_alive(n_alive), .n_cand(n_cand),
    .thr(thr), .accept(accept), .repeat_req(repeat_req),
    .t_down(ev_t_down), .t_up(ev_t_up));

  // ---------------- correction module ----------------
  correction_module #(.NPD(NPD), .V(V)) u_corr (
    .clk(clk), .rst(rst), .snap(snap), .snap_valid(p_valid), .snap_d(p_d),
    .snap_sym(snap_sym), .take(fire && corr_pt && c_res_valid),
    .busy(c_busy), .res_valid(c_res_valid), .e_val(c_e), .rel_sym(c_rel),
    .out_valid(out_valid), .out_sym(out_sym));

  // ---------------- events ----------------
  assign depth_done  = commit;
  assign ev_repeat   = repeat_req;
  assign ev_bcast    = tb_active && !tb_drop;
  assign ev_drop     = tb_drop;
  assign ev_stall    = (state == S_IDLE) && in_valid && !in_ready;
  assign ev_pb_apply = pur_load && pb_en && any_disagree;
  assign ev_pb_skip  = pur_load && corr_pt_q && e_apply_q && !any_agree;

  // the decoder never leaves a correction point without a finished search
  always_ff @(posedge clk)
    if (!rst && snap) assert (!c_busy) else $error("correction search overrun");
endmodule
