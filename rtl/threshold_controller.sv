// threshold_controller: keeps the purge threshold T between depths and
// enforces the survivor window [M_MIN, M_MAX].
//
// While the decoder evaluates a purge (`eval`), the number of surviving
// extended paths n_alive is checked. Above M_MAX, T is reduced by 10%; below
// M_MIN, T is raised by 10%; in both cases `repeat_req` asks the decoder to
// repeat the purge of the current depth with the new T (re-extension is not
// needed: the extended metrics are kept). Otherwise `accept` is raised.
// The 10% step is T/10 (integer), at least 1. T stays within [0, T_MAX].
// Design choices beyond the SPEC-T description: the purge is also accepted when a raise
// could not add survivors (all n_cand extended paths already alive, or T at
// T_MAX), when a cut is impossible (T = 0), or after MAX_REP repeats of one
// depth, so the loop always ends; an excess of survivors left by the last two
// cases is trimmed on the token bus.
//
// Timing: decision combinational in the eval cycle, T updated at the clock
// edge, so each repeat costs one cycle. T and the repeat count reset to
// T_INIT and 0 on `init`.
module threshold_controller
  import cpm_pkg::*;
#(
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned M_MAX   = 32,
  parameter int unsigned M_MIN   = 8,
  parameter int unsigned T_INIT  = 256,
  parameter int unsigned T_MAX   = 2 ** T_W - 1,
  parameter int unsigned MAX_REP = 64
)(
  input  logic              clk,
  input  logic              init,
  input  logic              eval,
  input  logic [CNT_W-1:0]  n_alive,
  input  logic [CNT_W-1:0]  n_cand,
  output thr_t              thr,
  output logic              accept,
  output logic              repeat_req,
  output logic              t_down,
  output logic              t_up
);
  logic [7:0] rep_cnt;
  thr_t       step;
  logic       at_limit;

  always_comb begin
    step       = (thr / thr_t'(10) == '0) ? thr_t'(1) : thr / thr_t'(10);
    at_limit   = (rep_cnt >= 8'(MAX_REP));
    t_down     = eval && !at_limit && (n_alive > CNT_W'(M_MAX)) && (thr != '0);
    t_up       = eval && !at_limit && (n_alive < CNT_W'(M_MIN)) && (n_alive < n_cand)
                 && (thr < thr_t'(T_MAX));
    repeat_req = t_down || t_up;
    accept     = eval && !repeat_req;
  end

  always_ff @(posedge clk) begin
    if (init) begin
      thr     <= thr_t'(T_INIT);
      rep_cnt <= '0;
    end else if (eval) begin
      if (t_down)
        thr <= thr - step;
      else if (t_up)
        thr <= (32'(thr) + 32'(step) > T_MAX) ? thr_t'(T_MAX) : thr + step;
      rep_cnt <= accept ? 8'd0 : rep_cnt + 8'd1;
    end
  end
endmodule
