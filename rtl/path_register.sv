// path_register: register array PD_i of the SPEC-T decoder.
//
// Holds one survivor (valid, phase state theta, symbol history hist with
// hist[0] the newest symbol, metric difference d) and, during a detection
// depth, the metrics of its M = 4 extended paths and which of them survived
// the purge. Extended path s of the survivor is
//   {valid = 1, theta' = (theta + alpha(hist[L-2])) mod 5,
//    hist' = {hist[HIST-2:0], s}, d = ext_d[s]}:
// the symbol leaving the L-1-symbol correlative window moves into theta.
// The history is HIST = L + 2v symbols deep: the v oldest are compared with
// the released symbols every v depths, the next v are sent to the correction
// module, the newest L-1 are the correlative state.
//
// After the purge the array is empty (no extended path alive), carefree (one)
// or congested (more than one). On the token bus a congested array offers its
// highest-numbered live extended path (bc_path) and, when granted the
// broadcasting token, drops it from its own set; an empty array granted the
// receiving token stores the bus word as its new survivor and is marked fresh
// (no longer empty). On commit every array that is not fresh takes its single
// live extended path, or becomes invalid if none is alive.
//
// Commands (one per cycle, from the decoder sequencer):
//   init      load the start state: array 0 holds the root path (theta 0,
//             history filled with INIT_SYM, d = 0), the others are empty
//   ext_load  register ext_d from the PE
//   pur_load  register alive flags from the PE
//   bt_grant  drop the offered path (broadcast or, with no receiver, discard)
//   rt_grant  take bus_path
//   commit    advance to the new survivor
module path_register
  import cpm_pkg::*;
#(
  parameter int unsigned V        = 8,
  parameter int unsigned HIST     = L_PULSE + 2 * V,
  parameter bit          ROOT     = 1'b0,
  parameter sym_t        INIT_SYM = 2'd0
)(
  input  logic                   clk,
  input  logic                   init,
  input  logic                   ext_load,
  input  metric_t [M_ARY-1:0]    ext_d,
  input  logic                   pur_load,
  input  logic [M_ARY-1:0]       alive_in,
  input  logic                   bt_grant,
  input  logic                   rt_grant,
  input  logic                   commit,
  input  logic [HIST*2+D_W+3:0]  bus_path,
  // survivor
  output logic                   p_valid,
  output theta_t                 p_theta,
  output sym_t [HIST-1:0]        p_hist,
  output metric_t                p_d,
  output metric_t [M_ARY-1:0]    reg_d,
  // token bus view
  output logic                   is_empty,
  output logic                   is_congested,
  output logic [HIST*2+D_W+3:0]  bc_path
);
  typedef struct packed {
    logic             valid;
    theta_t           theta;
    sym_t [HIST-1:0]  hist;
    metric_t          d;
  } path_t;

  path_t               cur;
  logic [M_ARY-1:0]    alive;
  logic                fresh;
  path_t               child [M_ARY];
  logic [2:0]          n_alive;
  logic [1:0]          hi_idx, lo_idx;

  always_comb begin
    for (int s = 0; s < M_ARY; s++) begin
      child[s].valid = 1'b1;
      child[s].theta = theta_step(cur.theta, cur.hist[L_PULSE-2]);
      child[s].hist  = {cur.hist[HIST-2:0], sym_t'(s)};
      child[s].d     = reg_d[s];
    end
    n_alive = '0;
    hi_idx  = 0;
    lo_idx  = 0;
    for (int s = 0; s < M_ARY; s++) begin
      n_alive = n_alive + 3'(alive[s]);
      if (alive[s]) hi_idx = 2'(s);
    end
    for (int s = M_ARY - 1; s >= 0; s--)
      if (alive[s]) lo_idx = 2'(s);
  end

  assign is_empty     = !fresh && (alive == '0);
  assign is_congested = (n_alive > 3'd1);
  assign bc_path      = child[hi_idx];

  always_ff @(posedge clk) begin
    if (init) begin
      cur.valid <= ROOT;
      cur.theta <= '0;
      cur.hist  <= {HIST{INIT_SYM}};
      cur.d     <= '0;
      alive     <= '0;
      fresh     <= 1'b0;
      reg_d     <= '0;
    end else begin
      if (ext_load) reg_d <= ext_d;
      if (pur_load) alive <= alive_in;
      if (bt_grant) alive[hi_idx] <= 1'b0;
      if (rt_grant) begin
        cur   <= path_t'(bus_path);
        fresh <= 1'b1;
      end
      if (commit) begin
        fresh <= 1'b0;
        alive <= '0;
        if (!fresh) begin
          if (n_alive == 3'd1) cur <= child[lo_idx];
          else                 cur.valid <= 1'b0;
        end
      end
    end
  end

  assign p_valid = cur.valid;
  assign p_theta = cur.theta;
  assign p_hist  = cur.hist;
  assign p_d     = cur.d;

  // a congested array cannot also be receiving, and commit happens only
  // once the bus has cleared all congestion
  always_ff @(posedge clk) begin
    if (!init) begin
      assert (!(rt_grant && !is_empty)) else $error("PD received while not empty");
      assert (!(commit && is_congested)) else $error("PD committed while congested");
    end
  end
endmodule
