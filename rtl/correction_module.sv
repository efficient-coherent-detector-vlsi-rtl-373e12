// correction_module: lagged correction of the best-metric speculation.
//
// Every v depths the decoder hands over a snapshot of all contender paths:
// validity, metric difference d_i = Gamma_B - Gamma_i to the speculated best
// metric, and v path symbols (sym[i][k] = alpha[m-L-k], k = 0..v-1, m the
// snapshot depth). This module then searches, one path per clock cycle, for
// E = min d_i and keeps the v symbols of the path that reaches it (the best
// path; ties go to the lowest index). The search is off the main recursion:
// it has v depths to finish, and the decoder stalls only if it has not.
//
// When the search ends, `res_valid` rises and holds E and the symbols until
// the decoder takes them (`take`); at the same edge `out_valid` pulses with
// the released symbols, oldest first (out_sym[j] = alpha[m-L-v+1+j]). A
// snapshot with no valid path gives E = 0 and releases nothing.
// Timing: `res_valid` is seen NPD + 2 cycles after the `snap` cycle; `busy`
// is high from the cycle after `snap` until then.
module correction_module
  import cpm_pkg::*;
#(
  parameter int unsigned NPD = 32,
  parameter int unsigned V   = 8
)(
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        snap,
  input  logic [NPD-1:0]              snap_valid,
  input  metric_t [NPD-1:0]           snap_d,
  input  sym_t [NPD-1:0][V-1:0]       snap_sym,
  input  logic                        take,
  output logic                        busy,        // search running or result not yet published
  output logic                        res_valid,
  output metric_t                     e_val,
  output sym_t [V-1:0]                rel_sym,     // rel_sym[k] = alpha[m-L-k]
  output logic                        out_valid,
  output sym_t [V-1:0]                out_sym      // oldest first
);
  localparam int unsigned IW = (NPD > 1) ? $clog2(NPD) : 1;

  logic [NPD-1:0]         sv;
  metric_t [NPD-1:0]      sd;
  sym_t [NPD-1:0][V-1:0]  ss;
  logic [IW-1:0]          idx;
  logic                   found;
  metric_t                best_d;
  sym_t [V-1:0]           best_s;
  logic                   done_q;
  logic                   srch;

  always_ff @(posedge clk) begin
    out_valid <= 1'b0;
    if (rst) begin
      srch      <= 1'b0;
      res_valid <= 1'b0;
      e_val     <= '0;
      rel_sym   <= '0;
      idx       <= '0;
      found     <= 1'b0;
      best_d    <= '0;
      best_s    <= '0;
    end else begin
      if (take) res_valid <= 1'b0;
      if (snap) begin
        sv     <= snap_valid;
        sd     <= snap_d;
        ss     <= snap_sym;
        idx    <= '0;
        found  <= 1'b0;
        srch   <= 1'b1;
      end else if (srch) begin
        if (sv[idx] && (!found || sd[idx] < best_d)) begin
          found  <= 1'b1;
          best_d <= sd[idx];
          best_s <= ss[idx];
        end
        if (32'(idx) == NPD - 1) srch <= 1'b0;
        else                     idx  <= idx + 1'b1;
      end
      // search finished last cycle: publish
      if (done_q) begin
        res_valid <= 1'b1;
        e_val     <= found ? best_d : '0;
        rel_sym   <= best_s;
        out_valid <= found;
      end
    end
  end

  // one-cycle marker that the last entry has just been compared
  always_ff @(posedge clk) begin
    if (rst) done_q <= 1'b0;
    else     done_q <= srch && !snap && (32'(idx) == NPD - 1);
  end

  assign busy = srch | done_q;

  always_comb
    for (int j = 0; j < V; j++) out_sym[j] = rel_sym[V-1-j];

  always_ff @(posedge clk)
    if (!rst) assert (!(snap && busy)) else $error("snapshot while searching");
endmodule
