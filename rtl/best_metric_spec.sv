// best_metric_spec: best-metric speculation of the SPEC-T detection module.
//
// Instead of searching all contender paths for the best metric each depth,
// the best metric is speculated: Gamma_B(n) = Gamma_B(n-1) + sum_i A_i(n),
// the largest metric any branch could add (cos <= 1). Every v depths the
// correction module supplies E, the accumulated over-estimate measured v
// depths earlier, and it is subtracted: Gamma_B(n) = Gamma_B(n-1) + sum A - E.
//
// The increment inc = sum_i A_i is combinational from the current samples
// (magnitudes from iq_magnitude). The detector stores each path's metric as
// its difference to Gamma_B, so only inc and E enter the datapath; the
// absolute Gamma_B is kept here as a GB_W-bit wrapping register for
// observation. It is updated on `upd` (one pulse per committed depth),
// subtracting `e_val` when `e_apply` is set. Reset clears it.
module best_metric_spec
  import cpm_pkg::*;
#(
  parameter int unsigned GB_W = 24
)(
  input  logic            clk,
  input  logic            rst,
  input  iq_sym_t         smp,
  input  logic            upd,
  input  logic            e_apply,
  input  metric_t         e_val,
  output mag_t            inc,
  output logic [GB_W-1:0] gamma_b
);
  logic [IQ_W:0] mag [N_OS];

  for (genvar g = 0; g < N_OS; g++) begin : g_mag
    iq_magnitude u_mag (.i_s(smp.i[g]), .q_s(smp.q[g]), .mag(mag[g]));
  end

  always_comb begin
    inc = '0;
    for (int i = 0; i < N_OS; i++) inc = inc + mag_t'(mag[i]);
  end

  always_ff @(posedge clk) begin
    if (rst)      gamma_b <= '0;
    else if (upd) gamma_b <= gamma_b + GB_W'(inc) - (e_apply ? GB_W'(e_val) : '0);
  end
endmodule
