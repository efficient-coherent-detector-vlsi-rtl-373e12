// tb_best_metric_spec: checks the speculation increment and the speculated
// best metric. For random samples the increment must bound the true sum of
// magnitudes from above and stay within 12% (+2 for rounding) of it;
// Gamma_B must follow a testbench running sum of increments minus applied
// corrections, one update per `upd` pulse.
module tb_best_metric_spec;
  import cpm_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  iq_sym_t     smp;
  logic        upd, e_apply;
  metric_t     e_val;
  mag_t        inc;
  logic [23:0] gamma_b;
  int checks = 0, failures = 0;
  longint model;

  best_metric_spec dut (.*);

  initial begin
    real m;
    upd = 0; e_apply = 0; e_val = '0; smp = '0;
    model = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N_OS; i++) begin
        smp.i[i] = 8'($urandom);
        smp.q[i] = 8'($urandom);
      end
      upd     = ($urandom_range(3) != 0);
      e_apply = ($urandom_range(3) == 0);
      e_val   = metric_t'($urandom_range(300));
      #1;
      m = 0.0;
      for (int i = 0; i < N_OS; i++)
        m += $sqrt(real'(smp.i[i]) ** 2 + real'(smp.q[i]) ** 2);
      checks++;
      if (real'(inc) < m - 1e-9 || real'(inc) > 1.12 * m + 2.0) begin
        failures++;
        if (failures < 10) $display("inc %0d true %f", inc, m);
      end
      if (upd) model = model + longint'(inc) - (e_apply ? longint'(e_val) : 0);
      @(posedge clk);
      #1;
      checks++;
      if (gamma_b != 24'(model)) begin
        failures++;
        if (failures < 10) $display("gamma %0d model %0d", gamma_b, 24'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
