// tb_branch_metric_unit: checks the branch metric against a floating-point
// reference. For random trellis states, candidate symbols and samples the
// ideal phases are computed from the LRC pulse formula, and the expected
// metric is sum_i (I_i cos phi_i + Q_i sin phi_i) * 127/128. The design's
// fixed-point phase and table quantisation must stay within a small
// tolerance of it, and the metric may never exceed the sum of the sample
// magnitudes (needed by the best-metric speculation).
module tb_branch_metric_unit;
  import cpm_pkg::*;
  import tb_cpm_ref_pkg::*;

  theta_t              theta;
  sym_t [L_PULSE-2:0]  corr;
  sym_t                cand;
  iq_sym_t             smp;
  bm_t                 bm;
  int checks = 0, failures = 0, worst = 0;

  branch_metric_unit dut (.*);

  initial begin
    int a [L];
    real ref_bm, mag, ph;
    int diff;
    for (int t = 0; t < 3000; t++) begin
      theta = 3'($urandom_range(4));
      for (int j = 0; j < L_PULSE - 1; j++) corr[j] = 2'($urandom_range(3));
      cand = 2'($urandom_range(3));
      for (int i = 0; i < N_OS; i++) begin
        smp.i[i] = 8'($urandom);
        smp.q[i] = 8'($urandom);
      end
      #1;
      a[0] = alpha_of(int'(cand));
      for (int j = 1; j < L; j++) a[j] = alpha_of(int'(corr[j-1]));
      ref_bm = 0.0;
      mag = 0.0;
      for (int i = 0; i < N; i++) begin
        ph = phase(int'(theta), a, i);
        ref_bm += (real'(smp.i[i]) * $cos(ph) + real'(smp.q[i]) * $sin(ph)) * 127.0 / 128.0;
        mag += $sqrt(real'(smp.i[i]) ** 2 + real'(smp.q[i]) ** 2);
      end
      diff = int'(bm) - $rtoi(ref_bm);
      if (diff < 0) diff = -diff;
      if (diff > worst) worst = diff;
      checks++;
      if (diff > 8) begin
        failures++;
        if (failures < 10) $display("bm %0d ref %f", bm, ref_bm);
      end
      checks++;
      if (real'(bm) > mag) failures++;
    end
    $display("worst deviation %0d", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
