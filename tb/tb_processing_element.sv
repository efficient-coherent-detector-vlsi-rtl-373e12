// tb_processing_element: checks path extension and path purge of one PE.
// Extension: for random survivors, samples, increments and corrections the
// four extended metrics must equal d + inc - bm - E clamped to the metric
// range (bm from a separately tested branch_metric_unit). Purge: alive must
// follow validity, the threshold and, when enabled, agreement with the
// released symbols. The survivor history is built from a symbol sequence
// seq (hist[p] = seq[n-1-p]) and the released symbols from the snapshot
// depth m = n - V (rel[k] = seq[m-L-k]), so agreement is derived from the
// sequence rather than from history positions.
module tb_processing_element;
  import cpm_pkg::*;
  localparam int V = 2, HIST = L_PULSE + 2 * V;

  logic                 p_valid, e_apply, pb_en, agree;
  theta_t               p_theta;
  sym_t [HIST-1:0]      p_hist;
  metric_t              p_d, e_val;
  iq_sym_t              smp;
  mag_t                 inc;
  metric_t [M_ARY-1:0]  ext_d, reg_d;
  thr_t                 thr;
  sym_t [V-1:0]         rel;
  logic [M_ARY-1:0]     alive;
  bm_t                  bm [M_ARY];
  int checks = 0, failures = 0, n_agree = 0, n_clamp = 0;

  processing_element #(.V(V), .HIST(HIST)) dut (.*);

  for (genvar s = 0; s < M_ARY; s++) begin : g_ref
    branch_metric_unit u_ref (.theta(p_theta), .corr(p_hist[L_PULSE-2:0]),
                              .cand(sym_t'(s)), .smp(smp), .bm(bm[s]));
  end

  initial begin
    int seq [64];
    int n, m, x;
    bit exp_agree;
    for (int t = 0; t < 5000; t++) begin
      n = 40;
      m = n - V;
      for (int k = 0; k < n; k++) seq[k] = $urandom_range(3);
      for (int p = 0; p < HIST; p++) p_hist[p] = 2'(seq[n-1-p]);
      for (int k = 0; k < V; k++) rel[k] = 2'(seq[m-L_PULSE-k]);
      if ($urandom_range(1)) rel[$urandom_range(V-1)] ^= 2'($urandom_range(1, 3));
      exp_agree = 1;
      for (int k = 0; k < V; k++) if (int'(rel[k]) != seq[m-L_PULSE-k]) exp_agree = 0;
      p_valid = ($urandom_range(7) != 0);
      p_theta = 3'($urandom_range(4));
      p_d     = metric_t'((t % 10 == 0) ? 4090 : $urandom_range(600));
      for (int i = 0; i < N_OS; i++) begin smp.i[i] = 8'($urandom); smp.q[i] = 8'($urandom); end
      inc     = mag_t'($urandom_range(400));
      e_apply = $urandom_range(1);
      e_val   = metric_t'($urandom_range(500));
      thr     = thr_t'($urandom_range(700));
      pb_en   = $urandom_range(1);
      for (int s = 0; s < M_ARY; s++) reg_d[s] = metric_t'($urandom_range(700));
      #1;
      for (int s = 0; s < M_ARY; s++) begin
        x = int'(p_d) + int'(inc) - int'(bm[s]) - (e_apply ? int'(e_val) : 0);
        if (x < 0 || x > 4095) n_clamp++;
        x = (x < 0) ? 0 : (x > 4095) ? 4095 : x;
        checks++;
        if (int'(ext_d[s]) != x) begin
          failures++;
          if (failures < 10) $display("ext_d %0d exp %0d", ext_d[s], x);
        end
        checks++;
        if (alive[s] != (p_valid && reg_d[s] <= thr && (!pb_en || exp_agree))) failures++;
      end
      checks++;
      if (agree != exp_agree) failures++;
      n_agree += int'(exp_agree);
    end
    checks++;
    if (n_agree == 0 || n_agree == 5000 || n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
