// tb_threshold_controller: drives random survivor counts through the
// threshold loop and compares T, accept and the cut/raise decisions with a
// testbench model of the rule: above M_MAX cut T by 10% (at least 1), below
// M_MIN raise it by 10% unless no more paths exist or T is at T_MAX, give up
// after MAX_REP repeats.
module tb_threshold_controller;
  import cpm_pkg::*;
  localparam int CNT_W = 8, M_MAX = 32, M_MIN = 8, T_INIT = 256, T_MAX = 4095, MAX_REP = 64;

  logic clk = 0, init = 1;
  always #5 clk = ~clk;
  logic             eval, accept, repeat_req, t_down, t_up;
  logic [CNT_W-1:0] n_alive, n_cand;
  thr_t             thr;
  int checks = 0, failures = 0, n_dn = 0, n_up = 0, n_lim = 0;

  threshold_controller #(.CNT_W(CNT_W), .M_MAX(M_MAX), .M_MIN(M_MIN), .T_INIT(T_INIT),
                         .T_MAX(T_MAX), .MAX_REP(MAX_REP)) dut (.*);

  initial begin
    int t_m, rep, step;
    bit dn, up;
    eval = 0; n_alive = 0; n_cand = 0;
    t_m = T_INIT; rep = 0;
    repeat (2) @(posedge clk);
    init = 0;
    for (int k = 0; k < 20000; k++) begin
      @(negedge clk);
      eval    = ($urandom_range(4) != 0);
      n_cand  = CNT_W'(4 * $urandom_range(32));
      n_alive = CNT_W'($urandom_range(int'(n_cand)));
      if (k % 3000 < 200) n_alive = CNT_W'((k % 2) ? 60 : 2);  // oscillation: hits the repeat limit
      if (k % 3000 < 200) n_cand  = CNT_W'(128);
      #1;
      step = (t_m / 10 == 0) ? 1 : t_m / 10;
      dn = eval && rep < MAX_REP && n_alive > M_MAX && t_m > 0;
      up = eval && rep < MAX_REP && n_alive < M_MIN && n_alive < n_cand && t_m < T_MAX;
      checks++;
      if (thr != t_m || t_down != dn || t_up != up || accept != (eval && !dn && !up)
          || repeat_req != (dn || up)) begin
        failures++;
        if (failures < 10) $display("k=%0d thr %0d/%0d dn %0d/%0d up %0d/%0d", k, thr, t_m, t_down, dn, t_up, up);
      end
      if (eval && rep >= MAX_REP) n_lim++;
      if (dn) begin t_m -= step; n_dn++; end
      if (up) begin t_m = (t_m + step > T_MAX) ? T_MAX : t_m + step; n_up++; end
      if (eval) rep = (dn || up) ? rep + 1 : 0;
    end
    checks++;
    if (n_dn == 0 || n_up == 0 || n_lim == 0) failures++;
    $display("cuts=%0d raises=%0d limit=%0d", n_dn, n_up, n_lim);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
