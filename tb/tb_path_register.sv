// tb_path_register: exercises one register array through random depths.
// Each round loads a random survivor over the bus (receive + commit), loads
// random extended metrics and alive flags, then checks the empty/congested
// classification, the offered extended path (history shifted by the symbol,
// phase state advanced by the symbol leaving the correlative window,
// computed here with integer arithmetic), its removal on each broadcast
// grant, and the survivor after commit: the single live extended path, or
// an invalid array when none is left. Also checks the start state.
module tb_path_register;
  import cpm_pkg::*;
  localparam int V = 2, HIST = L_PULSE + 2 * V, PW = 2 * HIST + D_W + 4;
  localparam sym_t INIT_SYM = 2'd1;

  logic clk = 0, init = 1;
  always #5 clk = ~clk;
  logic                 ext_load, pur_load, bt_grant, rt_grant, commit;
  metric_t [M_ARY-1:0]  ext_d, reg_d;
  logic [M_ARY-1:0]     alive_in;
  logic [PW-1:0]        bus_path, bc_path;
  logic                 p_valid, is_empty, is_congested;
  theta_t               p_theta;
  sym_t [HIST-1:0]      p_hist;
  metric_t              p_d;
  int checks = 0, failures = 0;

  path_register #(.V(V), .HIST(HIST), .ROOT(1'b1), .INIT_SYM(INIT_SYM)) dut (.*);

  function automatic logic [PW-1:0] child_of(input int th, input sym_t [HIST-1:0] h,
                                             input metric_t d, input int s);
    int nth;
    sym_t [HIST-1:0] nh;
    nth = (th + 2 * int'(h[L_PULSE-2]) - 3 + 5) % 5;
    for (int k = HIST - 1; k > 0; k--) nh[k] = h[k-1];
    nh[0] = sym_t'(s);
    return {1'b1, 3'(nth), nh, d};
  endfunction

  task automatic clr();
    ext_load = 0; pur_load = 0; bt_grant = 0; rt_grant = 0; commit = 0;
  endtask

  initial begin
    int th, na, hi, lo;
    sym_t [HIST-1:0] h;
    metric_t d;
    logic [M_ARY-1:0] al;
    clr(); ext_d = '0; alive_in = '0; bus_path = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    init = 0;
    checks++;
    if (!p_valid || p_theta != 0 || p_hist != {HIST{INIT_SYM}} || p_d != 0 || !is_empty
        || is_congested) failures++;
    for (int t = 0; t < 2000; t++) begin
      // receive a random survivor
      th = $urandom_range(4);
      for (int k = 0; k < HIST; k++) h[k] = 2'($urandom);
      d = metric_t'($urandom);
      bus_path = {1'b1, 3'(th), h, d};
      rt_grant = 1;
      @(negedge clk); clr();
      checks++;
      if (is_empty || p_hist != h) failures++;
      commit = 1;
      @(negedge clk); clr();
      checks++;
      if (!p_valid || int'(p_theta) != th || p_hist != h || p_d != d) failures++;
      // extend and purge
      for (int s = 0; s < M_ARY; s++) ext_d[s] = metric_t'($urandom);
      ext_load = 1;
      @(negedge clk); clr();
      al = 4'($urandom);
      alive_in = al;
      pur_load = 1;
      @(negedge clk); clr();
      na = $countones(al);
      checks++;
      if (is_empty != (na == 0) || is_congested != (na > 1) || reg_d != ext_d) failures++;
      // broadcast extras, highest symbol first
      while (na > 1) begin
        hi = 0;
        for (int s = 0; s < M_ARY; s++) if (al[s]) hi = s;
        checks++;
        if (bc_path != child_of(th, h, ext_d[hi], hi)) begin
          failures++;
          if (failures < 5) $display("bc %h exp %h", bc_path, child_of(th, h, ext_d[hi], hi));
        end
        bt_grant = 1;
        @(negedge clk); clr();
        al[hi] = 1'b0;
        na--;
      end
      lo = 0;
      for (int s = M_ARY - 1; s >= 0; s--) if (al[s]) lo = s;
      commit = 1;
      @(negedge clk); clr();
      checks++;
      if (na == 1) begin
        if ({p_valid, p_theta, p_hist, p_d} != child_of(th, h, ext_d[lo], lo)) failures++;
      end else if (p_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
