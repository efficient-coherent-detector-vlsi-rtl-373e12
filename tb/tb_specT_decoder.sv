// tb_specT_decoder: the SPEC-T decoder on its own, at a small size
// (M_MAX = 8, M_MIN = 2, V = 4), fed a noiseless 1000-symbol stream from the
// floating-point reference transmitter with random gaps between symbols.
// Checks: every released block equals the sent symbols (block k holds
// alpha[m-L-V+1 .. m-L], m = (k+1)V - 1), the survivor count stays within
// 1..M_MAX, in_ready is low outside the input state, and each depth takes
// exactly 4 + purge repeats + bus transfers cycles, plus one at correction
// points, plus the cycles spent waiting for input or for the correction.
module tb_specT_decoder;
  import cpm_pkg::*;
  import tb_cpm_ref_pkg::*;

  localparam int V = 4, M_MAX = 8, M_MIN = 2, NSYM = 1000;
  localparam real AMP = 70.0;
  localparam sym_t INIT_SYM = 2'd3;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, out_valid, depth_done;
  iq_sym_t       in_smp;
  sym_t [V-1:0]  out_sym;
  thr_t          thr;
  logic [$clog2(M_MAX+1)-1:0] n_surv;
  logic [23:0]   gamma_b;
  logic ev_t_down, ev_t_up, ev_repeat, ev_bcast, ev_drop, ev_stall, ev_pb_apply, ev_pb_skip;

  specT_decoder #(.M_MAX(M_MAX), .M_MIN(M_MIN), .V(V), .INIT_SYM(INIT_SYM)) dut (.*);

  int tx [NSYM];
  int checks = 0, failures = 0, n_blocks = 0, n_depth = 0, n_rep = 0, n_bc = 0, n_stall = 0;

  function automatic int sym_at(input int k);
    return (k < 0) ? int'(INIT_SYM) : tx[k];
  endfunction

  initial begin
    int theta;
    int a [L];
    real ph;
    in_valid = 0;
    in_smp = '0;
    void'($urandom(32'd77));
    foreach (tx[k]) tx[k] = $urandom_range(3);
    theta = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NSYM; n++) begin
      for (int j = 0; j < L; j++) a[j] = alpha_of(sym_at(n - j));
      for (int i = 0; i < N; i++) begin
        ph = phase(theta, a, i);
        in_smp.i[i] = 8'(quant8(AMP * $cos(ph)));
        in_smp.q[i] = 8'(quant8(AMP * $sin(ph)));
      end
      repeat ($urandom_range(3) == 0 ? $urandom_range(1, 6) : 0) @(posedge clk);
      #1 in_valid = 1;
      forever begin
        @(negedge clk);
        if (in_ready) break;
      end
      @(posedge clk);
      #1 in_valid = 0;
      theta = (theta + alpha_of(sym_at(n - L + 1)) + 10) % 5;
    end
  end

  int cyc = 0, expc = 0, terr = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (ev_repeat || ev_bcast || ev_drop) expc++;
    if (dut.state == 3'd0 && !(in_valid && in_ready)) expc++;   // waiting in S_IDLE
    if (dut.state != 3'd0 && in_ready) failures++;
    n_rep   += int'(ev_repeat);
    n_bc    += int'(ev_bcast);
    n_stall += int'(ev_stall);
    if (depth_done) begin
      n_depth++;
      checks++;
      if (cyc != expc + 4) begin
        terr++; failures++;
        if (terr < 5) $display("depth %0d took %0d cycles, expected %0d", n_depth, cyc, expc + 4);
      end
      cyc = 0;
      expc = dut.corr_pt_q ? 1 : 0;
    end
    if (n_surv > M_MAX || (n_depth > 0 && n_surv == 0)) failures++;
    if (out_valid) begin
      int m;
      m = (n_blocks + 1) * V - 1;
      for (int j = 0; j < V; j++) begin
        checks++;
        if (int'(out_sym[j]) != sym_at(m - L - V + 1 + j)) begin
          failures++;
          $display("block %0d sym %0d got %0d exp %0d", n_blocks, j, out_sym[j], sym_at(m - L - V + 1 + j));
        end
      end
      n_blocks++;
    end
  end

  initial begin
    wait (!rst);
    wait (n_depth == NSYM);
    repeat (100) @(posedge clk);
    $display("depths=%0d blocks=%0d repeats=%0d broadcasts=%0d stalls=%0d", n_depth, n_blocks, n_rep, n_bc, n_stall);
    checks++;
    if (n_blocks != NSYM / V) failures++;
    checks++;
    if (n_rep == 0 || n_bc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * NSYM) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
