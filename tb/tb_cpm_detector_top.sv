// tb_cpm_detector_top: end-to-end test of the CPM detector.
//
// A floating-point reference transmitter (tb_cpm_ref_pkg) sends NSYM random
// quaternary symbols as noisy I-Q samples, two per symbol, with no gaps. The
// released symbol blocks and their Gray bits are compared with what was sent
// (block k holds alpha[m-L-V+1 .. m-L], m = (k+1)V - 1, earlier symbols being
// the start-up history). The first half is sent without noise and every block
// decided in it must be exact; the second half carries Gaussian noise
// (about 16 dB Es/N0) and its symbol error rate must stay below 5%. The test runs with a short correction period (V = 2)
// and M_MAX = 16 so that the correction search outlasts V depths and the
// decoder has to stall. Every mechanism must occur at least once: threshold
// cut and raise (repeated purge), token bus broadcast, speculation correction
// (released blocks), agreement purge and stall. Dropped paths and skipped
// agreement purges are guards and are only reported.
module tb_cpm_detector_top;
  import tb_cpm_ref_pkg::*;

  localparam int V      = 2;
  localparam int M_MAX  = 16;
  localparam int M_MIN  = 4;
  localparam int NSYM   = 2000;
  localparam real AMP   = 80.0;
  localparam real SIGMA = 13.0;   // noise on the second half only
  localparam int  N0    = NSYM / 2;
  localparam logic [1:0] INIT_SYM = 2'd0;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic                   in_valid, in_ready, out_valid;
  logic signed [7:0]      in_i [2], in_q [2];
  logic [1:0]             out_sym [V];
  logic [2*V-1:0]         out_bits;
  logic [11:0]            thr;
  logic [$clog2(M_MAX+1)-1:0] n_surv;
  logic [23:0]            gamma_b;
  logic depth_done, ev_t_down, ev_t_up, ev_repeat, ev_bcast, ev_drop, ev_stall,
        ev_pb_apply, ev_pb_skip;

  cpm_detector_top #(.M_MAX(M_MAX), .M_MIN(M_MIN), .V(V), .INIT_SYM(INIT_SYM)) dut (.*);

  int tx [NSYM];
  int checks = 0, failures = 0;
  int n_down = 0, n_up = 0, n_rep = 0, n_bc = 0, n_drop = 0, n_stall = 0,
      n_pba = 0, n_pbs = 0, n_blocks = 0, n_depth = 0, sym_err = 0, n_noisy = 0;

  function automatic int sym_at(input int k);
    return (k < 0) ? int'(INIT_SYM) : tx[k];
  endfunction

  // stimulus
  initial begin
    int theta;
    int a [L];
    real ph, ii, qq;
    in_valid = 0;
    void'($urandom(32'd20240917));
    foreach (tx[k]) tx[k] = $urandom_range(3);
    theta = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < NSYM; n++) begin
      for (int j = 0; j < L; j++) a[j] = alpha_of(sym_at(n - j));
      for (int i = 0; i < N; i++) begin
        ph = phase(theta, a, i);
        ii = AMP * $cos(ph) + ((n >= N0) ? SIGMA * gauss() : 0.0);
        qq = AMP * $sin(ph) + ((n >= N0) ? SIGMA * gauss() : 0.0);
        in_i[i] = 8'(quant8(ii));
        in_q[i] = 8'(quant8(qq));
      end
      in_valid = 1;
      forever begin
        @(negedge clk);
        if (in_ready) break;
      end
      @(posedge clk);
      #1 in_valid = 0;
      theta = (theta + alpha_of(sym_at(n - L + 1)) + 10) % 5;
    end
  end

  // output check and event counting
  always @(posedge clk) if (!rst) begin
    n_down  += int'(ev_t_down);
    n_up    += int'(ev_t_up);
    n_rep   += int'(ev_repeat);
    n_bc    += int'(ev_bcast);
    n_drop  += int'(ev_drop);
    n_stall += int'(ev_stall);
    n_pba   += int'(ev_pb_apply);
    n_pbs   += int'(ev_pb_skip);
    n_depth += int'(depth_done);
    if (n_surv > M_MAX) begin failures++; $display("survivor count %0d > M_MAX", n_surv); end
    if (out_valid) begin
      int m;
      m = (n_blocks + 1) * V - 1;
      for (int j = 0; j < V; j++) begin
        int exp_c;
        exp_c = sym_at(m - L - V + 1 + j);
        if (m < N0) begin
          // decided before any noise arrived: must be exact
          checks++;
          if (int'(out_sym[j]) != exp_c) begin
            failures++;
            $display("block %0d sym %0d: got %0d exp %0d", n_blocks, j, out_sym[j], exp_c);
          end
        end else begin
          n_noisy++;
          if (int'(out_sym[j]) != exp_c) sym_err++;
        end
        checks++;
        if (out_bits[2*j +: 2] != (out_sym[j] ^ {1'b0, out_sym[j][1]})) failures++;
      end
      n_blocks++;
    end
  end

  task automatic need(input string what, input int cnt);
    checks++;
    if (cnt == 0) begin failures++; $display("mechanism never seen: %s", what); end
  endtask

  initial begin
    wait (!rst);
    wait (n_depth == NSYM);
    repeat (200) @(posedge clk);
    $display("depths=%0d blocks=%0d noisy_symbols=%0d errors=%0d T_down=%0d T_up=%0d repeats=%0d broadcasts=%0d drops=%0d stalls=%0d agreement_purges=%0d agreement_skips=%0d",
             n_depth, n_blocks, n_noisy, sym_err, n_down, n_up, n_rep, n_bc, n_drop, n_stall, n_pba, n_pbs);
    checks++;
    if (n_blocks < (NSYM / V) - 2) begin failures++; $display("too few blocks released"); end
    checks++;
    if (n_rep != n_down + n_up) failures++;
    // reduced search at this SNR: allow rare error bursts, no more than 5%
    checks++;
    if (sym_err * 20 > n_noisy) begin failures++; $display("error rate too high"); end
    need("threshold cut", n_down);
    need("threshold raise", n_up);
    need("token bus broadcast", n_bc);
    need("stall for correction", n_stall);
    need("agreement purge", n_pba);
    need("released blocks", n_blocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * NSYM) @(posedge clk);
    failures++;
    $display("watchdog expired at %0t state=%0d depths=%0d", $time, dut.u_dec.state, n_depth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
