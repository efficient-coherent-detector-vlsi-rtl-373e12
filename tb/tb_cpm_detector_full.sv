// tb_cpm_detector_full: the detector at its default size (M_MAX = 32
// survivors, correction every V = 8 depths) decoding a 2000-symbol stream.
//
// Same reference transmitter and checks as tb_cpm_detector_top, with no
// parameter overrides: the first half of the stream is noiseless and every
// block decided there must be exact; the second half carries Gaussian noise
// (about 16 dB Es/N0) and its symbol error rate must stay below 5%. It also
// checks the depth timing: with input always available a depth takes
// 4 + purge repeats + bus transfers cycles, plus one at correction points,
// plus any stall cycles. Threshold cut and raise, broadcasts and released
// blocks must all occur.
module tb_cpm_detector_full;
  import tb_cpm_ref_pkg::*;

  localparam int V      = 8;
  localparam int M_MAX  = 32;
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

  cpm_detector_top dut (.*);

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

  // depth timing: cycles between depth commits
  int cyc_in_depth = 0, exp_cyc = 0, timing_err = 0, timed = 0;
  always @(posedge clk) if (!rst) begin
    cyc_in_depth++;
    if (ev_repeat) exp_cyc++;
    if (ev_bcast || ev_drop) exp_cyc++;
    if (ev_stall) exp_cyc++;
    if (depth_done) begin
      // IDLE + EXT + PURGE + commit cycle, previous depth's SNAP counted below
      if (n_depth > 1 && cyc_in_depth != exp_cyc + 4) timing_err++;
      timed++;
      cyc_in_depth = 0;
      exp_cyc = (dut.u_dec.corr_pt_q) ? 1 : 0;
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
    checks++;
    if (timing_err != 0) begin failures++; $display("depth timing mismatches: %0d of %0d", timing_err, timed); end
    need("threshold cut", n_down);
    need("threshold raise", n_up);
    need("token bus broadcast", n_bc);
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
