// cpm_detector_top: digital part of the coherent CPM detector.
//
// Receiver chain: the CPM signal is quadrature demodulated and sampled N = 2
// times per symbol outside this block; each symbol period's N I-Q sample
// pairs enter here (in_valid/in_ready handshake, one transfer per symbol).
// The SPEC-T trellis decoder (specT_decoder) detects the symbols; every v
// symbols it releases a block of v decided symbols, which this block also
// Gray-demaps to bits (alpha -3,-1,+1,+3 -> 00,01,11,10).
//
// Ports: in_i/in_q are signed IQ_W-bit samples, index 0 the earlier sample.
// out_sym[0] is the oldest released symbol (code c, alpha = 2c - 3);
// out_bits[2j+1:2j] are the Gray bits of out_sym[j]. Release latency, depth
// timing and the event/status outputs are those of specT_decoder.
// The analog demodulator and the sampling converter are not part of it.
module cpm_detector_top
  import cpm_pkg::*;
#(
  parameter int unsigned M_MAX    = 32,
  parameter int unsigned M_MIN    = 8,
  parameter int unsigned V        = 8,
  parameter int unsigned T_INIT   = 256,
  parameter int unsigned MAX_REP  = 64,
  parameter logic [1:0]  INIT_SYM = 2'd0
)(
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IQ_W-1:0] in_i [N_OS],
  input  logic signed [IQ_W-1:0] in_q [N_OS],
  output logic                   out_valid,
  output logic [1:0]             out_sym  [V],
  output logic [2*V-1:0]         out_bits,
  output logic [T_W-1:0]         thr,
  output logic [$clog2(M_MAX+1)-1:0] n_surv,
  output logic [23:0]            gamma_b,
  output logic                   depth_done,
  output logic                   ev_t_down,
  output logic                   ev_t_up,
  output logic                   ev_repeat,
  output logic                   ev_bcast,
  output logic                   ev_drop,
  output logic                   ev_stall,
  output logic                   ev_pb_apply,
  output logic                   ev_pb_skip
);
  iq_sym_t       smp;
  sym_t [V-1:0]  dec_sym;

  always_comb
    for (int i = 0; i < N_OS; i++) begin
      smp.i[i] = in_i[i];
      smp.q[i] = in_q[i];
    end

  specT_decoder #(
    .M_MAX(M_MAX), .M_MIN(M_MIN), .V(V), .T_INIT(T_INIT), .MAX_REP(MAX_REP),
    .INIT_SYM(INIT_SYM)
  ) u_dec (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready), .in_smp(smp),
    .out_valid(out_valid), .out_sym(dec_sym),
    .thr(thr), .n_surv(n_surv), .gamma_b(gamma_b), .depth_done(depth_done),
    .ev_t_down(ev_t_down), .ev_t_up(ev_t_up), .ev_repeat(ev_repeat),
    .ev_bcast(ev_bcast), .ev_drop(ev_drop), .ev_stall(ev_stall),
    .ev_pb_apply(ev_pb_apply), .ev_pb_skip(ev_pb_skip));

  always_comb
    for (int j = 0; j < V; j++) begin
      out_sym[j]           = dec_sym[j];
      out_bits[2*j +: 2]   = gray_bits(dec_sym[j]);
    end
endmodule
