// cpm_pkg: constants, types and constant tables shared by the SPEC-T CPM
// detector.
//
// The signal set is quaternary CPM with modulation index h = 2/5 and a raised
// cosine phase pulse five symbols long (5RC), received with two I-Q samples
// per symbol; these are the values the detector is designed and evaluated
// for. A trellis state is a phase state theta (5 values, multiples of
// 2*pi/5) plus the L-1 = 4 previous symbols, 5 * 4^4 = 1280 states.
//
// Symbols are kept as a 2-bit code c with alpha = 2c - 3, so codes 0..3 stand
// for -3, -1, +1, +3. Gray mapping of a code to bits is c ^ (c >> 1).
//
// Phases are fixed point: a phase word of PH_W bits covers one turn (2*pi).
// The tables below are computed at elaboration from the textbook formulas:
//   LRC phase pulse  q(t) = t/(2LT) - sin(2*pi*t/(LT)) / (4*pi), 0 <= t <= LT
//   QTAB[j*N+i]      = round(h * q((j + (i+1)/N) T) * 2^PH_W)
//   THETA_PH[k]      = round(k/5 * 2^PH_W)
//   COS/SIN LUT[k]   = round((2^(LUT_W-1)-1) * cos/sin(2*pi*k / 2^LUT_AW))
// The word widths are this implementation's choice.
package cpm_pkg;

  // ---- signal set ----
  parameter int unsigned M_ARY    = 4;   // quaternary symbols
  parameter int unsigned L_PULSE  = 5;   // 5RC: pulse length in symbols
  parameter int unsigned P_STATES = 5;   // h = 2/5: five phase states
  parameter int unsigned N_OS     = 2;   // I-Q samples per symbol
  parameter real         H_MOD    = 0.4; // modulation index

  // ---- word widths ----
  parameter int unsigned IQ_W   = 8;   // signed I and Q sample
  parameter int unsigned PH_W   = 12;  // phase word, one turn = 2^PH_W
  parameter int unsigned LUT_AW = 8;   // cos/sin table address
  parameter int unsigned LUT_W  = 8;   // signed cos/sin table entry
  parameter int unsigned MAG_W  = 11;  // sum of N sample magnitudes
  parameter int unsigned BM_W   = 12;  // signed branch metric
  parameter int unsigned D_W    = 12;  // metric difference to speculated best
  parameter int unsigned T_W    = 12;  // purge threshold

  typedef logic [1:0]              sym_t;
  typedef logic signed [IQ_W-1:0]  iq_t;
  typedef logic [2:0]              theta_t;
  typedef logic [PH_W-1:0]         phase_t;
  typedef logic [MAG_W-1:0]        mag_t;
  typedef logic signed [BM_W-1:0]  bm_t;
  typedef logic [D_W-1:0]          metric_t;
  typedef logic [T_W-1:0]          thr_t;

  // one symbol period of received samples
  typedef struct packed {
    iq_t [N_OS-1:0] i;
    iq_t [N_OS-1:0] q;
  } iq_sym_t;

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [PH_W-1:0] qtab_t [L_PULSE*N_OS];  // index j*N_OS + i
  typedef logic [PH_W-1:0]        thtab_t [P_STATES];
  typedef logic signed [LUT_W-1:0] lut_t [2**LUT_AW];

  function automatic real lrc_q(input real t_over_T);
    real lt;
    lt = real'(L_PULSE);
    if (t_over_T <= 0.0) return 0.0;
    if (t_over_T >= lt) return 0.5;
    return t_over_T / (2.0 * lt) - $sin(2.0 * PI * t_over_T / lt) / (4.0 * PI);
  endfunction

  function automatic qtab_t make_qtab();
    qtab_t r;
    for (int j = 0; j < L_PULSE; j++)
      for (int i = 0; i < N_OS; i++)
        r[j*N_OS + i] = PH_W'($rtoi($floor(H_MOD * lrc_q(real'(j) + real'(i + 1) / real'(N_OS))
                                      * real'(2 ** PH_W) + 0.5)));
    return r;
  endfunction

  function automatic thtab_t make_thtab();
    thtab_t r;
    for (int k = 0; k < P_STATES; k++)
      r[k] = PH_W'($rtoi($floor(real'(k) * real'(2 ** PH_W) / real'(P_STATES) + 0.5)));
    return r;
  endfunction

  function automatic lut_t make_lut(input bit sine);
    lut_t r;
    real a, amp;
    amp = real'(2 ** (LUT_W - 1) - 1);
    for (int k = 0; k < 2 ** LUT_AW; k++) begin
      a = 2.0 * PI * real'(k) / real'(2 ** LUT_AW);
      r[k] = LUT_W'($rtoi($floor(amp * (sine ? $sin(a) : $cos(a)) + 0.5 + 1024.0)) - 1024);
    end
    return r;
  endfunction

  localparam qtab_t  QTAB     = make_qtab();
  localparam thtab_t THETA_PH = make_thtab();
  localparam lut_t   COS_LUT  = make_lut(1'b0);
  localparam lut_t   SIN_LUT  = make_lut(1'b1);

  // alpha = 2c - 3 as a small signed number
  function automatic logic signed [2:0] sym_alpha(input sym_t c);
    return 3'($signed({1'b0, c, 1'b0}) - 4'sd3);
  endfunction

  // phase state after a symbol leaves the correlative window:
  // theta' = (theta + alpha) mod 5, in units of 2*pi/5 (pi*h = 2*pi/5)
  function automatic theta_t theta_step(input theta_t th, input sym_t c);
    logic [3:0] s;
    s = 4'(th) + 4'(c) + 4'(c) + 4'd2;   // theta + 2c - 3 + 5
    if (s >= 4'd10) s = s - 4'd10;
    else if (s >= 4'd5) s = s - 4'd5;
    return theta_t'(s);
  endfunction

  function automatic logic [1:0] gray_bits(input sym_t c);
    return c ^ {1'b0, c[1]};
  endfunction

endpackage
