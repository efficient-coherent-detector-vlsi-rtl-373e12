// tb_cpm_ref_pkg: floating-point reference transmitter for the testbenches.
//
// Generates the baseband samples of quaternary, h = 2/5, 5RC CPM with N = 2
// samples per symbol, straight from the definition
//   phi(t) = 2*pi*h * sum_n alpha_n q(t - nT),
// written as phase state theta_n (multiples of 2*pi/5, from symbols that have
// left the pulse) plus the L most recent symbols. Uses real arithmetic only,
// independent of the fixed-point tables of the design, and adds Gaussian
// noise (sum of 12 uniform variates) to I and Q.
package tb_cpm_ref_pkg;
  localparam real PI   = 3.14159265358979323846;
  localparam int  L    = 5;
  localparam int  N    = 2;
  localparam real H    = 0.4;

  function automatic real q_lrc(input real t);
    if (t <= 0.0) return 0.0;
    if (t >= real'(L)) return 0.5;
    return t / (2.0 * L) - $sin(2.0 * PI * t / L) / (4.0 * PI);
  endfunction

  // alpha of a 2-bit code
  function automatic int alpha_of(input int code);
    return 2 * code - 3;
  endfunction

  // phase of sample i (0..N-1) of symbol n; a[j] = alpha[n-j], j = 0..L-1
  function automatic real phase(input int theta, input int a [L], input int i);
    real p;
    p = 2.0 * PI * real'(theta) / 5.0;
    for (int j = 0; j < L; j++)
      p += 2.0 * PI * H * real'(a[j]) * q_lrc(real'(j) + real'(i + 1) / real'(N));
    return p;
  endfunction

  function automatic real gauss();
    real s;
    s = 0.0;
    for (int k = 0; k < 12; k++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

  function automatic int quant8(input real x);
    int v;
    v = $rtoi($floor(x + 0.5 + 1000.0)) - 1000;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return v;
  endfunction
endpackage
