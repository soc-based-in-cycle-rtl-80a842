// lid_pkg: types, constants and constant functions shared by the in-cycle
// load-identification core.
//
// The numbers below are the system figures of the identification core: a
// 100 MHz fabric clock, 12-bit converters sampling at 2.78 Msps (one sample
// every 36 clocks), a 25-bit phase accumulator whose 10 MSBs address an
// 18-bit quarter-wave sine table of 256 entries, and a CIC /8 + FIR /2 +
// FIR /2 low-pass filter with a 600 Hz cutoff. The CIC order, the FIR
// coefficients and all word widths after the multipliers are this design's
// own choices.
//
// fir_coef() builds the FIR tap sets at elaboration time:
//   FIR_BINOMIAL  - taps C(n-1,k), a maximally flat low-pass of order n-1
//                   (order 3 gives 1 3 3 1);
//   FIR_SINC_BLACKMAN - h[k] = w[k] * sin(2 pi fc (k-c)/fs) / (pi (k-c)),
//                   c = (n-1)/2, w = Blackman window
//                   0.42 - 0.5 cos(2 pi k/(n-1)) + 0.08 cos(4 pi k/(n-1)).
// Both are scaled so that their sum (the DC gain) is 2**frac.
package lid_pkg;

  localparam int unsigned CLK_HZ      = 100_000_000;
  localparam int unsigned ADC_BITS    = 12;
  localparam int unsigned SAMPLE_DIV  = 36;      // 100 MHz / 36 = 2.78 Msps
  localparam int unsigned PHASE_BITS  = 25;
  localparam int unsigned LUT_PHASE_BITS = 10;   // accumulator MSBs used
  localparam int unsigned SINE_BITS   = 18;
  localparam int unsigned DATA_W      = 32;      // PSD component width

  // How the load voltage is formed from the measured signals.
  typedef enum logic {
    VMODE_RL  = 1'b0,   // v_L = v_o - v_c : impedance of the R-L load, eq. (3)
    VMODE_RLC = 1'b1    // v_o only        : impedance of the R-L-C tank, eq. (4)
  } vmode_e;

  typedef enum logic [1:0] {
    FIR_BINOMIAL      = 2'd0,
    FIR_SINC_BLACKMAN = 2'd1
  } fir_kind_e;

  // One filtered PSD result of one load (first-harmonic phasors
  // V = vc - j vs, I = ic - j is).
  typedef struct packed {
    logic signed [DATA_W-1:0] vc;
    logic signed [DATA_W-1:0] vs;
    logic signed [DATA_W-1:0] ic;
    logic signed [DATA_W-1:0] is;
  } psd_result_t;

  localparam real PI = 3.14159265358979323846;

  function automatic real binom(input int n, input int k);
    real r = 1.0;
    for (int j = 1; j <= k; j++) r = r * real'(n - k + j) / real'(j);
    return r;
  endfunction

  // Unscaled prototype tap k of an n-tap filter.
  function automatic real fir_proto(input fir_kind_e kind, input int n, input int k,
                                    input real fc_over_fs);
    real c, m, w;
    if (kind == FIR_BINOMIAL) return binom(n - 1, k);
    c = real'(n - 1) / 2.0;
    m = real'(k) - c;
    w = 0.42 - 0.5 * $cos(2.0 * PI * real'(k) / real'(n - 1))
             + 0.08 * $cos(4.0 * PI * real'(k) / real'(n - 1));
    if (m == 0.0) return w * 2.0 * fc_over_fs;
    return w * $sin(2.0 * PI * fc_over_fs * m) / (PI * m);
  endfunction

  // Tap k scaled so that the taps sum to 2**frac, rounded to an integer.
  function automatic longint fir_coef(input fir_kind_e kind, input int n, input int k,
                                      input real fc_over_fs, input int frac);
    real sum = 0.0;
    real v;
    for (int j = 0; j < n; j++) sum += fir_proto(kind, n, j, fc_over_fs);
    v = fir_proto(kind, n, k, fc_over_fs) / sum * (2.0 ** frac);
    return (v >= 0.0) ? longint'($rtoi(v + 0.5)) : -longint'($rtoi(-v + 0.5));
  endfunction

  // Quarter-wave sine table entry k of 2**abits: the sine sampled at the
  // centre of each step, sin(pi/2 (k + 0.5) / 2**abits), scaled to full scale.
  function automatic int sine_quarter(input int k, input int abits, input int bits);
    real a = (2.0 ** (bits - 1)) - 1.0;
    return $rtoi(a * $sin(PI / 2.0 * (real'(k) + 0.5) / (2.0 ** abits)) + 0.5);
  endfunction

endpackage
