// sc_fde_pkg: constants, types and the local long-training-symbol table shared by
// the SC-FDE timing synchronizer.
//
// The preamble is eight repetitions of a 32-sample short training symbol A followed by
// four repetitions of a 64-sample long training symbol C, both CAZAC (chirp) sequences
//   c_n = exp(j*pi*n^2/N),  n = 0..N-1.
// The coarse synchronizer correlates the input with itself delayed by D = 32 samples over
// a window of L = 32 samples and requires the decision |C_n| > P_n/2 to hold for T = 50
// consecutive samples. The fine synchronizer cross-correlates the +/-1 quantized input
// with the M = 64 sample long training symbol and declares timing after 4 peaks.
// These numbers follow the original design; the sample width (8 bits, as in the
// simulation waveforms of the original design) and the 12-bit coefficient scale are choices of
// this implementation.
//
// The local long training symbol is c_n for N = 64. Its phase is pi*k/64 with
// k = n^2 mod 128, so only cos(pi*k/64) for k = 0..32 is tabulated, rounded from
// 2047*cos(pi*k/64); the rest of the circle follows by symmetry in lts_cos().
package sc_fde_pkg;

  localparam int unsigned SAMPLE_W = 8;    // I and Q width of the received samples
  localparam int unsigned DELAY_D  = 32;   // autocorrelation delay = short symbol period
  localparam int unsigned WIN_L    = 32;   // sliding window length (shift RAM depth)
  localparam int unsigned HOLD_T   = 50;   // samples the decision must stay above Th
  localparam int unsigned LTS_LEN  = 64;   // long training symbol length M
  localparam int unsigned N_PEAKS  = 4;    // long training symbols in the long preamble
  localparam int unsigned COEF_W   = 12;   // width of the local symbol coefficients

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } sample_t;

  typedef struct packed {
    logic signed [COEF_W-1:0] re;
    logic signed [COEF_W-1:0] im;
  } coef_t;

  // round(2047*cos(pi*k/64)), k = 0..32 (first quarter of the circle)
  localparam logic signed [COEF_W-1:0] COS_Q [0:32] = '{
    12'sd2047, 12'sd2045, 12'sd2037, 12'sd2025, 12'sd2008, 12'sd1986, 12'sd1959,
    12'sd1927, 12'sd1891, 12'sd1850, 12'sd1805, 12'sd1756, 12'sd1702, 12'sd1644,
    12'sd1582, 12'sd1517, 12'sd1447, 12'sd1375, 12'sd1299, 12'sd1219, 12'sd1137,
    12'sd1052, 12'sd965,  12'sd875,  12'sd783,  12'sd690,  12'sd594,  12'sd497,
    12'sd399,  12'sd300,  12'sd201,  12'sd100,  12'sd0
  };

  // cos(pi*k/64) for any k, scaled by 2047
  function automatic logic signed [COEF_W-1:0] lts_cos(input int unsigned k);
    int unsigned kk;
    kk = k % 128;
    if (kk <= 32)      return COS_Q[kk];
    else if (kk <= 64) return -COS_Q[64 - kk];
    else if (kk <= 96) return -COS_Q[kk - 64];
    else               return COS_Q[128 - kk];
  endfunction

  // Sample n of the local long training symbol, exp(j*pi*n^2/64) scaled by 2047
  function automatic coef_t lts_coef(input int unsigned n);
    int unsigned k;
    coef_t c;
    k = (n * n) % 128;
    c.re = lts_cos(k);
    c.im = lts_cos(k + 96);   // sin(x) = cos(x - pi/2) = cos(x + 3*pi/2)
    return c;
  endfunction

  // Master control states of the coarse synchronizer
  typedef enum logic [0:0] {
    CS_SEARCH = 1'b0,   // buffer waits, frame search runs
    CS_OUTPUT = 1'b1    // frame found, buffer releases samples
  } coarse_state_t;

endpackage
