// tb_sc_fde_pkg: stimulus helpers shared by the SC-FDE timing synchronizer testbenches.
//
// Builds preambles with real arithmetic, independently of the fixed-point tables of the
// design: CAZAC chirp samples amp*exp(j*pi*n^2/N), approximately Gaussian noise (sum of
// twelve uniform variables), 16-QAM data samples, and saturation to 8 bits.
package tb_sc_fde_pkg;
  import sc_fde_pkg::*;

  localparam real PI = 3.14159265358979323846;

  function automatic int sat8(input int v);
    if (v > 127)  return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  // zero-mean noise with standard deviation sigma
  function automatic int gauss(input real sigma);
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 65535)) / 65536.0;
    return int'($rtoi((s - 6.0) * sigma + ((s >= 6.0) ? 0.5 : -0.5)));
  endfunction

  function automatic real cazac_re(input int n, input int N);
    return $cos(PI * real'(n * n) / real'(N));
  endfunction

  function automatic real cazac_im(input int n, input int N);
    return $sin(PI * real'(n * n) / real'(N));
  endfunction

  // one sample of a clean chirp with amplitude amp
  function automatic sample_t chirp(input int n, input int N, input real amp);
    sample_t s;
    s.re = SAMPLE_W'(sat8($rtoi(amp * cazac_re(n % N, N) + 128.5) - 128));
    s.im = SAMPLE_W'(sat8($rtoi(amp * cazac_im(n % N, N) + 128.5) - 128));
    return s;
  endfunction

  // add noise of standard deviation sigma to a sample
  function automatic sample_t add_noise(input sample_t s, input real sigma);
    sample_t r;
    r.re = SAMPLE_W'(sat8(int'(s.re) + gauss(sigma)));
    r.im = SAMPLE_W'(sat8(int'(s.im) + gauss(sigma)));
    return r;
  endfunction

  // a random 16-QAM symbol with levels +/-lvl, +/-3*lvl
  function automatic sample_t qam16(input int lvl);
    sample_t s;
    int lv [4];
    lv = '{-3*lvl, -lvl, lvl, 3*lvl};
    s.re = SAMPLE_W'(lv[$urandom_range(0, 3)]);
    s.im = SAMPLE_W'(lv[$urandom_range(0, 3)]);
    return s;
  endfunction

endpackage
