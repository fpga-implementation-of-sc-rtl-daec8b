// tb_sync_accuracy: timing accuracy of the full synchronizer over a multipath channel.
//
// Each trial sends 300 noise samples, the preamble (8 x 32-sample short chirps, 4 x
// 64-sample long chirps) and 100 16-QAM data samples through a three-path channel with
// path delays 0, 1 and 2 samples (0, 0.4 and 0.9 us at a 0.4 us sampling interval, the
// last rounded) and powers 0, -5 and -10 dB with a random phase per path and trial, then
// adds white noise for the chosen SNR (total received signal power over noise power).
// A trial is correct when the synchronizer releases, as its first output, the first
// sample of the long preamble (the default replay of 4 x 64 samples ahead of the data):
// no early false detection and the exact fine timing. restart separates the trials.
// Misses are sorted into coarse detections in the noise, frames the coarse stage never
// detected, fine searches that ended with fewer than four peaks, and the rest (wrong
// peak). TRIALS trials are run at each SNR from -10 dB to 10 dB in 2 dB steps, and at
// 3 dB. Accuracy must reach 99 % at 8 dB and 10 dB and 85 % at 3 dB; elsewhere it is
// reported only. Two more runs at 10 dB add a carrier frequency offset of 1 kHz (must reach
// 99 %) and 5 kHz (reported only) at the 2.5 Msample/s sampling rate. Each run also
// scores a full-precision, unquantized reference correlator on the same coarse-buffer
// stream. The quantized search may not beat it by more than 2 points, and from 8 dB up
// the two must agree within 1 point.
module tb_sync_accuracy;
  import sc_fde_pkg::*;
  import tb_sc_fde_pkg::*;

  localparam int  TRIALS = 2000;
  localparam real AMP = 45.0;
  localparam int  OUT_LEAD = 256;
  localparam real SWEEP [12] = '{-10.0, -8.0, -6.0, -4.0, -2.0, 0.0, 2.0, 3.0, 4.0, 6.0, 8.0, 10.0};

  logic    clk = 1'b0, rst_n = 1'b0, restart = 1'b0, in_valid = 1'b0;
  sample_t din = '0;
  logic            coarse_found, fd_valid, m_above, fine_found, out_valid, out_first;
  logic [22:0]     c_mag;
  logic [20:0]     p_sum;
  logic [49:0]     det_buf;
  sample_t         fd_out, dout;
  logic [19:0]     corr_mag;
  logic [2:0]      peak_count;

  sc_fde_timing_sync dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  sample_t rx [$];
  int      data_start;
  int      first_idx;      // -2: nothing released yet, -1: released sample unknown
  int      out_k;          // outputs seen in this trial
  int      det_at;         // input index at which coarse_found was first seen

  // identify the first released sample by matching it and the next three
  sample_t first_vals [4];
  always @(posedge clk) if (rst_n && out_valid && out_k < 4) begin
    first_vals[out_k] = dout;
    out_k++;
  end

  // Full-precision reference for the comparison before and after quantization. It takes
  // the same coarse-buffer stream, correlates it with the unquantized long training
  // symbol (oldest sample against coefficient 0, as in the hardware), divides the
  // magnitude by sqrt(window energy * 64) so that an ideal peak is 1, and counts four
  // rises above REF_THRESH. Its timing is right when the fourth rise is on the last
  // sample of the long preamble.
  localparam real REF_THRESH = 0.4;
  real lts_re [64], lts_im [64];
  real win_re [64], win_im [64];   // index 63 newest
  int  ref_fill, ref_peaks, ref_peak_at;
  bit  ref_above;
  int  cur_idx, last_acc;          // rx index being driven, and the last one accepted

  initial for (int m = 0; m < 64; m++) begin
    lts_re[m] = cazac_re(m, 64);
    lts_im[m] = cazac_im(m, 64);
  end

  task automatic ref_clear();
    ref_fill = 0; ref_peaks = 0; ref_peak_at = -1; ref_above = 1'b0;
  endtask

  task automatic ref_step(input int idx, input sample_t s);
    real cr, ci, e, norm;
    bit above;
    for (int m = 0; m < 63; m++) begin win_re[m] = win_re[m+1]; win_im[m] = win_im[m+1]; end
    win_re[63] = real'(s.re);
    win_im[63] = real'(s.im);
    if (ref_fill < 64) ref_fill++;
    if (ref_fill < 64) return;
    cr = 0.0; ci = 0.0; e = 0.0;
    for (int m = 0; m < 64; m++) begin
      cr += lts_re[m] * win_re[m] + lts_im[m] * win_im[m];
      ci += lts_re[m] * win_im[m] - lts_im[m] * win_re[m];
      e  += win_re[m] * win_re[m] + win_im[m] * win_im[m];
    end
    norm = (e > 0.0) ? $sqrt((cr * cr + ci * ci) / (e * 64.0)) : 0.0;
    above = norm > REF_THRESH;
    if (above && !ref_above && ref_peaks < 4) begin
      ref_peaks++;
      if (ref_peaks == 4) ref_peak_at = idx;
    end
    ref_above = above;
  endtask

  // the coarse buffer's output follows an accepted sample by one clock and carries the
  // sample 64 places earlier
  always @(posedge clk) if (rst_n) begin
    if (fd_valid) ref_step(last_acc - 64, fd_out);
    if (in_valid) last_acc = cur_idx;
  end

  task automatic build_trial(input real snr_db, input real cfo);
    real h_re [3], h_im [3], pw [3], sig_pw, sigma;
    real x_re [$], x_im [$];
    pw = '{1.0, 0.316227766, 0.1};
    sig_pw = 0.0;
    for (int p = 0; p < 3; p++) begin
      real ph;
      ph = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
      h_re[p] = $sqrt(pw[p]) * $cos(ph);
      h_im[p] = $sqrt(pw[p]) * $sin(ph);
      sig_pw += pw[p];
    end
    sigma = AMP * $sqrt(sig_pw / (2.0 * $pow(10.0, snr_db / 10.0)));
    for (int i = 0; i < 300; i++) begin x_re.push_back(0.0); x_im.push_back(0.0); end
    for (int i = 0; i < 256; i++) begin
      x_re.push_back(AMP * cazac_re(i % 32, 32)); x_im.push_back(AMP * cazac_im(i % 32, 32));
    end
    for (int i = 0; i < 256; i++) begin
      x_re.push_back(AMP * cazac_re(i % 64, 64)); x_im.push_back(AMP * cazac_im(i % 64, 64));
    end
    data_start = x_re.size();
    for (int i = 0; i < 100; i++) begin
      sample_t q;
      q = qam16(15);
      x_re.push_back(real'(q.re)); x_im.push_back(real'(q.im));
    end
    rx.delete();
    foreach (x_re[n]) begin
      real yr, yi;
      sample_t s;
      yr = 0.0; yi = 0.0;
      for (int p = 0; p < 3; p++) if (n - p >= 0) begin
        yr += h_re[p] * x_re[n-p] - h_im[p] * x_im[n-p];
        yi += h_re[p] * x_im[n-p] + h_im[p] * x_re[n-p];
      end
      begin   // carrier frequency offset: rotate by 2*pi*cfo*n (cfo in cycles per sample)
        real c, sn, tr;
        c = $cos(2.0 * PI * cfo * real'(n));
        sn = $sin(2.0 * PI * cfo * real'(n));
        tr = yr * c - yi * sn;
        yi = yr * sn + yi * c;
        yr = tr;
      end
      s.re = SAMPLE_W'(sat8($rtoi(yr + 1000.5) - 1000 + gauss(sigma)));
      s.im = SAMPLE_W'(sat8($rtoi(yi + 1000.5) - 1000 + gauss(sigma)));
      rx.push_back(s);
    end
  endtask

  function automatic bit first_is_long_start();
    for (int k = 0; k < 4; k++) if (first_vals[k] != rx[data_start - OUT_LEAD + k]) return 1'b0;
    return 1'b1;
  endfunction

  task automatic run_snr(input real snr_db, input real min_acc, input real cfo = 0.0);
    int correct, early, no_coarse, few_peaks, other, ref_correct;
    real ref_acc;
    int det_min, det_max;
    real acc;
    correct = 0; early = 0; no_coarse = 0; few_peaks = 0; other = 0; ref_correct = 0;
    det_min = 1 << 30; det_max = -1;
    for (int t = 0; t < TRIALS; t++) begin
      build_trial(snr_db, cfo);
      @(negedge clk);
      restart = 1'b1;
      @(negedge clk);
      restart = 1'b0;
      ref_clear();
      out_k = 0;
      det_at = -1;
      foreach (rx[i]) begin
        @(negedge clk);
        in_valid = 1'b1;
        din = rx[i];
        cur_idx = i;
        if (coarse_found && det_at < 0) det_at = i;
      end
      @(negedge clk);
      in_valid = 1'b0;
      repeat (10) @(negedge clk);
      if (ref_peak_at == data_start - 1) ref_correct++;
      if (out_k >= 4 && first_is_long_start()) begin
        correct++;
        if (det_at - 300 < det_min) det_min = det_at - 300;
        if (det_at - 300 > det_max) det_max = det_at - 300;
      end
      else if (det_at >= 0 && det_at < 300) early++;
      else if (det_at < 0) no_coarse++;
      else if (peak_count < 3'd4) few_peaks++;
      else other++;
    end
    acc = 100.0 * real'(correct) / real'(TRIALS);
    $display("SNR %4.1f dB, offset %0.1f kHz: %0d of %0d trials correctly timed (%5.1f %%)",
             snr_db, cfo * 2500.0, correct, TRIALS, acc);
    $display("  misses: %0d coarse detections in noise, %0d without coarse detection, %0d with fewer than 4 peaks, %0d other",
             early, no_coarse, few_peaks, other);
    ref_acc = 100.0 * real'(ref_correct) / real'(TRIALS);
    $display("  before quantization (full-precision reference): %5.1f %%", ref_acc);
    checks++;
    if (acc - ref_acc > 2.0) begin
      failures++;
      $display("FAIL quantized search beats the full-precision reference by %5.1f points",
               acc - ref_acc);
    end
    if (snr_db >= 8.0) begin
      checks++;
      if (ref_acc - acc > 1.0) begin
        failures++;
        $display("FAIL quantization loses %5.1f points at high SNR", ref_acc - acc);
      end
    end
    $display("  table: %5.1f dB  %5.1f  %5.1f", snr_db, acc, ref_acc);
    if (det_max >= 0)
      $display("  coarse detection seen %0d..%0d samples into the preamble", det_min, det_max);
    checks++;
    if (acc < min_acc) begin
      failures++;
      $display("FAIL accuracy %5.1f %% below %5.1f %%", acc, min_acc);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    foreach (SWEEP[k])
      run_snr(SWEEP[k], (SWEEP[k] == 3.0) ? 85.0 : (SWEEP[k] >= 8.0) ? 99.0 : 0.0);
    run_snr(10.0, 99.0, 1.0 / 2500.0);    // 1 kHz at 2.5 Msample/s
    run_snr(10.0, 0.0, 5.0 / 2500.0);     // 5 kHz, reported only
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
