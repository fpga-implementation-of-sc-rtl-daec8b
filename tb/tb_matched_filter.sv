// tb_matched_filter: checks the multiplier-free correlation of the quantized stream with
// the 64-sample long training symbol and the threshold peak count.
//
// The reference builds the local symbol as round(2047*exp(j*pi*m^2/64)) with real
// arithmetic and correlates the last 64 quantized samples with it (oldest sample against
// m = 0). Stimulus: 300 random +/-1 samples, four long training symbols quantized by
// sign with a few flipped bits, then random samples, with input gaps. Checked: the
// correlation sums (2 clocks after the sample), |Re|+|Im| (3 clocks), the peak count
// rising at the last sample of each long training symbol and nowhere else, peak_found
// after the fourth, and restart clearing the count.
module tb_matched_filter;
  import sc_fde_pkg::*;
  import tb_sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, q_valid = 1'b0, q_re = 1'b0, q_im = 1'b0;
  logic signed [18:0] corr_re, corr_im;
  logic [19:0] mag;
  logic peak, peak_found;
  logic [2:0] peak_count;

  matched_filter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int cre [64], cim [64];
  bit hq_re [$], hq_im [$];     // newest first
  int exp_re [$], exp_im [$], exp_mag [$];
  int idx = 0;
  int peak_idx [$];
  logic [2:0] prev_pc = '0;
  int pipe_idx [$];             // sample index per expected mag

  function automatic int rnd(input real x);
    return (x >= 0.0) ? $rtoi(x + 0.5) : -$rtoi(-x + 0.5);
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (q_valid) begin
      int sr, si;
      hq_re.push_front(q_re); hq_im.push_front(q_im);
      if (hq_re.size() > 64) begin void'(hq_re.pop_back()); void'(hq_im.pop_back()); end
      sr = 0; si = 0;
      for (int m = 0; m < 64; m++) begin
        int qr, qi, pos;
        pos = 63 - m;
        qr = (pos < hq_re.size()) ? (hq_re[pos] ? -1 : 1) : 1;   // register starts at +1
        qi = (pos < hq_im.size()) ? (hq_im[pos] ? -1 : 1) : 1;
        sr += cre[m]*qr + cim[m]*qi;
        si += cre[m]*qi - cim[m]*qr;
      end
      exp_re.push_back(sr); exp_im.push_back(si);
      exp_mag.push_back((sr < 0 ? -sr : sr) + (si < 0 ? -si : si));
      pipe_idx.push_back(idx);
      idx++;
    end
    if (dut.c_valid) begin
      int er, ei;
      er = exp_re.pop_front(); ei = exp_im.pop_front();
      check(corr_re == 19'(er) && corr_im == 19'(ei),
            $sformatf("corr %0d,%0d exp %0d,%0d", corr_re, corr_im, er, ei));
    end
    if (dut.m_valid) begin
      int em, ix;
      em = exp_mag.pop_front(); ix = pipe_idx.pop_front();
      check(mag == 20'(em), $sformatf("mag %0d exp %0d", mag, em));
      if (em > 105000) $display("sample %0d above threshold: %0d", ix, em);
      if (em > 105000 && peak_idx.size() < 4 && !dut.peak) peak_idx.push_back(ix);
    end
    prev_pc <= peak_count;
  end

  bit seq_re [$], seq_im [$];

  initial begin
    for (int m = 0; m < 64; m++) begin
      cre[m] = rnd(2047.0 * cazac_re(m, 64));
      cim[m] = rnd(2047.0 * cazac_im(m, 64));
    end
    for (int i = 0; i < 300; i++) begin seq_re.push_back($urandom_range(0,1)); seq_im.push_back($urandom_range(0,1)); end
    for (int s = 0; s < 4; s++)
      for (int m = 0; m < 64; m++) begin
        bit fr, fi;
        fr = ($urandom_range(0, 15) == 0); fi = ($urandom_range(0, 15) == 0);
        seq_re.push_back((cazac_re(m, 64) < 0) ^ fr);
        seq_im.push_back((cazac_im(m, 64) < 0) ^ fi);
      end
    for (int i = 0; i < 300; i++) begin seq_re.push_back($urandom_range(0,1)); seq_im.push_back($urandom_range(0,1)); end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (seq_re[i]) begin
      @(negedge clk);
      q_valid = 1'b1; q_re = seq_re[i]; q_im = seq_im[i];
      if (i == 300 + 255) begin
        // decision of the fourth peak sample is visible 4 clocks later
        @(negedge clk); q_valid = 1'b0;
        repeat (3) @(negedge clk);
        check(peak_found && peak_count == 3'd4, "peak_found after the fourth peak");
      end else if ($urandom_range(0, 4) == 0) begin
        @(negedge clk); q_valid = 1'b0;
      end
      if (i == 300 + 191) check(!peak_found, "no peak_found after three peaks");
    end
    @(negedge clk);
    q_valid = 1'b0;
    repeat (6) @(negedge clk);
    check(peak_idx.size() == 4, $sformatf("%0d peaks", peak_idx.size()));
    foreach (peak_idx[i])
      check(peak_idx[i] == 300 + 64*i + 63, $sformatf("peak %0d at sample %0d", i, peak_idx[i]));
    check(peak_count == 3'd4 && peak_found, "count stays at 4");
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    check(peak_count == 0 && !peak_found, "restart clears the count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
