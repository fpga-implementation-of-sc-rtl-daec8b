// tb_coarse_sync: end-to-end test of the coarse synchronizer at its default sizes.
//
// Input: 300 noise samples, the 256-sample short preamble (8 chirps of 32), 256 samples
// of long preamble and 200 of 16-QAM data, about 10 dB SNR, one sample per clock.
// A reference computed in the testbench from the input alone gives |C_n| (as |Re|+|Im|),
// P_n and the decision |C_n| > P_n/2 for every sample; the DUT's |C_n| and P_n must
// match it, frame_found must rise exactly 8 clocks after the sample that completes the
// first run of 50 decisions, and must do so inside the short preamble. Released samples
// must be the input delayed by 64 samples. A restart at the end must re-arm the search.
module tb_coarse_sync;
  import sc_fde_pkg::*;
  import tb_sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, in_valid = 1'b0;
  sample_t fd_in = '0;
  logic fd_valid, frame_found, frame_enable, m_above;
  sample_t fd_out;
  logic [22:0] c_mag;
  logic [20:0] p_sum;
  logic [49:0] det_buf;

  coarse_sync dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  sample_t stim [$];
  sample_t hist [$];       // newest first
  int cq [$], pq [$];
  int run = 0, expect_found_cyc = -1, found_cyc = -1, complete_idx = -1, idx = 0;
  int n_rel = 0;
  bit exp_v = 0;
  sample_t exp_d;

  always @(posedge clk) if (rst_n) begin
    // released stream
    check(fd_valid == exp_v && (!exp_v || fd_out == exp_d), "released sample");
    if (fd_valid) n_rel++;
    exp_v = 0;
    if (in_valid) begin
      int cr, ci, p, cm;
      hist.push_front(fd_in);
      if (hist.size() > 64 && frame_enable) begin exp_v = 1; exp_d = hist[64]; end
      cr = 0; ci = 0; p = 0;
      for (int k = 0; k < 32; k++) begin
        int ar, ai, br, bi;
        ar = hist[k].re; ai = hist[k].im;
        br = (k + 32 < hist.size()) ? hist[k+32].re : 0;
        bi = (k + 32 < hist.size()) ? hist[k+32].im : 0;
        if (k >= hist.size()) begin ar = 0; ai = 0; end
        cr += ar*br + ai*bi;
        ci += ai*br - ar*bi;
        p  += br*br + bi*bi;
      end
      cm = (cr < 0 ? -cr : cr) + (ci < 0 ? -ci : ci);
      cq.push_back(cm); pq.push_back(p);
      run = (cm > p / 2) ? run + 1 : 0;
      if (run == 50 && expect_found_cyc < 0) begin
        expect_found_cyc = cyc + 8;
        complete_idx = idx;
      end
      if (hist.size() > 70) void'(hist.pop_back());
      idx++;
    end
    if (dut.u_search.in_valid) begin
      int ec, ep;
      ec = cq.pop_front(); ep = pq.pop_front();
      check(c_mag == 23'(ec) && p_sum == 21'(ep),
            $sformatf("|C| %0d P %0d exp %0d %0d", c_mag, p_sum, ec, ep));
    end
    if (frame_found && found_cyc < 0) found_cyc = cyc;
  end

  initial begin
    for (int i = 0; i < 300; i++) stim.push_back(add_noise('0, 7.0));
    for (int i = 0; i < 256; i++) stim.push_back(add_noise(chirp(i, 32, 45.0), 7.0));
    for (int i = 0; i < 256; i++) stim.push_back(add_noise(chirp(i, 64, 45.0), 7.0));
    for (int i = 0; i < 200; i++) stim.push_back(add_noise(qam16(15), 7.0));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (stim[i]) begin
      @(negedge clk);
      in_valid = 1'b1;
      fd_in = stim[i];
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
    check(expect_found_cyc > 0, "reference finds the frame");
    check(found_cyc == expect_found_cyc,
          $sformatf("frame_found at cycle %0d, expected %0d", found_cyc, expect_found_cyc));
    check(complete_idx >= 300 && complete_idx < 556,
          $sformatf("hold completed at sample %0d, short preamble is 300..555", complete_idx));
    check(n_rel > 0, "samples released");
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
    @(negedge clk);
    check(!frame_found && !frame_enable && det_buf == '0, "restart re-arms the search");
    $display("frame found at sample %0d, %0d samples released", complete_idx, n_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
