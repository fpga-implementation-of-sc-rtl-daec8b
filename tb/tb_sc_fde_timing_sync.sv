// tb_sc_fde_timing_sync: end-to-end test of the timing synchronizer at its default
// parameters.
//
// Two frames are sent. Each is: 300 noise samples, (frame 1 only) a 20-sample burst of
// strong noise (standard deviation 60) followed by 200 noise samples, the preamble (8 short
// chirps of 32 samples, 4 long chirps of 64), 288 random 16-QAM data samples and 100
// noise samples, at about 10 dB SNR. Frame 1 arrives one sample per clock, frame 2 one
// sample every other clock. restart separates the frames.
// Checked per frame: the burst lifts m_n above 0.5 but does not trigger coarse
// detection (its decision run is shorter than the 50-sample hold), coarse detection happens inside the short preamble,
// exactly 4 peaks are counted, the first released sample is the first sample of the
// long preamble, and every later sample (long training symbols, then data) comes out in
// order. The last BUF_DEPTH + 256 samples stay behind in the coarse buffer and the replay
// store. Each mechanism (threshold hit, rejected short run, coarse detection, buffer
// release, each fine peak, replayed long training sample, data sample output, restart,
// input gaps) is counted and must occur.
module tb_sc_fde_timing_sync;
  import sc_fde_pkg::*;
  import tb_sc_fde_pkg::*;

  localparam int  BUF_DEPTH = 64;
  localparam int  OUT_LEAD  = 256;   // replayed long preamble (4 x 64 samples)
  localparam real AMP   = 45.0;
  localparam real SIGMA = 10.0;   // 45^2 / (2*10^2): about 10 dB SNR

  logic    clk = 1'b0;
  logic    rst_n = 1'b0;
  logic    restart = 1'b0;
  logic    in_valid = 1'b0;
  sample_t din = '0;

  logic            coarse_found, fd_valid, m_above;
  logic [22:0]     c_mag;
  logic [20:0]     p_sum;
  logic [49:0]     det_buf;
  sample_t         fd_out, dout;
  logic [19:0]     corr_mag;
  logic [2:0]      peak_count;
  logic            fine_found, out_valid, out_first;

  sc_fde_timing_sync dut (
    .clk, .rst_n, .restart, .in_valid, .din,
    .coarse_found, .c_mag, .p_sum, .m_above, .det_buf, .fd_valid, .fd_out,
    .corr_mag, .peak_count, .fine_found, .out_valid, .out_first, .dout
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // stimulus of the current frame
  sample_t stim [$];
  int      decoy_start, decoy_end, pre_start, long_end;
  int      sent;                 // samples of the frame sent so far
  int      found_at;             // sample index at which coarse_found was seen
  sample_t expect_q [$];         // samples from the start of the long preamble, in order
  int      got, first_seen;

  // mechanism counters
  int n_hit = 0, n_reject = 0, n_coarse = 0, n_release = 0, n_peak = 0;
  int n_symbols = 0, n_replayed = 0, n_restart = 0, n_gap = 0;
  int run = 0;
  logic prev_found = 1'b0;
  logic [2:0] prev_pc = '0;

  // watch the decision runs and the coarse detection
  always @(posedge clk) if (rst_n) begin
    if (dut.u_coarse.u_search.in_valid) begin
      if (m_above) begin
        n_hit++;
        run++;
      end else begin
        if (run >= 5 && run < 50 && !coarse_found) n_reject++;
        run = 0;
      end
    end
    if (coarse_found && !prev_found) begin
      n_coarse++;
      found_at = sent;
    end
    prev_found <= coarse_found;
    if (fd_valid) n_release++;
    if (peak_count != prev_pc && peak_count != 0) n_peak++;
    prev_pc <= peak_count;
    if (out_valid) begin
      if (got < OUT_LEAD) n_replayed++;
      else n_symbols++;
      if (out_first) begin
        first_seen++;
        check(got == 0, "first marker on the first long preamble sample");
      end
      if (expect_q.size() == 0) check(1'b0, "output beyond expected stream");
      else begin
        sample_t e;
        e = expect_q.pop_front();
        check(dout == e, $sformatf("output sample %0d: got (%0d,%0d) expected (%0d,%0d)",
                                   got, dout.re, dout.im, e.re, e.im));
        got++;
      end
    end
  end

  task automatic build_frame(input bit with_decoy);
    stim.delete();
    expect_q.delete();
    for (int i = 0; i < 300; i++) stim.push_back(add_noise('0, SIGMA));
    decoy_start = -1; decoy_end = -1;
    if (with_decoy) begin
      decoy_start = stim.size();
      for (int i = 0; i < 20; i++) stim.push_back(add_noise('0, 60.0));
      decoy_end = stim.size();
      for (int i = 0; i < 200; i++) stim.push_back(add_noise('0, SIGMA));
    end
    pre_start = stim.size();
    for (int i = 0; i < 256; i++) stim.push_back(add_noise(chirp(i, 32, AMP), SIGMA));
    for (int i = 0; i < 256; i++) stim.push_back(add_noise(chirp(i, 64, AMP), SIGMA));
    long_end = stim.size();
    for (int i = 0; i < 288; i++) stim.push_back(add_noise(qam16(15), SIGMA));
    for (int i = 0; i < 100; i++) stim.push_back(add_noise('0, SIGMA));
    for (int i = long_end - OUT_LEAD; i < stim.size(); i++) expect_q.push_back(stim[i]);
  endtask

  task automatic run_frame(input bit with_decoy, input int gap);
    int exp_out;
    build_frame(with_decoy);
    sent = 0; got = 0; first_seen = 0; found_at = -1;
    exp_out = expect_q.size() - BUF_DEPTH - OUT_LEAD;
    foreach (stim[i]) begin
      @(negedge clk);
      in_valid = 1'b1;
      din = stim[i];
      sent = i + 1;
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
        in_valid = 1'b0;
        n_gap++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (20) @(negedge clk);
    check(found_at > pre_start + 32 && found_at <= pre_start + 256,
          $sformatf("coarse detection at sample %0d, short preamble %0d..%0d",
                    found_at, pre_start, pre_start + 255));
    if (with_decoy)
      check(found_at > decoy_end + 100, "decoy burst must not be detected");
    check(peak_count == 3'd4, $sformatf("peak count %0d", peak_count));
    check(fine_found, "fine synchronization found");
    check(first_seen == 1, "exactly one first-sample marker");
    check(got == exp_out, $sformatf("released %0d samples, expected %0d", got, exp_out));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(1'b1, 0);
    @(negedge clk);
    restart = 1'b1;
    n_restart++;
    @(negedge clk);
    restart = 1'b0;
    check(!coarse_found && !fine_found && peak_count == 0, "restart clears both stages");
    run_frame(1'b0, 1);
    check(n_hit > 0,     "threshold hits occurred");
    check(n_reject > 0,  "a short decision run was rejected by the hold length");
    check(n_coarse == 2, $sformatf("coarse detections %0d", n_coarse));
    check(n_release > 0, "coarse buffer released samples");
    check(n_peak == 8,   $sformatf("fine peaks counted %0d", n_peak));
    check(n_replayed == 2 * OUT_LEAD, $sformatf("long training samples replayed %0d", n_replayed));
    check(n_symbols > 0, "data symbols output");
    check(n_restart > 0 && n_gap > 0, "restart and input gaps exercised");
    $display("mechanisms: hits=%0d rejected_runs=%0d coarse=%0d released=%0d peaks=%0d replayed=%0d symbols=%0d restarts=%0d gaps=%0d",
             n_hit, n_reject, n_coarse, n_release, n_peak, n_replayed, n_symbols, n_restart,
             n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
