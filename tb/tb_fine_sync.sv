// tb_fine_sync: end-to-end test of the fine synchronizer at its default sizes.
//
// Input: 64 samples of the short preamble, the long preamble (four 64-sample chirps)
// and 300 16-QAM data samples, about 10 dB SNR, with random input gaps. Checked: the
// quantized outputs follow the input signs, the peak count steps 1, 2, 3, 4 at the last
// sample of each long training symbol (the count is read 5 clocks after that sample and
// one clock before it), the first released sample is the first sample of the long
// preamble (the default replay of 4 x 64 samples), and the stream follows in order. Each
// released sample leaves 5 clocks after the input 256 samples later that pushes it out.
module tb_fine_sync;
  import sc_fde_pkg::*;
  import tb_sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, in_valid = 1'b0;
  sample_t din = '0;
  logic q_re, q_im, peak_found, out_valid, out_first;
  logic [19:0] corr_mag;
  logic [2:0] peak_count;
  sample_t dout;

  fine_sync dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  sample_t stim [$];
  int in_cyc [$];
  int out_n = 0, n_first = 0;
  localparam int LONG_START = 64, DATA_START = 64 + 256;

  always @(posedge clk) if (rst_n) begin
    if (dut.q_valid) begin
      sample_t s;
      s = dut.q_dout;
      check(q_re == (s.re < 0) && q_im == (s.im < 0), "quantized signs");
    end
    if (out_valid) begin
      int n;
      n = LONG_START + out_n;
      check(n + 256 < stim.size() && dout == stim[n] && cyc - in_cyc[n + 256] == 5,
            $sformatf("output %0d: got %0d,%0d", out_n, dout.re, dout.im));
      if (out_first) begin
        n_first++;
        check(out_n == 0, "first marker on the first long preamble sample");
      end
      out_n++;
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) stim.push_back(add_noise(chirp(i, 32, 45.0), 7.0));
    for (int i = 0; i < 256; i++) stim.push_back(add_noise(chirp(i, 64, 45.0), 7.0));
    for (int i = 0; i < 300; i++) stim.push_back(add_noise(qam16(15), 7.0));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (stim[i]) begin
      @(negedge clk);
      in_valid = 1'b1;
      din = stim[i];
      in_cyc.push_back(cyc);
      if (i >= LONG_START && i < DATA_START && (i - LONG_START) % 64 == 63) begin
        int cnt_pre;
        cnt_pre = peak_count;
        check(cnt_pre == (i - LONG_START) / 64, $sformatf("count %0d before peak", cnt_pre));
        @(negedge clk);
        in_valid = 1'b0;
        repeat (4) @(negedge clk);
        check(peak_count == 3'((i - LONG_START) / 64 + 1),
              $sformatf("count %0d after long symbol %0d", peak_count, (i - LONG_START) / 64));
      end else begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (8) @(negedge clk);
    check(peak_found, "fine timing found");
    check(n_first == 1, "one first marker");
    check(out_n == 300, $sformatf("%0d samples released, expected 300", out_n));
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
