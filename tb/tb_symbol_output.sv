// tb_symbol_output: checks the gate and the replay store of the symbol output.
//
// Three instances share one numbered sample stream with random gaps: LEAD = 0 (no
// replay), LEAD = 256 (the default, the long preamble length), and LEAD = 600, which is
// longer than the stream before the peak. peak_found is raised in the clock after a
// chosen sample k (as the peak search would, 4 clocks after that sample) and cleared
// later. Each instance must
// release, in order, the samples from k + 1 - LEAD on (from 0 if that is negative,
// since entries never written are not sent). Each sample must leave 4 clocks after the
// input LEAD samples later that pushes it out. first must mark only the first of them,
// and nothing may leave after peak_found drops.
module tb_symbol_output;
  import sc_fde_pkg::*;

  localparam int N_INST = 3;
  localparam int LEADS [N_INST] = '{0, 256, 600};

  logic clk = 1'b0, rst_n = 1'b0, peak_found = 1'b0, in_valid = 1'b0;
  sample_t din = '0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int in_cyc [int];            // input cycle of each sample number
  int k_peak = 400, k_stop = 900;
  int t_found = -1, t_stop = -1;
  int next_exp [N_INST];
  int n_first [N_INST];
  int n_out [N_INST];

  always @(posedge clk) if (rst_n && in_valid) in_cyc[int'({din.re, din.im})] = cyc;

  for (genvar j = 0; j < N_INST; j++) begin : g_inst
    localparam int LD = LEADS[j];
    logic out_valid, first;
    sample_t dout;

    symbol_output #(.DLY(3), .LEAD(LD)) dut (
      .clk, .rst_n, .peak_found, .in_valid, .din, .out_valid, .first, .dout
    );

    always @(posedge clk) if (rst_n && out_valid) begin
      int num;
      num = int'({dout.re, dout.im});
      n_out[j]++;
      checks++;
      if (num != next_exp[j] || !in_cyc.exists(num + LD) || cyc - in_cyc[num + LD] != 4) begin
        failures++;
        $display("FAIL LEAD %0d: released sample %0d, expected %0d", LD, num, next_exp[j]);
      end
      next_exp[j] = num + 1;
      if (first) begin
        n_first[j]++;
        checks++;
        if (n_out[j] != 1) begin failures++; $display("FAIL LEAD %0d: first marker late", LD); end
      end
    end
  end

  task automatic arm;
    peak_found = 1'b1;
    for (int j = 0; j < N_INST; j++) next_exp[j] = (k_peak + 1 - LEADS[j] < 0) ? 0 : k_peak + 1 - LEADS[j];
  endtask

  initial begin
    for (int j = 0; j < N_INST; j++) begin next_exp[j] = -1; n_first[j] = 0; n_out[j] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1200; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      {din.re, din.im} = 16'(i);
      if (i == k_peak) t_found = cyc + 4;
      if (i == k_stop) t_stop = cyc + 4;
      if (cyc == t_found) arm();
      if (cyc == t_stop) peak_found = 1'b0;
      while ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        if (cyc == t_found) arm();
        if (cyc == t_stop) peak_found = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    for (int j = 0; j < N_INST; j++) begin
      int lo, hi, exp_first;
      exp_first = (k_peak + 1 - LEADS[j] < 0) ? 0 : k_peak + 1 - LEADS[j];
      lo = k_stop - LEADS[j] - 5;
      hi = k_stop - LEADS[j] + 2;
      checks++;
      if (n_first[j] != 1) begin
        failures++; $display("FAIL LEAD %0d: first seen %0d times", LEADS[j], n_first[j]);
      end
      checks++;
      if (next_exp[j] < lo || next_exp[j] > hi) begin
        failures++;
        $display("FAIL LEAD %0d: release stopped at %0d, peak_found fell after %0d", LEADS[j],
                 next_exp[j], k_stop);
      end
      checks++;
      if (n_out[j] != next_exp[j] - exp_first) begin
        failures++; $display("FAIL LEAD %0d: %0d samples released", LEADS[j], n_out[j]);
      end
      $display("LEAD %0d: released %0d samples, %0d to %0d", LEADS[j], n_out[j], exp_first,
               next_exp[j] - 1);
    end
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
