// tb_corr_window_energy: checks P_n = sum of |r|^2 over the last 32 accepted samples
// against a direct sum, with full-scale samples, input gaps and a clear (between
// samples), and checks the
// 5-clock latency.
module tb_corr_window_energy;
  import sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  sample_t din = '0;
  logic out_valid;
  logic [20:0] p_sum;

  corr_window_energy dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int hist [$];
  typedef struct { int p; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) if (rst_n) begin
    if (clear) hist.delete();
    else if (in_valid) begin
      int p;
      hist.push_front(int'(din.re)*int'(din.re) + int'(din.im)*int'(din.im));
      if (hist.size() > 32) void'(hist.pop_back());
      p = 0;
      foreach (hist[i]) p += hist[i];
      q.push_back('{p, cyc});
    end
    if (out_valid) begin
      exp_t e;
      e = q.pop_front();
      checks++;
      if (p_sum != 21'(e.p) || cyc - e.t != 5) begin
        failures++;
        $display("FAIL P %0d exp %0d latency %0d", p_sum, e.p, cyc - e.t);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0) && (i < 1997 || i > 2001);
      clear = (i == 2000);
      if (i >= 100 && i < 200) begin
        din.re = -8'sd128; din.im = -8'sd128;
      end else begin
        din.re = 8'($urandom); din.im = 8'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 1'b0; clear = 1'b0;
    repeat (8) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
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
