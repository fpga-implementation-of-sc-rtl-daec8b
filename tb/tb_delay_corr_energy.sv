// tb_delay_corr_energy: checks C_n = sum_{k<32} r_{n-k} conj(r_{n-k-32}) (real and
// imaginary parts) and |Re|+|Im| against a direct computation from the input history,
// including the zero-filled start, random input gaps and full-scale samples. Checks the
// delayed sample output (1 clock) and the magnitude latency (6 clocks).
module tb_delay_corr_energy;
  import sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  sample_t din = '0;
  logic db_valid, out_valid;
  sample_t da, db;
  logic signed [21:0] c_re, c_im;
  logic [22:0] mag;

  delay_corr_energy dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int hre [$], him [$];   // input history, newest first
  typedef struct { int cre; int cim; int t; } exp_t;
  exp_t q [$], qc [$];
  int dbq_re [$], dbq_im [$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid) begin
      int cr, ci;
      hre.push_front(int'(din.re));
      him.push_front(int'(din.im));
      cr = 0; ci = 0;
      for (int k = 0; k < 32; k++) begin
        int ar, ai, br, bi;
        ar = (k < hre.size()) ? hre[k] : 0;
        ai = (k < him.size()) ? him[k] : 0;
        br = (k + 32 < hre.size()) ? hre[k+32] : 0;
        bi = (k + 32 < him.size()) ? him[k+32] : 0;
        cr += ar*br + ai*bi;      // r * conj(r_D)
        ci += ai*br - ar*bi;
      end
      q.push_back('{cr, ci, cyc});
      qc.push_back('{cr, ci, cyc});
      dbq_re.push_back(hre.size() > 32 ? hre[32] : 0);
      dbq_im.push_back(him.size() > 32 ? him[32] : 0);
    end
    if (db_valid) begin
      int er, ei;
      er = dbq_re.pop_front(); ei = dbq_im.pop_front();
      checks++;
      if (db.re != er || db.im != ei) begin
        failures++; $display("FAIL delayed sample %0d,%0d exp %0d,%0d", db.re, db.im, er, ei);
      end
    end
    if (dut.acc_valid) begin   // window sums, 5 clocks after the sample
      exp_t e;
      e = qc.pop_front();
      checks++;
      if (c_re != e.cre || c_im != e.cim || cyc - e.t != 5) begin
        failures++;
        $display("FAIL C %0d,%0d exp %0d,%0d latency %0d", c_re, c_im, e.cre, e.cim, cyc - e.t);
      end
    end
    if (out_valid) begin
      exp_t e;
      int am;
      e = q.pop_front();
      am = (e.cre < 0 ? -e.cre : e.cre) + (e.cim < 0 ? -e.cim : e.cim);
      checks++;
      if (mag != 23'(am) || cyc - e.t != 6) begin
        failures++;
        $display("FAIL |C| %0d exp %0d latency %0d", mag, am, cyc - e.t);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = (i < 1000) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (i >= 200 && i < 300) begin
        din.re = -8'sd128; din.im = (i % 2) ? 8'sd127 : -8'sd128;   // full scale
      end else begin
        din.re = 8'($urandom); din.im = 8'($urandom);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (10) @(negedge clk);
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
