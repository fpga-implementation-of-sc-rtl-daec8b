// tb_quantizer: checks the sign quantization (negative -> -1 coded 1, zero and positive
// -> +1 coded 0) of I and Q, the pass-through of the sample and the 1-clock latency,
// over the full 8-bit range and random samples.
module tb_quantizer;
  import sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  sample_t din = '0;
  logic out_valid, q_re, q_im;
  sample_t dout;

  quantizer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      sample_t s;
      s.re = (i < 256) ? 8'(i) : 8'($urandom);
      s.im = (i < 256) ? 8'(255 - i) : 8'($urandom);
      @(negedge clk);
      in_valid = 1'b1;
      din = s;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (!out_valid || q_re != (s.re < 0) || q_im != (s.im < 0) || dout != s) begin
        failures++;
        $display("FAIL sample %0d,%0d -> q %0b%0b", s.re, s.im, q_re, q_im);
      end
      checks++;
      if (q_re != (s.re[7]) || q_im != (s.im[7])) begin
        failures++;
        $display("FAIL sign code");
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL out_valid without input"); end
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
