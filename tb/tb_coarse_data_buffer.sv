// tb_coarse_data_buffer: checks that nothing leaves the buffer while enable is low or
// before 64 samples have been written, and that with enable high each accepted input
// releases, one clock later, the sample accepted 64 samples earlier; input gaps and
// enable toggling are random.
module tb_coarse_data_buffer;
  import sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, in_valid = 1'b0;
  sample_t din = '0;
  logic out_valid;
  sample_t dout;

  coarse_data_buffer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0;
  sample_t hist [$];
  bit exp_v;
  sample_t exp_d;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid != exp_v || (exp_v && dout != exp_d)) begin
      failures++;
      $display("FAIL valid %0b exp %0b data %h exp %h", out_valid, exp_v, dout, exp_d);
    end
    if (out_valid) n_out++;
    exp_v = 0;
    if (in_valid) begin
      hist.push_front(din);
      if (hist.size() > 64 && enable) begin
        exp_v = 1;
        exp_d = hist[64];
      end
      if (hist.size() > 65) void'(hist.pop_back());
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;                 // enabled from the start: nothing until filled
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      din = sample_t'($urandom);
      if (i > 200 && $urandom_range(0, 99) == 0) enable = ~enable;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_out == 0) begin failures++; $display("FAIL nothing released"); end
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
