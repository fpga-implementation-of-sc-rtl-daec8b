// tb_sliding_window_acc: checks the running window sum against a direct sum of the last
// 32 accepted inputs, with random input gaps, extreme values and a clear in the middle;
// each sum must appear one clock after its input.
module tb_sliding_window_acc;
  localparam int W = 22, DEPTH = 32;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic signed [W-1:0] x = '0;
  logic out_valid;
  logic signed [W-1:0] sum;

  sliding_window_acc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist [$];
  int expected;
  bit pending = 0;

  always @(posedge clk) if (rst_n) begin
    if (pending) begin
      checks++;
      if (!out_valid || sum != expected) begin
        failures++;
        $display("FAIL sum %0d expected %0d valid %0b", sum, expected, out_valid);
      end
    end else if (out_valid) begin
      checks++; failures++; $display("FAIL spurious out_valid");
    end
    pending = 0;
    if (clear) hist.delete();
    else if (in_valid) begin
      hist.push_front(int'(x));
      if (hist.size() > DEPTH) void'(hist.pop_back());
      expected = 0;
      foreach (hist[i]) expected += hist[i];
      pending = 1;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      clear = (i == 1500);
      in_valid = ($urandom_range(0, 4) != 0);
      case ($urandom_range(0, 5))
        0: x = -W'(65536);
        1: x = W'(65535);
        default: x = W'($signed(17'($urandom)));
      endcase
    end
    @(negedge clk);
    in_valid = 1'b0; clear = 1'b0;
    repeat (3) @(negedge clk);
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
