// tb_coarse_control: checks the SEARCH/OUTPUT sequence of the master control: output is
// enabled the clock after found, stays enabled when found drops, returns to SEARCH on
// restart (also when restart and found coincide), and clear_search follows restart.
// A random run is compared with a reference state machine.
module tb_coarse_control;
  import sc_fde_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, found = 1'b0;
  coarse_state_t state;
  logic frame_found, frame_enable, clear_search;

  coarse_control dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit model = 0;    // 1 = output enabled
  int n_enter = 0, n_leave = 0;

  task automatic step(input bit f, input bit r);
    @(negedge clk);
    found = f; restart = r;
    #1;
    checks++;
    if (clear_search != r) begin failures++; $display("FAIL clear_search"); end
    @(negedge clk);
    if (r) begin
      if (model) n_leave++;
      model = 0;
    end else if (f && !model) begin
      model = 1;
      n_enter++;
    end
    checks++;
    if (frame_enable != model || frame_found != model || (state == CS_OUTPUT) != model) begin
      failures++;
      $display("FAIL found=%0b restart=%0b enable=%0b exp %0b", f, r, frame_enable, model);
    end
    found = 1'b0; restart = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1;
    checks++;
    if (frame_enable) begin failures++; $display("FAIL enabled after reset"); end
    step(0, 0);
    step(1, 0);
    step(0, 0);
    step(0, 1);
    step(1, 1);
    for (int i = 0; i < 500; i++) step($urandom_range(0, 3) == 0, $urandom_range(0, 5) == 0);
    checks++;
    if (n_enter == 0 || n_leave == 0) begin failures++; $display("FAIL transitions not seen"); end
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
