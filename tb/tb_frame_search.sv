// tb_frame_search: checks the divider-free decision |C| > P/2 at its boundary (equal,
// one above, odd P) and the 50-sample hold: runs of 49 hits must not find a frame, a
// run of 50 must, a miss must end it, and clear must empty the detection register.
// The detection register is compared with a model after every sample.
module tb_frame_search;
  localparam int HOLD = 50;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [22:0] c_mag = '0;
  logic [20:0] p_sum = '0;
  logic hit, found;
  logic [HOLD-1:0] det_buf;

  frame_search dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [HOLD-1:0] model = '0;
  int n_found = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one sample; above selects a pair on either side of the threshold
  task automatic sample(input bit above);
    int p, c;
    p = $urandom_range(2, 1000000);
    case ($urandom_range(0, 2))
      0: c = above ? p/2 + 1 : p/2;          // boundary
      1: c = above ? p : $urandom_range(0, p/2);
      default: c = above ? p/2 + $urandom_range(1, 1000) : p/2 - $urandom_range(0, p/2);
    endcase
    @(negedge clk);
    in_valid = 1'b1; c_mag = 23'(c); p_sum = 21'(p);
    @(negedge clk);
    in_valid = 1'b0;
    model = {model[HOLD-2:0], above};
    check(det_buf == model, $sformatf("detection register %h exp %h", det_buf, model));
    check(hit == above, $sformatf("decision c=%0d p=%0d", c, p));
    check(found == (&model), "found");
    if (found) n_found++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (49) sample(1'b1);
    check(!found, "49 hits must not find a frame");
    sample(1'b0);
    repeat (50) sample(1'b1);
    check(found, "50 hits find a frame");
    sample(1'b0);
    check(!found, "a miss ends the run");
    repeat (60) sample(1'b1);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    model = '0;
    check(det_buf == '0 && !found, "clear empties the register");
    for (int i = 0; i < 2000; i++) sample($urandom_range(0, 9) != 0);
    check(n_found > 0, "frames found");
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
