// tb_cmult3: checks the three-multiplier complex product against the four-multiplier
// formula (Ar*Br - Ai*Bi, Ar*Bi + Ai*Br) for corner and random operands, with random
// gaps in in_valid, and checks the 3-clock latency of every product.
module tb_cmult3;
  localparam int AW = 8, BW = 9;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [AW-1:0] ar = '0, ai = '0;
  logic signed [BW-1:0] br = '0, bi = '0;
  logic out_valid;
  logic signed [AW+BW:0] zr, zi;

  cmult3 #(.AW(AW), .BW(BW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int re; int im; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) if (rst_n) begin
    if (in_valid) q.push_back('{int'(ar)*int'(br) - int'(ai)*int'(bi),
                                int'(ar)*int'(bi) + int'(ai)*int'(br), cyc});
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL unexpected output"); end
      else begin
        e = q.pop_front();
        if (zr != e.re || zi != e.im || cyc - e.t != 3) begin
          failures++;
          $display("FAIL got %0d,%0d exp %0d,%0d latency %0d", zr, zi, e.re, e.im, cyc - e.t);
        end
      end
    end
  end

  initial begin
    int corner [4];
    corner = '{-128, 127, 0, -1};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (corner[i]) foreach (corner[j]) begin
      @(negedge clk);
      in_valid = 1'b1;
      ar = AW'(corner[i]); ai = AW'(corner[j]);
      br = BW'(corner[j] * 2); bi = BW'(corner[i] == -128 ? 128 : corner[i]);
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      ar = AW'($urandom); ai = AW'($urandom); br = BW'($urandom); bi = BW'($urandom);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d products missing", q.size()); end
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
