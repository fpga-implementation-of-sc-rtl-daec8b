// amp_reduce: magnitude estimate of a complex value, |a + jb| ~ |a| + |b|.
//
// Replaces the square root of a^2 + b^2 by the sum of absolute values. The estimate is
// never below the true magnitude and at most sqrt(2) times it, so thresholds compared
// against it are set a little higher. Registered: mag follows in_valid by one clock.
// Output width W+1 holds the largest sum, |-2^(W-1)| + |-2^(W-1)|.
module amp_reduce #(
  parameter int unsigned W = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic                out_valid,
  output logic        [W:0]   mag
);

  logic [W:0] abs_a, abs_b;

  always_comb begin
    abs_a = a[W-1] ? (W+1)'(-(W+1)'(a)) : (W+1)'(a);
    abs_b = b[W-1] ? (W+1)'(-(W+1)'(b)) : (W+1)'(b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
    end else begin
      out_valid <= in_valid;
      mag       <= abs_a + abs_b;
    end
  end

endmodule
