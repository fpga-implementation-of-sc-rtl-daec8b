// cmult3: pipelined complex multiplier Z = A * B built from three real multipliers.
//
// The usual product needs four multipliers. Here the shared term Ar*(Br+Bi) is formed
// once and the two results are
//   Zr = Ar*(Br+Bi) - Bi*(Ar+Ai)
//   Zi = Ar*(Br+Bi) - Br*(Ar-Ai)
// which is the three-multiplier structure of the original design (one pre-adder per multiplier,
// one subtractor per output).
// Timing: three register stages (pre-add, multiply, post-subtract); out_valid follows
// in_valid three clocks later, one product per clock. The register split is a choice of
// this implementation. Output width AW+BW+1 holds every product of two signed numbers.
module cmult3 #(
  parameter int unsigned AW = 8,
  parameter int unsigned BW = 8,
  localparam int unsigned ZW = AW + BW + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [AW-1:0] ar,
  input  logic signed [AW-1:0] ai,
  input  logic signed [BW-1:0] br,
  input  logic signed [BW-1:0] bi,
  output logic                 out_valid,
  output logic signed [ZW-1:0] zr,
  output logic signed [ZW-1:0] zi
);

  // stage 1: pre-adders
  logic                 v1;
  logic signed [AW:0]   a_sum, a_dif;
  logic signed [BW:0]   b_sum;
  logic signed [AW-1:0] ar1;
  logic signed [BW-1:0] br1, bi1;
  // stage 2: the three products
  logic                   v2;
  logic signed [ZW-1:0]   p_bi, p_ar, p_br;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; out_valid <= 1'b0;
      a_sum <= '0; a_dif <= '0; b_sum <= '0; ar1 <= '0; br1 <= '0; bi1 <= '0;
      p_bi <= '0; p_ar <= '0; p_br <= '0; zr <= '0; zi <= '0;
    end else begin
      v1    <= in_valid;
      a_sum <= (AW+1)'(ar) + (AW+1)'(ai);
      a_dif <= (AW+1)'(ar) - (AW+1)'(ai);
      b_sum <= (BW+1)'(br) + (BW+1)'(bi);
      ar1   <= ar;
      br1   <= br;
      bi1   <= bi;

      v2    <= v1;
      p_bi  <= ZW'(a_sum) * ZW'(bi1);
      p_ar  <= ZW'(ar1) * ZW'(b_sum);
      p_br  <= ZW'(a_dif) * ZW'(br1);

      out_valid <= v2;
      zr <= p_ar - p_bi;
      zi <= p_ar - p_br;
    end
  end

endmodule
