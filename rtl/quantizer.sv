// quantizer: one-bit quantization of the received samples for fine synchronization.
//
// Each of I and Q is mapped to +1 or -1 by its sign, so the received sample becomes one
// of 1+j, 1-j, -1+j, -1-j and the correlation that follows needs no multiplier. A value
// is coded by its sign bit: 0 means +1, 1 means -1. Zero, which the design does not
// assign, is taken as +1. The unquantized sample travels alongside for the symbol output.
// Timing: q/dout follow in_valid by one clock.
module quantizer
  import sc_fde_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t din,
  output logic    out_valid,
  output logic    q_re,       // 1 = -1, 0 = +1
  output logic    q_im,
  output sample_t dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q_re      <= 1'b0;
      q_im      <= 1'b0;
      dout      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        q_re <= din.re < 0;
        q_im <= din.im < 0;
        dout <= din;
      end
    end
  end

endmodule
