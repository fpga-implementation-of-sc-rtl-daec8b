// frame_search: threshold decision with hold length for the coarse synchronizer.
//
// The decision m_n = |C_n| / P_n > Th is evaluated without a divider: with Th = 0.5,
//   |C_n| > P_n >> 1.
// Each decision bit is shifted into a HOLD-bit detection register; the frame is found
// when the register is all ones, i.e. the decision held for HOLD consecutive samples.
// This rejects short noise bursts that cross the threshold. HOLD = 50 and the 1-bit
// right shift (Th = 0.5) follow the original design; the registered found output, the clear
// input and the hit/rise strobes are this implementation's.
// Timing: det_buf and found are updated one clock after a valid (|C_n|, P_n) pair.
module frame_search #(
  parameter int unsigned MW   = 23,   // width of |C_n|
  parameter int unsigned PW   = 21,   // width of P_n
  parameter int unsigned HOLD = 50
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,      // empties the detection register
  input  logic            in_valid,
  input  logic [MW-1:0]   c_mag,
  input  logic [PW-1:0]   p_sum,
  output logic            hit,        // registered m_n > Th of the last sample
  output logic [HOLD-1:0] det_buf,    // last HOLD decisions, newest in bit 0
  output logic            found       // all HOLD decisions above threshold
);

  localparam int unsigned CMPW = (MW > PW) ? MW : PW;

  logic above;
  assign above = CMPW'(c_mag) > CMPW'(p_sum >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      det_buf <= '0;
      hit     <= 1'b0;
    end else if (clear) begin
      det_buf <= '0;
      hit     <= 1'b0;
    end else if (in_valid) begin
      det_buf <= {det_buf[HOLD-2:0], above};
      hit     <= above;
    end
  end

  assign found = &det_buf;

endmodule
