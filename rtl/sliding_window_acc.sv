// sliding_window_acc: running sum of the last DEPTH input values.
//
// Each valid input enters a shift RAM of DEPTH stages. The accumulator adds the value
// entering the window and subtracts the value leaving it (the one DEPTH samples older):
//   sum <= sum + x_n - x_{n-DEPTH}
// so one adder pair replaces a DEPTH-input adder. Shift RAM and accumulator start at
// zero, which makes the modular sum exact as long as W holds DEPTH times the largest
// input. DEPTH = 32 is the original design's window; W is set by the user of the block.
// Timing: the sum including the current input appears one clock after in_valid,
// with out_valid. Both window and sum advance only on valid inputs. clear empties the
// window.
module sliding_window_acc #(
  parameter int unsigned W     = 22,
  parameter int unsigned DEPTH = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                out_valid,
  output logic signed [W-1:0] sum
);

  logic signed [W-1:0] shift_ram [DEPTH];
  logic signed [W-1:0] x_old;

  assign x_old = shift_ram[DEPTH-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) shift_ram[i] <= '0;
      sum       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        for (int i = 0; i < DEPTH; i++) shift_ram[i] <= '0;
        sum <= '0;
      end else if (in_valid) begin
        shift_ram[0] <= x;
        for (int i = 1; i < DEPTH; i++) shift_ram[i] <= shift_ram[i-1];
        sum <= sum + x - x_old;
      end
    end
  end

endmodule
