// coarse_data_buffer: input cache of the coarse synchronizer (FD_in to FD_out).
//
// Incoming samples are written into a circular RAM of DEPTH entries while the frame
// search runs. Each write first reads the entry it overwrites, so the read side is the
// input delayed by DEPTH samples. Once the master control raises enable, the delayed
// samples leave the buffer; the first one out is the sample that arrived DEPTH samples
// before the first sample accepted with enable high, so the start of the preamble that
// the detector needed to see is not lost. Before the RAM has been filled once, nothing
// is released. DEPTH = 64 is this implementation's choice: it must not exceed the
// detection latency (D + HOLD samples at least).
// Timing: dout/out_valid follow an accepted in_valid by one clock.
module coarse_data_buffer
  import sc_fde_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    enable,      // from the master control: release samples
  input  logic    in_valid,
  input  sample_t din,
  output logic    out_valid,
  output sample_t dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  sample_t         mem [DEPTH];
  logic [AW-1:0]   wptr;
  logic            filled;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dout      <= mem[wptr];
      mem[wptr] <= din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      filled    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && enable && filled;
      if (in_valid) begin
        if (wptr == AW'(DEPTH-1)) begin
          wptr   <= '0;
          filled <= 1'b1;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
    end
  end

endmodule
