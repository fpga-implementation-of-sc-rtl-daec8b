// corr_window_energy: correlation window energy P_n of the coarse synchronizer.
//
//   P_n = sum_{k=0}^{L-1} |r_{n-k-D}|^2
//
// Input is the delayed sample r_{n-D} from the delay correlation path. Energy
// calculation (two real multipliers, Re^2 + Im^2, one register), energy accumulation
// (sliding_window_acc over L samples) and a data buffer of ALIGN register stages that
// lines P_n up with |C_n|, whose path is longer.
// Timing: out_valid follows in_valid by 2 + ALIGN clocks; with the default ALIGN = 3
// that is 5 clocks, matching delay_corr_energy's magnitude output (6 clocks from the raw
// sample, 5 from the delayed one). The ALIGN value is this implementation's choice.
module corr_window_energy
  import sc_fde_pkg::*;
#(
  parameter int unsigned L     = WIN_L,
  parameter int unsigned ALIGN = 3,
  localparam int unsigned EW   = 2*SAMPLE_W,          // |r|^2 <= 2*128^2 = 2^15, unsigned
  localparam int unsigned PW   = EW + $clog2(L)       // window sum width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  sample_t          din,
  output logic             out_valid,
  output logic [PW-1:0]    p_sum
);

  logic          e_valid;
  logic [EW-1:0] energy;
  logic signed [EW-1:0] sq_re, sq_im;

  assign sq_re = EW'(din.re) * EW'(din.re);
  assign sq_im = EW'(din.im) * EW'(din.im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0;
      energy  <= '0;
    end else begin
      e_valid <= in_valid;
      energy  <= EW'(sq_re) + EW'(sq_im);
    end
  end

  logic                 s_valid;
  logic signed [PW:0]   s_sum;   // one extra bit: the accumulator is signed

  sliding_window_acc #(.W(PW+1), .DEPTH(L)) u_acc (
    .clk, .rst_n, .clear, .in_valid (e_valid), .x ((PW+1)'(energy)),
    .out_valid (s_valid), .sum (s_sum)
  );

  // alignment buffer
  logic          buf_v [ALIGN+1];
  logic [PW-1:0] buf_d [ALIGN+1];

  assign buf_v[0] = s_valid;
  assign buf_d[0] = PW'(s_sum);

  for (genvar g = 1; g <= ALIGN; g++) begin : g_align
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        buf_v[g] <= 1'b0;
        buf_d[g] <= '0;
      end else begin
        buf_v[g] <= buf_v[g-1];
        buf_d[g] <= buf_d[g-1];
      end
    end
  end

  assign out_valid = buf_v[ALIGN];
  assign p_sum     = buf_d[ALIGN];

endmodule
