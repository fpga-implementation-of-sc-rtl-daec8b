// delay_corr_energy: delay correlation energy |C_n| of the coarse synchronizer.
//
//   C_n = sum_{k=0}^{L-1} r_{n-k} * conj(r_{n-k-D}),   |C_n| ~ |Re C_n| + |Im C_n|
//
// Three stages, as in the design: delay correlation calculation (a D-sample delay line
// z^-D, conjugation and the three-multiplier complex product r_n * conj(r_{n-D})),
// correlation value accumulation (sliding_window_acc on real and imaginary parts, one
// add and one subtract per sample instead of an L-input adder) and amplitude reduction
// (|a|+|b| instead of a square root).
// The current sample (DataA) and the delayed sample (DataB) are also brought out,
// registered, so that the energy path can use r_{n-D}.
// Timing: da/db follow in_valid by 1 clock (db_valid); c_re/c_im by 5 clocks; mag by
// 6 clocks (out_valid). One sample per clock at most. The delay line starts at zero.
module delay_corr_energy
  import sc_fde_pkg::*;
#(
  parameter int unsigned D     = DELAY_D,
  parameter int unsigned L     = WIN_L,
  localparam int unsigned PW   = 2*SAMPLE_W + 1,     // product width
  localparam int unsigned CW   = PW + $clog2(L)       // window sum width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 in_valid,
  input  sample_t              din,
  output logic                 db_valid,
  output sample_t              da,          // r_n, registered
  output sample_t              db,          // r_{n-D}, registered
  output logic signed [CW-1:0] c_re,
  output logic signed [CW-1:0] c_im,
  output logic                 out_valid,
  output logic        [CW:0]   mag          // |Re C_n| + |Im C_n|
);

  sample_t delay_line [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < D; i++) delay_line[i] <= '0;
      da <= '0; db <= '0; db_valid <= 1'b0;
    end else begin
      db_valid <= in_valid;
      if (in_valid) begin
        delay_line[0] <= din;
        for (int i = 1; i < D; i++) delay_line[i] <= delay_line[i-1];
        da <= din;
        db <= delay_line[D-1];
      end
    end
  end

  // r_n * conj(r_{n-D}); conjugation negates Im of the delayed sample (-(-128) is kept
  // exact by widening the B operand by one bit)
  logic signed [SAMPLE_W:0]  b_re, b_im;
  logic                      p_valid;
  logic signed [PW:0]        p_re, p_im;

  assign b_re = (SAMPLE_W+1)'(db.re);
  assign b_im = -(SAMPLE_W+1)'(db.im);

  cmult3 #(.AW(SAMPLE_W), .BW(SAMPLE_W+1)) u_cmult (
    .clk, .rst_n,
    .in_valid (db_valid),
    .ar (da.re), .ai (da.im), .br (b_re), .bi (b_im),
    .out_valid (p_valid), .zr (p_re), .zi (p_im)
  );

  // the product of two 8-bit complex samples fits PW bits (|z| <= 2*128*128)
  logic acc_valid, acc_valid_i;

  sliding_window_acc #(.W(CW), .DEPTH(L)) u_acc_re (
    .clk, .rst_n, .clear, .in_valid (p_valid), .x (CW'(p_re)),
    .out_valid (acc_valid), .sum (c_re)
  );
  sliding_window_acc #(.W(CW), .DEPTH(L)) u_acc_im (
    .clk, .rst_n, .clear, .in_valid (p_valid), .x (CW'(p_im)),
    .out_valid (acc_valid_i), .sum (c_im)
  );

  amp_reduce #(.W(CW)) u_amp (
    .clk, .rst_n, .in_valid (acc_valid), .a (c_re), .b (c_im),
    .out_valid, .mag
  );

endmodule
