// matched_filter: cross-correlation with the local long training symbol and peak count.
//
// The last M quantized samples sit in a shift register. Each is multiplied by the
// conjugate of one local long-training coefficient S_m = a + jb; since the sample is
// (+/-1) + j(+/-1) the product is a sum of +/-a and +/-b:
//   (a+jb)* (qr + j qi) = (a qr + b qi) + j(a qi - b qr)
// The oldest sample meets S_0 and the newest S_{M-1}, so the correlation peaks when the
// newest sample is the last one of a long training symbol. The sum is reduced to
// |Re| + |Im| and compared with THRESH (a fixed threshold replaces a maximum search).
// Each rise of the comparison above THRESH counts one peak; when N_PK peaks have been
// counted peak_found rises and stays until restart.
// The coefficients are exp(j*pi*m^2/64) scaled by 2047 (sc_fde_pkg::lts_coef). M = 64
// and 4 peaks follow the original design; the coefficient scale and THRESH (about 0.63 of the
// ideal peak of 64*2047*4/pi ~ 167000) are this implementation's.
// Timing: the sample shifts in one clock after q_valid; corr_re/corr_im follow one clock
// later, mag one more, and peak_count/peak_found one more: the decision for a sample is
// visible 4 clocks after its q_valid.
module matched_filter
  import sc_fde_pkg::*;
#(
  parameter int unsigned M      = LTS_LEN,
  parameter int unsigned N_PK   = N_PEAKS,
  parameter int unsigned THRESH = 105000,
  localparam int unsigned SW    = COEF_W + 1 + $clog2(M),   // correlation sum width
  localparam int unsigned NW    = $clog2(N_PK + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              q_valid,
  input  logic              q_re,        // 1 = -1, 0 = +1
  input  logic              q_im,
  output logic signed [SW-1:0] corr_re,  // CorrelationSumRe
  output logic signed [SW-1:0] corr_im,  // CorrelationSumIm
  output logic        [SW:0]   mag,      // |Re| + |Im|
  output logic              peak,        // mag above THRESH
  output logic [NW-1:0]     peak_count,  // peaks counted so far
  output logic              peak_found   // N_PK peaks seen
);

  // local long training symbol, conjugated at use
  coef_t coef [M];
  always_comb for (int m = 0; m < M; m++) coef[m] = lts_coef(m);

  // shift register of quantized samples; index 0 holds the newest
  logic [M-1:0] sr_re, sr_im;
  logic         s_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_re   <= '0;
      sr_im   <= '0;
      s_valid <= 1'b0;
    end else begin
      s_valid <= q_valid;
      if (q_valid) begin
        sr_re <= {sr_re[M-2:0], q_re};
        sr_im <= {sr_im[M-2:0], q_im};
      end
    end
  end

  // correlation value accumulation: additions only
  logic signed [SW-1:0] sum_re, sum_im;
  always_comb begin
    logic signed [SW-1:0] a, b;
    sum_re = '0;
    sum_im = '0;
    for (int m = 0; m < M; m++) begin
      a = SW'(coef[m].re);
      b = SW'(coef[m].im);
      // sample r = qr + j qi at shift position M-1-m meets S_m
      sum_re = sum_re + (sr_re[M-1-m] ? -a : a) + (sr_im[M-1-m] ? -b : b);
      sum_im = sum_im + (sr_im[M-1-m] ? -a : a) - (sr_re[M-1-m] ? -b : b);
    end
  end

  logic c_valid, m_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr_re <= '0;
      corr_im <= '0;
      c_valid <= 1'b0;
    end else begin
      c_valid <= s_valid;
      if (s_valid) begin
        corr_re <= sum_re;
        corr_im <= sum_im;
      end
    end
  end

  // amplitude reduction
  amp_reduce #(.W(SW)) u_amp (
    .clk, .rst_n, .in_valid (c_valid), .a (corr_re), .b (corr_im),
    .out_valid (m_valid), .mag
  );

  // peak search by threshold: count rising crossings
  logic above;
  assign above = mag > (SW+1)'(THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peak       <= 1'b0;
      peak_count <= '0;
      peak_found <= 1'b0;
    end else if (restart) begin
      peak       <= 1'b0;
      peak_count <= '0;
      peak_found <= 1'b0;
    end else if (m_valid && !peak_found) begin
      peak <= above;
      if (above && !peak) begin
        peak_count <= peak_count + 1'b1;
        if (peak_count == NW'(N_PK - 1)) peak_found <= 1'b1;
      end
    end
  end

endmodule
