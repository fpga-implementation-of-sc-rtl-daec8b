// fine_sync: fine timing synchronizer (quantized cross-correlation, 4-peak count).
//
// Three parts, as in the original design's fine synchronization structure:
//   quantization      quantizer, I and Q to +1/-1 by sign
//   matched filtering matched_filter, 64-tap correlation with the local long training
//                     symbol using additions only, |Re|+|Im|, threshold peak count
//   symbol output     symbol_output, serial output once the 4th peak is found
// The correlation peaks at the last sample of each of the four long training symbols;
// the fourth peak marks the end of the long preamble. The stream is then released on
// dout, starting LEAD samples before the sample after the fourth peak. The default
// LEAD = 4 x 64 replays the long training symbols ahead of the data, as in the
// original design; LEAD = 0 starts at the first data sample.
// Timing: peak_count/peak_found show a sample's decision 5 clocks after its in_valid;
// dout follows an in_valid by 5 clocks, carrying the sample LEAD samples older.
// restart clears the peak count.
module fine_sync
  import sc_fde_pkg::*;
#(
  parameter int unsigned M      = LTS_LEN,
  parameter int unsigned N_PK   = N_PEAKS,
  parameter int unsigned THRESH = 105000,
  parameter int unsigned LEAD   = N_PK * M,
  localparam int unsigned SW    = COEF_W + 1 + $clog2(M),
  localparam int unsigned NW    = $clog2(N_PK + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              restart,
  input  logic              in_valid,
  input  sample_t           din,
  output logic              q_re,        // QuantizationRe of the newest sample
  output logic              q_im,
  output logic [SW:0]       corr_mag,    // |CorrelationSum| estimate
  output logic [NW-1:0]     peak_count,  // STS_end_counter
  output logic              peak_found,  // PeakFinded
  output logic              out_valid,   // DataOutEnable
  output logic              out_first,
  output sample_t           dout
);

  logic    q_valid;
  sample_t q_dout;
  logic    peak;
  logic signed [SW-1:0] corr_re, corr_im;

  quantizer u_quant (
    .clk, .rst_n, .in_valid, .din,
    .out_valid (q_valid), .q_re, .q_im, .dout (q_dout)
  );

  matched_filter #(.M(M), .N_PK(N_PK), .THRESH(THRESH)) u_mf (
    .clk, .rst_n, .restart, .q_valid, .q_re, .q_im,
    .corr_re, .corr_im, .mag (corr_mag), .peak, .peak_count, .peak_found
  );

  symbol_output #(.DLY(3), .LEAD(LEAD)) u_out (
    .clk, .rst_n, .peak_found, .in_valid (q_valid), .din (q_dout),
    .out_valid, .first (out_first), .dout
  );

endmodule
