// sc_fde_timing_sync: SC-FDE receiver timing synchronization, coarse then fine.
//
// Received complex baseband samples (8-bit I and Q) enter the coarse synchronizer,
// which detects the 32-sample periodic short preamble by delay autocorrelation
// (|C_n| > P_n/2 for 50 consecutive samples) and then releases the buffered stream. The
// fine synchronizer quantizes that stream to +/-1, correlates it with the 64-sample long
// training symbol and counts four correlation peaks; the fourth marks the end of the
// long preamble. The stream then leaves on dout in order, starting OUT_LEAD samples
// before the first data sample: with the default OUT_LEAD = 4 x 64 the four long
// training symbols come first, then the data blocks. restart re-arms both stages for
// the next frame.
// The two-stage scheme, its structure, its constants and the serial output of long
// training and data symbols follow the original design; the restart input, the coarse
// buffer depth, the fine threshold, the replay store, the word lengths and the
// pipelining are this implementation's.
// Timing: one sample per clock at most (in_valid may have gaps). coarse_found rises
// about 8 clocks after the sample that completes the 50-sample hold; fd_out lags fd_in
// by BUF_DEPTH samples plus one clock; dout lags the fine stage's input by OUT_LEAD
// samples plus 5 clocks.
module sc_fde_timing_sync
  import sc_fde_pkg::*;
#(
  parameter int unsigned D           = DELAY_D,
  parameter int unsigned L           = WIN_L,
  parameter int unsigned HOLD        = HOLD_T,
  parameter int unsigned BUF_DEPTH   = 64,
  parameter int unsigned M           = LTS_LEN,
  parameter int unsigned N_PK        = N_PEAKS,
  parameter int unsigned FINE_THRESH = 105000,
  parameter int unsigned OUT_LEAD    = N_PK * M,
  localparam int unsigned CW         = 2*SAMPLE_W + 1 + $clog2(L),
  localparam int unsigned PW         = 2*SAMPLE_W + $clog2(L),
  localparam int unsigned SW         = COEF_W + 1 + $clog2(M),
  localparam int unsigned NW         = $clog2(N_PK + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            in_valid,
  input  sample_t         din,
  // coarse synchronization
  output logic            coarse_found,
  output logic [CW:0]     c_mag,
  output logic [PW-1:0]   p_sum,
  output logic            m_above,
  output logic [HOLD-1:0] det_buf,
  output logic            fd_valid,
  output sample_t         fd_out,
  // fine synchronization
  output logic [SW:0]     corr_mag,
  output logic [NW-1:0]   peak_count,
  output logic            fine_found,
  output logic            out_valid,
  output logic            out_first,
  output sample_t         dout
);

  logic frame_enable;
  logic q_re, q_im;

  coarse_sync #(.D(D), .L(L), .HOLD(HOLD), .BUF_DEPTH(BUF_DEPTH)) u_coarse (
    .clk, .rst_n, .restart, .in_valid, .fd_in (din),
    .fd_valid, .fd_out, .frame_found (coarse_found), .frame_enable,
    .c_mag, .p_sum, .m_above, .det_buf
  );

  fine_sync #(.M(M), .N_PK(N_PK), .THRESH(FINE_THRESH), .LEAD(OUT_LEAD)) u_fine (
    .clk, .rst_n, .restart, .in_valid (fd_valid), .din (fd_out),
    .q_re, .q_im, .corr_mag, .peak_count, .peak_found (fine_found),
    .out_valid, .out_first, .dout
  );

endmodule
