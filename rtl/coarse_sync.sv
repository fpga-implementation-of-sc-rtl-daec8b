// coarse_sync: coarse timing synchronizer (delay autocorrelation with hold length).
//
// Five parts, wired as in the original design's coarse synchronization structure:
//   data buffer                        coarse_data_buffer, caches FD_in, releases FD_out
//   master control                     coarse_control, SEARCH / OUTPUT
//   delay correlation energy           delay_corr_energy, |C_n| (D = 32, L = 32)
//   correlation window energy          corr_window_energy, P_n of r_{n-D}
//   frame search                       frame_search, |C_n| > P_n/2 held for 50 samples
// The two energy paths see the input stream directly (the buffer only delays the copy
// that goes on to fine synchronization). Once the short preamble's 32-sample
// periodicity has kept m_n above 0.5 for 50 samples, frame_found rises and the buffer
// streams the input, delayed by BUF_DEPTH samples, on fd_out.
// Timing: frame_found rises 7 clocks after the input sample that completes the hold
// (6 clocks of correlation pipeline, 1 of frame search), plus 1 clock of control.
// fd_out follows each accepted input by 1 clock while frame_enable is high.
module coarse_sync
  import sc_fde_pkg::*;
#(
  parameter int unsigned D         = DELAY_D,
  parameter int unsigned L         = WIN_L,
  parameter int unsigned HOLD      = HOLD_T,
  parameter int unsigned BUF_DEPTH = 64,
  localparam int unsigned CW       = 2*SAMPLE_W + 1 + $clog2(L),
  localparam int unsigned PW       = 2*SAMPLE_W + $clog2(L)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            restart,
  input  logic            in_valid,
  input  sample_t         fd_in,
  output logic            fd_valid,
  output sample_t         fd_out,
  output logic            frame_found,
  output logic            frame_enable,
  output logic [CW:0]     c_mag,        // |C_n| estimate (SumDelayCorrelationMagnitude)
  output logic [PW-1:0]   p_sum,        // P_n (SumMagnitude)
  output logic            m_above,      // last decision m_n > 0.5
  output logic [HOLD-1:0] det_buf       // detection shift register (BufferForDetection)
);

  logic          clear;
  logic          found;
  logic          db_valid, c_valid, p_valid;
  sample_t       da, db;
  logic signed [CW-1:0] c_re, c_im;
  coarse_state_t state;

  coarse_data_buffer #(.DEPTH(BUF_DEPTH)) u_buffer (
    .clk, .rst_n, .enable (frame_enable), .in_valid, .din (fd_in),
    .out_valid (fd_valid), .dout (fd_out)
  );

  coarse_control u_control (
    .clk, .rst_n, .restart, .found, .state, .frame_found, .frame_enable,
    .clear_search (clear)
  );

  delay_corr_energy #(.D(D), .L(L)) u_corr (
    .clk, .rst_n, .clear, .in_valid, .din (fd_in),
    .db_valid, .da, .db, .c_re, .c_im, .out_valid (c_valid), .mag (c_mag)
  );

  corr_window_energy #(.L(L), .ALIGN(3)) u_energy (
    .clk, .rst_n, .clear, .in_valid (db_valid), .din (db),
    .out_valid (p_valid), .p_sum
  );

  frame_search #(.MW(CW+1), .PW(PW), .HOLD(HOLD)) u_search (
    .clk, .rst_n, .clear, .in_valid (c_valid), .c_mag, .p_sum,
    .hit (m_above), .det_buf, .found
  );

  // |C_n| and P_n travel through pipelines of equal length
  a_aligned: assert property (@(posedge clk) disable iff (!rst_n) c_valid == p_valid);

endmodule
