// coarse_control: master control of the coarse synchronizer.
//
// Two states. In SEARCH the data buffer holds samples back while the frame search
// runs. When frame search reports a frame, the control moves to OUTPUT and enables the
// buffer, which then streams samples to the fine synchronizer. restart returns to
// SEARCH and clears the frame search and correlation windows for the next frame.
// The design gives the control's role; its two states and the restart input are this
// implementation's.
// Timing: frame_enable rises the clock after found is seen. clear_search is restart
// itself, so the detection register empties on the same edge that returns to SEARCH.
module coarse_control
  import sc_fde_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          restart,
  input  logic          found,          // from frame search
  output coarse_state_t state,
  output logic          frame_found,    // frame located (FrameFinded)
  output logic          frame_enable,   // data buffer releases samples (FrameEnable)
  output logic          clear_search
);

  coarse_state_t next;

  always_comb begin
    next = state;
    unique case (state)
      CS_SEARCH: if (found)   next = CS_OUTPUT;
      CS_OUTPUT: if (restart) next = CS_SEARCH;
      default:                next = CS_SEARCH;
    endcase
    if (restart) next = CS_SEARCH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CS_SEARCH;
    end else begin
      state <= next;
    end
  end

  assign clear_search = restart;
  assign frame_found  = (state == CS_OUTPUT);
  assign frame_enable = (state == CS_OUTPUT);

endmodule
