// symbol_output: releases the received samples once fine timing is found.
//
// The stream first passes a replay store that delays it by LEAD samples (a circular
// RAM, read before write, advancing only on valid samples), then a pipeline that
// delays it by DLY clocks in all. Each sample's stand-in reaches the output gate in the
// clock in which the peak search has decided every sample up to the one LEAD samples
// later, but not that one. A sample is passed on when peak_found is already high. With
// the default DLY = 3 this matches the 4-clock decision latency of matched_filter.
// The first sample out is then LEAD samples before the sample right after the fourth
// peak. With the default LEAD = 4 x 64 that is the first sample of the first long
// training symbol, so the long training symbols and then the data symbols follow in
// order (serial output), as in the original design. With LEAD = 0 the
// output starts at the first data sample. Nothing is released until LEAD samples have
// been stored once since reset, so entries never written are never sent.
// The store size, the delay and the gating are this implementation's choices.
// Timing: out_valid/dout follow an in_valid by DLY + 1 clocks and carry the sample that
// arrived LEAD samples earlier; first is high with the first released sample. The
// last LEAD samples of a frame leave only as later samples push them out.
module symbol_output
  import sc_fde_pkg::*;
#(
  parameter int unsigned DLY  = 3,     // at least 1
  parameter int unsigned LEAD = N_PEAKS * LTS_LEN
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    peak_found,
  input  logic    in_valid,
  input  sample_t din,
  output logic    out_valid,
  output logic    first,
  output sample_t dout
);

  logic    pv [DLY+1];
  sample_t pd [DLY+1];

  logic    v1;    // stage 1: the store's output, or the input registered once
  sample_t d1;

  assign pv[0] = in_valid;
  assign pd[0] = din;
  assign pv[1] = v1;
  assign pd[1] = d1;

  if (LEAD > 0) begin : g_store
    localparam int unsigned AW = (LEAD > 1) ? $clog2(LEAD) : 1;
    sample_t       mem [LEAD];
    logic [AW-1:0] wptr;
    logic          filled;   // the store has been written all the way round once

    always_ff @(posedge clk) begin
      if (in_valid) begin
        d1        <= mem[wptr];
        mem[wptr] <= din;
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v1     <= 1'b0;
        wptr   <= '0;
        filled <= 1'b0;
      end else begin
        v1 <= in_valid && filled;
        if (in_valid) begin
          if (wptr == AW'(LEAD-1)) begin
            wptr   <= '0;
            filled <= 1'b1;
          end else begin
            wptr <= wptr + 1'b1;
          end
        end
      end
    end
  end else begin : g_direct
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v1 <= 1'b0;
        d1 <= '0;
      end else begin
        v1 <= in_valid;
        d1 <= din;
      end
    end
  end

  for (genvar g = 2; g <= DLY; g++) begin : g_dly
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        pv[g] <= 1'b0;
        pd[g] <= '0;
      end else begin
        pv[g] <= pv[g-1];
        pd[g] <= pd[g-1];
      end
    end
  end

  logic sent;   // a sample has been released since peak_found rose

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      first     <= 1'b0;
      dout      <= '0;
      sent      <= 1'b0;
    end else begin
      out_valid <= pv[DLY] && peak_found;
      first     <= pv[DLY] && peak_found && !sent;
      if (pv[DLY] && peak_found) begin
        dout <= pd[DLY];
        sent <= 1'b1;
      end
      if (!peak_found) sent <= 1'b0;
    end
  end

endmodule
