// agc_strobe_capture: turns the sample-strobe and frame-strobe pins into
// pending flags that the sequencer polls.
//
// Each strobe (and the push-to-talk line) passes a SYNC_STAGES flip-flop
// synchroniser, since the vocoder timing chain is not tied to the chip
// clock.  A rising edge of a synchronised strobe sets its pending flag; the
// sequencer clears it when it starts the task.  An edge arriving in the same
// clock as the clear keeps the flag set, so no strobe is lost.  Because each
// edge is remembered separately, the two strobes need only be loosely
// aligned in time, as the published design intends.
//
// Storing rising edges in separate flags and polling them follows the
// published chip; the synchroniser and its depth are this design's own.
// Latency: a strobe edge shows as a pending flag SYNC_STAGES+1 clocks later.
module agc_strobe_capture #(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic clk,
  input  logic rst,             // asynchronous, active high
  input  logic sample_strobe,   // pin, asynchronous
  input  logic frame_strobe,    // pin, asynchronous
  input  logic push_to_talk,    // pin, asynchronous
  input  logic clr_sample,
  input  logic clr_frame,
  output logic sample_pending,
  output logic frame_pending,
  output logic ptt_sync
);

  if (SYNC_STAGES < 2) begin : g_bad_sync
    $error("agc_strobe_capture: SYNC_STAGES must be at least 2");
  end

  logic [SYNC_STAGES-1:0] samp_sync, frm_sync, ptt_chain;
  logic samp_prev, frm_prev;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      samp_sync      <= '0;
      frm_sync       <= '0;
      ptt_chain      <= '0;
      samp_prev      <= 1'b0;
      frm_prev       <= 1'b0;
      sample_pending <= 1'b0;
      frame_pending  <= 1'b0;
    end else begin
      samp_sync <= {samp_sync[SYNC_STAGES-2:0], sample_strobe};
      frm_sync  <= {frm_sync[SYNC_STAGES-2:0], frame_strobe};
      ptt_chain <= {ptt_chain[SYNC_STAGES-2:0], push_to_talk};
      samp_prev <= samp_sync[SYNC_STAGES-1];
      frm_prev  <= frm_sync[SYNC_STAGES-1];

      if (samp_sync[SYNC_STAGES-1] && !samp_prev) sample_pending <= 1'b1;
      else if (clr_sample)                        sample_pending <= 1'b0;

      if (frm_sync[SYNC_STAGES-1] && !frm_prev) frame_pending <= 1'b1;
      else if (clr_frame)                       frame_pending <= 1'b0;
    end
  end

  assign ptt_sync = ptt_chain[SYNC_STAGES-1];

endmodule
