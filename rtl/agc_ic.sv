// agc_ic: the automatic gain control chip.
//
// The chip watches the mu-255 PCM words coming out of the codec and sets a
// 6-bit code for a digitally controlled audio attenuator ahead of the codec.
// Per sample it keeps the largest (1's complemented) code of the frame and
// counts saturated samples; per frame it decides: saturated -> +1.5 dB,
// several saturated samples -> +3 dB, quiet (more than 6 dB under
// saturation) for DECAY_FRAMES frames in a row -> -1.5 dB, silent (more than
// 30 dB under) or push-to-talk -> no change.  The code on attenuate_out
// changes only at the end of a frame-rate task, i.e. on frame boundaries.
//
// Structure, as on the chip floor plan: strobe flags, a state sequencer
// (control) and an 8-bit data path.  One clock (the chip used a three-phase
// clock; here a single rising-edge clock) and an asynchronous active-high
// reset.  Pins: MUCODE (8), attenuate-out (6), reset, push-to-talk,
// sample-strobe, frame-strobe and twelve test outputs.  Which internal values
// reach the test outputs is this design's choice: {state (4), maximum (8)}.
// MUCODE must be stable from the sample-strobe edge until the sample is
// dispatched, SYNC_STAGES+2 clocks later.
module agc_ic
  import agc_pkg::*;
#(
  parameter int unsigned SYNC_STAGES   = 2,
  parameter data_t       SATURATION    = 8'hFE,
  parameter data_t       LOW_LEVEL     = 8'hEF,
  parameter data_t       SILENCE_LEVEL = 8'hAF,
  parameter satcnt_t     SAT_LIMIT     = 7'd126,
  parameter satcnt_t     SEVERAL_SAT   = 7'd2,
  parameter int unsigned DECAY_FRAMES  = 25,
  parameter atten_t      ATTEN_MAX     = 6'd59,
  parameter atten_t      ATTEN_RESET   = 6'd0
) (
  input  logic         clk,
  input  logic         rst,
  input  data_t        mucode,
  input  logic         push_to_talk,
  input  logic         sample_strobe,
  input  logic         frame_strobe,
  output atten_t       attenuate_out,
  output logic [11:0]  test_out
);

  logic      sample_pending, frame_pending, ptt_sync;
  logic      clr_sample, clr_frame;
  agc_ctrl_t ctrl;
  agc_stat_t stat;
  state_t    state;
  data_t     maximum;

  agc_strobe_capture #(.SYNC_STAGES(SYNC_STAGES)) u_strobes (
    .clk, .rst, .sample_strobe, .frame_strobe, .push_to_talk,
    .clr_sample, .clr_frame, .sample_pending, .frame_pending, .ptt_sync
  );

  agc_control u_control (
    .clk, .rst, .sample_pending, .frame_pending, .ptt(ptt_sync),
    .stat, .ctrl, .clr_sample, .clr_frame, .state_q(state)
  );

  agc_datapath #(
    .SATURATION(SATURATION), .LOW_LEVEL(LOW_LEVEL),
    .SILENCE_LEVEL(SILENCE_LEVEL), .SAT_LIMIT(SAT_LIMIT),
    .SEVERAL_SAT(SEVERAL_SAT), .DECAY_FRAMES(DECAY_FRAMES),
    .ATTEN_MAX(ATTEN_MAX), .ATTEN_RESET(ATTEN_RESET)
  ) u_datapath (
    .clk, .rst, .mucode_in(mucode), .ctrl, .stat, .attenuate_out,
    .maximum_q(maximum), .satcnt_q()   // count not brought out
  );

  assign test_out = {state, maximum};

  // The attenuation code never leaves the attenuator's range.
  a_atten_range: assert property (@(posedge clk) disable iff (rst)
                                  attenuate_out <= ATTEN_MAX);

endmodule
