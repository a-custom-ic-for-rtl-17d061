// agc_control: state sequencer of the AGC chip.
//
// A single sequencer serves both tasks one after the other (time-serial).
// In interrupt-wait it polls two pending flags: a pending sample is served
// first (clear the flag, latch the PCM word), then a pending frame.  The
// sample-rate task then runs one source statement per clock:
//   S1  maximum <- ~mucode when ~mucode > maximum
//   S2  back to interrupt-wait when saturation-count > 126
//   S3  saturation-count + 1 when ~mucode > SATURATION
//   S4  back to interrupt-wait
// The frame-rate task checks push-to-talk, then attack (saturated frame:
// +1 step, or +2 steps when several samples saturated), silence (no change,
// decay count kept), slow decay (count low frames, after DECAY_FRAMES of
// them one step less and the count restarts; a louder frame restarts it),
// and always ends in F_CLR, which publishes the attenuation and clears the
// per-frame registers.
//
// Timing: a sample costs 5 clocks from dispatch to the return to
// interrupt-wait (3 when saturation-count is full); a frame costs 3
// (push-to-talk) to 7 (low-level frame) clocks counted the same way.  The sample-rate statements and their order follow
// the published source fragment and flow chart; the serving order when both
// flags are pending and the frame-rate state breakdown are this design's.
module agc_control
  import agc_pkg::*;
(
  input  logic      clk,
  input  logic      rst,             // asynchronous, active high
  input  logic      sample_pending,
  input  logic      frame_pending,
  input  logic      ptt,             // push-to-talk, synchronised
  input  agc_stat_t stat,
  output agc_ctrl_t ctrl,
  output logic      clr_sample,      // acknowledge the sample flag
  output logic      clr_frame,       // acknowledge the frame flag
  output state_t    state_q
);

  state_t state, state_n;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= ST_WAIT;
    else     state <= state_n;
  end

  always_comb begin
    state_n    = state;
    ctrl       = '0;
    clr_sample = 1'b0;
    clr_frame  = 1'b0;
    unique case (state)
      ST_WAIT: begin
        if (sample_pending) begin
          clr_sample       = 1'b1;
          ctrl.load_mucode = 1'b1;
          state_n          = ST_S1;
        end else if (frame_pending) begin
          clr_frame = 1'b1;
          state_n   = ST_F_PTT;
        end
      end
      ST_S1: begin
        ctrl.load_max = stat.mu_gt_max;
        state_n       = ST_S2;
      end
      ST_S2: state_n = stat.sat_full ? ST_WAIT : ST_S3;
      ST_S3: begin
        ctrl.inc_sat = stat.mu_gt_sat;
        state_n      = ST_S4;
      end
      ST_S4: state_n = ST_WAIT;
      ST_F_PTT: state_n = ptt ? ST_F_CLR : ST_F_SAT;
      ST_F_SAT: begin
        if (stat.max_sat) begin
          ctrl.clr_decay = 1'b1;
          state_n        = stat.many_sat ? ST_F_INC2 : ST_F_INC1;
        end else begin
          state_n = ST_F_SIL;
        end
      end
      ST_F_SIL: state_n = stat.max_silent ? ST_F_CLR : ST_F_LOW;
      ST_F_LOW: begin
        if (stat.max_low) begin
          ctrl.inc_decay = 1'b1;
          state_n        = ST_F_DEC;
        end else begin
          ctrl.clr_decay = 1'b1;
          state_n        = ST_F_CLR;
        end
      end
      ST_F_DEC: begin
        if (stat.decay_done) begin
          ctrl.clr_decay = 1'b1;
          ctrl.dec_atten = !stat.atten_at_min;
        end
        state_n = ST_F_CLR;
      end
      ST_F_INC2: begin
        ctrl.inc_atten = !stat.atten_at_max;
        state_n        = ST_F_INC1;
      end
      ST_F_INC1: begin
        ctrl.inc_atten = !stat.atten_at_max;
        state_n        = ST_F_CLR;
      end
      ST_F_CLR: begin
        ctrl.end_frame = 1'b1;
        state_n        = ST_WAIT;
      end
      default: state_n = ST_WAIT;
    endcase
  end

  assign state_q = state;

  // At most one flag is acknowledged per clock, and a sample's PCM word is
  // latched in the clock its flag is acknowledged.
  a_one_ack: assert property (@(posedge clk) disable iff (rst)
                              !(clr_sample && clr_frame));
  a_load_with_ack: assert property (@(posedge clk) disable iff (rst)
                                    ctrl.load_mucode == clr_sample);
  // Attenuation moves one way per clock.
  a_one_atten_op: assert property (@(posedge clk) disable iff (rst)
                                   !(ctrl.inc_atten && ctrl.dec_atten));

endmodule
