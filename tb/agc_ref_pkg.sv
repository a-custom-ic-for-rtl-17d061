// agc_ref_pkg: behavioural reference of the AGC algorithm for testbenches.
//
// agc_ref works at the level of samples and frames, not clocks: sample()
// takes one mu-255 code as it appears on the MUCODE pins, frame() makes the
// end-of-frame decision and returns what kind of frame it was, so that a
// testbench can count how often each mechanism occurred.  It is written
// from the algorithm's description, independently of the RTL structure.
package agc_ref_pkg;

  typedef enum int {
    FR_PTT,          // push-to-talk: no adaptation
    FR_ATTACK1,      // saturated frame: one step up
    FR_ATTACK2,      // several saturated samples: two steps up
    FR_SILENCE,      // more than 30 dB down: no adaptation, decay count kept
    FR_DECAY_COUNT,  // low frame counted
    FR_DECAY_STEP,   // low frame completed a run: one step down
    FR_HOLD          // normal level: decay count restarts
  } frame_kind_e;

  class agc_ref;
    int unsigned sat_th, low_th, sil_th, several, decay_frames, atten_max;
    int unsigned maximum, satcnt, atten, decay;
    // side information about the last frame
    bit clamped_high, clamped_low, decay_was_reset;

    function new(int unsigned sat_th = 'hFE, int unsigned low_th = 'hEF,
                 int unsigned sil_th = 'hAF, int unsigned several = 2,
                 int unsigned decay_frames = 25, int unsigned atten_max = 59,
                 int unsigned atten_reset = 0);
      this.sat_th = sat_th;  this.low_th = low_th;  this.sil_th = sil_th;
      this.several = several;  this.decay_frames = decay_frames;
      this.atten_max = atten_max;
      maximum = 0;  satcnt = 0;  atten = atten_reset;  decay = 0;
    endfunction

    function void sample(logic [7:0] mu);
      logic [7:0]  inv;
      int unsigned level;
      inv   = ~mu;
      level = int'(inv);
      if (level > maximum) maximum = level;
      if (satcnt < 127 && level > sat_th) satcnt++;
    endfunction

    function frame_kind_e frame(bit ptt);
      frame_kind_e k;
      clamped_high = 0;  clamped_low = 0;  decay_was_reset = 0;
      if (ptt) begin
        k = FR_PTT;
      end else if (maximum > sat_th) begin
        int unsigned steps;
        steps = (satcnt > several) ? 2 : 1;
        k = (steps == 2) ? FR_ATTACK2 : FR_ATTACK1;
        decay_was_reset = (decay != 0);
        decay = 0;
        repeat (steps) begin
          if (atten < atten_max) atten++;
          else clamped_high = 1;
        end
      end else if (maximum < sil_th) begin
        k = FR_SILENCE;
      end else if (maximum < low_th) begin
        decay++;
        if (decay >= decay_frames) begin
          decay = 0;
          k = FR_DECAY_STEP;
          if (atten > 0) atten--;
          else clamped_low = 1;
        end else begin
          k = FR_DECAY_COUNT;
        end
      end else begin
        k = FR_HOLD;
        decay_was_reset = (decay != 0);
        decay = 0;
      end
      maximum = 0;
      satcnt = 0;
      return k;
    endfunction
  endclass

endpackage
