// agc_datapath: registers and functional units of the AGC chip.
//
// Holds the per-sample register mucode, the per-frame registers maximum and
// saturation-count, the running attenuation and decay-count, and the
// attenuate-out port register.  All comparisons are done on the 1's
// complement of the PCM word (~mucode), as in the chip's source program, so
// that a larger value means a louder sample; the controller decides which
// operation happens in each clock through `ctrl` and branches on `stat`.
//
// Interface: ctrl is sampled on the rising clock edge; stat is combinational
// from the registers.  attenuate_out changes only when ctrl.end_frame is set,
// i.e. once per frame at the end of the frame-rate task.
//
// From the published design: 8-bit data path, 1's complement of the PCM
// code, saturation-count held below 128, +1.5 dB / +3 dB attack, -1.5 dB
// decay after DECAY_FRAMES low frames, no change on silence.  This design's
// own choices: the threshold codes (one mu-255 segment is about 6 dB, so
// "6 dB below saturation" is one segment = 16 codes below full scale and
// "30 dB below" is five segments = 80 codes below), "several" saturating
// samples meaning more than two, the attenuation ceiling of 59 steps
// (88.5 dB / 1.5 dB), and reset values of zero.  Attack and decay steps
// stop at the ends of the attenuation range instead of wrapping.
module agc_datapath
  import agc_pkg::*;
#(
  parameter data_t        SATURATION    = 8'hFE,  // ~mucode above this: saturated
  parameter data_t        LOW_LEVEL     = 8'hEF,  // maximum below this: > 6 dB down
  parameter data_t        SILENCE_LEVEL = 8'hAF,  // maximum below this: > 30 dB down
  parameter satcnt_t      SAT_LIMIT     = 7'd126, // stop counting above this
  parameter satcnt_t      SEVERAL_SAT   = 7'd2,   // more than this: 3 dB attack
  parameter int unsigned  DECAY_FRAMES  = 25,     // low frames before a 1.5 dB decay
  parameter atten_t       ATTEN_MAX     = 6'd59,  // 88.5 dB
  parameter atten_t       ATTEN_RESET   = 6'd0
) (
  input  logic      clk,
  input  logic      rst,            // asynchronous, active high
  input  data_t     mucode_in,      // MUCODE pins
  input  agc_ctrl_t ctrl,
  output agc_stat_t stat,
  output atten_t    attenuate_out,  // attenuate-out pins
  output data_t     maximum_q,      // for the test outputs
  output satcnt_t   satcnt_q
);

  localparam int unsigned DECAY_W = $clog2(DECAY_FRAMES + 1);
  typedef logic [DECAY_W-1:0] decay_t;

  data_t   mucode;
  data_t   maximum;
  satcnt_t satcnt;
  atten_t  atten;
  decay_t  decay;
  atten_t  atten_out;

  data_t   mu_not;   // 1's complement unit
  assign mu_not = ~mucode;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      mucode    <= '0;
      maximum   <= '0;
      satcnt    <= '0;
      atten     <= ATTEN_RESET;
      decay     <= '0;
      atten_out <= ATTEN_RESET;
    end else begin
      if (ctrl.load_mucode) mucode <= mucode_in;

      if (ctrl.end_frame) begin
        maximum   <= '0;
        satcnt    <= '0;
        atten_out <= atten;
      end else begin
        if (ctrl.load_max) maximum <= mu_not;
        if (ctrl.inc_sat)  satcnt  <= satcnt + 1'b1;
      end

      if (ctrl.inc_atten)      atten <= atten + 1'b1;
      else if (ctrl.dec_atten) atten <= atten - 1'b1;

      if (ctrl.clr_decay)      decay <= '0;
      else if (ctrl.inc_decay) decay <= decay + 1'b1;
    end
  end

  always_comb begin
    stat.mu_gt_max    = mu_not > maximum;
    stat.sat_full     = satcnt > SAT_LIMIT;
    stat.mu_gt_sat    = mu_not > SATURATION;
    stat.max_sat      = maximum > SATURATION;
    stat.many_sat     = satcnt > SEVERAL_SAT;
    stat.max_silent   = maximum < SILENCE_LEVEL;
    stat.max_low      = maximum < LOW_LEVEL;
    stat.decay_done   = decay >= decay_t'(DECAY_FRAMES);
    stat.atten_at_max = atten >= ATTEN_MAX;
    stat.atten_at_min = atten == '0;
  end

  assign attenuate_out = atten_out;
  assign maximum_q     = maximum;
  assign satcnt_q      = satcnt;

endmodule
