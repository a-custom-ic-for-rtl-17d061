// agc_pkg: widths, sequencer states and the control/status bundles shared by
// the AGC controller and its data path.
//
// The AGC chip works on an 8-bit data path (the mu-255 PCM word), drives a
// 6-bit attenuation code and counts up to 127 saturating samples per frame;
// those three sizes follow the published chip.  The state list mirrors the
// statement-per-clock style of the original sequencer: one "interrupt-wait"
// polling state, four sample-rate states (one per source statement) and the
// frame-rate states, whose breakdown is this design's own.
package agc_pkg;

  localparam int unsigned DATA_W   = 8;  // mu-255 PCM word and data path width
  localparam int unsigned ATTEN_W  = 6;  // attenuator code, 1.5 dB per step
  localparam int unsigned SATCNT_W = 7;  // saturation-count, saturates at 127
  localparam int unsigned STATE_W  = 4;

  typedef logic [DATA_W-1:0]   data_t;
  typedef logic [ATTEN_W-1:0]  atten_t;
  typedef logic [SATCNT_W-1:0] satcnt_t;

  // Sequencer states.  S1..S4 are the four statements of the sample-rate
  // task; F_* is the frame-rate task.
  typedef enum logic [STATE_W-1:0] {
    ST_WAIT    = 4'd0,   // interrupt-wait: poll the strobe flags
    ST_S1      = 4'd1,   // maximum <- ~mucode if larger
    ST_S2      = 4'd2,   // leave if saturation-count > 126
    ST_S3      = 4'd3,   // count the sample if ~mucode > SATURATION
    ST_S4      = 4'd4,   // go back to interrupt-wait
    ST_F_PTT   = 4'd5,   // push-to-talk: no adaptation
    ST_F_SAT   = 4'd6,   // fast attack test
    ST_F_SIL   = 4'd7,   // silence test (> 30 dB below saturation)
    ST_F_LOW   = 4'd8,   // slow decay test (> 6 dB below saturation)
    ST_F_DEC   = 4'd9,   // decay counter expired: one step less
    ST_F_INC2  = 4'd10,  // first of two attack steps
    ST_F_INC1  = 4'd11,  // (last) attack step
    ST_F_CLR   = 4'd12   // output attenuation, clear per-frame registers
  } state_t;

  // One data-path operation set per clock, issued by the controller.
  typedef struct packed {
    logic load_mucode;  // mucode <- MUCODE pins
    logic load_max;     // maximum <- ~mucode
    logic inc_sat;      // saturation-count <- saturation-count + 1
    logic inc_atten;    // attenuation + 1 (1.5 dB more)
    logic dec_atten;    // attenuation - 1 (1.5 dB less)
    logic inc_decay;    // decay-count + 1
    logic clr_decay;    // decay-count <- 0
    logic end_frame;    // attenuate-out <- attenuation; clear maximum, saturation-count
  } agc_ctrl_t;

  // Comparison results the data path returns to the controller.
  typedef struct packed {
    logic mu_gt_max;     // ~mucode > maximum
    logic sat_full;      // saturation-count > 126
    logic mu_gt_sat;     // ~mucode > SATURATION
    logic max_sat;       // maximum > SATURATION (frame saturated)
    logic many_sat;      // saturation-count > SEVERAL_SAT
    logic max_silent;    // maximum more than 30 dB below saturation
    logic max_low;       // maximum more than 6 dB below saturation
    logic decay_done;    // decay-count reached DECAY_FRAMES
    logic atten_at_max;  // attenuation at its top code
    logic atten_at_min;  // attenuation at 0
  } agc_stat_t;

endpackage
