// tb_agc_system: closed-loop test of the AGC chip and its PCM latch, at the
// design's default sizes.
//
// The testbench models the analogue side: a test signal is scaled by the
// attenuator (1.5 dB per code step, applied from the attenuate-out pins),
// encoded to mu-255 PCM (the usual 8-bit companding: bias 132, clip 32635,
// bits inverted) and shifted serially, MSB first, into the latch one sample
// period at a time; then the sample strobe (and at frame ends the frame
// strobe) is raised.  180 samples make a frame.  The signal goes through
// phases that exercise each behaviour:
//   floor    low level with the attenuation already at 0
//   attack   a tone 12 dB over full scale; the loop must settle unsaturated
//   decay    the tone 12 dB quieter; the attenuation must step down
//   click    one full-scale sample in a moderate frame: a single step up
//   silence  a faint tone; the attenuation must not move
//   ptt      loud tone with push-to-talk held; the attenuation must not move
//   overload a large negative offset saturating every sample; the
//            saturation count caps and the attenuation reaches its ceiling
// The frame-level reference model is fed the same codes, and attenuate-out
// is compared with it after every frame.  Each mechanism is counted and
// must occur at least once.
module tb_agc_system;
  import agc_pkg::*;
  import agc_ref_pkg::*;

  localparam int SAMPLE_CLKS   = 32;
  localparam int FRAME_SAMPLES = 180;
  localparam real PI = 3.14159265358979;

  logic        clk = 0, rst = 1;
  logic        pcm_bit_en = 0, pcm_bit = 0, pcm_sync = 0;
  logic        sample_strobe = 0, frame_strobe = 0, push_to_talk = 0;
  atten_t      attenuate_out;
  data_t       mucode;
  logic        pcm_word_valid;
  logic [11:0] test_out;
  int checks = 0, failures = 0;

  agc_system dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mu-255 encoder: 16-bit linear sample to the transmitted (inverted) code
  function automatic logic [7:0] mulaw(int x);
    int mag, e;
    logic sign;
    sign = x < 0;
    mag  = sign ? -x : x;
    if (mag > 32635) mag = 32635;
    mag += 132;
    e = 7;
    while (e > 0 && !mag[e + 7]) e--;
    return ~{sign, 3'(e), 4'((mag >> (e + 3)) & 15)};
  endfunction

  agc_ref ref_m;
  int     n_kind[7];
  int     n_clamp_hi = 0, n_clamp_lo = 0, n_decay_reset = 0, n_cap = 0, n_frames = 0;
  longint n_samples = 0;
  real    phase = 0.0;

  // One frame of a tone of amplitude amp plus offset dc, through the
  // attenuator and the codec, into the chip.
  task automatic run_frame(real amp, real dc, bit ptt, output frame_kind_e k,
                          input bit click = 0);
    for (int i = 0; i < FRAME_SAMPLES; i++) begin
      automatic bit   boundary = (i == FRAME_SAMPLES - 1);
      automatic real  gain = 10.0 ** (-1.5 * real'(attenuate_out) / 20.0);
      automatic real  x;
      automatic logic [7:0] code;
      phase += 2.0 * PI * 437.0 / 8000.0;
      x = (amp * $sin(phase) + dc) * gain;
      if (click && i == FRAME_SAMPLES / 2) x = -1.0e6;
      if (x > 1.0e6) x = 1.0e6;
      if (x < -1.0e6) x = -1.0e6;
      code = mulaw(int'(x));
      // shift the code in, MSB first
      for (int b = 7; b >= 0; b--) begin
        @(negedge clk);
        pcm_bit_en = 1; pcm_bit = code[b]; pcm_sync = (b == 7);
      end
      @(negedge clk);
      pcm_bit_en = 0; pcm_sync = 0;
      repeat (3) @(negedge clk);
      check(mucode == code, "latched PCM word");
      if (i == 1) push_to_talk = ptt;
      sample_strobe = 1;
      frame_strobe  = boundary;
      repeat (2) @(negedge clk);
      sample_strobe = 0;
      frame_strobe  = 0;
      repeat (SAMPLE_CLKS - 14) @(negedge clk);
      ref_m.sample(code);
      n_samples++;
    end
    if (ref_m.satcnt == 127) n_cap++;
    k = ref_m.frame(ptt);
    n_frames++;
    n_kind[k]++;
    n_clamp_hi    += ref_m.clamped_high;
    n_clamp_lo    += ref_m.clamped_low;
    n_decay_reset += ref_m.decay_was_reset;
    check(attenuate_out == atten_t'(ref_m.atten),
          $sformatf("frame %0d (%s): attenuate-out %0d, expected %0d",
                    n_frames, k.name(), attenuate_out, ref_m.atten));
  endtask

  initial begin
    frame_kind_e k;
    int a0, a1, n_att;
    ref_m = new();
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(negedge clk);

    // floor: low level at attenuation 0, a decay run ends at the floor
    repeat (26) run_frame(5000.0, 0.0, 0, k);
    check(attenuate_out == 0, "floor: attenuation stays at 0");

    // attack: 12 dB over full scale; must settle without saturating
    n_att = 0;
    for (int f = 0; f < 16; f++) begin
      run_frame(4.0 * 32635.0, 0.0, 0, k);
      if (f >= 10 && (k == FR_ATTACK1 || k == FR_ATTACK2)) n_att++;
    end
    check(n_att == 0, "attack: loop still saturating after 10 frames");
    check(attenuate_out >= 7 && attenuate_out <= 10,
          $sformatf("attack: settled at %0d steps, 12 dB needs about 8", attenuate_out));

    // decay: 12 dB quieter for 60 frames -> two 1.5 dB steps down
    a0 = int'(attenuate_out);
    repeat (60) run_frame(32635.0, 0.0, 0, k);
    a1 = int'(attenuate_out);
    check(a1 == a0 - 2, $sformatf("decay: %0d -> %0d, expected two steps", a0, a1));

    // a single click in an otherwise moderate frame: one step up
    run_frame(32635.0, 0.0, 0, k, 1);
    check(k == FR_ATTACK1 && int'(attenuate_out) == a1 + 1, "click: one 1.5 dB step");

    // silence: faint tone, attenuation held
    a0 = int'(attenuate_out);
    repeat (10) run_frame(150.0, 0.0, 0, k);
    check(attenuate_out == atten_t'(a0), "silence: attenuation held");

    // push-to-talk with a loud tone: attenuation held
    repeat (5) run_frame(8.0 * 32635.0, 0.0, 1, k);
    check(attenuate_out == atten_t'(a0), "push-to-talk: attenuation held");

    // overload: every sample saturated, up to the ceiling
    repeat (30) run_frame(1000.0, -1.0e9, 0, k);
    check(attenuate_out == 59, "overload: attenuation at 88.5 dB");

    $display("frames=%0d samples=%0d ptt=%0d attack1=%0d attack2=%0d silence=%0d low=%0d decay_step=%0d hold=%0d",
             n_frames, n_samples, n_kind[FR_PTT], n_kind[FR_ATTACK1], n_kind[FR_ATTACK2],
             n_kind[FR_SILENCE], n_kind[FR_DECAY_COUNT], n_kind[FR_DECAY_STEP], n_kind[FR_HOLD]);
    $display("ceiling=%0d floor=%0d decay_reset=%0d count_cap=%0d",
             n_clamp_hi, n_clamp_lo, n_decay_reset, n_cap);
    for (int i = 0; i < 7; i++) check(n_kind[i] > 0, $sformatf("frame kind %0d never seen", i));
    check(n_clamp_hi > 0, "ceiling never reached");
    check(n_clamp_lo > 0, "floor never reached by a decay");
    check(n_decay_reset > 0, "decay count never restarted");
    check(n_cap > 0, "saturation count never capped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * FRAME_SAMPLES * SAMPLE_CLKS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
