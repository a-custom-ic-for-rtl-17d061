// tb_agc_ic: end-to-end test of the AGC chip against the frame-level
// reference model.
//
// The testbench plays the vocoder timing chain: a sample strobe every
// SAMPLE_CLKS clocks with a new mu-255 code on MUCODE, and every
// FRAME_SAMPLES samples a frame strobe rising together with a sample strobe
// (as in the chip's timing diagram, the sample that comes with the frame
// strobe is served first and still belongs to the closing frame).
// Frames are built to a chosen type: saturated (1-2 or 3..180 full-scale
// samples), normal, low (6 to 30 dB under saturation), silent, each
// optionally with push-to-talk.  A fixed opening schedule reaches the
// attenuation floor and ceiling and a decay step, then frame types are
// random.  After every frame the attenuate-out pins are compared with the
// model; any change of attenuate-out must come right after the sequencer's
// final frame state.  Every mechanism is counted and must occur.
module tb_agc_ic;
  import agc_pkg::*;
  import agc_ref_pkg::*;

  localparam int SAMPLE_CLKS   = 24;
  localparam int FRAME_SAMPLES = 180;  // 22.5 ms / 125 us
  localparam int N_RANDOM      = 120;

  typedef enum int {T_SAT_FEW, T_SAT_MANY, T_SAT_CAP, T_NORMAL, T_LOW, T_SILENT} ftype_e;

  logic        clk = 0, rst = 1;
  data_t       mucode = 8'hFF;
  logic        push_to_talk = 0, sample_strobe = 0, frame_strobe = 0;
  atten_t      attenuate_out;
  logic [11:0] test_out;
  int checks = 0, failures = 0;

  agc_ic dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // attenuate-out may only change right after the end-of-frame state
  state_t prev_state;
  atten_t prev_att;
  int     att_changes = 0;
  always @(posedge clk) begin
    if (!rst && attenuate_out != prev_att) begin
      att_changes++;
      check(prev_state == ST_F_CLR, "attenuate-out changed outside a frame boundary");
    end
    prev_state <= state_t'(test_out[11:8]);
    prev_att   <= attenuate_out;
  end

  // levels (1's complement of the code) for one frame of the given type
  function automatic void make_frame(ftype_e t, ref logic [7:0] lv[FRAME_SAMPLES]);
    int unsigned top, nsat;
    case (t)
      T_NORMAL: top = 'hEF + $urandom % ('hFE - 'hEF + 1);
      T_LOW:    top = 'hAF + $urandom % ('hEE - 'hAF + 1);
      T_SILENT: top = $urandom % 'hAF;
      default:  top = 'hFE;
    endcase
    for (int i = 0; i < FRAME_SAMPLES; i++) lv[i] = 8'($urandom % (top + 1));
    lv[$urandom % FRAME_SAMPLES] = 8'(top);
    case (t)
      T_SAT_FEW:  nsat = 1 + $urandom % 2;
      T_SAT_MANY: nsat = 3 + $urandom % 120;
      T_SAT_CAP:  nsat = 128 + $urandom % (FRAME_SAMPLES - 127);
      default:    nsat = 0;
    endcase
    for (int i = 0; i < int'(nsat); i++) lv[i] = 8'hFF;
    lv.shuffle();
  endfunction

  agc_ref ref_m;
  int n_kind[7];
  int n_clamp_hi = 0, n_clamp_lo = 0, n_decay_reset = 0, n_cap = 0, n_both = 0;
  ftype_e sched[$];
  bit     ptt_sched[$];

  initial begin
    logic [7:0] lv[FRAME_SAMPLES];
    frame_kind_e k;
    ref_m = new();

    // opening schedule
    repeat (27) begin sched.push_back(T_LOW);      ptt_sched.push_back(0); end
    repeat (33) begin sched.push_back(T_SAT_MANY); ptt_sched.push_back(0); end
    sched.push_back(T_SAT_CAP); ptt_sched.push_back(0);
    repeat (3)  begin sched.push_back(T_SAT_FEW);  ptt_sched.push_back(1); end
    repeat (10) begin sched.push_back(T_LOW);      ptt_sched.push_back(0); end
    sched.push_back(T_NORMAL); ptt_sched.push_back(0);
    for (int i = 0; i < 30; i++) begin
      sched.push_back(i % 6 == 5 ? T_SILENT : T_LOW); ptt_sched.push_back(0);
    end
    sched.push_back(T_SAT_FEW); ptt_sched.push_back(0);
    while (sched.size() < 105 + N_RANDOM) begin
      automatic ftype_e t = ftype_e'($urandom % 6);
      automatic int run = 1 + $urandom % 8;
      if (t == T_LOW) run = 1 + $urandom % 30;
      repeat (run) begin
        sched.push_back(t);
        ptt_sched.push_back(($urandom % 10) == 0);
      end
    end

    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(negedge clk);

    foreach (sched[f]) begin
      make_frame(sched[f], lv);
      for (int i = 0; i < FRAME_SAMPLES; i++) begin
        automatic bit boundary = (i == FRAME_SAMPLES - 1);
        // The last sample of the frame comes with the frame strobe.
        @(negedge clk);
        if (boundary) check(test_out[7:0] == 8'(ref_m.maximum), "maximum on test outputs");
        mucode = ~lv[i];
        if (i == 1) push_to_talk = ptt_sched[f];
        sample_strobe = 1;
        frame_strobe  = boundary;
        repeat (2) @(negedge clk);
        sample_strobe = 0;
        frame_strobe  = 0;
        repeat (SAMPLE_CLKS - 2) @(negedge clk);
        ref_m.sample(~lv[i]);
      end
      if (ref_m.satcnt == 127) n_cap++;
      n_both++;
      k = ref_m.frame(ptt_sched[f]);
      n_kind[k]++;
      n_clamp_hi    += ref_m.clamped_high;
      n_clamp_lo    += ref_m.clamped_low;
      n_decay_reset += ref_m.decay_was_reset;
      check(attenuate_out == atten_t'(ref_m.atten),
            $sformatf("frame %0d (%s): attenuate-out %0d, expected %0d",
                      f, k.name(), attenuate_out, ref_m.atten));
    end

    $display("frames=%0d ptt=%0d attack1=%0d attack2=%0d silence=%0d low=%0d decay_step=%0d hold=%0d",
             sched.size(), n_kind[FR_PTT], n_kind[FR_ATTACK1], n_kind[FR_ATTACK2],
             n_kind[FR_SILENCE], n_kind[FR_DECAY_COUNT], n_kind[FR_DECAY_STEP], n_kind[FR_HOLD]);
    $display("ceiling=%0d floor=%0d decay_reset=%0d count_cap=%0d both_strobes=%0d atten_changes=%0d",
             n_clamp_hi, n_clamp_lo, n_decay_reset, n_cap, n_both, att_changes);
    for (int i = 0; i < 7; i++) check(n_kind[i] > 0, $sformatf("frame kind %0d never seen", i));
    check(n_clamp_hi > 0, "ceiling never reached");
    check(n_clamp_lo > 0, "floor never reached by a decay");
    check(n_decay_reset > 0, "decay count never restarted by a loud frame");
    check(n_cap > 0, "saturation count never capped");
    check(att_changes > 0, "attenuation never changed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300 * FRAME_SAMPLES * SAMPLE_CLKS) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
