// tb_agc_control: runs the sequencer through every branch of the sample-rate
// and frame-rate tasks and checks the operations it issues and the number
// of clocks each task takes.
//
// The testbench plays the strobe flags (a flag stays set until the
// sequencer acknowledges it) and holds the data-path comparison results
// constant for the duration of one task.  For each case it counts, over the
// whole task, how often each operation was issued and how many clocks passed
// from dispatch until the sequencer was back in interrupt-wait, and compares
// with the expected figures: a sample takes 5 clocks (one per source
// statement plus the dispatch), or 3 when the saturation count is full.
module tb_agc_control;
  import agc_pkg::*;

  logic      clk = 0, rst = 1;
  logic      sample_pending = 0, frame_pending = 0, ptt = 0;
  agc_stat_t stat = '0;
  agc_ctrl_t ctrl;
  logic      clr_sample, clr_frame;
  state_t    state_q;
  int checks = 0, failures = 0;

  agc_control dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    int cycles, mu, mx, isat, iatt, datt, idec, cdec, endf, csamp, cfrm;
  } tally_t;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Raise the given flags, then count operations until the sequencer sits
  // in interrupt-wait with no flag left.
  task automatic run(bit samp, bit frm, agc_stat_t st, bit p, output tally_t t);
    t = '{default: 0};
    @(negedge clk);
    stat = st; ptt = p;
    sample_pending = samp; frame_pending = frm;
    do begin
      #1;
      t.cycles++;
      t.mu   += ctrl.load_mucode;  t.mx   += ctrl.load_max;
      t.isat += ctrl.inc_sat;      t.iatt += ctrl.inc_atten;
      t.datt += ctrl.dec_atten;    t.idec += ctrl.inc_decay;
      t.cdec += ctrl.clr_decay;    t.endf += ctrl.end_frame;
      t.csamp += clr_sample;       t.cfrm += clr_frame;
      @(posedge clk);
      if (clr_sample) sample_pending <= 0;
      if (clr_frame)  frame_pending <= 0;
      @(negedge clk);
    end while (!(state_q == ST_WAIT && !sample_pending && !frame_pending) && t.cycles < 100);
  endtask

  function automatic agc_stat_t mk(bit mu_gt_max = 0, bit sat_full = 0, bit mu_gt_sat = 0,
                                   bit max_sat = 0, bit many_sat = 0, bit max_silent = 0,
                                   bit max_low = 0, bit decay_done = 0,
                                   bit at_max = 0, bit at_min = 0);
    agc_stat_t s;
    s.mu_gt_max = mu_gt_max;  s.sat_full = sat_full;  s.mu_gt_sat = mu_gt_sat;
    s.max_sat = max_sat;  s.many_sat = many_sat;  s.max_silent = max_silent;
    s.max_low = max_low;  s.decay_done = decay_done;
    s.atten_at_max = at_max;  s.atten_at_min = at_min;
    return s;
  endfunction

  task automatic expect_t(tally_t t, string name, int cycles, int mu, int mx, int isat,
                          int iatt, int datt, int idec, int cdec, int endf,
                          int csamp, int cfrm);
    check(t.cycles == cycles, $sformatf("%s: %0d clocks, expected %0d", name, t.cycles, cycles));
    check(t.mu == mu && t.mx == mx && t.isat == isat,
          $sformatf("%s: sample ops %0d %0d %0d", name, t.mu, t.mx, t.isat));
    check(t.iatt == iatt && t.datt == datt,
          $sformatf("%s: atten ops +%0d -%0d", name, t.iatt, t.datt));
    check(t.idec == idec && t.cdec == cdec,
          $sformatf("%s: decay ops +%0d clr%0d", name, t.idec, t.cdec));
    check(t.endf == endf && t.csamp == csamp && t.cfrm == cfrm,
          $sformatf("%s: end/ack %0d %0d %0d", name, t.endf, t.csamp, t.cfrm));
  endtask

  initial begin
    tally_t t;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // idle: nothing issued
    repeat (5) begin
      @(negedge clk);
      check(state_q == ST_WAIT && ctrl == '0 && !clr_sample && !clr_frame, "idle");
    end

    //            name                    cyc mu mx is ia da id cd ef cs cf
    run(1, 0, mk(.mu_gt_max(1), .mu_gt_sat(1)), 0, t);
    expect_t(t, "sample louder, saturating", 5, 1, 1, 1, 0, 0, 0, 0, 0, 1, 0);
    run(1, 0, mk(), 0, t);
    expect_t(t, "sample quiet",              5, 1, 0, 0, 0, 0, 0, 0, 0, 1, 0);
    run(1, 0, mk(.sat_full(1), .mu_gt_sat(1), .mu_gt_max(1)), 0, t);
    expect_t(t, "sample, count full",        3, 1, 1, 0, 0, 0, 0, 0, 0, 1, 0);
    run(1, 1, mk(.max_silent(1)), 0, t);
    expect_t(t, "sample and frame",          5+5, 1, 0, 0, 0, 0, 0, 0, 1, 1, 1);
    run(0, 1, mk(.max_sat(1), .many_sat(1)), 1, t);
    expect_t(t, "push-to-talk",              3, 0, 0, 0, 0, 0, 0, 0, 1, 0, 1);
    run(0, 1, mk(.max_sat(1), .many_sat(1)), 0, t);
    expect_t(t, "attack 3 dB",               6, 0, 0, 0, 2, 0, 0, 1, 1, 0, 1);
    run(0, 1, mk(.max_sat(1)), 0, t);
    expect_t(t, "attack 1.5 dB",             5, 0, 0, 0, 1, 0, 0, 1, 1, 0, 1);
    run(0, 1, mk(.max_sat(1), .many_sat(1), .at_max(1)), 0, t);
    expect_t(t, "attack at ceiling",         6, 0, 0, 0, 0, 0, 0, 1, 1, 0, 1);
    run(0, 1, mk(.max_silent(1), .max_low(1)), 0, t);
    expect_t(t, "silence",                   5, 0, 0, 0, 0, 0, 0, 0, 1, 0, 1);
    run(0, 1, mk(.max_low(1)), 0, t);
    expect_t(t, "low frame counted",         7, 0, 0, 0, 0, 0, 1, 0, 1, 0, 1);
    run(0, 1, mk(.max_low(1), .decay_done(1)), 0, t);
    expect_t(t, "decay step",                7, 0, 0, 0, 0, 1, 1, 1, 1, 0, 1);
    run(0, 1, mk(.max_low(1), .decay_done(1), .at_min(1)), 0, t);
    expect_t(t, "decay at floor",            7, 0, 0, 0, 0, 0, 1, 1, 1, 0, 1);
    run(0, 1, mk(), 0, t);
    expect_t(t, "normal level",              6, 0, 0, 0, 0, 0, 0, 1, 1, 0, 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
