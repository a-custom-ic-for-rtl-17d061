// tb_agc_datapath: random operation sequences against a register-level
// model of the data path.
//
// Each clock a random set of operations is applied (one attenuation and one
// decay operation at a time, as the controller issues them) and every
// comparison output and the attenuate-out register are compared with
// values the testbench computes itself.  Directed steps first check the
// threshold codes at their exact boundaries.
module tb_agc_datapath;
  import agc_pkg::*;

  localparam int unsigned DF = 25;

  logic      clk = 0, rst = 1;
  data_t     mucode_in = '0;
  agc_ctrl_t ctrl = '0;
  agc_stat_t stat;
  atten_t    attenuate_out;
  data_t     maximum_q;
  satcnt_t   satcnt_q;
  int checks = 0, failures = 0;

  agc_datapath dut (.*);

  always #5 clk = ~clk;

  // model
  int unsigned m_mu, m_max, m_sat, m_att, m_dec, m_out;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    int unsigned lvl;
    lvl = (~m_mu) & 'hFF;
    check(stat.mu_gt_max    == (lvl > m_max),   "mu_gt_max");
    check(stat.sat_full     == (m_sat > 126),   "sat_full");
    check(stat.mu_gt_sat    == (lvl > 'hFE),    "mu_gt_sat");
    check(stat.max_sat      == (m_max > 'hFE),  "max_sat");
    check(stat.many_sat     == (m_sat > 2),     "many_sat");
    check(stat.max_silent   == (m_max < 'hAF),  "max_silent");
    check(stat.max_low      == (m_max < 'hEF),  "max_low");
    check(stat.decay_done   == (m_dec >= DF),   "decay_done");
    check(stat.atten_at_max == (m_att >= 59),   "atten_at_max");
    check(stat.atten_at_min == (m_att == 0),    "atten_at_min");
    check(attenuate_out == atten_t'(m_out),     "attenuate_out");
    check(maximum_q == data_t'(m_max),          "maximum");
    check(satcnt_q == satcnt_t'(m_sat),         "saturation-count");
  endtask

  task automatic step();
    int unsigned old_mu;
    @(posedge clk);
    old_mu = m_mu;
    if (ctrl.load_mucode) m_mu = 32'(mucode_in);
    if (ctrl.end_frame) begin
      m_max = 0; m_sat = 0; m_out = m_att;
    end else begin
      if (ctrl.load_max) m_max = (~old_mu) & 'hFF;
      if (ctrl.inc_sat)  m_sat = (m_sat + 1) & 'h7F;
    end
    if (ctrl.inc_atten)      m_att = (m_att + 1) & 'h3F;
    else if (ctrl.dec_atten) m_att = (m_att - 1) & 'h3F;
    if (ctrl.clr_decay)      m_dec = 0;
    else if (ctrl.inc_decay) m_dec = (m_dec + 1) & 'h1F;
    #1 compare();
  endtask

  task automatic load_max_with(data_t level);
    @(negedge clk);
    ctrl = '0; mucode_in = ~level; ctrl.load_mucode = 1;
    step();
    @(negedge clk);
    ctrl = '0; ctrl.load_max = 1;
    step();
  endtask

  initial begin
    {m_mu, m_max, m_sat, m_att, m_dec, m_out} = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    compare();

    // threshold boundaries (levels are ~mucode)
    load_max_with(8'hFE); check(!stat.max_sat, "FE not saturated");
    check(!stat.max_low, "FE not low");
    load_max_with(8'hFF); check(stat.max_sat, "FF saturated");
    check(stat.mu_gt_sat, "FF counts as saturating sample");
    load_max_with(8'hEF); check(!stat.max_low, "EF not 6 dB down");
    load_max_with(8'hEE); check(stat.max_low && !stat.max_silent, "EE low, not silent");
    load_max_with(8'hAF); check(!stat.max_silent, "AF not silent");
    load_max_with(8'hAE); check(stat.max_silent, "AE silent");

    // random operation mix
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      ctrl = '0;
      mucode_in = data_t'($urandom);
      ctrl.load_mucode = ($urandom % 3) == 0;
      ctrl.load_max    = ($urandom % 4) == 0;
      ctrl.inc_sat     = ($urandom % 2) == 0;
      ctrl.end_frame   = ($urandom % 200) == 0;
      case ($urandom % 4)
        0: ctrl.inc_atten = 1;
        1: ctrl.dec_atten = 1;
        default: ;
      endcase
      case ($urandom % 8)
        0: ctrl.clr_decay = 1;
        1, 2, 3: ctrl.inc_decay = 1;
        default: ;
      endcase
      step();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
