// tb_agc_strobe_capture: checks edge capture, flag clearing and latency of
// the strobe flags.
//
// A rising strobe edge must raise its pending flag exactly SYNC_STAGES+1
// clocks later and only once per edge, however long the strobe stays high;
// a clear lowers it; an edge coinciding with a clear wins; push-to-talk
// appears after SYNC_STAGES clocks.
module tb_agc_strobe_capture;
  localparam int unsigned SYNC = 2;

  logic clk = 0, rst = 1;
  logic sample_strobe = 0, frame_strobe = 0, push_to_talk = 0;
  logic clr_sample = 0, clr_frame = 0;
  logic sample_pending, frame_pending, ptt_sync;
  int checks = 0, failures = 0;

  agc_strobe_capture #(.SYNC_STAGES(SYNC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Raise a strobe just after a clock edge and count clocks until its flag.
  task automatic edge_latency(bit is_frame, int hold, output int lat);
    lat = -1;
    @(negedge clk);
    if (is_frame) frame_strobe = 1; else sample_strobe = 1;
    for (int i = 1; i <= 10; i++) begin
      @(posedge clk); #1;
      if (i == hold) begin
        if (is_frame) frame_strobe = 0; else sample_strobe = 0;
      end
      if (lat < 0 && (is_frame ? frame_pending : sample_pending)) lat = i;
    end
  endtask

  initial begin
    int lat;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check(!sample_pending && !frame_pending, "flags clear after reset");

    // sample strobe: latency and one flag per edge (held high 6 clocks)
    edge_latency(0, 6, lat);
    check(lat == SYNC + 1, $sformatf("sample latency %0d", lat));
    check(sample_pending && !frame_pending, "only sample flag set");
    @(negedge clk) clr_sample = 1;
    @(negedge clk) clr_sample = 0;
    check(!sample_pending, "sample flag cleared");
    repeat (5) @(negedge clk);
    check(!sample_pending, "no second flag from a level");

    // frame strobe
    edge_latency(1, 1, lat);
    check(lat == SYNC + 1, $sformatf("frame latency %0d", lat));
    check(frame_pending && !sample_pending, "only frame flag set");
    @(negedge clk) clr_frame = 1;
    @(negedge clk) clr_frame = 0;
    check(!frame_pending, "frame flag cleared");

    // both at once: both flags, independent clears
    @(negedge clk) begin sample_strobe = 1; frame_strobe = 1; end
    @(negedge clk) begin sample_strobe = 0; frame_strobe = 0; end
    repeat (SYNC + 1) @(negedge clk);
    check(sample_pending && frame_pending, "both flags held");
    clr_sample = 1;
    @(negedge clk) clr_sample = 0;
    check(!sample_pending && frame_pending, "frame flag kept while sample served");
    clr_frame = 1;
    @(negedge clk) clr_frame = 0;

    // an edge arriving in the clock of a clear must not be lost
    @(negedge clk) sample_strobe = 1;
    @(negedge clk) sample_strobe = 0;
    repeat (SYNC - 1) @(negedge clk);
    // the flag rises at the next posedge; clear in that same clock
    clr_sample = 1;
    @(negedge clk) clr_sample = 0;
    check(sample_pending, "edge wins over a simultaneous clear");
    clr_sample = 1;
    @(negedge clk) clr_sample = 0;
    check(!sample_pending, "cleared afterwards");

    // push-to-talk synchroniser
    @(negedge clk) push_to_talk = 1;
    repeat (SYNC - 1) @(negedge clk);
    check(!ptt_sync, "ptt not yet through");
    @(negedge clk);
    check(ptt_sync, "ptt through after SYNC_STAGES clocks");
    push_to_talk = 0;
    repeat (SYNC) @(negedge clk);
    check(!ptt_sync, "ptt released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
