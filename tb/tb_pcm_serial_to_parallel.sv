// tb_pcm_serial_to_parallel: shifts random words in MSB first with random
// gaps between bits and checks each latched word, that the latch holds its
// value while the next word is being shifted, and that word_sync realigns
// the bit count after a stray bit.
module tb_pcm_serial_to_parallel;
  logic       clk = 0, rst = 1;
  logic       bit_en = 0, bit_in = 0, word_sync = 0;
  logic [7:0] word_out;
  logic       word_valid;
  int checks = 0, failures = 0;
  int valids = 0;

  pcm_serial_to_parallel dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (word_valid) valids++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send_bit(bit b, bit sync);
    @(negedge clk);
    bit_en = 1; bit_in = b; word_sync = sync;
    @(negedge clk);
    bit_en = 0; word_sync = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  initial begin
    logic [7:0] w, prev;
    int v0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    prev = '0;
    for (int n = 0; n < 300; n++) begin
      w = 8'($urandom);
      v0 = valids;
      // a stray bit before some words; sync must realign
      if (n % 7 == 3) send_bit(1'b1, 1'b0);
      for (int i = 7; i >= 0; i--) begin
        send_bit(w[i], i == 7);
        if (i > 0) check(word_out == prev, "latch holds previous word");
      end
      repeat (2) @(negedge clk);
      check(valids == v0 + 1, $sformatf("one word_valid per word (%0d)", valids - v0));
      check(word_out == w, $sformatf("word %0d: got %02x expected %02x", n, word_out, w));
      prev = w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
