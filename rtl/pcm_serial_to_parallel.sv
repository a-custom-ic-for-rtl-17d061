// pcm_serial_to_parallel: the 8-bit serial-to-parallel converter and latch
// between the codec's serial PCM output and the AGC chip's MUCODE pins.
//
// Bits arrive MSB first, one per clock in which bit_en is high; word_sync,
// given with the first bit of a word, restarts the bit count.  When the
// eighth bit is in, the assembled word is copied to the output latch, which
// then holds it steady while the chip reads it; word_valid pulses for one
// clock as it does.  The converter's function is that of the published
// peripheral circuit; the serial format (MSB first, sync with the first bit)
// and running it in the chip's clock domain with a bit enable are this
// design's choices.
module pcm_serial_to_parallel #(
  parameter int unsigned WIDTH = 8   // at least 3
) (
  input  logic             clk,
  input  logic             rst,          // asynchronous, active high
  input  logic             bit_en,       // a serial bit is present
  input  logic             bit_in,
  input  logic             word_sync,    // with bit_en: first bit of a word
  output logic [WIDTH-1:0] word_out,     // latched parallel word
  output logic             word_valid    // one clock when word_out is loaded
);

  localparam int unsigned CNT_W = $clog2(WIDTH + 1);

  logic [WIDTH-2:0] shreg;   // first WIDTH-1 bits of the word
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      shreg      <= '0;
      count      <= '0;
      word_out   <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (bit_en) begin
        shreg <= {shreg[WIDTH-3:0], bit_in};
        if (word_sync || count == CNT_W'(WIDTH)) begin
          count <= CNT_W'(1);
        end else begin
          count <= count + 1'b1;
        end
        if (!word_sync && count == CNT_W'(WIDTH - 1)) begin
          word_out   <= {shreg, bit_in};
          word_valid <= 1'b1;
        end
      end
    end
  end

endmodule
