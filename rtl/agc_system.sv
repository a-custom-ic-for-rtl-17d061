// agc_system: the AGC chip with the digital part of its peripheral circuit.
//
// Serial PCM from the codec's transmit side is assembled by an 8-bit
// serial-to-parallel converter and latch and presented to the chip's MUCODE
// pins; the chip's 6-bit attenuate-out code goes to the audio attenuator
// (through a TTL-to-CMOS level converter on the board, which has no logic
// function and is not modelled).  Strobes and push-to-talk come from the
// vocoder timing chain.  The board's three-phase clock generator is replaced
// by the single clock `clk`.
//
// Timing: a PCM word must be completely shifted in before the sample-strobe
// edge that announces it, and must not be overwritten until the chip has
// latched it (SYNC_STAGES+2 clocks after that edge).  attenuate_out changes
// once per frame, at the end of the frame-rate task.
module agc_system
  import agc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        pcm_bit_en,
  input  logic        pcm_bit,
  input  logic        pcm_sync,
  input  logic        sample_strobe,
  input  logic        frame_strobe,
  input  logic        push_to_talk,
  output atten_t      attenuate_out,
  output data_t       mucode,        // latched PCM word (MUCODE pins)
  output logic        pcm_word_valid, // one clock when a new word is latched
  output logic [11:0] test_out
);

  pcm_serial_to_parallel #(.WIDTH(DATA_W)) u_s2p (
    .clk, .rst, .bit_en(pcm_bit_en), .bit_in(pcm_bit), .word_sync(pcm_sync),
    .word_out(mucode), .word_valid(pcm_word_valid)
  );

  agc_ic u_agc (
    .clk, .rst, .mucode, .push_to_talk, .sample_strobe, .frame_strobe,
    .attenuate_out, .test_out
  );

endmodule
