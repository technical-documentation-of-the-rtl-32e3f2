// pcm1802_model: behavioural model of one PCM1802 stereo converter in slave
// mode, left-justified 24-bit format (testbench use only).
//
// On every BCK falling edge DOUT presents the next bit, MSB first. An LRCK
// change seen at a BCK falling edge starts a new word: LRCK high selects the
// left channel, low the right one, and each LRCK rising edge advances the
// frame counter. The word is tb_util_pkg::adc_sample(LINE, channel, frame),
// so a checker can identify every sample. SCKI is accepted but not used.
// The serial format follows the converter settings the documentation gives
// (slave mode, left-justified, 24 bits); the sample encoding is the test's own.
module pcm1802_model #(
  parameter int LINE = 0
) (
  input  logic scki,
  input  logic bck,
  input  logic lrck,
  output logic dout
);
  import tb_util_pkg::*;
  logic        last_lr = 1'b0;
  logic [23:0] word = '0;
  int          frame = -1;
  int          bitn = 0;

  initial dout = 1'b0;

  always @(negedge bck) begin
    if (lrck != last_lr) begin
      if (lrck) frame++;
      word = adc_sample(LINE, lrck ? 0 : 1, frame);
      bitn = 23;
      last_lr = lrck;
    end else if (bitn > 0) bitn--;
    else bitn = -1;
    dout <= (bitn >= 0) ? word[bitn] : 1'b0;
  end

  logic unused;
  assign unused = scki;
endmodule
