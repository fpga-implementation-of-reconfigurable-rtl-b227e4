// glitter: chooses the modulation from the noise level.
//
// The registered 8-bit input word is read as the noise level, as the source
// does: its example sends the word 10101010 (170) to the selector and gets
// BPSK. The thresholds and codes follow the source's table:
//   86 <= level <= 173  -> 2'b00 BPSK
//   level > 173         -> 2'b01 QPSK
//   level < 86          -> 2'b10 QAM
// The code 2'b11 is never produced. The source prints the lower bound as
// 1010110 (86) and the upper as 10101101 (173). It says "between" them for
// BPSK, so both bounds count as BPSK here.
// The thresholds are parameters (NOISE_LOW, NOISE_HIGH) whose defaults
// are the source's values. The block is purely combinational. Its output is taken up by the
// modulator register on the next clock edge.
module glitter
  import rms_pkg::*;
#(
  parameter word_t NOISE_LOW  = 8'b0101_0110,  // 86
  parameter word_t NOISE_HIGH = 8'b1010_1101   // 173
) (
  input  word_t reg_out,       // noise level (register output)
  output mod_e  control_out    // modulation select
);
  always_comb begin
    if (reg_out > NOISE_HIGH)     control_out = MOD_QPSK;
    else if (reg_out < NOISE_LOW) control_out = MOD_QAM;
    else                          control_out = MOD_BPSK;
  end
endmodule
