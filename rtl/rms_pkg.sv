// rms_pkg: shared types, sizes and bit-level functions of the reconfigurable
// modulation scheme (RMS) with Hamming coding for a cognitive-radio link.
//
// The link carries one 8-bit word per symbol period. The word is modulated
// by one of three schemes chosen by a 2-bit control code, padded with three
// zero MSBs to 11 bits and protected by an extended Hamming (16,11) code.
//
// What follows the source design: the 2-bit control codes (00 BPSK, 01 QPSK,
// 10 QAM), the 8 -> 11 -> 16 bit widths, and the bit placement of the
// Hamming code (it reproduces the published example 00011111111 ->
// 0000111101110111 exactly).
//
// This design's own choices: the modulators are bit-level baseband models
// in which multiplying by the carrier becomes an inversion on the symbol
// slots where the sampled carrier is negative (every even slot); the QPSK
// dibit and 16-QAM nibble layouts; the Gray level mapping of QAM; and the
// treatment of the unused control code 11 as BPSK. With these choices BPSK
// of 10101010 is 11111111, as in the source.
package rms_pkg;

  localparam int unsigned DATA_W = 8;   // user word
  localparam int unsigned PAD_W  = 3;   // zero MSBs added after modulation
  localparam int unsigned MSG_W  = DATA_W + PAD_W;  // 11: Hamming message
  localparam int unsigned CODE_W = 16;  // extended Hamming codeword

  typedef enum logic [1:0] {
    MOD_BPSK = 2'b00,
    MOD_QPSK = 2'b01,
    MOD_QAM  = 2'b10,
    MOD_RSVD = 2'b11   // never produced by the selector; handled as BPSK
  } mod_e;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [MSG_W-1:0]  msg_t;
  typedef logic [CODE_W-1:0] code_t;

  // I/Q view of a word produced by the serial-to-parallel converter:
  // odd bits form the I channel, even bits the Q channel, so that symbol k
  // of QPSK is the dibit {i[k], q[k]} = word[2k+1:2k].
  typedef struct packed {
    logic [DATA_W/2-1:0] i;
    logic [DATA_W/2-1:0] q;
  } iq_t;

  // Sampled carrier sign per symbol slot: 1 where the carrier is negative.
  // The carrier runs at half the symbol rate, so its sign alternates and is
  // negative on slot 0.
  function automatic logic carrier_neg(input int unsigned slot);
    return (slot % 2) == 0;
  endfunction

  function automatic logic [1:0] gray2bin2(input logic [1:0] g);
    return {g[1], g[1] ^ g[0]};
  endfunction

  function automatic logic [1:0] bin2gray2(input logic [1:0] b);
    return {b[1], b[1] ^ b[0]};
  endfunction

  // ---------------------------------------------------------------- BPSK
  // 8 one-bit symbols; the phase (0 or 180 degrees) of each bit flips
  // where the carrier is negative.
  function automatic word_t bpsk_mod(input word_t d);
    word_t r;
    for (int unsigned n = 0; n < DATA_W; n++) r[n] = d[n] ^ carrier_neg(n);
    return r;
  endfunction

  // ---------------------------------------------------------------- QPSK
  // 4 dibit symbols {I,Q}; each selects one of the phases 45/135/225/315
  // degrees. A negative carrier turns the point by 180 degrees, which
  // inverts both I and Q.
  function automatic word_t qpsk_mod(input iq_t x);
    word_t r;
    for (int unsigned k = 0; k < DATA_W/2; k++) begin
      r[2*k+1] = x.i[k] ^ carrier_neg(k);
      r[2*k]   = x.q[k] ^ carrier_neg(k);
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- 16-QAM
  // 2 nibble symbols {I1,I0,Q1,Q0}. Each Gray-coded pair selects one of the
  // amplitudes -3,-1,+1,+3, sent as the amplitude index 0..3. A negative
  // carrier negates the amplitude, which is index 3-idx (~idx).
  function automatic word_t qam_mod(input iq_t x);
    word_t r;
    logic [1:0] ii, qi;
    for (int unsigned k = 0; k < DATA_W/4; k++) begin
      ii = gray2bin2({x.i[2*k+1], x.q[2*k+1]});
      qi = gray2bin2({x.i[2*k],   x.q[2*k]});
      if (carrier_neg(k)) begin
        ii = ~ii;
        qi = ~qi;
      end
      r[4*k +: 4] = {ii, qi};
    end
    return r;
  endfunction

  function automatic word_t bpsk_demod(input word_t m);
    return bpsk_mod(m);  // the sign flip is its own inverse
  endfunction

  function automatic word_t qpsk_demod(input word_t m);
    iq_t x;
    for (int unsigned k = 0; k < DATA_W/2; k++) begin
      x.i[k] = m[2*k+1];
      x.q[k] = m[2*k];
    end
    return qpsk_mod(x);  // the 180-degree turn is its own inverse
  endfunction

  function automatic word_t qam_demod(input word_t m);
    word_t r;
    logic [1:0] ii, qi, gi, gq;
    for (int unsigned k = 0; k < DATA_W/4; k++) begin
      ii = m[4*k+2 +: 2];
      qi = m[4*k   +: 2];
      if (carrier_neg(k)) begin
        ii = ~ii;
        qi = ~qi;
      end
      gi = bin2gray2(ii);
      gq = bin2gray2(qi);
      // undo the I/Q split: nibble k was {d[4k+3], d[4k+2], d[4k+1], d[4k]}
      r[4*k+3] = gi[1];
      r[4*k+2] = gi[0];
      r[4*k+1] = gq[1];
      r[4*k]   = gq[0];
    end
    return r;
  endfunction

  // ------------------------------------------------------ Hamming (16,11)
  // Positions 1..15 of a Hamming (15,11) code sit in bits 0..14: parity at
  // positions 1,2,4,8, message bits m[0..10] at 3,5,6,7,9..15 in order.
  // Bit 15 is the overall parity of bits 0..14 (extended code, SECDED).
  function automatic code_t hamming_encode(input msg_t m);
    logic [15:1] cw;
    int unsigned j;
    cw = '0;
    j  = 0;
    for (int unsigned p = 1; p <= 15; p++) begin
      if ((p & (p - 1)) != 0) begin
        cw[p] = m[j];
        j++;
      end
    end
    for (int unsigned b = 1; b <= 8; b = b * 2) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p <= 15; p++)
        if ((p & b) != 0 && p != b) par ^= cw[p];
      cw[b] = par;
    end
    return {^cw, cw};
  endfunction

  // Extract the 11 message bits from positions 3,5,6,7,9..15.
  function automatic msg_t hamming_extract(input logic [15:1] cw);
    msg_t m;
    int unsigned j;
    m = '0;
    j = 0;
    for (int unsigned p = 1; p <= 15; p++) begin
      if ((p & (p - 1)) != 0) begin
        m[j] = cw[p];
        j++;
      end
    end
    return m;
  endfunction

endpackage
