// hamming_decoder: extended Hamming (16,11) decoder with single-error
// correction and double-error detection.
//
// Bits 0..14 of the codeword are Hamming positions 1..15, and bit 15 is the
// overall parity (see hamming_encoder). The syndrome is the XOR of the
// indices of all set positions. An overall parity check is also made over
// all 16 bits.
//   syndrome 0, parity ok    : no error
//   syndrome s, parity fails : one error; position s is flipped back
//                              (s = 0: the parity bit itself was hit)
//   syndrome s, parity ok    : two errors; double_err is raised and the
//                              message is passed on uncorrected
// out is the 11-bit message. hamming_decoder_out is its low 8 bits, which
// drops the three zero MSBs added before encoding.
//
// The source describes correction of one error and a flag for two. It
// also draws an inner decoder, de-interleavers and an outer decoder
// without giving their function. As with the encoder, the single code that
// matches its example is what is built.
//
// Timing: one register stage, valid one cycle after in_valid. Reset is
// synchronous.
module hamming_decoder
  import rms_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  code_t in,
  output logic  out_valid,
  output msg_t  out,
  output word_t hamming_decoder_out,
  output logic  single_err,     // one error seen (and corrected)
  output logic  double_err      // two errors seen (not correctable)
);
  logic [3:0]  syndrome;
  logic        parity_fail;
  logic [15:1] fixed;
  msg_t        msg;

  always_comb begin
    syndrome = '0;
    for (int unsigned p = 1; p <= 15; p++)
      if (in[p-1]) syndrome ^= 4'(p);
    parity_fail = ^in;
    fixed = in[14:0];
    if (parity_fail && syndrome != '0) fixed[syndrome] = ~fixed[syndrome];
    msg = hamming_extract(fixed);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      out        <= '0;
      single_err <= 1'b0;
      double_err <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out        <= msg;
        single_err <= parity_fail;
        double_err <= !parity_fail && syndrome != '0;
      end
    end
  end

  assign hamming_decoder_out = out[DATA_W-1:0];
endmodule
