// hamming_encoder: extended Hamming (16,11) encoder (SECDED).
//
// The 11-bit message (three zero MSBs over the 8-bit modulated word) is
// laid out as a Hamming (15,11) codeword. Bit n of the output holds code
// position n+1. Parity bits sit at positions 1, 2, 4 and 8. Message bit
// 0..10 fill positions 3, 5, 6, 7, 9..15 in order. Parity bit b is the XOR
// of every other position whose index has bit b set. Bit 15 is the XOR of
// bits 0..14, so the code corrects one error and detects two. This layout
// reproduces the source's example: 00011111111 -> 0000111101110111.
//
// The source also draws the encoder as outer encoder, data/parity
// interleavers, combiner and inner encoder. It gives no function for those
// stages, and its example matches the single code above, so that code is
// what is built.
//
// Timing: one register stage; hamming_out is valid one cycle after
// in_valid. Reset is synchronous.
module hamming_encoder
  import rms_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  msg_t  in,
  output logic  out_valid,
  output code_t hamming_out
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid   <= 1'b0;
      hamming_out <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) hamming_out <= hamming_encode(in);
    end
  end
endmodule
