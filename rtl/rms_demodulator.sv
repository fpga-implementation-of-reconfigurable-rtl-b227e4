// rms_demodulator: the receiver's reconfigurable demodulator.
//
// It undoes the transmitter's modulation under the 2-bit select that came
// with the word (00 BPSK, 01 QPSK, 10 16-QAM, 11 as BPSK). Like the
// modulator, it is a single block with one inverse mapping per scheme and a
// multiplexer (see rms_pkg). The source's example is BPSK: 11111111 in
// gives 10101010 out.
//
// Timing: one register stage; data_out is valid one cycle after in_valid.
// Reset is synchronous.
module rms_demodulator
  import rms_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  mod_e  control,
  input  word_t data_in,
  output logic  out_valid,
  output word_t data_out
);
  word_t demod_w;

  always_comb begin
    unique case (control)
      MOD_QPSK: demod_w = qpsk_demod(data_in);
      MOD_QAM:  demod_w = qam_demod(data_in);
      default:  demod_w = bpsk_demod(data_in);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      data_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) data_out <= demod_w;
    end
  end
endmodule
