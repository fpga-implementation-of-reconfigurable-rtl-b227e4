// s2p_conv: serial-to-parallel converter at the modulator input.
//
// On load it takes in the 8-bit input word and splits it into the I and Q
// channels of the modulators. Odd bits go to I and even bits to Q, so QPSK
// symbol k is the dibit word[2k+1:2k] = {I, Q}. The output is registered:
// it is valid (out_valid) one cycle after load, in step with the input
// register that feeds the modulation selector. rst clears the word and the
// valid flag (synchronous).
//
// The source draws this converter in the transmitter next to the input
// register, and inside the QPSK modulator. The bit split is this design's
// own choice.
module s2p_conv
  import rms_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  word_t data_in,
  output iq_t   iq_out,
  output logic  out_valid
);
  iq_t split;

  always_comb begin
    for (int unsigned k = 0; k < DATA_W/2; k++) begin
      split.i[k] = data_in[2*k+1];
      split.q[k] = data_in[2*k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      iq_out    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= load;
      if (load) iq_out <= split;
    end
  end
endmodule
