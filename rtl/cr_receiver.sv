// cr_receiver: the cognitive-radio receiver. It undoes the transmitter:
// downsampling, Hamming decoding with correction, demodulation and an
// output register.
//
// Data path:
//   line -> downsampler (keeps the slot_mark word and its select)
//        -> Hamming (16,11) decoder (corrects 1 error, flags 2)
//        -> low 8 bits -> RMS demodulator (select = MOD control)
//        -> output register -> reciever_out
// The 2-bit MOD control is the select that arrives with the codeword
// (link_mod_ctrl). It is delayed inside the receiver to stay with its word.
//
// Timing: four register stages. A codeword taken in at edge t (slot_mark
// high before it) is on reciever_out after edge t+3. receiver_valid is
// high for that one cycle. single_err and double_err then describe that
// word and hold until the next one. Reset is synchronous and active high.
module cr_receiver
  import rms_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  code_t receiver_in,
  input  logic  slot_mark,
  input  mod_e  link_mod_ctrl,
  output word_t reciever_out,        // spelled as in the source waveform
  output logic  receiver_valid,
  output code_t downsampled_out,
  output msg_t  hamming_de_msg,
  output word_t hamming_de_out,
  output word_t demodulated_out,
  output logic  single_err,          // with receiver_valid: word was corrected
  output logic  double_err           // with receiver_valid: word is not reliable
);
  logic v_ds, v_dec, v_dem;
  mod_e ctrl_ds, ctrl_dec;
  logic dec_single, dec_double, dem_single, dem_double;

  downsampler u_down (
    .clk, .rst, .in(receiver_in), .slot_mark, .ctrl_in(link_mod_ctrl),
    .downsampled_out, .ctrl_out(ctrl_ds), .out_valid(v_ds)
  );

  hamming_decoder u_hd (
    .clk, .rst, .in_valid(v_ds), .in(downsampled_out), .out_valid(v_dec),
    .out(hamming_de_msg), .hamming_decoder_out(hamming_de_out),
    .single_err(dec_single), .double_err(dec_double)
  );

  always_ff @(posedge clk) begin
    if (rst)       ctrl_dec <= MOD_BPSK;
    else if (v_ds) ctrl_dec <= ctrl_ds;
  end

  rms_demodulator u_dem (
    .clk, .rst, .in_valid(v_dec), .control(ctrl_dec), .data_in(hamming_de_out),
    .out_valid(v_dem), .data_out(demodulated_out)
  );

  data_register #(.W(DATA_W)) u_reg_out (
    .clk, .rst, .wen(v_dem), .data_in(demodulated_out), .data_out(reciever_out)
  );

  // The error flags travel with their word to the output register.
  always_ff @(posedge clk) begin
    if (rst) begin
      receiver_valid <= 1'b0;
      dem_single     <= 1'b0;
      dem_double     <= 1'b0;
      single_err     <= 1'b0;
      double_err     <= 1'b0;
    end else begin
      receiver_valid <= v_dem;
      if (v_dec) begin
        dem_single <= dec_single;
        dem_double <= dec_double;
      end
      if (v_dem) begin
        single_err <= dem_single;
        double_err <= dem_double;
      end
    end
  end
endmodule
