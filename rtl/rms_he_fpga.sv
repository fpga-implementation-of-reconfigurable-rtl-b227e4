// rms_he_fpga: a complete cognitive-radio link, with the transmitter and
// the receiver wired back to back. It uses a reconfigurable modulation
// scheme (BPSK / QPSK / 16-QAM in one block, chosen from the noise level
// of the input word) and an extended Hamming (16,11) code.
//
// An 8-bit word on `data` is loaded every UPSAMPLE cycles while
// reg_control is high. After the transmitter pipeline the 16-bit line word
// passes an ideal channel, and chan_err is XORed onto it in the codeword
// slot. This lets a test put one or two bit errors on the air. The receiver
// corrects a single error, flags a double one, and puts the recovered word
// on reciever_out.
//
// Timing: the word sampled at a sym_strobe edge appears on reciever_out
// seven cycles later, with receiver_valid high for that cycle. One word
// is carried per UPSAMPLE cycles (default 2, so one word per 2 clocks).
// chan_err is applied only in the slot_mark cycle, because the zero slots
// carry no data. Reset is synchronous and active high.
module rms_he_fpga
  import rms_pkg::*;
#(
  parameter int unsigned UPSAMPLE = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  reg_control,
  input  word_t data,
  input  code_t chan_err,          // bit errors put on the codeword slot
  output logic  sym_strobe,        // data is sampled at this edge
  output mod_e  mod_ctrl_out,      // scheme chosen for the current word
  output word_t register_tran_out,
  output word_t modulated_out,
  output word_t bpsk_out,          // the three schemes side by side
  output word_t qpsk_out,
  output word_t qam_out,
  output code_t hamming_out,
  output code_t transmitter_out,
  output code_t downsampled_out,
  output msg_t  hamming_de_msg,    // 11-bit decoded message
  output word_t hamming_de_out,
  output word_t demodulated_out,
  output word_t reciever_out,
  output logic  receiver_valid,
  output logic  single_err,
  output logic  double_err
);
  logic  slot_mark;
  mod_e  link_mod_ctrl;
  code_t line;

  cr_transmitter #(.UPSAMPLE(UPSAMPLE)) u_tx (
    .clk, .rst, .reg_control, .data,
    .transmitter_out, .slot_mark, .link_mod_ctrl, .sym_strobe,
    .register_tran_out, .mod_ctrl_out, .modulated_out,
    .bpsk_out, .qpsk_out, .qam_out, .hamming_out
  );

  assign line = transmitter_out ^ (slot_mark ? chan_err : '0);

  cr_receiver u_rx (
    .clk, .rst, .receiver_in(line), .slot_mark, .link_mod_ctrl,
    .reciever_out, .receiver_valid, .downsampled_out, .hamming_de_msg,
    .hamming_de_out, .demodulated_out, .single_err, .double_err
  );
endmodule
