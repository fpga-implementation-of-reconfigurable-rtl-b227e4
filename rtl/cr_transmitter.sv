// cr_transmitter: the cognitive-radio transmitter. It takes an 8-bit word,
// modulates it under a scheme chosen from the word's noise level,
// Hamming-encodes it and upsamples it.
//
// Data path (one word every UPSAMPLE cycles, started by ctrl_unit):
//   data -> input register -> glitter ------------------+ 2-bit select
//   data -> serial-to-parallel (I/Q) -> RMS modulator <-+
//        -> {3'b000, modulated} -> Hamming (16,11) encoder -> upsampler
// The line output carries the 16-bit codeword in one cycle (slot_mark
// high) and zeros in the other UPSAMPLE-1 cycles. The modulation select
// travels with the codeword on link_mod_ctrl, so that the receiver's
// demodulator knows the scheme. The source draws this receiver input as
// "MOD control" without saying where it comes from; sending it beside the
// line is this design's own choice.
//
// Timing: a word sampled on `data` at the sym_strobe edge (edge 0: input
// register and S-to-P) is modulated at edge 1, encoded at edge 2 and is on
// transmitter_out after edge 3, with slot_mark high for that cycle.
// Reset is synchronous and active high. The intermediate values are brought
// out under the names of the source's waveform.
module cr_transmitter
  import rms_pkg::*;
#(
  parameter int unsigned UPSAMPLE = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  reg_control,
  input  word_t data,
  output code_t transmitter_out,
  output logic  slot_mark,
  output mod_e  link_mod_ctrl,
  output logic  sym_strobe,
  output word_t register_tran_out,
  output mod_e  mod_ctrl_out,
  output word_t modulated_out,
  output word_t bpsk_out,
  output word_t qpsk_out,
  output word_t qam_out,
  output code_t hamming_out
);
  iq_t  iq;
  logic v_s2p, v_mod, v_ham;
  mod_e ctrl_mod, ctrl_ham;

  ctrl_unit #(.UPSAMPLE(UPSAMPLE)) u_ctrl (
    .clk, .rst, .reg_control, .sym_strobe
  );

  data_register #(.W(DATA_W)) u_reg (
    .clk, .rst, .wen(sym_strobe), .data_in(data), .data_out(register_tran_out)
  );

  s2p_conv u_s2p (
    .clk, .rst, .load(sym_strobe), .data_in(data), .iq_out(iq), .out_valid(v_s2p)
  );

  glitter u_glitter (
    .reg_out(register_tran_out), .control_out(mod_ctrl_out)
  );

  rms_modulator u_rms (
    .clk, .rst, .in_valid(v_s2p), .control(mod_ctrl_out), .iq_in(iq),
    .out_valid(v_mod), .ctrl_out(ctrl_mod), .modulated_out,
    .bpsk_out, .qpsk_out, .qam_out
  );

  hamming_encoder u_he (
    .clk, .rst, .in_valid(v_mod), .in({PAD_W'(0), modulated_out}),
    .out_valid(v_ham), .hamming_out
  );

  upsampler #(.FACTOR(UPSAMPLE)) u_up (
    .clk, .rst, .in_valid(v_ham), .in(hamming_out),
    .upsampled_out(transmitter_out), .slot_mark
  );

  // The select follows its word down the pipeline.
  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl_ham      <= MOD_BPSK;
      link_mod_ctrl <= MOD_BPSK;
    end else begin
      if (v_mod) ctrl_ham      <= ctrl_mod;
      if (v_ham) link_mod_ctrl <= ctrl_ham;
    end
  end
endmodule
