// rms_modulator: the reconfigurable modulation scheme (RMS).
//
// One block modulates the 8-bit word in one of three ways. The 2-bit
// select from the modulation selector (glitter) picks the scheme: 00 BPSK,
// 01 QPSK, 10 16-QAM (11 is handled as BPSK). The three bit-level
// modulators share the I/Q input from the serial-to-parallel converter.
// They are computed in parallel, and a multiplexer picks one. All three
// are also brought out (bpsk/qpsk/qam), as in the source's waveforms.
// Modulation here is a baseband bit model. The carrier is sampled once per
// symbol slot and is negative on even slots, so multiplying by it inverts
// the bits of those slots (BPSK bit, QPSK dibit) or negates the amplitude
// index (QAM); see rms_pkg. BPSK of 10101010 gives 11111111, the value the
// source reports.
//
// Timing: one register stage. The result and the select it was made with
// appear one cycle after in_valid, with out_valid. Reset is synchronous.
module rms_modulator
  import rms_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  mod_e  control,
  input  iq_t   iq_in,
  output logic  out_valid,
  output mod_e  ctrl_out,        // select used for modulated_out
  output word_t modulated_out,
  output word_t bpsk_out,
  output word_t qpsk_out,
  output word_t qam_out
);
  word_t word_in, bpsk_w, qpsk_w, qam_w, sel_w;

  always_comb begin
    for (int unsigned k = 0; k < DATA_W/2; k++) begin
      word_in[2*k+1] = iq_in.i[k];
      word_in[2*k]   = iq_in.q[k];
    end
    bpsk_w = bpsk_mod(word_in);
    qpsk_w = qpsk_mod(iq_in);
    qam_w  = qam_mod(iq_in);
    unique case (control)
      MOD_QPSK: sel_w = qpsk_w;
      MOD_QAM:  sel_w = qam_w;
      default:  sel_w = bpsk_w;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid     <= 1'b0;
      ctrl_out      <= MOD_BPSK;
      modulated_out <= '0;
      bpsk_out      <= '0;
      qpsk_out      <= '0;
      qam_out       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ctrl_out      <= control;
        modulated_out <= sel_w;
        bpsk_out      <= bpsk_w;
        qpsk_out      <= qpsk_w;
        qam_out       <= qam_w;
      end
    end
  end
endmodule
