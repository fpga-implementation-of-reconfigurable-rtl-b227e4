// downsampler: drops the zero words the upsampler inserted.
//
// It keeps only the line word in the cycle marked by slot_mark (the
// transmitter's timing signal), together with the 2-bit modulation select
// that travels beside it. The kept word is held on downsampled_out until
// the next one. out_valid pulses once per kept word.
//
// The source says that the downsampler removes the zeros the upsampler
// added, and that it is driven by the control signals. Keeping words by a
// slot mark is this design's own choice.
//
// Timing: one register stage. Reset is synchronous.
module downsampler
  import rms_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  code_t in,
  input  logic  slot_mark,
  input  mod_e  ctrl_in,
  output code_t downsampled_out,
  output mod_e  ctrl_out,
  output logic  out_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      downsampled_out <= '0;
      ctrl_out        <= MOD_BPSK;
      out_valid       <= 1'b0;
    end else begin
      out_valid <= slot_mark;
      if (slot_mark) begin
        downsampled_out <= in;
        ctrl_out        <= ctrl_in;
      end
    end
  end
endmodule
