// upsampler: zero-insertion upsampler on the transmit side.
//
// Each 16-bit codeword is sent in one clock cycle, and all-zero words fill
// the other FACTOR-1 cycles of the symbol period. So the line carries one
// codeword slot for every FACTOR cycles. slot_mark is high in the cycle
// that carries a codeword. It is the timing signal that tells the
// downsampler which words to keep.
//
// The source says that the upsampler adds zeros in certain clock cycles and
// that the downsampler removes them. Its waveform shows the line switching
// between the codeword and zeros at twice the word rate, hence FACTOR = 2.
// The slot_mark signal is this design's own choice.
//
// Timing: the word on `in` with in_valid goes out on the next cycle. New
// words may come at most once every FACTOR cycles (asserted). Reset is
// synchronous.
module upsampler
  import rms_pkg::*;
#(
  parameter int unsigned FACTOR = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  code_t in,
  output code_t upsampled_out,
  output logic  slot_mark
);
  localparam int unsigned GW = $clog2(FACTOR + 1);
  logic [GW-1:0] gap;   // cycles since the last codeword, saturating

  always_ff @(posedge clk) begin
    if (rst) begin
      upsampled_out <= '0;
      slot_mark     <= 1'b0;
      gap           <= GW'(FACTOR);
    end else begin
      slot_mark     <= in_valid;
      upsampled_out <= in_valid ? in : '0;
      if (in_valid)                gap <= '0;
      else if (gap != GW'(FACTOR)) gap <= gap + 1'b1;
    end
  end

  // A codeword must be followed by FACTOR-1 zero slots.
  a_spacing: assert property (@(posedge clk) disable iff (rst)
    in_valid |-> gap >= GW'(FACTOR - 1))
    else $error("upsampler: codewords closer than FACTOR cycles");
endmodule
