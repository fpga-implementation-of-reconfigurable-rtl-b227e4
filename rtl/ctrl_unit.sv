// ctrl_unit: the "control signals" block. It decides when each stage of the
// link handles a new word.
//
// Every stage runs on one clock. A new 8-bit word enters the transmitter
// once per symbol period of UPSAMPLE clock cycles, because the upsampler
// sends each codeword in one cycle and zeros in the other UPSAMPLE-1
// cycles. A modulo-UPSAMPLE slot counter runs while reg_control (the
// enable, named as in the source waveforms) is high. sym_strobe is high in
// slot 0 and tells the input register and the serial-to-parallel converter
// to load.
//
// The source names this block and says that it sets when each module
// processes. The slot counter, the enable and the strobe are this design's
// own choices. Reset is synchronous and active high; the counter restarts
// at slot 0.
module ctrl_unit #(
  parameter int unsigned UPSAMPLE = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic reg_control,   // 1: link running
  output logic sym_strobe     // load a new word this cycle
);
  localparam int unsigned SW = $clog2(UPSAMPLE + 1);
  logic [SW-1:0] slot;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot <= '0;
    end else if (reg_control) begin
      if (slot == SW'(UPSAMPLE - 1)) slot <= '0;
      else                           slot <= slot + 1'b1;
    end
  end

  assign sym_strobe = reg_control && (slot == '0);

  initial assert (UPSAMPLE >= 1) else $error("UPSAMPLE must be at least 1");
endmodule
