// data_register: the 8-bit register at the transmitter input ("Register")
// and at the receiver output ("Register out").
//
// On a rising clock edge the register clears when rst is high, loads
// data_in when wen is high, and otherwise holds. So data_out shows data_in
// one cycle after a write, and zero while rst is held. This is the
// behaviour the source shows: 10101010 in, 10101010 out with wen=1 and
// rst=0, and zero out with rst=1. Reset is synchronous. The source
// waveform shows the output turning non-zero only after rst falls. The
// width is a parameter; its default is 8, as in the source.
module data_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wen,
  input  logic [W-1:0] data_in,
  output logic [W-1:0] data_out
);
  always_ff @(posedge clk) begin
    if (rst)      data_out <= '0;
    else if (wen) data_out <= data_in;
  end
endmodule
