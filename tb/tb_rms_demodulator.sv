// tb_rms_demodulator: exhaustive test of the reconfigurable demodulator.
// For every word and select code, the reference modulation of the word
// (tb_ref_pkg) is fed in and the original word must come back one cycle
// later. The source's example (11111111 under 00 gives 10101010) is
// checked by value.
module tb_rms_demodulator;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, in_valid, out_valid;
  mod_e control;
  word_t data_in, data_out;
  int checks = 0, failures = 0;

  rms_demodulator dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    rst = 1; in_valid = 0; control = MOD_BPSK; data_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    control = MOD_BPSK; data_in = 8'b11111111; in_valid = 1;
    @(negedge clk);
    check(out_valid && data_out == 8'b10101010, "BPSK example 11111111 -> 10101010");
    for (int m = 0; m < 4; m++) begin
      for (int v = 0; v < 256; v++) begin
        control = mod_e'(m); data_in = ref_mod(8'(v), 2'(m)); in_valid = 1;
        @(negedge clk);
        check(out_valid && data_out == 8'(v),
              $sformatf("mode %0d word %b got %b", m, v, data_out));
      end
    end
    in_valid = 0;
    @(negedge clk);
    check(!out_valid, "valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
