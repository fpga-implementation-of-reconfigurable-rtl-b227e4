// tb_s2p_conv: test of the serial-to-parallel (I/Q split) converter.
// Random words are loaded at random times. One cycle after a load,
// out_valid is high and I holds the odd bits, Q the even bits. Without a
// load the word is held and out_valid is low.
module tb_s2p_conv;
  import rms_pkg::*;
  logic clk = 0, rst, load;
  word_t data_in, last;
  iq_t iq_out;
  logic out_valid;
  int checks = 0, failures = 0;

  s2p_conv dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: data %b i %b q %b valid %b", what, last, iq_out.i, iq_out.q, out_valid);
    end
  endtask

  initial begin
    rst = 1; load = 0; data_in = '0; last = '0;
    @(negedge clk); @(negedge clk);
    check(out_valid == 0 && iq_out == '0, "reset");
    rst = 0;
    repeat (300) begin
      load = $urandom_range(0, 1);
      data_in = 8'($urandom);
      @(negedge clk);
      if (load) last = data_in;
      check(out_valid == load, "valid");
      check(iq_out.i == {last[7], last[5], last[3], last[1]}, "I channel");
      check(iq_out.q == {last[6], last[4], last[2], last[0]}, "Q channel");
    end
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
