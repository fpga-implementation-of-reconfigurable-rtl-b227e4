// tb_hamming_decoder: test of the SECDED decoder.
// Checks the worked example (0000111101110111 -> 00011111111 and
// 11111111), then for all 2048 messages: the clean codeword, every one of
// the 16 single-bit errors (corrected, single_err set) and random double
// errors (double_err set, single_err clear). Codewords come from the
// reference encoder of tb_ref_pkg. The one-cycle latency is checked.
module tb_hamming_decoder;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, in_valid, out_valid;
  code_t in;
  msg_t out;
  word_t hamming_decoder_out;
  logic single_err, double_err;
  int checks = 0, failures = 0;

  hamming_decoder dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic dec(input code_t c);
    in = c; in_valid = 1;
    @(negedge clk);
    check(out_valid, "latency 1");
  endtask

  initial begin
    rst = 1; in_valid = 0; in = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    dec(16'b0000111101110111);
    check(out == 11'b00011111111 && hamming_decoder_out == 8'b11111111
          && !single_err && !double_err, "example");
    for (int v = 0; v < 2048; v++) begin
      code_t c;
      int a, b;
      c = ref_encode(11'(v));
      dec(c);
      check(out == 11'(v) && !single_err && !double_err, $sformatf("clean %b", v));
      check(hamming_decoder_out == 8'(v), "low 8 bits");
      for (int e = 0; e < 16; e++) begin
        dec(c ^ (16'd1 << e));
        check(out == 11'(v) && single_err && !double_err,
              $sformatf("single error msg %b bit %0d got %b", v, e, out));
      end
      a = $urandom_range(0, 15);
      b = (a + $urandom_range(1, 15)) % 16;
      dec(c ^ (16'd1 << a) ^ (16'd1 << b));
      check(double_err && !single_err, $sformatf("double error msg %b bits %0d,%0d", v, a, b));
    end
    in_valid = 0;
    @(negedge clk);
    check(!out_valid, "valid drops");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
