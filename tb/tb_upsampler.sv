// tb_upsampler: test of the zero-insertion upsampler for FACTOR = 2 (the
// default) and FACTOR = 3. Codewords are offered every FACTOR cycles or
// later. In each cycle the output must be the codeword offered in the
// cycle before, with slot_mark high, or all zeros with slot_mark low.
// It also counts that both a codeword slot and an inserted zero slot occur.
module tb_upsampler;
  import rms_pkg::*;
  logic clk = 0, rst;
  logic v2, v3, m2, m3;
  code_t in2, in3, o2, o3, p_in2, p_in3;
  logic p_v2, p_v3;
  int checks = 0, failures = 0, zeros = 0, words = 0;
  int gap2, gap3;

  upsampler #(.FACTOR(2)) dut2 (.clk, .rst, .in_valid(v2), .in(in2), .upsampled_out(o2), .slot_mark(m2));
  upsampler #(.FACTOR(3)) dut3 (.clk, .rst, .in_valid(v3), .in(in3), .upsampled_out(o3), .slot_mark(m3));
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; v2 = 0; v3 = 0; in2 = '0; in3 = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    gap2 = 9; gap3 = 9;
    repeat (500) begin
      // offer a word when allowed, sometimes later
      v2 = (gap2 >= 1) && ($urandom_range(0, 3) != 0);
      v3 = (gap3 >= 2) && ($urandom_range(0, 3) != 0);
      in2 = 16'($urandom) | 16'h0001;   // never all-zero, to tell it from a gap
      in3 = 16'($urandom) | 16'h0001;
      p_v2 = v2; p_v3 = v3; p_in2 = in2; p_in3 = in3;
      @(negedge clk);
      gap2 = v2 ? 0 : gap2 + 1;
      gap3 = v3 ? 0 : gap3 + 1;
      check(m2 == p_v2 && o2 == (p_v2 ? p_in2 : '0), "factor 2 slot");
      check(m3 == p_v3 && o3 == (p_v3 ? p_in3 : '0), "factor 3 slot");
      if (p_v2) words++; else zeros++;
    end
    check(words > 0 && zeros > 0, "both slot kinds seen");
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
