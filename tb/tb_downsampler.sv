// tb_downsampler: test of the downsampler. Random line words arrive every
// cycle; slot_mark picks some of them. After each edge the output must
// hold the last marked word and its select, and out_valid must equal the
// mark of the cycle before. Unmarked words, including non-zero ones, must
// never get through.
module tb_downsampler;
  import rms_pkg::*;
  logic clk = 0, rst, slot_mark, out_valid, p_mark;
  code_t in, downsampled_out, kept;
  mod_e ctrl_in, ctrl_out, kept_ctrl;
  int checks = 0, failures = 0;

  downsampler dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; slot_mark = 0; in = '0; ctrl_in = MOD_BPSK;
    @(negedge clk); @(negedge clk);
    check(downsampled_out == '0 && !out_valid, "reset");
    rst = 0;
    kept = '0; kept_ctrl = MOD_BPSK;
    repeat (500) begin
      slot_mark = $urandom_range(0, 2) == 0;
      in = 16'($urandom);
      ctrl_in = mod_e'($urandom_range(0, 2));
      p_mark = slot_mark;
      if (slot_mark) begin
        kept = in;
        kept_ctrl = ctrl_in;
      end
      @(negedge clk);
      check(out_valid == p_mark, "valid follows mark");
      check(downsampled_out == kept && ctrl_out == kept_ctrl, "keeps marked word only");
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
