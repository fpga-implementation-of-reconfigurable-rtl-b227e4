// tb_ctrl_unit: checks that the load strobe comes exactly once every
// UPSAMPLE cycles while reg_control is high, never while it is low, and
// restarts in slot 0 after reset. Run for UPSAMPLE = 2 (default) and 3.
module tb_ctrl_unit;
  logic clk = 0, rst, reg_control;
  logic s2, s3;
  int checks = 0, failures = 0;

  ctrl_unit #(.UPSAMPLE(2)) dut2 (.clk, .rst, .reg_control, .sym_strobe(s2));
  ctrl_unit #(.UPSAMPLE(3)) dut3 (.clk, .rst, .reg_control, .sym_strobe(s3));
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    rst = 1; reg_control = 1;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // enabled: slot count since reset decides the strobe
    for (int c = 0; c < 60; c++) begin
      check(s2 == (c % 2 == 0), "period 2");
      check(s3 == (c % 3 == 0), "period 3");
      @(negedge clk);
    end
    // disabled: no strobe, counter frozen
    reg_control = 0;
    repeat (10) begin
      #1 check(!s2 && !s3, "no strobe while disabled");
      @(negedge clk);
    end
    // reset restarts in slot 0
    rst = 1; reg_control = 1; @(negedge clk); rst = 0;
    #1 check(s2 && s3, "slot 0 after reset");
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
