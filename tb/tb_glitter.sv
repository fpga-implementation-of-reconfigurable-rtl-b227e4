// tb_glitter: exhaustive test of the modulation selector over all 256 noise
// levels against the threshold table (86..173 BPSK, above QPSK, below QAM),
// including the source's example 10101010 -> 00 and both boundaries.
module tb_glitter;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  word_t reg_out;
  mod_e  control_out;
  int checks = 0, failures = 0;

  glitter dut (.*);

  task automatic check(input logic [1:0] exp, input string what);
    checks++;
    if (control_out !== exp) begin
      failures++;
      $display("FAIL %s: level %0d got %b expected %b", what, reg_out, control_out, exp);
    end
  endtask

  initial begin
    reg_out = 8'b10101010; #1 check(2'b00, "example");
    reg_out = 8'd86;  #1 check(2'b00, "low bound");
    reg_out = 8'd85;  #1 check(2'b10, "below low bound");
    reg_out = 8'd173; #1 check(2'b00, "high bound");
    reg_out = 8'd174; #1 check(2'b01, "above high bound");
    for (int v = 0; v < 256; v++) begin
      reg_out = 8'(v);
      #1 check(ref_glitter(8'(v)), "sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
