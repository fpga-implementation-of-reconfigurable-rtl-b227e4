// tb_rms_modulator: exhaustive test of the reconfigurable modulator.
// Every 8-bit word is modulated under every select code (00 BPSK, 01 QPSK,
// 10 QAM, 11 handled as BPSK). The result is compared with the integer
// constellation model of tb_ref_pkg. The source's example (BPSK of
// 10101010 = 11111111) is checked by value. The one-cycle latency is
// checked: out_valid follows in_valid by exactly one cycle.
module tb_rms_modulator;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, in_valid, out_valid;
  mod_e control, ctrl_out;
  iq_t iq_in;
  word_t modulated_out, bpsk_out, qpsk_out, qam_out;
  int checks = 0, failures = 0;

  rms_modulator dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic iq_t split(input word_t d);
    iq_t x;
    for (int k = 0; k < 4; k++) begin
      x.i[k] = d[2*k+1];
      x.q[k] = d[2*k];
    end
    return x;
  endfunction

  initial begin
    rst = 1; in_valid = 0; control = MOD_BPSK; iq_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    // source example
    control = MOD_BPSK; iq_in = split(8'b10101010); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check(out_valid && modulated_out == 8'b11111111, "BPSK example 10101010 -> 11111111");
    @(negedge clk);
    check(!out_valid && modulated_out == 8'b11111111, "holds without in_valid");
    for (int m = 0; m < 4; m++) begin
      for (int v = 0; v < 256; v++) begin
        control = mod_e'(m); iq_in = split(8'(v)); in_valid = 1;
        @(negedge clk);
        check(out_valid, "latency 1");
        check(ctrl_out == mod_e'(m), "select passed on");
        check(modulated_out == ref_mod(8'(v), 2'(m)),
              $sformatf("mode %0d word %b got %b exp %b", m, v, modulated_out, ref_mod(8'(v), 2'(m))));
        check(bpsk_out == ref_mod(8'(v), 2'd0) && qpsk_out == ref_mod(8'(v), 2'd1)
              && qam_out == ref_mod(8'(v), 2'd2), "per-scheme outputs");
      end
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
