// tb_hamming_encoder: test of the extended Hamming (16,11) encoder.
// Checks the two worked examples (00011111111 -> 0000111101110111 and
// 00001000111 -> 1000010010110111), then all 2048 messages against the
// parity-check reference of tb_ref_pkg: every codeword must have a zero
// syndrome, even overall parity and the message at positions 3,5,6,7,9..15.
// It also checks that distinct messages give codewords at least 4 bits
// apart (sampled pairs), and the one-cycle latency.
module tb_hamming_encoder;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, in_valid, out_valid;
  msg_t in;
  code_t hamming_out;
  code_t book [2048];
  int checks = 0, failures = 0;

  hamming_encoder dut (.*);
  always #10 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic enc(input msg_t m);
    in = m; in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    check(out_valid, "latency 1");
  endtask

  initial begin
    rst = 1; in_valid = 0; in = '0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    enc(11'b00011111111);
    check(hamming_out == 16'b0000111101110111, $sformatf("example 1 got %b", hamming_out));
    enc(11'b00001000111);
    check(hamming_out == 16'b1000010010110111, $sformatf("example 2 got %b", hamming_out));
    for (int v = 0; v < 2048; v++) begin
      in = 11'(v); in_valid = 1;
      @(negedge clk);
      book[v] = hamming_out;
      check(out_valid, "valid");
      check(hamming_out == ref_encode(11'(v)), $sformatf("msg %b got %b", v, hamming_out));
      check(syndrome15(hamming_out) == 0 && ^hamming_out == 0, "zero syndrome, even parity");
      check(ref_extract(hamming_out) == 11'(v), "systematic positions");
    end
    in_valid = 0;
    for (int t = 0; t < 3000; t++) begin
      int a, b;
      a = $urandom_range(0, 2047);
      b = $urandom_range(0, 2047);
      if (a != b) check($countones(book[a] ^ book[b]) >= 4, "distance >= 4");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
