// tb_cr_receiver: test of the receiver chain. The test plays the
// transmitter: every other cycle it sends the reference codeword of a
// random word with slot_mark and the select, and zeros in between. Some
// codewords get one flipped bit, some get two. Each word must come out on
// reciever_out 3 edges after the downsampler takes it in, with
// receiver_valid high. Clean and single-error words must equal the sent
// word (single_err set for the latter), and double-error words must raise
// double_err. The source's example (0000111101110111 under BPSK ->
// 10101010) is sent first.
module tb_cr_receiver;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, slot_mark, receiver_valid, single_err, double_err;
  code_t receiver_in, downsampled_out;
  mod_e link_mod_ctrl;
  msg_t hamming_de_msg;
  word_t reciever_out, hamming_de_out, demodulated_out;
  int checks = 0, failures = 0, cyc = 0;
  int n_clean = 0, n_single = 0, n_double = 0;
  typedef struct { word_t d; int nerr; int at; } exp_t;
  exp_t q [$];
  exp_t pend;

  cr_receiver dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  always @(posedge clk) if (!rst && slot_mark) begin
    pend.at = cyc + 1;
    q.push_back(pend);
  end

  always @(negedge clk) if (!rst && receiver_valid) begin
    exp_t e;
    if (q.size() == 0) check(0, "output without input");
    else begin
      e = q.pop_front();
      check(cyc - e.at == 3, $sformatf("latency %0d", cyc - e.at));
      if (e.nerr == 2) begin
        check(double_err && !single_err, "double error flagged");
        n_double++;
      end else begin
        check(reciever_out == e.d, $sformatf("word %b got %b (%0d errors)", e.d, reciever_out, e.nerr));
        check(single_err == (e.nerr == 1) && !double_err, "error flags");
        if (e.nerr == 1) n_single++; else n_clean++;
      end
    end
  end

  task automatic send(input word_t d, input int nerr);
    code_t c;
    int a, b;
    c = ref_tx(d);
    a = $urandom_range(0, 15);
    b = (a + $urandom_range(1, 15)) % 16;
    if (nerr >= 1) c ^= 16'd1 << a;
    if (nerr == 2) c ^= 16'd1 << b;
    pend.d = d; pend.nerr = nerr;
    receiver_in = c; slot_mark = 1; link_mod_ctrl = mod_e'(ref_glitter(d));
    @(negedge clk);
    receiver_in = '0; slot_mark = 0;
    @(negedge clk);
  endtask

  initial begin
    rst = 1; slot_mark = 0; receiver_in = '0; link_mod_ctrl = MOD_BPSK;
    repeat (3) @(negedge clk);
    rst = 0;
    check(16'b0000111101110111 == ref_tx(8'b10101010), "reference agrees with the example");
    send(8'b10101010, 0);
    repeat (4) @(negedge clk);
    check(reciever_out == 8'b10101010 && hamming_de_msg == 11'b00011111111
          && hamming_de_out == 8'b11111111, "example received");
    for (int i = 0; i < 600; i++) send(8'($urandom), $urandom_range(0, 5) == 0 ? 2 : $urandom_range(0, 1));
    repeat (6) @(negedge clk);
    check(q.size() == 0, "all words received");
    check(n_clean > 0 && n_single > 0 && n_double > 0, "clean, corrected and flagged words seen");
    $display("clean=%0d corrected=%0d double=%0d", n_clean, n_single, n_double);
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
