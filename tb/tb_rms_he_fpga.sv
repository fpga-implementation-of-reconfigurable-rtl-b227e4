// tb_rms_he_fpga: end-to-end test of the whole link at its default
// parameters (UPSAMPLE = 2).
//
// It starts with the worked example: 10101010 is sent over a clean channel
// and must come back as 10101010 via select 00, modulated word 11111111
// and codeword 0000111101110111. Then a random stream follows. Each word
// must leave the receiver exactly 7 cycles after it was loaded, and a word
// is carried every 2 cycles. Codeword slots must match the reference
// encoding, and the slots in between must be zero. Words hit by one
// channel error must be corrected (single_err). Words hit by two must be
// flagged (double_err). The test counts each mechanism and fails if one
// never happens: BPSK, QPSK and QAM words; a change of scheme between
// consecutive words; inserted zero slots; a corrected and a flagged word;
// a pause of reg_control; and a reset in the middle of the stream, which
// must clear the pipeline.
module tb_rms_he_fpga;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, reg_control, sym_strobe, receiver_valid, single_err, double_err;
  word_t data, register_tran_out, modulated_out, bpsk_out, qpsk_out, qam_out;
  word_t hamming_de_out, demodulated_out, reciever_out;
  code_t chan_err, hamming_out, transmitter_out, downsampled_out;
  msg_t hamming_de_msg;
  mod_e mod_ctrl_out;
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { word_t d; int at; int nerr; } item_t;
  item_t in_flight [$];   // loaded, codeword not yet on the line
  item_t on_air    [$];   // codeword sent, not yet received

  // mechanism counters
  int n_mode [3];
  int n_switch = 0, n_zero_slot = 0, n_clean = 0, n_single = 0, n_double = 0;
  int n_pause = 0, n_reset = 0, last_mode = -1, last_valid_cyc = -1, n_back_to_back = 0;

  rms_he_fpga dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Pre-edge view: loads and line slots.
  always @(posedge clk) if (!rst) begin
    if (sym_strobe) begin
      item_t it;
      int m;
      it.d = data; it.at = cyc + 1; it.nerr = 0;
      in_flight.push_back(it);
      m = ref_glitter(data);
      n_mode[m]++;
      if (last_mode >= 0 && m != last_mode) n_switch++;
      last_mode = m;
    end
    if (dut.slot_mark) begin
      item_t it;
      if (in_flight.size() == 0) check(0, "codeword slot without a word");
      else begin
        it = in_flight.pop_front();
        check(transmitter_out == ref_tx(it.d), $sformatf("line word for %b", it.d));
        it.nerr = $countones(chan_err);
        on_air.push_back(it);
      end
    end else begin
      check(transmitter_out == '0, "zero slot");
      n_zero_slot++;
    end
  end

  always @(negedge clk) if (!rst && receiver_valid) begin
    item_t it;
    if (on_air.size() == 0) check(0, "output without input");
    else begin
      it = on_air.pop_front();
      check(cyc - it.at == 7, $sformatf("latency %0d", cyc - it.at));
      if (last_valid_cyc >= 0 && cyc - last_valid_cyc == 2) n_back_to_back++;
      last_valid_cyc = cyc;
      if (it.nerr == 2) begin
        check(double_err && !single_err, "double error flagged");
        n_double++;
      end else begin
        check(reciever_out == it.d, $sformatf("word %b received %b, %0d errors", it.d, reciever_out, it.nerr));
        check(single_err == (it.nerr == 1) && !double_err, "error flags");
        if (it.nerr == 1) n_single++; else n_clean++;
      end
    end
  end

  function automatic code_t rand_err();
    int r, a, b;
    r = $urandom_range(0, 9);
    a = $urandom_range(0, 15);
    b = (a + $urandom_range(1, 15)) % 16;
    if (r < 5) return '0;
    if (r < 8) return 16'd1 << a;
    return (16'd1 << a) | (16'd1 << b);
  endfunction

  task automatic stream(input int n);
    for (int i = 0; i < n; i++) begin
      data = 8'($urandom);
      chan_err = rand_err();
      @(negedge clk);
    end
  endtask

  initial begin
    rst = 1; reg_control = 0; data = 8'b10101010; chan_err = '0;
    repeat (3) @(negedge clk);
    rst = 0; reg_control = 1;
    // worked example, clean channel, data held
    repeat (10) @(negedge clk);
    check(register_tran_out == 8'b10101010 && mod_ctrl_out == MOD_BPSK, "example select 00");
    check(modulated_out == 8'b11111111, "example modulated 11111111");
    check(hamming_out == 16'b0000111101110111, "example codeword");
    check(hamming_de_msg == 11'b00011111111 && hamming_de_out == 8'b11111111, "example decoded");
    check(demodulated_out == 8'b10101010 && reciever_out == 8'b10101010, "example received");
    stream(400);
    // pause
    reg_control = 0;
    repeat (12) begin
      @(negedge clk);
      #1 check(!sym_strobe, "no load while paused");
      n_pause++;
    end
    reg_control = 1;
    stream(400);
    // reset in the middle of the stream: everything in flight is dropped
    rst = 1;
    @(negedge clk);
    in_flight.delete();
    on_air.delete();
    n_reset++;
    #1 check(reciever_out == '0 && !receiver_valid && transmitter_out == '0, "reset clears");
    rst = 0;
    stream(400);
    reg_control = 0; chan_err = '0;
    repeat (12) @(negedge clk);
    check(in_flight.size() == 0 && on_air.size() == 0, "every word delivered");
    check(n_mode[0] > 0, "BPSK used");
    check(n_mode[1] > 0, "QPSK used");
    check(n_mode[2] > 0, "QAM used");
    check(n_switch > 0, "scheme switched");
    check(n_zero_slot > 0, "zero slots inserted");
    check(n_clean > 0, "clean words");
    check(n_single > 0, "single errors corrected");
    check(n_double > 0, "double errors flagged");
    check(n_pause > 0 && n_reset > 0, "pause and reset");
    check(n_back_to_back > 0, "one word per 2 cycles");
    $display("BPSK=%0d QPSK=%0d QAM=%0d switches=%0d zero_slots=%0d clean=%0d corrected=%0d flagged=%0d pause=%0d reset=%0d back_to_back=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_switch, n_zero_slot, n_clean, n_single, n_double,
             n_pause, n_reset, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
