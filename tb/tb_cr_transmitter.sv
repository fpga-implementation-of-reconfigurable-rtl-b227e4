// tb_cr_transmitter: test of the transmitter chain at UPSAMPLE = 2.
// First the worked example: word 10101010 -> register 10101010, select
// 00 (BPSK), modulated 11111111, 11-bit message 00011111111 after the
// zero MSBs, codeword 0000111101110111 on the line. Then a stream of
// random words covering all three schemes. Each codeword slot must carry
// the reference encoding of its word (tb_ref_pkg) exactly 3 cycles after
// the word was loaded, with the right select beside it. Every other line
// slot must be zero. The reg_control pause must stop loading.
module tb_cr_transmitter;
  import rms_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst, reg_control, slot_mark, sym_strobe;
  word_t data, register_tran_out, modulated_out, bpsk_out, qpsk_out, qam_out;
  code_t transmitter_out, hamming_out;
  mod_e link_mod_ctrl, mod_ctrl_out;
  int checks = 0, failures = 0, cyc = 0;
  int mode_seen [3];
  int zero_slots = 0, pause_cycles = 0;
  word_t q_data [$];
  int    q_cyc  [$];

  cr_transmitter #(.UPSAMPLE(2)) dut (.*);
  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Scoreboard: record loads and compare every line slot.
  always @(negedge clk) if (!rst) begin
    if (slot_mark) begin
      word_t d;
      int c;
      if (q_data.size() == 0) begin
        check(0, "codeword without a loaded word");
      end else begin
        d = q_data.pop_front();
        c = q_cyc.pop_front();
        check(cyc - c == 3, $sformatf("latency %0d", cyc - c));
        check(transmitter_out == ref_tx(d),
              $sformatf("word %b: line %b expected %b", d, transmitter_out, ref_tx(d)));
        check(link_mod_ctrl == mod_e'(ref_glitter(d)), "select beside codeword");
        mode_seen[ref_glitter(d)]++;
      end
    end else begin
      check(transmitter_out == '0, "inserted zero slot");
      zero_slots++;
    end
  end

  // Loads are recorded at the edge that takes them in (pre-edge values).
  always @(posedge clk) if (!rst && sym_strobe) begin
    q_data.push_back(data);
    q_cyc.push_back(cyc + 1);   // edges counted so far, this one included
  end

  initial begin
    rst = 1; reg_control = 0; data = 8'b10101010;
    repeat (3) @(negedge clk);
    rst = 0; reg_control = 1;
    // worked example, held steady
    repeat (6) @(negedge clk);
    check(register_tran_out == 8'b10101010, "example register");
    check(mod_ctrl_out == MOD_BPSK, "example select 00");
    check(modulated_out == 8'b11111111, "example modulated 11111111");
    check(hamming_out == 16'b0000111101110111, "example codeword");
    // random stream with a pause
    for (int i = 0; i < 600; i++) begin
      if (i == 300) begin
        reg_control = 0;
        repeat (7) begin
          @(negedge clk);
          #1 check(!sym_strobe, "no load while paused");
          pause_cycles++;
        end
        reg_control = 1;
      end
      data = 8'($urandom);
      @(negedge clk);
    end
    reg_control = 0;
    repeat (8) @(negedge clk);
    check(q_data.size() == 0, "all words sent");
    check(mode_seen[0] > 0 && mode_seen[1] > 0 && mode_seen[2] > 0, "all three schemes used");
    check(zero_slots > 0 && pause_cycles > 0, "zero slots and pause seen");
    $display("schemes BPSK=%0d QPSK=%0d QAM=%0d zero slots=%0d", mode_seen[0], mode_seen[1],
             mode_seen[2], zero_slots);
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
