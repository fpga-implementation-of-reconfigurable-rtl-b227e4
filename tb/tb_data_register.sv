// tb_data_register: self-checking test of the 8-bit register.
// Checks the source's example (10101010 with wen=1, rst=0 appears on the
// output; rst=1 gives zero), then random writes, holds and resets against
// a shadow model, one clock edge at a time.
module tb_data_register;
  logic clk = 0, rst, wen;
  logic [7:0] data_in, data_out, model;
  int checks = 0, failures = 0;

  data_register #(.W(8)) dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (data_out !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, data_out, exp);
    end
  endtask

  initial begin
    rst = 1; wen = 1; data_in = 8'b10101010;
    @(negedge clk); @(negedge clk);
    check(8'h00, "held in reset");
    rst = 0;
    @(negedge clk);
    check(8'b10101010, "example word");
    model = 8'b10101010;
    repeat (400) begin
      rst = ($urandom_range(0, 15) == 0);
      wen = $urandom_range(0, 1);
      data_in = 8'($urandom);
      @(negedge clk);
      if (rst) model = '0;
      else if (wen) model = data_in;
      check(model, "random");
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
