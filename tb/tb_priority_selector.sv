// tb_priority_selector: checks the highest-set-bit encoder of the 64-bit
// ready-priority array: the example with bit 60 as highest set bit, every
// single bit, the empty array and 2000 random arrays against a loop model.
`timescale 1ns/1ps
module tb_priority_selector;
  logic [63:0] bits_in;
  logic [5:0]  high_out;
  logic        any_out;
  int checks = 0, failures = 0;

  priority_selector #(.WIDTH(64)) dut (.*);

  task automatic expect_high(int exp, bit exp_any);
    #1;
    checks++;
    if (high_out != 6'(exp) || any_out != exp_any) begin
      failures++;
      $display("FAIL: bits=%h high=%0d any=%0d exp %0d/%0d", bits_in, high_out, any_out, exp, exp_any);
    end
  endtask

  initial begin
    bits_in = 64'h1000_0000_0000_001F;   // bits 60 and 4..0
    expect_high(60, 1);
    bits_in = '0;
    expect_high(0, 0);
    for (int i = 0; i < 64; i++) begin
      bits_in = 64'd1 << i;
      expect_high(i, 1);
    end
    for (int n = 0; n < 2000; n++) begin
      int exp;
      logic [63:0] r;
      int sh;
      exp = -1;
      r  = {32'($urandom), 32'($urandom)};
      sh = $urandom_range(0, 63);
      bits_in = r >> sh;
      for (int i = 0; i < 64; i++) if (bits_in[i]) exp = i;
      expect_high(exp < 0 ? 0 : exp, exp >= 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
