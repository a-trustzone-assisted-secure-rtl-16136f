// tb_cmd_ring: checks the circular command buffer with three write ports:
// port order within a cycle, first-in first-out order across cycles,
// wrap-around of the pointers, push and pop in the same cycle when full,
// and dropping with an overflow report when full, against a queue model.
`timescale 1ns/1ps
module tb_cmd_ring;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  wr_en;
  logic [15:0] wr_data [3];
  logic        rd_en, empty, overflow_out;
  logic [15:0] rd_data;
  int checks = 0, failures = 0, overflows = 0, exp_ovf_cycles = 0;
  logic [15:0] model [$];

  cmd_ring #(.T(logic [15:0]), .DEPTH(16), .NWR(3)) dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int pend_ovf;
  initial begin
    wr_en = 0; rd_en = 0; wr_data[0] = 0; wr_data[1] = 0; wr_data[2] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      bit pop;
      int ovf_now;
      @(negedge clk);
      // compare the visible head with the model
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(rd_data == model[0], $sformatf("head %h exp %h", rd_data, model[0]));
      pop   = ($urandom_range(0, 99) < ((n / 500) % 2 ? 20 : 70));
      rd_en = pop;
      for (int p = 0; p < 3; p++) begin
        wr_en[p]   = ($urandom_range(0, 99) < 30);
        wr_data[p] = 16'($urandom);
      end
      // model: pop first, then ports in order
      if (pop && model.size() > 0) void'(model.pop_front());
      ovf_now = 0;
      for (int p = 0; p < 3; p++)
        if (wr_en[p]) begin
          if (model.size() < 16) model.push_back(wr_data[p]);
          else ovf_now = 1;
        end
      @(posedge clk); #1;
      check(overflow_out == ovf_now[0], "overflow report");
      if (overflow_out) overflows++;
    end
    check(overflows > 0, "buffer was filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
