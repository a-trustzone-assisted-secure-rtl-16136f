// tb_systick: checks the tick generator and counter: tick period equal to
// the load value (three load values), tick_value counting one per tick,
// tick_int set by a tick and held until cleared, no tick while disabled,
// and the restart of the period on enable.
`timescale 1ns/1ps
module tb_systick;
  import rtos_pkg::*;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;
  logic enable_in, int_clear_in, tick, tick_int;
  tick_t load_in, tick_value;
  int checks = 0, failures = 0;

  systick dut (.*);

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic run_period(input int load, input int nticks);
    int last, cyc, seen;
    tick_t v0;
    @(negedge aclk); enable_in = 0; load_in = load;
    @(negedge aclk); enable_in = 1;
    v0 = tick_value; last = -1; cyc = 0; seen = 0;
    while (seen < nticks) begin
      @(negedge aclk); cyc++;
      if (tick) begin
        if (last >= 0) check(cyc - last == load, $sformatf("period %0d expected %0d", cyc - last, load));
        else           check(cyc == load + 1, $sformatf("first tick after %0d cycles, expected %0d", cyc, load + 1));
        last = cyc; seen++;
      end
      if (cyc > 10 * load + 20) begin check(0, "no tick"); break; end
    end
    @(negedge aclk);
    check(tick_value == v0 + tick_t'(nticks), $sformatf("tick_value %0d expected %0d", tick_value, v0 + nticks));
  endtask

  initial begin
    enable_in = 0; load_in = 10; int_clear_in = 0;
    repeat (2) @(negedge aclk);
    aresetn = 1;
    repeat (30) @(negedge aclk);
    check(tick_value == 0 && !tick_int, "nothing while disabled");
    run_period(10, 5);
    run_period(3, 6);
    run_period(37, 3);
    check(tick_int == 1, "interrupt flag set");
    @(negedge aclk); enable_in = 0; int_clear_in = 1;
    @(negedge aclk); int_clear_in = 0;
    check(tick_int == 0, "interrupt flag cleared");
    repeat (100) @(negedge aclk);
    check(tick_int == 0 && tick == 0, "no tick once disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
