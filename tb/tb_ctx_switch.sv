// tb_ctx_switch: context-switch latency workload on the full-size hardware
// RTOS services (all parameters at their defaults).
//
// With only the idle task (priority 0) running, a task is created at each of
// the priorities 7, 15, 23, 31, 39, 47, 55 and 63 in turn. The bench counts
// clock cycles from the cycle the create strobe is sampled to the
// context-switch interrupt, and from the suspend strobe back to the idle
// task being chosen. A task at priority 0 shares the level with the idle
// task, so it is switched in by the next tick; there the count runs from the
// tick pulse to the interrupt. Every count must be the same at every
// priority (the hardware decision does not depend on the priority or on how
// many priorities are in use): 3 cycles from a create to the interrupt,
// 3 cycles from a suspend to the new choice, and 2 cycles from a tick to the
// interrupt.
`timescale 1ns/1ps
module tb_ctx_switch;
  import rtos_pkg::*;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic     tick_enable_in = 0, tick_int_clear_in = 0;
  tick_t    tick_load_in = 200, tick_value;
  logic     tick_int;
  logic     createTask_in = 0, deleteTask_in = 0, suspendTask_in = 0, resumeTask_in = 0;
  logic     delayTask_in = 0, abortDelay_in = 0;
  addr_t    addrTCB_in = '0;
  prio_t    priority_in = '0;
  task_id_t taskID_in = '0;
  tick_t    valueDelay_in = '0;
  logic     createTimer_in = 0, deleteTimer_in = 0, startTimer_in = 0, stopTimer_in = 0;
  logic     changePeriod_in = 0, autoRLDTimer_in = 0;
  task_id_t timerTaskID_in = '0, timerID = '0;
  addr_t    addrTimer_in = '0;
  tick_t    periodTimer_in = '0;
  logic     createSemphr_in = 0, deleteSemphr_in = 0, take_in = 0, release_in = 0;
  count_t   countInit_in = '0, countmax_in = '0;
  task_id_t semaphoreID_in = '0, sem_taskID_in = '0;
  prio_t    sem_priority_in = '0;
  logic     tick_out;
  task_id_t taskIDrun_out;
  addr_t    addrTCBrun_out;
  prio_t    highpriority_out;
  logic     resumetimer_out;
  task_id_t timertaskID_out, timerID_out;
  addr_t    addrTimer_out;
  tick_t    expireTime_out;
  task_id_t semaphoreID_out, semphrtaskID_out;
  logic     takesuccess_out, resumeSempr_out, suspendSempr_out;
  logic     tm_busy_out, tm_reject_out, tm_overflow_out;
  logic     timers_busy_out, sem_busy_out;

  rtos_hw_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // free-running cycle counter, read at negative edges
  int cyc = 0;
  always @(posedge aclk) cyc++;

  task automatic strobe(ref logic s, input task_id_t id, input prio_t p);
    @(negedge aclk);
    taskID_in = id; priority_in = p; addrTCB_in = 32'h2000_0000 + 32'(id) * 32'h80;
    s = 1;
    @(negedge aclk);
    s = 0;
  endtask

  localparam task_id_t IDLE = 0;
  int prios [9] = '{7, 15, 23, 31, 39, 47, 55, 63, 0};
  int t0, lat_create, lat_suspend, lat_tick, k;
  task_id_t id;

  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    strobe(createTask_in, IDLE, 6'd0);
    repeat (10) @(negedge aclk);
    check(taskIDrun_out == IDLE, "idle task runs");

    for (k = 0; k < 8; k++) begin
      id = task_id_t'(10 + k);
      @(negedge aclk);
      taskID_in = id; priority_in = prio_t'(prios[k]);
      addrTCB_in = 32'h2000_0000 + 32'(id) * 32'h80;
      createTask_in = 1;
      t0 = cyc + 1;                      // the edge that samples the strobe
      @(negedge aclk); createTask_in = 0;
      while (!tick_out && cyc - t0 < 50) @(negedge aclk);
      lat_create = cyc - t0;
      check(taskIDrun_out == id && addrTCBrun_out == 32'h2000_0000 + 32'(id) * 32'h80,
            $sformatf("priority %0d: new task switched in", prios[k]));
      check(lat_create == 3, $sformatf("priority %0d: create to interrupt %0d cycles", prios[k], lat_create));
      repeat (5) @(negedge aclk);
      @(negedge aclk);
      taskID_in = id; suspendTask_in = 1;
      t0 = cyc + 1;
      @(negedge aclk); suspendTask_in = 0;
      while (taskIDrun_out != IDLE && cyc - t0 < 50) @(negedge aclk);
      lat_suspend = cyc - t0;
      check(lat_suspend == 3, $sformatf("priority %0d: suspend to idle %0d cycles", prios[k], lat_suspend));
      $display("priority %2d: create->interrupt %0d cycles, suspend->idle %0d cycles",
               prios[k], lat_create, lat_suspend);
      repeat (5) @(negedge aclk);
    end

    // priority 0: same level as the idle task, switched in by the tick
    strobe(createTask_in, 8'd20, 6'd0);
    repeat (10) @(negedge aclk);
    check(taskIDrun_out == IDLE, "priority 0 task waits for the tick");
    tick_enable_in = 1;
    while (!dut.tick) @(negedge aclk);
    t0 = cyc;                            // tick pulse sampled at the next edge
    while (!tick_out && cyc - t0 < 50) @(negedge aclk);
    lat_tick = cyc - t0;
    check(taskIDrun_out == 8'd20, "priority 0 task switched in at the tick");
    check(lat_tick == 2, $sformatf("priority 0: tick to interrupt %0d cycles", lat_tick));
    $display("priority  0: tick->interrupt %0d cycles", lat_tick);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
