// tb_thread_metric: kernel-benchmark style workloads on the full-size
// hardware RTOS services (all parameters at their defaults).
//
// The bench plays the kernel and the benchmark threads, issuing the commands
// each thread's code would issue and following the running task that the
// scheduler reports. Three patterns of the Thread-Metric suite are run:
//   * preemptive context switching: five threads of five priorities; the
//     lowest resumes the next higher one, which preempts it and resumes the
//     next, up to the highest; then each suspends itself in turn and control
//     falls back down the chain. Every resume must raise exactly one
//     preemption interrupt, every self-suspend must hand over to the next
//     lower thread with no interrupt.
//   * semaphore processing: one thread takes and releases a semaphore in a
//     loop; every take succeeds and no task is ever blocked.
//   * interrupt processing with preemption: an interrupt handler (the bench)
//     resumes a high-priority thread, which preempts, counts and suspends
//     itself again.
// Each pattern runs a fixed number of iterations; the bench checks every
// step and that every iteration takes the same number of clock cycles, and
// prints the cycles per iteration as seen at the service ports (command
// strobes included; the processor's own work is not modelled). The
// cooperative, message-passing and memory-allocation tests of the suite are
// not run: the first relies on a software yield, the other two on services
// that stay in software.
`timescale 1ns/1ps
module tb_thread_metric;
  import rtos_pkg::*;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic     tick_enable_in = 0, tick_int_clear_in = 0;
  tick_t    tick_load_in = 1000, tick_value;
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

  int cyc = 0, irqs = 0, blocks = 0, rejects = 0;
  always @(posedge aclk) begin
    cyc++;
    if (tick_out)         irqs++;
    if (suspendSempr_out) blocks++;
    if (tm_reject_out)    rejects++;
  end

  typedef enum {C_CREATE, C_SUSPEND, C_RESUME} cmd_e;
  task automatic tm(input cmd_e c, input task_id_t id, input prio_t p = '0);
    @(negedge aclk);
    taskID_in = id; priority_in = p; addrTCB_in = 32'h3000_0000 + 32'(id) * 32'h100;
    unique case (c)
      C_CREATE:  createTask_in  = 1;
      C_SUSPEND: suspendTask_in = 1;
      C_RESUME:  resumeTask_in  = 1;
    endcase
    @(negedge aclk);
    {createTask_in, suspendTask_in, resumeTask_in} = '0;
  endtask

  // wait until the scheduler reports task id (bounded), then settle
  task automatic wait_run(input task_id_t id, input string what);
    int t0 = cyc;
    while (taskIDrun_out != id && cyc - t0 < 100) @(negedge aclk);
    check(taskIDrun_out == id, $sformatf("%s: running %0d expected %0d", what, taskIDrun_out, id));
    while (tm_busy_out || sem_busy_out) @(negedge aclk);
    @(negedge aclk);
  endtask

  localparam int ITER = 20;
  localparam task_id_t IDLE = 0, SP = 40, IPP = 41;
  task_id_t th [1:5];                    // th[1] highest priority ... th[5] lowest
  prio_t    tp [1:5];
  int i, k, t_it, it_cycles, first_cycles, irq0;
  bit same;

  initial begin
    for (k = 1; k <= 5; k++) begin th[k] = task_id_t'(30 + k); tp[k] = prio_t'(60 - 10 * k); end
    repeat (3) @(negedge aclk);
    aresetn = 1;
    tm(C_CREATE, IDLE, 6'd0);
    wait_run(IDLE, "idle");

    // ---- preemptive context switching
    // create the five threads and park each one suspended; then the
    // lowest is resumed and starts the chain
    for (k = 5; k >= 1; k--) begin
      tm(C_CREATE, th[k], tp[k]);
      wait_run(th[k], "create chain thread");
      tm(C_SUSPEND, th[k]);
      wait_run(IDLE, "park chain thread");
    end
    tm(C_RESUME, th[5]);
    wait_run(th[5], "chain start");
    same = 1; first_cycles = -1;
    for (i = 0; i < ITER; i++) begin
      t_it = cyc; irq0 = irqs;
      for (k = 5; k >= 2; k--) begin
        tm(C_RESUME, th[k-1]);
        wait_run(th[k-1], $sformatf("PS iter %0d: thread %0d resumes %0d", i, k, k - 1));
      end
      check(irqs - irq0 == 4, $sformatf("PS iter %0d: four preemption interrupts, saw %0d", i, irqs - irq0));
      irq0 = irqs;
      for (k = 1; k <= 4; k++) begin
        tm(C_SUSPEND, th[k]);
        wait_run(th[k+1], $sformatf("PS iter %0d: thread %0d suspends", i, k));
      end
      check(irqs == irq0, $sformatf("PS iter %0d: no interrupt on self-suspend", i));
      it_cycles = cyc - t_it;
      if (first_cycles < 0) first_cycles = it_cycles;
      else if (it_cycles != first_cycles) same = 0;
    end
    check(same, "PS: every iteration takes the same number of cycles");
    $display("preemptive switching: %0d iterations, %0d cycles each (8 switches)", ITER, first_cycles);
    tm(C_SUSPEND, th[5]);
    wait_run(IDLE, "PS done");

    // ---- semaphore processing
    @(negedge aclk); semaphoreID_in = 8'd9; countInit_in = 1; countmax_in = 1; createSemphr_in = 1;
    @(negedge aclk); createSemphr_in = 0;
    tm(C_CREATE, SP, 6'd20);
    wait_run(SP, "SP thread");
    same = 1; first_cycles = -1;
    for (i = 0; i < 2 * ITER; i++) begin
      int ok0;
      t_it = cyc;
      @(negedge aclk); semaphoreID_in = 8'd9; sem_taskID_in = SP; sem_priority_in = 6'd20; take_in = 1;
      @(negedge aclk); take_in = 0;
      ok0 = 0;
      repeat (3) begin @(negedge aclk); if (takesuccess_out) ok0 = 1; end
      check(ok0 == 1, $sformatf("SP iter %0d: take succeeds", i));
      @(negedge aclk); release_in = 1;
      @(negedge aclk); release_in = 0;
      repeat (3) @(negedge aclk);
      it_cycles = cyc - t_it;
      if (first_cycles < 0) first_cycles = it_cycles;
      else if (it_cycles != first_cycles) same = 0;
    end
    check(blocks == 0, "SP: no thread ever blocked");
    check(taskIDrun_out == SP, "SP: thread keeps running");
    check(same, "SP: every take/release pair takes the same number of cycles");
    $display("semaphore processing: %0d take/release pairs, %0d cycles each", 2 * ITER, first_cycles);

    // ---- interrupt processing with preemption
    tm(C_CREATE, IPP, 6'd45);
    wait_run(IPP, "IPP thread created");
    tm(C_SUSPEND, IPP);
    wait_run(SP, "IPP thread waits");
    same = 1; first_cycles = -1;
    for (i = 0; i < ITER; i++) begin
      t_it = cyc; irq0 = irqs;
      tm(C_RESUME, IPP);                 // from the interrupt handler
      wait_run(IPP, $sformatf("IPP iter %0d: handler's resume preempts", i));
      check(irqs - irq0 == 1, $sformatf("IPP iter %0d: one interrupt", i));
      tm(C_SUSPEND, IPP);
      wait_run(SP, $sformatf("IPP iter %0d: back to the interrupted thread", i));
      it_cycles = cyc - t_it;
      if (first_cycles < 0) first_cycles = it_cycles;
      else if (it_cycles != first_cycles) same = 0;
    end
    check(same, "IPP: every iteration takes the same number of cycles");
    $display("interrupt processing with preemption: %0d iterations, %0d cycles each", ITER, first_cycles);
    check(rejects == 0, "no command refused");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
