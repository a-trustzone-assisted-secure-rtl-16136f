// tb_rtos_hw_top: end-to-end test of the hardware RTOS services at their
// full size (256 tasks, 64 priorities, 256 timers, 256 semaphores).
//
// The test bench plays the processor: it creates tasks, timers and
// semaphores through the command strobes and watches the running task and
// the context-switch interrupt that the scheduler reports. The scenario:
//   1. an idle task and tasks A, B (same priority) and D (higher) are
//      created; D must run, and ticks while D is alone raise no interrupt;
//      duplicate or out-of-state commands are refused;
//   2. D delays itself for four ticks: A and B alternate with an interrupt
//      at every tick, then D is woken from the Delay List and preempts;
//   3. a handler task T (highest priority) is created and suspended; an
//      auto-reloading software timer expires, resumes T through the task
//      manager and T preempts; this repeats at the reload period, then the
//      timer is stopped and expires no more;
//   4. D blocks on an empty semaphore (suspended through the task manager),
//      a release wakes it; in the same cycle the application resumes T, so
//      two command sources meet in the task manager's buffer; a later take
//      succeeds at once;
//   5. a burst of delay commands against a long Delay List overflows the
//      command buffer; each dropped command is found again as a refused
//      abort-delay.
// Monitors count every mechanism (round-robin interrupt, preemption
// interrupt, tick without interrupt, Delay List wake-up, timer expiry,
// timer reload, semaphore block/resume/success, refused command, buffer
// overflow, simultaneous command sources); one that never happened counts as
// a failure.
`timescale 1ns/1ps
module tb_rtos_hw_top;
  import rtos_pkg::*;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic     tick_enable_in, tick_int_clear_in;
  tick_t    tick_load_in, tick_value;
  logic     tick_int;
  logic     createTask_in, deleteTask_in, suspendTask_in, resumeTask_in;
  logic     delayTask_in, abortDelay_in;
  addr_t    addrTCB_in;
  prio_t    priority_in;
  task_id_t taskID_in;
  tick_t    valueDelay_in;
  logic     createTimer_in, deleteTimer_in, startTimer_in, stopTimer_in;
  logic     changePeriod_in, autoRLDTimer_in;
  task_id_t timerTaskID_in, timerID;
  addr_t    addrTimer_in;
  tick_t    periodTimer_in;
  logic     createSemphr_in, deleteSemphr_in, take_in, release_in;
  count_t   countInit_in, countmax_in;
  task_id_t semaphoreID_in, sem_taskID_in;
  prio_t    sem_priority_in;
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

  // ---------------------------------------------------------------- monitors
  prio_t    tprio [256];       // priority of each created task, as the bench knows it
  task_id_t prev_run;
  int n_rr = 0, n_preempt = 0, n_tickless = 0, n_wake = 0, n_expiry = 0;
  int n_reload = 0, n_block = 0, n_resume = 0, n_take_ok = 0, n_reject = 0;
  int n_overflow = 0, n_multi = 0, n_irq_other = 0;
  bit irq_since_tick = 1;
  tick_t last_expire;
  bit    have_expire = 0;
  tick_t reload_period;

  always @(posedge aclk) if (aresetn) begin
    if (tick_out) begin
      irq_since_tick = 1;
      if (tprio[taskIDrun_out] > tprio[prev_run])       n_preempt++;
      else if (tprio[taskIDrun_out] == tprio[prev_run]) n_rr++;
      else                                               n_irq_other++;
    end
    prev_run = taskIDrun_out;
    if (dut.tick) begin
      if (!irq_since_tick) n_tickless++;
      irq_since_tick = 0;
    end
    if (dut.u_tm.wake) n_wake++;
    if (resumetimer_out) begin
      n_expiry++;
      if (have_expire && expireTime_out - last_expire == reload_period) n_reload++;
      last_expire = expireTime_out;
      have_expire = 1;
    end
    if (suspendSempr_out) n_block++;
    if (resumeSempr_out)  n_resume++;
    if (takesuccess_out)  n_take_ok++;
    if (tm_reject_out)    n_reject++;
    if (tm_overflow_out)  n_overflow++;
    if ((resumeSempr_out || suspendSempr_out || resumetimer_out) &&
        (createTask_in || deleteTask_in || suspendTask_in || resumeTask_in ||
         delayTask_in || abortDelay_in))
      n_multi++;
  end

  // ------------------------------------------------------------- stimulus
  task automatic idle_inputs();
    {createTask_in, deleteTask_in, suspendTask_in, resumeTask_in} = '0;
    {delayTask_in, abortDelay_in} = '0;
    {createTimer_in, deleteTimer_in, startTimer_in, stopTimer_in, changePeriod_in} = '0;
    {createSemphr_in, deleteSemphr_in, take_in, release_in} = '0;
  endtask

  task automatic settle(input int n = 12);
    repeat (n) @(negedge aclk);
    while (tm_busy_out || timers_busy_out || sem_busy_out) @(negedge aclk);
    repeat (4) @(negedge aclk);
  endtask

  // one application command to the task manager, one clock cycle long
  typedef enum {C_CREATE, C_DELETE, C_SUSPEND, C_RESUME, C_DELAY, C_ABORT} tcmd_e;
  task automatic tm(input tcmd_e c, input task_id_t id, input prio_t p = '0,
                    input tick_t v = '0);
    @(negedge aclk);
    taskID_in = id; priority_in = p; valueDelay_in = v;
    addrTCB_in = 32'h0010_0000 + 32'(id) * 32'h100;
    unique case (c)
      C_CREATE:  begin createTask_in = 1; tprio[id] = p; end
      C_DELETE:  deleteTask_in  = 1;
      C_SUSPEND: suspendTask_in = 1;
      C_RESUME:  resumeTask_in  = 1;
      C_DELAY:   delayTask_in   = 1;
      C_ABORT:   abortDelay_in  = 1;
    endcase
    @(negedge aclk);
    idle_inputs();
  endtask

  task automatic next_tick();
    tick_t t0 = tick_value;
    while (tick_value == t0) @(negedge aclk);
    repeat (12) @(negedge aclk);
  endtask

  task automatic expect_run(input task_id_t id, input string what);
    check(taskIDrun_out == id,
          $sformatf("%s: running task %0d, expected %0d", what, taskIDrun_out, id));
    check(addrTCBrun_out == 32'h0010_0000 + 32'(id) * 32'h100,
          $sformatf("%s: TCB address %h", what, addrTCBrun_out));
  endtask

  localparam task_id_t IDLE = 0, A = 1, B = 2, D = 4, T = 8;
  localparam task_id_t TMR = 3, SEM = 5;
  localparam int       LOAD = 100;     // clock cycles per system tick

  int irq0, rej0, ovf0, exp0, k, v0;
  tick_t tv;

  initial begin
    idle_inputs();
    tick_enable_in = 0; tick_load_in = LOAD; tick_int_clear_in = 0;
    addrTCB_in = '0; priority_in = '0; taskID_in = '0; valueDelay_in = '0;
    timerTaskID_in = '0; timerID = '0; addrTimer_in = '0; periodTimer_in = '0;
    autoRLDTimer_in = 0; countInit_in = '0; countmax_in = '0;
    semaphoreID_in = '0; sem_taskID_in = '0; sem_priority_in = '0;
    foreach (tprio[i]) tprio[i] = '0;
    prev_run = '0;
    repeat (3) @(negedge aclk);
    aresetn = 1;
    @(negedge aclk);
    tick_enable_in = 1;

    // ---- 1. task creation and refused commands
    tm(C_CREATE, IDLE, 6'h00);
    tm(C_CREATE, A, 6'h0A);
    tm(C_CREATE, B, 6'h0A);
    tm(C_CREATE, D, 6'h10);
    settle();
    expect_run(D, "highest-priority task runs after creation");
    check(highpriority_out == 6'h10, "highest ready priority 0x10");
    rej0 = n_reject;
    tm(C_CREATE, D, 6'h11);          // already exists
    tm(C_RESUME, A);                 // ready, not suspended
    tm(C_ABORT, B);                  // not delayed
    tm(C_DELETE, 8'd200);            // never created
    settle();
    check(n_reject - rej0 == 4, $sformatf("four refused commands, saw %0d", n_reject - rej0));
    expect_run(D, "refused commands change nothing");
    irq0 = n_rr + n_preempt + n_irq_other;
    next_tick(); next_tick();
    check(n_rr + n_preempt + n_irq_other == irq0, "no interrupt while D is alone at the top");
    expect_run(D, "D keeps running over ticks");

    // ---- 2. delay, round robin, wake-up with preemption
    tv = tick_value;
    tm(C_DELAY, D, 6'h10, tv + 4);
    settle();
    expect_run(A, "D delayed: first task of priority 0x0A runs");
    next_tick(); expect_run(B, "tick 1: A -> B");
    next_tick(); expect_run(A, "tick 2: B -> A");
    next_tick(); expect_run(B, "tick 3: A -> B");
    check(tick_value == tv + 3, "three ticks passed");
    next_tick(); settle();
    expect_run(D, "tick 4: D woken from the Delay List and preempts");
    check(tick_int, "tick interrupt flag set");
    @(negedge aclk); tick_int_clear_in = 1; @(negedge aclk); tick_int_clear_in = 0;
    check(!tick_int, "tick interrupt flag cleared");

    // ---- 3. software timer resumes its handler task
    tm(C_CREATE, T, 6'h20);
    settle();
    expect_run(T, "new highest task preempts");
    tm(C_SUSPEND, T);
    settle();
    expect_run(D, "handler task suspended, D back");
    reload_period = 3;
    @(negedge aclk);
    timerID = TMR; timerTaskID_in = T; addrTimer_in = 32'hCAFE_0040;
    periodTimer_in = reload_period; autoRLDTimer_in = 1; createTimer_in = 1;
    @(negedge aclk); idle_inputs();
    startTimer_in = 1; tv = tick_value;
    @(negedge aclk); idle_inputs();
    exp0 = n_expiry;
    while (n_expiry == exp0) @(negedge aclk);
    check(timertaskID_out == T && timerID_out == TMR && addrTimer_out == 32'hCAFE_0040,
          "expiry names the handler task, timer and callback");
    check(expireTime_out == tv + reload_period, "first expiry one period after start");
    settle();
    expect_run(T, "timer expiry resumes the handler task, which preempts");
    tm(C_SUSPEND, T);
    settle();
    expect_run(D, "handler done");
    while (n_expiry == exp0 + 1) @(negedge aclk);
    check(expireTime_out == tv + 2 * reload_period, "reloaded timer expires one period later");
    settle();
    expect_run(T, "second expiry resumes the handler again");
    tm(C_SUSPEND, T);
    @(negedge aclk); timerID = TMR; stopTimer_in = 1;
    @(negedge aclk); idle_inputs();
    settle();
    exp0 = n_expiry;
    repeat (2 * reload_period + 1) next_tick();
    check(n_expiry == exp0, "stopped timer does not expire");
    expect_run(D, "D runs after the handler is suspended");

    // ---- 4. semaphore block and release, two sources at once
    @(negedge aclk);
    semaphoreID_in = SEM; countInit_in = 0; countmax_in = 1; createSemphr_in = 1;
    @(negedge aclk); idle_inputs();
    settle();
    @(negedge aclk);
    semaphoreID_in = SEM; sem_taskID_in = D; sem_priority_in = 6'h10; take_in = 1;
    @(negedge aclk); idle_inputs();
    settle();
    check(n_block == 1, "empty semaphore blocks the taker");
    check(taskIDrun_out == A || taskIDrun_out == B, "D blocked: a 0x0A task runs");
    // release from the running task; the application resumes T in the cycle
    // the semaphore's resume request reaches the task manager
    @(negedge aclk);
    semaphoreID_in = SEM; sem_taskID_in = taskIDrun_out; release_in = 1;
    @(negedge aclk); idle_inputs();
    @(negedge aclk);
    taskID_in = T; resumeTask_in = 1;
    @(negedge aclk); idle_inputs();
    settle();
    check(n_resume == 1, "release resumes the waiter");
    expect_run(T, "T (resumed together with D) runs");
    tm(C_SUSPEND, T);
    settle();
    expect_run(D, "D resumed by the semaphore");
    @(negedge aclk); semaphoreID_in = SEM; release_in = 1;
    @(negedge aclk); idle_inputs();
    @(negedge aclk); semaphoreID_in = SEM; sem_taskID_in = D; take_in = 1;
    @(negedge aclk); idle_inputs();
    settle();
    check(n_take_ok == 1, "take on an available semaphore succeeds");
    expect_run(D, "successful take does not block");

    // ---- 5. command buffer overflow against a long Delay List
    v0 = 32'(tick_value) + 5000;
    for (k = 0; k < 40; k++) tm(C_CREATE, task_id_t'(100 + k), 6'h01);
    for (k = 0; k < 20; k++) tm(C_CREATE, task_id_t'(150 + k), 6'h01);
    settle();
    for (k = 0; k < 40; k++) begin
      tm(C_DELAY, task_id_t'(100 + k), 6'h01, tick_t'(v0 + k));
      settle(1);
    end
    ovf0 = n_overflow;
    // one delay command per cycle, each sorted behind the whole list
    for (k = 0; k < 20; k++) begin
      @(negedge aclk);
      taskID_in = task_id_t'(150 + k); valueDelay_in = tick_t'(v0 + 100 + k);
      delayTask_in = 1;
    end
    @(negedge aclk); idle_inputs();
    settle();
    check(n_overflow > ovf0, "burst overflows the command buffer");
    rej0 = n_reject;
    for (k = 0; k < 20; k++) tm(C_ABORT, task_id_t'(150 + k));
    settle();
    check(n_reject - rej0 == n_overflow - ovf0,
          $sformatf("dropped delays (%0d) show as refused aborts (%0d)",
                    n_overflow - ovf0, n_reject - rej0));
    expect_run(D, "D still runs");

    // ---- mechanisms
    $display("mechanisms: rr=%0d preempt=%0d tickless=%0d wake=%0d expiry=%0d reload=%0d",
             n_rr, n_preempt, n_tickless, n_wake, n_expiry, n_reload);
    $display("            block=%0d resume=%0d take_ok=%0d reject=%0d overflow=%0d multi=%0d",
             n_block, n_resume, n_take_ok, n_reject, n_overflow, n_multi);
    check(n_rr > 0,       "round-robin interrupt happened");
    check(n_preempt > 0,  "preemption interrupt happened");
    check(n_tickless > 0, "tick without interrupt happened");
    check(n_wake > 0,     "Delay List wake-up happened");
    check(n_expiry > 0,   "timer expiry happened");
    check(n_reload > 0,   "timer reload happened");
    check(n_block > 0,    "semaphore block happened");
    check(n_resume > 0,   "semaphore resume happened");
    check(n_take_ok > 0,  "semaphore take success happened");
    check(n_reject > 0,   "refused command happened");
    check(n_overflow > 0, "buffer overflow happened");
    check(n_multi > 0,    "simultaneous command sources happened");
    check(n_irq_other == 0, "no interrupt to a lower-priority task");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200_000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
