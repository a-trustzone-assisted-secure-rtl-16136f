// rtos_hw_top: hardware services of the real-time OS, as placed in the
// programmable logic next to the processor.
//
// Five blocks work together. systick produces the system tick and counts it
// (tick_value), the time base of every sorted list. task_manager keeps the
// ready lists per priority and the Delay List and answers the scheduler's
// questions. hw_scheduler picks the running task at every tick (round robin
// inside the top priority) and whenever the top ready task changes, and
// interrupts the processor (tick_out) only when the running task must
// change. sw_timers keeps the software timers and, at expiry, makes the
// timer handler task ready through the task manager. hw_semaphore keeps
// counting semaphores and suspends or resumes tasks through the task
// manager. In the original system the processor reaches these ports through
// memory-mapped registers on an AXI4-Lite bus; here they are plain ports:
// one-cycle command strobes with their data, and status outputs. The
// semaphore service's task ID and priority inputs are named sem_taskID_in
// and sem_priority_in here to keep them apart from the task manager's.
//
// Internal connections: tick -> scheduler tick_in; tick_value -> task
// manager and timer tick_in; timer resumetimer_out/timertaskID_out -> task
// manager resume; semaphore suspendSempr_out/resumeSempr_out/
// semphrtaskID_out -> task manager suspend/resume; task manager
// highpriority/highpriorityTask/nexttaskID/addrTCBrun -> scheduler;
// scheduler taskIDrun_out -> task manager taskIDrun_in.
//
// Timing: see the blocks. A tick changes the running task two clock edges
// after the tick pulse; a delayed task whose expiration equals the new tick
// value is ready three edges after it and preempts two edges later.
//
// Which blocks exist and how they connect follows the design description;
// the plain-port boundary in place of the bus is this implementation's.
module rtos_hw_top
  import rtos_pkg::*;
#(
  parameter int unsigned NUM_TASKS  = 256,
  parameter int unsigned NUM_TIMERS = 256,
  parameter int unsigned NUM_SEMS   = 256
) (
  input  logic     aclk,
  input  logic     aresetn,
  // system tick configuration
  input  logic     tick_enable_in,
  input  tick_t    tick_load_in,
  input  logic     tick_int_clear_in,
  output tick_t    tick_value,
  output logic     tick_int,
  // task manager commands
  input  logic     createTask_in,
  input  logic     deleteTask_in,
  input  logic     suspendTask_in,
  input  logic     resumeTask_in,
  input  logic     delayTask_in,
  input  logic     abortDelay_in,
  input  addr_t    addrTCB_in,
  input  prio_t    priority_in,
  input  task_id_t taskID_in,
  input  tick_t    valueDelay_in,
  // software timer commands
  input  logic     createTimer_in,
  input  logic     deleteTimer_in,
  input  logic     startTimer_in,
  input  logic     stopTimer_in,
  input  logic     changePeriod_in,
  input  task_id_t timerTaskID_in,
  input  task_id_t timerID,
  input  addr_t    addrTimer_in,
  input  tick_t    periodTimer_in,
  input  logic     autoRLDTimer_in,
  // semaphore commands
  input  logic     createSemphr_in,
  input  logic     deleteSemphr_in,
  input  count_t   countInit_in,
  input  count_t   countmax_in,
  input  logic     take_in,
  input  logic     release_in,
  input  task_id_t semaphoreID_in,
  input  task_id_t sem_taskID_in,
  input  prio_t    sem_priority_in,
  // scheduling results
  output logic     tick_out,
  output task_id_t taskIDrun_out,
  output addr_t    addrTCBrun_out,
  output prio_t    highpriority_out,
  // timer results
  output logic     resumetimer_out,
  output task_id_t timertaskID_out,
  output addr_t    addrTimer_out,
  output task_id_t timerID_out,
  output tick_t    expireTime_out,
  // semaphore results
  output task_id_t semaphoreID_out,
  output logic     takesuccess_out,
  output logic     resumeSempr_out,
  output logic     suspendSempr_out,
  output task_id_t semphrtaskID_out,
  // status
  output logic     tm_busy_out,
  output logic     tm_reject_out,
  output logic     tm_overflow_out,
  output logic     timers_busy_out,
  output logic     sem_busy_out
);

  logic     tick;
  task_id_t hp_task, next_task;
  addr_t    tcb_run;

  systick u_tick (
    .aclk         (aclk),
    .aresetn      (aresetn),
    .enable_in    (tick_enable_in),
    .load_in      (tick_load_in),
    .int_clear_in (tick_int_clear_in),
    .tick         (tick),
    .tick_value   (tick_value),
    .tick_int     (tick_int)
  );

  task_manager #(.NUM_TASKS(NUM_TASKS)) u_tm (
    .aclk                 (aclk),
    .aresetn              (aresetn),
    .createTask_in        (createTask_in),
    .deleteTask_in        (deleteTask_in),
    .suspendTask_in       (suspendTask_in),
    .resumeTask_in        (resumeTask_in),
    .delayTask_in         (delayTask_in),
    .abortDelay_in        (abortDelay_in),
    .addrTCB_in           (addrTCB_in),
    .priority_in          (priority_in),
    .taskID_in            (taskID_in),
    .valueDelay_in        (valueDelay_in),
    .resumetimer_in       (resumetimer_out),
    .timertaskID_in       (timertaskID_out),
    .resumeSemphr_in      (resumeSempr_out),
    .suspendSemphr_in     (suspendSempr_out),
    .semphrtaskID_in      (semphrtaskID_out),
    .tick_in              (tick_value),
    .taskIDrun_in         (taskIDrun_out),
    .highpriority_out     (highpriority_out),
    .highpriorityTask_out (hp_task),
    .nexttaskID_out       (next_task),
    .addrTCBrun_out       (tcb_run),
    .busy_out             (tm_busy_out),
    .reject_out           (tm_reject_out),
    .overflow_out         (tm_overflow_out)
  );

  hw_scheduler u_sched (
    .aclk                (aclk),
    .aresetn             (aresetn),
    .highpriority_in     (highpriority_out),
    .highpriorityTask_in (hp_task),
    .nexttaskID_in       (next_task),
    .addrTCBrun_in       (tcb_run),
    .tick_in             (tick),
    .tick_out            (tick_out),
    .taskIDrun_out       (taskIDrun_out),
    .addrTCBrun_out      (addrTCBrun_out)
  );

  sw_timers #(.NUM_TIMERS(NUM_TIMERS)) u_timers (
    .aclk            (aclk),
    .aresetn         (aresetn),
    .createTimer_in  (createTimer_in),
    .deleteTimer_in  (deleteTimer_in),
    .startTimer_in   (startTimer_in),
    .stopTimer_in    (stopTimer_in),
    .changePeriod_in (changePeriod_in),
    .timerTaskID_in  (timerTaskID_in),
    .timerID         (timerID),
    .addrTimer_in    (addrTimer_in),
    .periodTimer_in  (periodTimer_in),
    .autoRLDTimer_in (autoRLDTimer_in),
    .tick_in         (tick_value),
    .resumetimer_out (resumetimer_out),
    .timertaskID_out (timertaskID_out),
    .addrTimer_out   (addrTimer_out),
    .timerID_out     (timerID_out),
    .expireTime_out  (expireTime_out),
    .busy_out        (timers_busy_out)
  );

  hw_semaphore #(.NUM_SEMS(NUM_SEMS), .NUM_TASKS(NUM_TASKS)) u_sem (
    .aclk             (aclk),
    .aresetn          (aresetn),
    .createSemphr_in  (createSemphr_in),
    .deleteSemphr_in  (deleteSemphr_in),
    .countInit_in     (countInit_in),
    .countmax_in      (countmax_in),
    .take_in          (take_in),
    .release_in       (release_in),
    .semaphoreID_in   (semaphoreID_in),
    .taskID_in        (sem_taskID_in),
    .priority_in      (sem_priority_in),
    .semaphoreID_out  (semaphoreID_out),
    .takesuccess_out  (takesuccess_out),
    .resumeSempr_out  (resumeSempr_out),
    .suspendSempr_out (suspendSempr_out),
    .semphrtaskID_out (semphrtaskID_out),
    .busy_out         (sem_busy_out)
  );

endmodule
