// task_manager: hardware task manager (hTM) of the hardware RTOS.
//
// It tracks the state of every task and keeps three lists in the
// programmable logic:
//   * Task List, indexed by task ID: TCB address, priority and the
//     previous/next pointers of a circular doubly linked list that joins
//     all ready tasks of the same priority.
//   * Priority List, indexed by priority: first task (TASK STRT), last task
//     (TASK END) and number of ready tasks of that priority. A new or resumed
//     task is appended at the end, so tasks of one priority rotate in order.
//   * Delay List: tasks blocked until a tick value, sorted by expiration
//     (sorted_list). A single list covers delays that end before and after
//     the tick counter wraps.
// A 64-bit bit array of non-empty priorities feeds priority_selector, which
// gives the highest ready priority.
//
// Commands arrive as one-cycle strobes: from the application (create,
// delete, suspend, resume, delay, abort delay, with taskID_in and the data
// inputs), from the software timer service (resumetimer_in with
// timertaskID_in) and from the semaphore service (resumeSemphr_in /
// suspendSemphr_in with semphrtaskID_in). All three sources can strobe in the
// same cycle; each command is put in a circular buffer (cmd_ring) and
// executed in order. Before executing, the command is checked against the
// task's state: a free (deleted or never created) ID accepts only create; a
// ready task accepts delete, suspend and delay; a suspended task accepts only
// resume; a delayed task accepts only abort delay. A refused command is
// dropped and reported on reject_out for one cycle. When the head of the
// Delay List reaches the current tick (tick_in), the task is woken: removed
// from the Delay List and appended to its ready list.
//
// Scheduler interface (combinational from the lists): highpriority_out,
// highpriorityTask_out (first task of that priority), nexttaskID_out (the
// task after taskIDrun_in in its ready list, or highpriorityTask_out when
// taskIDrun_in is no longer ready) and addrTCBrun_out (TCB address
// of taskIDrun_in). When no task is ready, highpriority_out is 0 and
// highpriorityTask_out is not meaningful (the RTOS always has its idle task
// ready at priority 0).
//
// Timing: create, delete, suspend, resume, abort and wake-up take two cycles
// from the strobe (one into the buffer, one to execute); delay takes two
// cycles plus one for each Delay List entry passed while sorting. busy_out is
// high while commands are pending or a list is being sorted.
//
// The lists, their fields, the command set, the validity rules and the
// circular buffer follow the design description. The buffer depth, the order
// of simultaneous application strobes (create, delete, suspend, resume,
// delay, abort), checking validity when a command leaves the buffer, the
// reject/busy outputs and the 32-bit addrTCBrun_out are this
// implementation's choices.
module task_manager
  import rtos_pkg::*;
#(
  parameter int unsigned NUM_TASKS  = 256,
  parameter int unsigned RING_DEPTH = 16
) (
  input  logic     aclk,
  input  logic     aresetn,
  // application commands
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
  // from the software timer service
  input  logic     resumetimer_in,
  input  task_id_t timertaskID_in,
  // from the semaphore service
  input  logic     resumeSemphr_in,
  input  logic     suspendSemphr_in,
  input  task_id_t semphrtaskID_in,
  // current tick
  input  tick_t    tick_in,
  // scheduler interface
  input  task_id_t taskIDrun_in,
  output prio_t    highpriority_out,
  output task_id_t highpriorityTask_out,
  output task_id_t nexttaskID_out,
  output addr_t    addrTCBrun_out,
  // status
  output logic     busy_out,
  output logic     reject_out,
  output logic     overflow_out
);

  // ---------------------------------------------------------------- lists
  addr_t       t_tcb   [NUM_TASKS];
  prio_t       t_prio  [NUM_TASKS];
  task_id_t    t_prev  [NUM_TASKS];
  task_id_t    t_next  [NUM_TASKS];
  task_state_e t_state [NUM_TASKS];

  task_id_t    p_start [NUM_PRIO];
  task_id_t    p_end   [NUM_PRIO];
  logic [TASK_ID_W:0] p_count [NUM_PRIO];
  logic [NUM_PRIO-1:0] ready_bits;

  // ------------------------------------------------------ command buffer
  tm_cmd_t app_cmd, tmr_cmd, sem_cmd;
  logic    app_v;
  tm_cmd_t wr_data [3];
  logic [2:0] wr_en;
  tm_cmd_t cur;
  logic    ring_empty, pop;

  always_comb begin
    app_cmd       = '0;
    app_cmd.id    = taskID_in;
    app_cmd.tcb   = addrTCB_in;
    app_cmd.prio  = priority_in;
    app_cmd.value = valueDelay_in;
    app_v         = 1'b1;
    if      (createTask_in)  app_cmd.op = TM_CREATE;
    else if (deleteTask_in)  app_cmd.op = TM_DELETE;
    else if (suspendTask_in) app_cmd.op = TM_SUSPEND;
    else if (resumeTask_in)  app_cmd.op = TM_RESUME;
    else if (delayTask_in)   app_cmd.op = TM_DELAY;
    else if (abortDelay_in)  app_cmd.op = TM_ABORT;
    else                     app_v      = 1'b0;

    tmr_cmd    = '0;
    tmr_cmd.op = TM_RESUME;
    tmr_cmd.id = timertaskID_in;

    sem_cmd    = '0;
    sem_cmd.op = suspendSemphr_in ? TM_SUSPEND : TM_RESUME;
    sem_cmd.id = semphrtaskID_in;

    wr_en      = {resumeSemphr_in | suspendSemphr_in, resumetimer_in, app_v};
    wr_data[0] = app_cmd;
    wr_data[1] = tmr_cmd;
    wr_data[2] = sem_cmd;
  end

  cmd_ring #(.T(tm_cmd_t), .DEPTH(RING_DEPTH), .NWR(3)) u_ring (
    .clk          (aclk),
    .rst_n        (aresetn),
    .wr_en        (wr_en),
    .wr_data      (wr_data),
    .rd_en        (pop),
    .rd_data      (cur),
    .empty        (ring_empty),
    .overflow_out (overflow_out)
  );

  // ------------------------------------------------------------ delay list
  logic     dl_ins, dl_rem, dl_busy, dl_empty;
  task_id_t dl_rem_id, dl_head;
  tick_t    dl_head_value;

  sorted_list #(.N(NUM_TASKS), .ID_W(TASK_ID_W), .VAL_W(TICK_W)) u_delay (
    .clk        (aclk),
    .rst_n      (aresetn),
    .ins_valid  (dl_ins),
    .ins_id     (cur.id),
    .ins_value  (cur.value),
    .ref_in     (tick_in),
    .rem_valid  (dl_rem),
    .rem_id     (dl_rem_id),
    .busy       (dl_busy),
    .empty      (dl_empty),
    .head_id    (dl_head),
    .head_value (dl_head_value)
  );

  // ------------------------------------------------------------- control
  // The controller executes one command per cycle while the Delay List is
  // not sorting. A due wake-up goes before the buffered commands.
  logic wake, exec, cmd_ok;
  assign wake   = !dl_busy && !dl_empty && (dl_head_value == tick_in);
  assign exec   = !dl_busy && !wake && !ring_empty;
  assign pop    = exec;
  assign cmd_ok = tm_cmd_valid(t_state[cur.id], cur.op);

  assign dl_ins    = exec && cmd_ok && cur.op == TM_DELAY;
  assign dl_rem    = wake || (exec && cmd_ok && cur.op == TM_ABORT);
  assign dl_rem_id = wake ? dl_head : cur.id;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      for (int unsigned i = 0; i < NUM_TASKS; i++) begin
        t_tcb[i]   <= '0;
        t_prio[i]  <= '0;
        t_prev[i]  <= '0;
        t_next[i]  <= '0;
        t_state[i] <= TS_EMPTY;
      end
      for (int unsigned p = 0; p < NUM_PRIO; p++) begin
        p_start[p] <= '0;
        p_end[p]   <= '0;
        p_count[p] <= '0;
      end
      ready_bits <= '0;
      reject_out <= 1'b0;
    end else begin
      logic     do_ins, do_rem;
      task_id_t id;
      prio_t    pr;
      do_ins     = 1'b0;
      do_rem     = 1'b0;
      id         = cur.id;
      pr         = t_prio[cur.id];
      reject_out <= 1'b0;

      if (wake) begin
        id     = dl_head;
        pr     = t_prio[dl_head];
        do_ins = 1'b1;
        t_state[dl_head] <= TS_READY;
      end else if (exec) begin
        if (!cmd_ok) begin
          reject_out <= 1'b1;
        end else begin
          unique case (cur.op)
            TM_CREATE: begin
              pr                 = cur.prio;
              t_tcb[cur.id]     <= cur.tcb;
              t_prio[cur.id]    <= cur.prio;
              t_state[cur.id]   <= TS_READY;
              do_ins             = 1'b1;
            end
            TM_DELETE: begin
              t_state[cur.id] <= TS_EMPTY;
              do_rem           = 1'b1;
            end
            TM_SUSPEND: begin
              t_state[cur.id] <= TS_SUSPENDED;
              do_rem           = 1'b1;
            end
            TM_RESUME, TM_ABORT: begin
              t_state[cur.id] <= TS_READY;
              do_ins           = 1'b1;
            end
            TM_DELAY: begin
              t_state[cur.id] <= TS_DELAYED;
              do_rem           = 1'b1;
            end
            default: ;
          endcase
        end
      end

      // append task id to the ready list of priority pr
      if (do_ins) begin
        if (p_count[pr] == 0) begin
          p_start[pr]    <= id;
          p_end[pr]      <= id;
          t_prev[id]     <= id;
          t_next[id]     <= id;
          ready_bits[pr] <= 1'b1;
        end else begin
          t_next[p_end[pr]]   <= id;
          t_prev[p_start[pr]] <= id;
          t_prev[id]          <= p_end[pr];
          t_next[id]          <= p_start[pr];
          p_end[pr]           <= id;
        end
        p_count[pr] <= p_count[pr] + 1'b1;
      end

      // unlink task id from the ready list of priority pr
      if (do_rem) begin
        if (p_count[pr] == 1) begin
          ready_bits[pr] <= 1'b0;
        end else begin
          t_next[t_prev[id]] <= t_next[id];
          t_prev[t_next[id]] <= t_prev[id];
          if (p_start[pr] == id) p_start[pr] <= t_next[id];
          if (p_end[pr] == id)   p_end[pr]   <= t_prev[id];
        end
        p_count[pr] <= p_count[pr] - 1'b1;
      end
    end
  end

  // -------------------------------------------------- scheduler interface
  priority_selector #(.WIDTH(NUM_PRIO)) u_sel (
    .bits_in  (ready_bits),
    .high_out (highpriority_out),
    .any_out  ()
  );

  assign highpriorityTask_out = p_start[highpriority_out];
  // A running task that has just left its ring (blocked or deleted) has no
  // successor there; the next tick then goes to the first task at the top.
  assign nexttaskID_out       = (t_state[taskIDrun_in] == TS_READY) ?
                                t_next[taskIDrun_in] : highpriorityTask_out;
  assign addrTCBrun_out       = t_tcb[taskIDrun_in];
  assign busy_out             = dl_busy || wake || !ring_empty;

  // A task ID beyond the configured number of tasks is a software error.
  assert property (@(posedge aclk) disable iff (!aresetn)
                   !ring_empty |-> 32'(cur.id) < NUM_TASKS)
    else $error("task_manager: task ID %0d out of range", cur.id);

endmodule
