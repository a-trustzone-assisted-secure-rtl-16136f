// hw_scheduler: hardware scheduler (hS) of the hardware RTOS.
//
// It decides which task runs (taskIDrun_out) from what the task manager
// reports, and raises the context-switch interrupt (tick_out) for the
// processor only when the running task must change. A three-state machine
// does the work:
//   IDLE     waits. A system tick (tick_in) moves it to TICK; otherwise a
//            change of the first task of the highest ready priority
//            (highpriorityTask_in) moves it to PRIORITY.
//   PRIORITY takes highpriorityTask_in as the running task, back to IDLE.
//   TICK     if the highest ready priority is the one the running task was
//            chosen at, takes the next task of the same priority
//            (nexttaskID_in, round robin per time slice); otherwise takes
//            highpriorityTask_in. Back to IDLE.
// tick_out is a one-cycle pulse. In TICK it is raised when the chosen task
// differs from the running one, so ticks that would change nothing (a single
// task at the top priority, or no task change) produce no interrupt; this is
// the tickless behaviour of the design. In PRIORITY it is raised only when
// the new highest priority is above the running task's priority (a woken or
// resumed task preempts); when the running task blocks itself the software
// already yields and no interrupt is sent. addrTCBrun_out passes on the TCB
// address the task manager looks up for taskIDrun_out.
//
// Timing: the decision is taken one cycle after the event (IDLE to
// TICK/PRIORITY) and taskIDrun_out and tick_out change at the end of that
// state, i.e. two clock edges after tick_in or the priority change.
//
// The states, their transitions and the tick/priority rules follow the
// design description. Which of tick and priority change wins when both
// happen together (tick), the preemption rule for the interrupt in PRIORITY
// and the pulse form of tick_out are this implementation's choices.
module hw_scheduler
  import rtos_pkg::*;
(
  input  logic     aclk,
  input  logic     aresetn,
  input  prio_t    highpriority_in,
  input  task_id_t highpriorityTask_in,
  input  task_id_t nexttaskID_in,
  input  addr_t    addrTCBrun_in,
  input  logic     tick_in,
  output logic     tick_out,
  output task_id_t taskIDrun_out,
  output addr_t    addrTCBrun_out
);

  typedef enum logic [1:0] {S_IDLE, S_TICK, S_PRIORITY} sstate_e;
  sstate_e  state_q;
  task_id_t seen_hpt_q;   // last highpriorityTask_in acted upon
  prio_t    run_prio_q;   // priority level the running task was chosen at

  assign addrTCBrun_out = addrTCBrun_in;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      state_q       <= S_IDLE;
      seen_hpt_q    <= '0;
      run_prio_q    <= '0;
      taskIDrun_out <= '0;
      tick_out      <= 1'b0;
    end else begin
      tick_out <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (tick_in)                                state_q <= S_TICK;
          else if (highpriorityTask_in != seen_hpt_q) state_q <= S_PRIORITY;
        end
        S_PRIORITY: begin
          taskIDrun_out <= highpriorityTask_in;
          seen_hpt_q    <= highpriorityTask_in;
          run_prio_q    <= highpriority_in;
          tick_out      <= (highpriority_in > run_prio_q) &&
                           (highpriorityTask_in != taskIDrun_out);
          state_q       <= S_IDLE;
        end
        S_TICK: begin
          if (highpriority_in == run_prio_q) begin
            taskIDrun_out <= nexttaskID_in;
            tick_out      <= (nexttaskID_in != taskIDrun_out);
          end else begin
            taskIDrun_out <= highpriorityTask_in;
            tick_out      <= (highpriorityTask_in != taskIDrun_out);
          end
          seen_hpt_q <= highpriorityTask_in;
          run_prio_q <= highpriority_in;
          state_q    <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
