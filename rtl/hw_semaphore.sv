// hw_semaphore: hardware semaphore service (hSmphr) of the hardware RTOS.
//
// Every semaphore is a counting semaphore; with a maximum count of 1 it acts
// as a binary semaphore or a mutex. Two structures are kept:
//   * Semaphore List, indexed by semaphore ID: first and last waiting task,
//     maximum count (MAX) and present count (VALUE), plus a created flag.
//   * Waiting List, indexed by task ID: priority and previous/next
//     pointers. Tasks blocked on one semaphore form a linked list sorted by
//     priority, highest first (equal priorities in arrival order). A task
//     waits on at most one semaphore, so one entry per task is enough.
// Commands are one-cycle strobes with semaphoreID_in:
//   createSemphr_in  MAX = countmax_in, VALUE = countInit_in (clipped to MAX).
//   deleteSemphr_in  forgets the semaphore (its waiting list is dropped).
//   take_in          (taskID_in, priority_in) if VALUE > 0: VALUE - 1 and a
//                    takesuccess_out pulse; otherwise the task is inserted in
//                    the waiting list and suspendSempr_out asks the task
//                    manager to suspend it.
//   release_in       if tasks wait: the highest-priority one is removed and
//                    resumeSempr_out asks the task manager to resume it (the
//                    count is handed to it, VALUE is unchanged); otherwise
//                    VALUE + 1, never above MAX.
// Each result pulse lasts one cycle, with semaphoreID_out and
// semphrtaskID_out naming the semaphore and the task concerned. Commands on
// a semaphore that was not created are ignored. Commands wait in a small
// circular buffer while a waiting list is being sorted.
//
// Timing: the clock edge that samples a strobe puts the command in the
// buffer; the next edge executes it and raises its result pulse. A take that
// blocks behind other waiters spends one more cycle per waiting task of
// priority at or above its own while the list is surveyed.
//
// The lists, their fields, the counting rules, the priority ordering of
// waiters and the ports follow the design description. Handing the count
// directly to the resumed waiter, clipping the initial count, dropping the
// waiters on delete, the buffer and the timing are this implementation's
// choices.
module hw_semaphore
  import rtos_pkg::*;
#(
  parameter int unsigned NUM_SEMS   = 256,
  parameter int unsigned NUM_TASKS  = 256,
  parameter int unsigned RING_DEPTH = 8
) (
  input  logic     aclk,
  input  logic     aresetn,
  input  logic     createSemphr_in,
  input  logic     deleteSemphr_in,
  input  count_t   countInit_in,
  input  count_t   countmax_in,
  input  logic     take_in,
  input  logic     release_in,
  input  task_id_t semaphoreID_in,
  input  task_id_t taskID_in,
  input  prio_t    priority_in,
  output task_id_t semaphoreID_out,
  output logic     takesuccess_out,
  output logic     resumeSempr_out,
  output logic     suspendSempr_out,
  output task_id_t semphrtaskID_out,
  output logic     busy_out
);

  // ------------------------------------------------------- Semaphore List
  task_id_t s_start   [NUM_SEMS];
  task_id_t s_end     [NUM_SEMS];
  count_t   s_max     [NUM_SEMS];
  count_t   s_value   [NUM_SEMS];
  logic     s_created [NUM_SEMS];
  logic     s_waiters [NUM_SEMS];   // waiting list not empty

  // --------------------------------------------------------- Waiting List
  prio_t    w_prio [NUM_TASKS];
  task_id_t w_prev [NUM_TASKS];
  task_id_t w_next [NUM_TASKS];

  // ------------------------------------------------------ command buffer
  sm_cmd_t app_cmd, cur;
  logic    app_v, ring_empty, pop;
  sm_cmd_t wr_data [1];

  always_comb begin
    app_cmd      = '0;
    app_cmd.sem  = semaphoreID_in;
    app_cmd.init = countInit_in;
    app_cmd.max  = countmax_in;
    app_cmd.tid = taskID_in;
    app_cmd.prio = priority_in;
    app_v        = 1'b1;
    if      (createSemphr_in) app_cmd.op = SM_CREATE;
    else if (deleteSemphr_in) app_cmd.op = SM_DELETE;
    else if (take_in)         app_cmd.op = SM_TAKE;
    else if (release_in)      app_cmd.op = SM_RELEASE;
    else                      app_v      = 1'b0;
    wr_data[0] = app_cmd;
  end

  cmd_ring #(.T(sm_cmd_t), .DEPTH(RING_DEPTH), .NWR(1)) u_ring (
    .clk          (aclk),
    .rst_n        (aresetn),
    .wr_en        (app_v),
    .wr_data      (wr_data),
    .rd_en        (pop),
    .rd_data      (cur),
    .empty        (ring_empty),
    .overflow_out ()
  );

  // ------------------------------------------------------------- control
  typedef enum logic {M_IDLE, M_WALK} mstate_e;
  mstate_e  state_q;
  sm_cmd_t  wcmd_q;     // blocking take being inserted
  task_id_t wcur_q;     // waiting-list entry under survey

  assign pop      = (state_q == M_IDLE) && !ring_empty;
  assign busy_out = (state_q != M_IDLE) || !ring_empty;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      for (int unsigned i = 0; i < NUM_SEMS; i++) begin
        s_start[i]   <= '0;
        s_end[i]     <= '0;
        s_max[i]     <= '0;
        s_value[i]   <= '0;
        s_created[i] <= 1'b0;
        s_waiters[i] <= 1'b0;
      end
      for (int unsigned i = 0; i < NUM_TASKS; i++) begin
        w_prio[i] <= '0;
        w_prev[i] <= '0;
        w_next[i] <= '0;
      end
      state_q          <= M_IDLE;
      wcmd_q           <= '0;
      wcur_q           <= '0;
      semaphoreID_out  <= '0;
      semphrtaskID_out <= '0;
      takesuccess_out  <= 1'b0;
      resumeSempr_out  <= 1'b0;
      suspendSempr_out <= 1'b0;
    end else begin
      takesuccess_out  <= 1'b0;
      resumeSempr_out  <= 1'b0;
      suspendSempr_out <= 1'b0;
      unique case (state_q)
        M_IDLE: if (!ring_empty) begin
          unique case (cur.op)
            SM_CREATE: begin
              s_max[cur.sem]     <= cur.max;
              s_value[cur.sem]   <= (cur.init > cur.max) ? cur.max : cur.init;
              s_created[cur.sem] <= 1'b1;
              s_waiters[cur.sem] <= 1'b0;
            end
            SM_DELETE: begin
              s_created[cur.sem] <= 1'b0;
              s_waiters[cur.sem] <= 1'b0;
            end
            SM_TAKE: if (s_created[cur.sem]) begin
              semaphoreID_out  <= cur.sem;
              semphrtaskID_out <= cur.tid;
              if (s_value[cur.sem] != 0) begin
                s_value[cur.sem] <= s_value[cur.sem] - 1'b1;
                takesuccess_out  <= 1'b1;
              end else begin
                w_prio[cur.tid] <= cur.prio;
                if (!s_waiters[cur.sem]) begin
                  s_start[cur.sem]   <= cur.tid;
                  s_end[cur.sem]     <= cur.tid;
                  s_waiters[cur.sem] <= 1'b1;
                  suspendSempr_out   <= 1'b1;
                end else begin
                  wcmd_q  <= cur;
                  wcur_q  <= s_start[cur.sem];
                  state_q <= M_WALK;
                end
              end
            end
            SM_RELEASE: if (s_created[cur.sem]) begin
              semaphoreID_out <= cur.sem;
              if (s_waiters[cur.sem]) begin
                semphrtaskID_out <= s_start[cur.sem];
                resumeSempr_out  <= 1'b1;
                if (s_start[cur.sem] == s_end[cur.sem])
                  s_waiters[cur.sem] <= 1'b0;
                else
                  s_start[cur.sem] <= w_next[s_start[cur.sem]];
              end else begin
                semphrtaskID_out <= cur.tid;
                if (s_value[cur.sem] < s_max[cur.sem])
                  s_value[cur.sem] <= s_value[cur.sem] + 1'b1;
              end
            end
            default: ;
          endcase
        end
        M_WALK: begin
          if (w_prio[wcur_q] < wcmd_q.prio) begin
            // insert in front of the first waiter of lower priority
            w_next[wcmd_q.tid] <= wcur_q;
            w_prev[wcmd_q.tid] <= w_prev[wcur_q];
            w_prev[wcur_q]      <= wcmd_q.tid;
            if (wcur_q == s_start[wcmd_q.sem]) s_start[wcmd_q.sem] <= wcmd_q.tid;
            else                               w_next[w_prev[wcur_q]] <= wcmd_q.tid;
            suspendSempr_out <= 1'b1;
            state_q          <= M_IDLE;
          end else if (wcur_q == s_end[wcmd_q.sem]) begin
            w_next[wcur_q]      <= wcmd_q.tid;
            w_prev[wcmd_q.tid] <= wcur_q;
            s_end[wcmd_q.sem]   <= wcmd_q.tid;
            suspendSempr_out    <= 1'b1;
            state_q             <= M_IDLE;
          end else begin
            wcur_q <= w_next[wcur_q];
          end
        end
        default: state_q <= M_IDLE;
      endcase
    end
  end

endmodule
