// sw_timers: hardware software-timer service (hST) of the hardware RTOS.
//
// It takes over from the RTOS the bookkeeping of software timers and the
// check for expired ones. Two structures are kept:
//   * Timer Info List, indexed by timer ID: period, callback address and
//     auto-reload flag of every created timer (plus created/active flags).
//   * Timer List: the active timers sorted by expiration tick
//     (sorted_list), which also orders timers that expire after the tick
//     counter wraps behind those that expire before.
// Commands are one-cycle strobes with timerID and the data inputs:
// createTimer_in stores a timer's information (and samples the ID of the
// timer handler task from timerTaskID_in); startTimer_in arms it to expire
// at tick_in + period (re-arming it if already active); stopTimer_in
// disarms it; changePeriod_in sets a new period and re-arms the timer with
// it, as the RTOS API's change-period call does; deleteTimer_in disarms and
// forgets it. Commands for a timer that was not created are ignored, except
// create. Commands wait in a small circular buffer while the list is sorting.
//
// When the first timer of the Timer List reaches the current tick, the
// service pulses resumetimer_out for one cycle, so that the task manager
// makes the timer handler task (timertaskID_out) ready, and presents the
// timer's ID, callback address and expiration tick on timerID_out,
// addrTimer_out and expireTime_out until the next expiry. An auto-reload
// timer is put back in the list at expiration + period, so its period does
// not drift; a one-shot timer becomes inactive.
//
// Timing: a start/change command is in the list 2 cycles after its strobe
// plus one cycle per list entry passed while sorting; busy_out is high while a command
// or an expiry is pending or the list is sorting. An expiry is reported
// 1 cycle after tick_in reaches the expiration tick (the list must not be
// sorting), re-arming takes further cycles as for a start.
//
// The lists and their fields, the command set and the resume/callback
// outputs follow the design description. Sampling the handler task ID on
// create, the re-arming rule of change-period, ignoring commands for
// uncreated timers, the buffer and the timing are this implementation's
// choices. The description's block diagram shows the handler task ID input
// twice (timerTaskID_in and timertaskID_in); this module has it once.
module sw_timers
  import rtos_pkg::*;
#(
  parameter int unsigned NUM_TIMERS = 256,
  parameter int unsigned RING_DEPTH = 8
) (
  input  logic     aclk,
  input  logic     aresetn,
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
  input  tick_t    tick_in,
  output logic     resumetimer_out,
  output task_id_t timertaskID_out,
  output addr_t    addrTimer_out,
  output task_id_t timerID_out,
  output tick_t    expireTime_out,
  output logic     busy_out
);

  // ----------------------------------------------------- Timer Info List
  tick_t period_q   [NUM_TIMERS];
  addr_t callback_q [NUM_TIMERS];
  logic  autorld_q  [NUM_TIMERS];
  logic  created_q  [NUM_TIMERS];
  logic  active_q   [NUM_TIMERS];

  // ------------------------------------------------------ command buffer
  st_cmd_t app_cmd, cur;
  logic    app_v, ring_empty, pop;
  st_cmd_t wr_data [1];

  always_comb begin
    app_cmd            = '0;
    app_cmd.id         = timerID;
    app_cmd.callback   = addrTimer_in;
    app_cmd.period     = periodTimer_in;
    app_cmd.autoreload = autoRLDTimer_in;
    app_v              = 1'b1;
    if      (createTimer_in)  app_cmd.op = ST_CREATE;
    else if (deleteTimer_in)  app_cmd.op = ST_DELETE;
    else if (startTimer_in)   app_cmd.op = ST_START;
    else if (stopTimer_in)    app_cmd.op = ST_STOP;
    else if (changePeriod_in) app_cmd.op = ST_CHANGE;
    else                      app_v      = 1'b0;
    wr_data[0] = app_cmd;
  end

  cmd_ring #(.T(st_cmd_t), .DEPTH(RING_DEPTH), .NWR(1)) u_ring (
    .clk          (aclk),
    .rst_n        (aresetn),
    .wr_en        (app_v),
    .wr_data      (wr_data),
    .rd_en        (pop),
    .rd_data      (cur),
    .empty        (ring_empty),
    .overflow_out ()
  );

  // ---------------------------------------------------------- Timer List
  logic     tl_ins, tl_rem, tl_busy, tl_empty;
  task_id_t tl_ins_id, tl_rem_id, tl_head;
  tick_t    tl_ins_value, tl_head_value;

  sorted_list #(.N(NUM_TIMERS), .ID_W(TASK_ID_W), .VAL_W(TICK_W)) u_list (
    .clk        (aclk),
    .rst_n      (aresetn),
    .ins_valid  (tl_ins),
    .ins_id     (tl_ins_id),
    .ins_value  (tl_ins_value),
    .ref_in     (tick_in),
    .rem_valid  (tl_rem),
    .rem_id     (tl_rem_id),
    .busy       (tl_busy),
    .empty      (tl_empty),
    .head_id    (tl_head),
    .head_value (tl_head_value)
  );

  // ------------------------------------------------------------- control
  // An insertion that must follow a removal of the same timer (re-arm) is
  // held one cycle in pend_*; nothing else is started meanwhile.
  logic     pend_q;
  task_id_t pend_id_q;
  tick_t    pend_value_q;

  logic due, exec, c_created, c_active;
  assign due       = !tl_busy && !pend_q && !tl_empty && (tl_head_value == tick_in);
  assign exec      = !tl_busy && !pend_q && !due && !ring_empty;
  assign pop       = exec;
  assign c_created = created_q[cur.id];
  assign c_active  = active_q[cur.id];

  // the period used when (re)arming from a command
  tick_t arm_period;
  assign arm_period = (cur.op == ST_START) ? period_q[cur.id] : cur.period;

  always_comb begin
    tl_ins       = 1'b0;
    tl_ins_id    = cur.id;
    tl_ins_value = tick_in + arm_period;
    tl_rem       = 1'b0;
    tl_rem_id    = cur.id;
    if (pend_q) begin
      tl_ins       = 1'b1;
      tl_ins_id    = pend_id_q;
      tl_ins_value = pend_value_q;
    end else if (due) begin
      tl_rem    = 1'b1;
      tl_rem_id = tl_head;
    end else if (exec) begin
      unique case (cur.op)
        ST_CREATE, ST_DELETE, ST_STOP: tl_rem = c_active;
        ST_START, ST_CHANGE: begin
          tl_rem = c_created && c_active;
          tl_ins = c_created && !c_active;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      for (int unsigned i = 0; i < NUM_TIMERS; i++) begin
        period_q[i]   <= '0;
        callback_q[i] <= '0;
        autorld_q[i]  <= 1'b0;
        created_q[i]  <= 1'b0;
        active_q[i]   <= 1'b0;
      end
      pend_q          <= 1'b0;
      pend_id_q       <= '0;
      pend_value_q    <= '0;
      resumetimer_out <= 1'b0;
      timertaskID_out <= '0;
      addrTimer_out   <= '0;
      timerID_out     <= '0;
      expireTime_out  <= '0;
    end else begin
      resumetimer_out <= 1'b0;
      pend_q          <= 1'b0;
      if (createTimer_in) timertaskID_out <= timerTaskID_in;
      if (due) begin
        resumetimer_out <= 1'b1;
        timerID_out     <= tl_head;
        addrTimer_out   <= callback_q[tl_head];
        expireTime_out  <= tl_head_value;
        if (autorld_q[tl_head]) begin
          pend_q       <= 1'b1;
          pend_id_q    <= tl_head;
          pend_value_q <= tl_head_value + period_q[tl_head];
        end else begin
          active_q[tl_head] <= 1'b0;
        end
      end else if (exec) begin
        unique case (cur.op)
          ST_CREATE: begin
            period_q[cur.id]   <= cur.period;
            callback_q[cur.id] <= cur.callback;
            autorld_q[cur.id]  <= cur.autoreload;
            created_q[cur.id]  <= 1'b1;
            active_q[cur.id]   <= 1'b0;
          end
          ST_DELETE: begin
            created_q[cur.id] <= 1'b0;
            active_q[cur.id]  <= 1'b0;
          end
          ST_STOP: active_q[cur.id] <= 1'b0;
          ST_START, ST_CHANGE: begin
            if (c_created) begin
              if (cur.op == ST_CHANGE) period_q[cur.id] <= cur.period;
              active_q[cur.id] <= 1'b1;
              if (c_active) begin
                pend_q       <= 1'b1;
                pend_id_q    <= cur.id;
                pend_value_q <= tick_in + arm_period;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  assign busy_out = tl_busy || pend_q || due || !ring_empty;

endmodule
