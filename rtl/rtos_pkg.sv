// rtos_pkg: widths, command records and task states shared by the hardware
// RTOS services (task manager, scheduler, software timers, semaphores).
//
// The widths follow the block diagrams of the services: task identifiers,
// timer identifiers and semaphore identifiers are 8 bits, priorities are
// 6 bits (64 levels), the tick count, TCB addresses and callback addresses
// are 32 bits. The command encodings and the record layouts are choices of
// this implementation; the software side only ever sees the individual
// strobe and data ports of each service.
package rtos_pkg;

  localparam int unsigned TASK_ID_W = 8;
  localparam int unsigned PRIO_W    = 6;
  localparam int unsigned NUM_PRIO  = 64;
  localparam int unsigned TICK_W    = 32;
  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned CNT_W     = 8;

  typedef logic [TASK_ID_W-1:0] task_id_t;
  typedef logic [PRIO_W-1:0]    prio_t;
  typedef logic [TICK_W-1:0]    tick_t;
  typedef logic [ADDR_W-1:0]    addr_t;
  typedef logic [CNT_W-1:0]     count_t;

  // Task manager operations. The first six come from the application
  // (through the software API), resume/suspend also come from the timer and
  // semaphore services.
  typedef enum logic [2:0] {
    TM_CREATE  = 3'd0,
    TM_DELETE  = 3'd1,
    TM_SUSPEND = 3'd2,
    TM_RESUME  = 3'd3,
    TM_DELAY   = 3'd4,
    TM_ABORT   = 3'd5
  } tm_op_e;

  typedef struct packed {
    tm_op_e   op;
    task_id_t id;
    addr_t    tcb;
    prio_t    prio;
    tick_t    value;   // expiration tick of a delay
  } tm_cmd_t;

  // State of a task identifier inside the task manager. TS_EMPTY is both
  // "never created" and "deleted": a create may overwrite it.
  typedef enum logic [1:0] {
    TS_EMPTY     = 2'd0,
    TS_READY     = 2'd1,
    TS_SUSPENDED = 2'd2,
    TS_DELAYED   = 2'd3
  } task_state_e;

  // Command validity rules of the task manager's state control.
  function automatic logic tm_cmd_valid(task_state_e st, tm_op_e op);
    unique case (st)
      TS_EMPTY:     return op == TM_CREATE;
      TS_READY:     return op inside {TM_DELETE, TM_SUSPEND, TM_DELAY};
      TS_SUSPENDED: return op == TM_RESUME;
      TS_DELAYED:   return op == TM_ABORT;
      default:      return 1'b0;
    endcase
  endfunction

  // Software timer service operations.
  typedef enum logic [2:0] {
    ST_CREATE = 3'd0,
    ST_DELETE = 3'd1,
    ST_START  = 3'd2,
    ST_STOP   = 3'd3,
    ST_CHANGE = 3'd4
  } st_op_e;

  typedef struct packed {
    st_op_e   op;
    task_id_t id;       // timer identifier
    addr_t    callback;
    tick_t    period;
    logic     autoreload;
  } st_cmd_t;

  // Semaphore service operations.
  typedef enum logic [1:0] {
    SM_CREATE  = 2'd0,
    SM_DELETE  = 2'd1,
    SM_TAKE    = 2'd2,
    SM_RELEASE = 2'd3
  } sm_op_e;

  typedef struct packed {
    sm_op_e   op;
    task_id_t sem;
    count_t   init;
    count_t   max;
    task_id_t tid; 
    prio_t    prio;
  } sm_cmd_t;

endpackage
