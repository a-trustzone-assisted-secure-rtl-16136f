// tb_task_manager: self-checking testbench of the hardware task manager.
//
// A reference model kept in the testbench (one queue of task IDs per
// priority, the state of every task and a sorted delay queue) is updated for
// every command, and after each command the scheduler interface of the
// block is compared with it: highest priority, first task of that priority,
// and for every ready task its successor in the ready list and its TCB
// address. Directed parts check create/delete/suspend/resume/delay/abort,
// the state rules (refused commands), round-robin order, the delay list
// ordering across a tick wrap (current tick 0x6A, delays 0x7F, 0x90, 0x0A,
// 0x3F wake in that order), simultaneous commands from the three sources and
// the two-cycle command latency; a random part issues 600 mixed commands.
`timescale 1ns/1ps
module tb_task_manager;
  import rtos_pkg::*;

  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic createTask_in, deleteTask_in, suspendTask_in, resumeTask_in,
        delayTask_in, abortDelay_in, resumetimer_in, resumeSemphr_in,
        suspendSemphr_in;
  addr_t addrTCB_in;  prio_t priority_in;  task_id_t taskID_in;
  tick_t valueDelay_in, tick_in;
  task_id_t timertaskID_in, semphrtaskID_in, taskIDrun_in;
  prio_t highpriority_out; task_id_t highpriorityTask_out, nexttaskID_out;
  addr_t addrTCBrun_out; logic busy_out, reject_out, overflow_out;

  task_manager dut (.*);

  int checks = 0, failures = 0, rejects_seen = 0;

  // ------------------------------------------------------ reference model
  task_state_e m_state [256];
  int          m_prio  [256];
  addr_t       m_tcb   [256];
  int          rq [64][$];
  typedef struct { int id; tick_t val; } dl_t;
  dl_t         dq [$];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  function automatic bit m_valid(int id, tm_op_e op);
    return tm_cmd_valid(m_state[id], op);
  endfunction

  function automatic void m_rq_remove(int id);
    int p = m_prio[id];
    foreach (rq[p][i]) if (rq[p][i] == id) begin rq[p].delete(i); break; end
  endfunction

  function automatic void m_dq_insert(int id, tick_t val, tick_t ref_t);
    int pos = dq.size();
    foreach (dq[i]) if (tick_t'(dq[i].val - ref_t) > tick_t'(val - ref_t)) begin pos = i; break; end
    dq.insert(pos, '{id, val});
  endfunction

  // returns 1 when the command is expected to be refused
  function automatic bit m_apply(tm_op_e op, int id, addr_t tcb, int pr, tick_t val);
    if (!m_valid(id, op)) return 1;
    case (op)
      TM_CREATE:  begin m_tcb[id] = tcb; m_prio[id] = pr; rq[pr].push_back(id); m_state[id] = TS_READY; end
      TM_DELETE:  begin m_rq_remove(id); m_state[id] = TS_EMPTY; end
      TM_SUSPEND: begin m_rq_remove(id); m_state[id] = TS_SUSPENDED; end
      TM_RESUME:  begin rq[m_prio[id]].push_back(id); m_state[id] = TS_READY; end
      TM_DELAY:   begin m_rq_remove(id); m_dq_insert(id, val, tick_in); m_state[id] = TS_DELAYED; end
      TM_ABORT:   begin
        foreach (dq[i]) if (dq[i].id == id) begin dq.delete(i); break; end
        rq[m_prio[id]].push_back(id); m_state[id] = TS_READY;
      end
      default: ;
    endcase
    return 0;
  endfunction

  function automatic void m_wake();
    while (dq.size() > 0 && dq[0].val == tick_in) begin
      int id = dq[0].id;
      dq.pop_front();
      rq[m_prio[id]].push_back(id);
      m_state[id] = TS_READY;
    end
  endfunction

  // compare the scheduler interface with the model
  task automatic compare(input string tag);
    int hp = -1;
    for (int p = 63; p >= 0; p--) if (rq[p].size() > 0) begin hp = p; break; end
    if (hp >= 0) begin
      check(highpriority_out == prio_t'(hp), $sformatf("%s: highpriority %0d exp %0d", tag, highpriority_out, hp));
      check(highpriorityTask_out == task_id_t'(rq[hp][0]),
            $sformatf("%s: highpriorityTask %0d exp %0d", tag, highpriorityTask_out, rq[hp][0]));
    end else begin
      check(highpriority_out == 0, $sformatf("%s: highpriority with no ready task", tag));
    end
    for (int p = 0; p < 64; p++)
      foreach (rq[p][i]) begin
        int t = rq[p][i];
        int n = rq[p][(i + 1) % rq[p].size()];
        taskIDrun_in = task_id_t'(t);
        #1;
        check(nexttaskID_out == task_id_t'(n), $sformatf("%s: next of %0d is %0d exp %0d", tag, t, nexttaskID_out, n));
        check(addrTCBrun_out == m_tcb[t], $sformatf("%s: TCB of %0d", tag, t));
      end
    // a running task that is not ready any more hands over to the top task
    if (hp >= 0)
      for (int t = 0; t < 256; t += 5)
        if (m_state[t] != TS_READY) begin
          taskIDrun_in = task_id_t'(t);
          #1;
          check(nexttaskID_out == task_id_t'(rq[hp][0]),
                $sformatf("%s: next of non-ready %0d is %0d", tag, t, nexttaskID_out));
        end
  endtask

  task automatic idle_inputs();
    {createTask_in, deleteTask_in, suspendTask_in, resumeTask_in, delayTask_in,
     abortDelay_in, resumetimer_in, resumeSemphr_in, suspendSemphr_in} = '0;
  endtask

  task automatic wait_idle();
    @(posedge aclk); #1;
    while (busy_out) begin @(posedge aclk); #1; end
  endtask

  // issue one application command and track refusals
  task automatic app(tm_op_e op, int id, addr_t tcb = '0, int pr = 0, tick_t val = '0);
    bit exp_rej;
    int rej = 0;
    @(negedge aclk);
    taskID_in = task_id_t'(id); addrTCB_in = tcb; priority_in = prio_t'(pr); valueDelay_in = val;
    case (op)
      TM_CREATE:  createTask_in  = 1;
      TM_DELETE:  deleteTask_in  = 1;
      TM_SUSPEND: suspendTask_in = 1;
      TM_RESUME:  resumeTask_in  = 1;
      TM_DELAY:   delayTask_in   = 1;
      TM_ABORT:   abortDelay_in  = 1;
      default: ;
    endcase
    exp_rej = m_apply(op, id, tcb, pr, val);
    @(negedge aclk);
    idle_inputs();
    do begin
      @(posedge aclk); #1;
      if (reject_out) rej++;
    end while (busy_out);
    @(posedge aclk); #1;
    if (reject_out) rej++;
    rejects_seen += rej;
    check(rej == int'(exp_rej), $sformatf("command %s id %0d refused=%0d expected %0d", op.name(), id, rej, exp_rej));
  endtask

  task automatic set_tick(tick_t t);
    @(negedge aclk);
    tick_in = t;
    m_wake();
    repeat (3) @(posedge aclk);
    wait_idle();
  endtask

  int lat;
  initial begin
    idle_inputs();
    addrTCB_in = 0; priority_in = 0; taskID_in = 0; valueDelay_in = 0; tick_in = 0;
    timertaskID_in = 0; semphrtaskID_in = 0; taskIDrun_in = 0;
    foreach (m_state[i]) begin m_state[i] = TS_EMPTY; m_prio[i] = 0; m_tcb[i] = 0; end
    repeat (3) @(posedge aclk);
    aresetn = 1;
    repeat (2) @(posedge aclk);

    // ---- example lists: A,C,F at priority 1; B,E at 4; G at 2
    app(TM_CREATE, 0, 32'h1000_0000, 1);   // A
    app(TM_CREATE, 1, 32'h1000_0100, 4);   // B
    app(TM_CREATE, 2, 32'h1000_0200, 1);   // C
    app(TM_CREATE, 3, 32'h1000_0300, 7);   // D (later suspended)
    app(TM_CREATE, 4, 32'h1000_0400, 4);   // E
    app(TM_CREATE, 5, 32'h1000_0500, 1);   // F
    app(TM_CREATE, 7, 32'h1000_0700, 2);   // G
    compare("create");
    app(TM_SUSPEND, 3);
    compare("suspend D");
    check(highpriority_out == 4 && highpriorityTask_out == 1, "highest ready is B at 4");
    // refused commands
    app(TM_CREATE, 0, 32'h0, 9);          // A exists
    app(TM_RESUME, 0);                    // A not suspended
    app(TM_ABORT, 0);                     // A not delayed
    app(TM_SUSPEND, 3);                   // D already suspended
    app(TM_DELAY, 3, 0, 0, 5);            // D suspended
    app(TM_DELETE, 6);                    // free ID
    compare("refused");
    // delete the middle, first and last of the priority-1 list
    app(TM_DELETE, 2);  compare("delete middle");
    app(TM_DELETE, 0);  compare("delete first");
    app(TM_CREATE, 0, 32'h2000_0000, 1);  compare("create over deleted ID");
    app(TM_DELETE, 0);  compare("delete last");
    app(TM_RESUME, 3);  compare("resume D");
    check(highpriority_out == 7 && highpriorityTask_out == 3, "D is highest after resume");

    // ---- delay list across a wrap (current tick 0x6A)
    set_tick(32'h6A);
    app(TM_CREATE, 10, 32'hA0, 20); app(TM_CREATE, 11, 32'hA1, 20);
    app(TM_CREATE, 12, 32'hA2, 20); app(TM_CREATE, 13, 32'hA3, 20);
    app(TM_DELAY, 12, 0, 0, 32'h0A);    // value3, after the wrap
    app(TM_DELAY, 10, 0, 0, 32'h7F);    // value0
    app(TM_DELAY, 13, 0, 0, 32'h3F);    // value4, after the wrap
    app(TM_DELAY, 11, 0, 0, 32'h90);    // value1
    compare("delays inserted");
    check(dq.size() == 4 && dq[0].id == 10 && dq[1].id == 11 && dq[2].id == 12 && dq[3].id == 13,
          "model order 0x7F,0x90,0x0A,0x3F");
    set_tick(32'h7F);  compare("wake 0x7F");
    check(m_state[10] == TS_READY && m_state[11] == TS_DELAYED, "only 0x7F woke");
    set_tick(32'h0A);  compare("0x0A not due before 0x90");
    check(m_state[12] == TS_DELAYED, "0x0A waits behind 0x90");
    set_tick(32'h90);  compare("wake 0x90");
    set_tick(32'hFFFF_FFFF); set_tick(32'h0A); compare("wake 0x0A after wrap");
    app(TM_ABORT, 13);  compare("abort 0x3F");
    app(TM_ABORT, 13);  // refused now
    // delay with equal values keeps insertion order
    app(TM_DELAY, 10, 0, 0, 32'h20); app(TM_DELAY, 11, 0, 0, 32'h20); app(TM_DELAY, 12, 0, 0, 32'h20);
    set_tick(32'h20); compare("equal delays wake in order");

    // ---- commands of the three sources in one cycle
    app(TM_SUSPEND, 10);   // will be resumed by the timer service
    @(negedge aclk);
    resumetimer_in = 1; timertaskID_in = 10;
    suspendSemphr_in = 1; semphrtaskID_in = 11;
    deleteTask_in = 1; taskID_in = 12;
    void'(m_apply(TM_RESUME, 10, 0, 0, 0));
    void'(m_apply(TM_DELETE, 12, 0, 0, 0));
    void'(m_apply(TM_SUSPEND, 11, 0, 0, 0));
    @(negedge aclk); idle_inputs();
    wait_idle(); @(posedge aclk); #1;
    compare("three sources");
    @(negedge aclk); resumeSemphr_in = 1; semphrtaskID_in = 11;
    void'(m_apply(TM_RESUME, 11, 0, 0, 0));
    @(negedge aclk); idle_inputs(); wait_idle(); compare("semaphore resume");

    // ---- latency: strobe at one edge, lists updated at the next
    @(negedge aclk);
    createTask_in = 1; taskID_in = 50; addrTCB_in = 32'h5000; priority_in = 63;
    void'(m_apply(TM_CREATE, 50, 32'h5000, 63, 0));
    @(posedge aclk); #1; idle_inputs();
    lat = 1;
    while (highpriority_out != 63 && lat < 10) begin @(posedge aclk); #1; lat++; end
    check(lat == 2, $sformatf("create latency %0d cycles, expected 2", lat));
    wait_idle(); compare("latency");

    // ---- random commands
    for (int n = 0; n < 600; n++) begin
      int id, r;
      tm_op_e op;
      id = $urandom_range(0, 40);
      r  = $urandom_range(0, 99);
      if (r < 25)      op = TM_CREATE;
      else if (r < 35) op = TM_DELETE;
      else if (r < 50) op = TM_SUSPEND;
      else if (r < 65) op = TM_RESUME;
      else if (r < 85) op = TM_DELAY;
      else             op = TM_ABORT;
      app(op, id, $urandom(), $urandom_range(0, 63), tick_in + $urandom_range(1, 20));
      if (n % 10 == 9) set_tick(tick_in + 1);
      if (n % 25 == 24) compare($sformatf("random %0d", n));
    end
    compare("random end");
    check(rejects_seen > 0, "some commands were refused");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
