// tb_hw_semaphore: self-checking testbench of the semaphore service.
//
// A model keeps every semaphore's maximum, count and priority-ordered
// waiting queue. Each command's result pulse (takesuccess_out,
// suspendSempr_out or resumeSempr_out, with semaphoreID_out and
// semphrtaskID_out) is compared with the model's. Directed parts build four
// semaphores with counts 0/10, 0/3, 0/1 and 2/2 and waiting tasks of
// priorities 0x01, 0x0A, 0x01, 0x08 and 0x0E, check that releases wake the
// highest priority first (equal priorities in arrival order), that the count
// never passes its maximum, that a free count is taken at once, that
// commands on uncreated semaphores do nothing, and the result latency. A
// random part issues 800 commands on 8 semaphores and 32 tasks.
`timescale 1ns/1ps
module tb_hw_semaphore;
  import rtos_pkg::*;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic createSemphr_in, deleteSemphr_in, take_in, release_in;
  count_t countInit_in, countmax_in;
  task_id_t semaphoreID_in, taskID_in, semaphoreID_out, semphrtaskID_out;
  prio_t priority_in;
  logic takesuccess_out, resumeSempr_out, suspendSempr_out, busy_out;
  int checks = 0, failures = 0;

  hw_semaphore dut (.*);

  typedef struct { int kind; int sem; int tid; } ev_t;   // kind 1 take ok, 2 suspend, 3 resume
  ev_t got_q [$];
  always @(posedge aclk) begin
    if (takesuccess_out)  got_q.push_back('{1, int'(semaphoreID_out), int'(semphrtaskID_out)});
    if (suspendSempr_out) got_q.push_back('{2, int'(semaphoreID_out), int'(semphrtaskID_out)});
    if (resumeSempr_out)  got_q.push_back('{3, int'(semaphoreID_out), int'(semphrtaskID_out)});
  end

  bit m_created [256];
  int m_max [256], m_val [256];
  int m_wq [256][$];
  int m_prio [256];
  bit m_waiting [256];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic wait_idle();
    @(posedge aclk); #1;
    while (busy_out) begin @(posedge aclk); #1; end
    @(posedge aclk); #1;
  endtask

  // op: 0 create, 1 delete, 2 take, 3 release
  task automatic cmd(int op, int sem, int a = 0, int b = 0);
    ev_t e;
    bit  has_e = 0;
    @(negedge aclk);
    semaphoreID_in = task_id_t'(sem);
    case (op)
      0: begin createSemphr_in = 1; countInit_in = count_t'(a); countmax_in = count_t'(b);
         m_created[sem] = 1; m_max[sem] = b; m_val[sem] = (a > b) ? b : a;
         foreach (m_wq[sem][i]) m_waiting[m_wq[sem][i]] = 0;
         m_wq[sem].delete(); end
      1: begin deleteSemphr_in = 1; m_created[sem] = 0;
         foreach (m_wq[sem][i]) m_waiting[m_wq[sem][i]] = 0;
         m_wq[sem].delete(); end
      2: begin take_in = 1; taskID_in = task_id_t'(a); priority_in = prio_t'(b);
         if (m_created[sem]) begin
           has_e = 1;
           if (m_val[sem] > 0) begin m_val[sem]--; e = '{1, sem, a}; end
           else begin
             int pos = m_wq[sem].size();
             foreach (m_wq[sem][i]) if (m_prio[m_wq[sem][i]] < b) begin pos = i; break; end
             m_wq[sem].insert(pos, a); m_prio[a] = b; m_waiting[a] = 1;
             e = '{2, sem, a};
           end
         end end
      3: begin release_in = 1; taskID_in = task_id_t'(a);
         if (m_created[sem]) begin
           if (m_wq[sem].size() > 0) begin
             int t = m_wq[sem].pop_front();
             m_waiting[t] = 0; has_e = 1; e = '{3, sem, t};
           end else if (m_val[sem] < m_max[sem]) m_val[sem]++;
         end end
      default: ;
    endcase
    @(negedge aclk);
    {createSemphr_in, deleteSemphr_in, take_in, release_in} = '0;
    wait_idle();
    check(got_q.size() == int'(has_e), $sformatf("op %0d sem %0d: %0d results, expected %0d", op, sem, got_q.size(), has_e));
    if (has_e && got_q.size() > 0)
      check(got_q[0].kind == e.kind && got_q[0].sem == e.sem && got_q[0].tid == e.tid,
            $sformatf("op %0d sem %0d: result %0d/%0d/%0d expected %0d/%0d/%0d", op, sem,
                      got_q[0].kind, got_q[0].sem, got_q[0].tid, e.kind, e.sem, e.tid));
    got_q.delete();
  endtask

  int lat;
  initial begin
    {createSemphr_in, deleteSemphr_in, take_in, release_in} = '0;
    countInit_in = 0; countmax_in = 0; semaphoreID_in = 0; taskID_in = 0; priority_in = 0;
    repeat (2) @(posedge aclk);
    aresetn = 1;
    repeat (2) @(posedge aclk);
    got_q.delete();

    // four semaphores: 0/10, 0/3, 0/1, 2/2
    cmd(0, 1, 0, 10); cmd(0, 2, 0, 3); cmd(0, 3, 0, 1); cmd(0, 4, 2, 2);
    // waiting tasks A(0x01) B(0x0A) C(0x01) E(0x08) F(0x0E)
    cmd(2, 1, 8'hA, 8'h01);
    cmd(2, 1, 8'hB, 8'h0A);
    cmd(2, 2, 8'hC, 8'h01);
    cmd(2, 1, 8'hE, 8'h08);
    cmd(2, 1, 8'hF, 8'h0E);
    cmd(2, 1, 8'h1, 8'h0A);          // same priority as B: behind B
    cmd(2, 4, 8'h2, 8'h05);          // 2/2: taken at once
    cmd(2, 4, 8'h3, 8'h05);
    cmd(2, 4, 8'h4, 8'h05);          // now 0/2: blocks
    cmd(3, 1); cmd(3, 1); cmd(3, 1); cmd(3, 1); cmd(3, 1);   // F, B, 1, E, A
    cmd(3, 1);                       // nobody waits: count 1
    cmd(2, 1, 8'h5, 8'h3);           // taken at once
    cmd(3, 3); cmd(3, 3); cmd(3, 3); // binary: count stays at 1
    cmd(2, 3, 8'h6, 8'h1); cmd(2, 3, 8'h7, 8'h1);           // one succeeds, one blocks
    cmd(2, 9, 8'h8, 8'h1);           // never created: nothing
    cmd(1, 2); cmd(3, 2);            // deleted: nothing

    // latency: the result of a take on a free count shows one edge after the
    // edge that samples the strobe
    cmd(0, 20, 1, 1);
    @(negedge aclk); take_in = 1; semaphoreID_in = 20; taskID_in = 9; priority_in = 2;
    @(posedge aclk); #1; take_in = 0; lat = 0;
    do begin @(posedge aclk); #1; lat++; end while (!takesuccess_out && lat < 10);
    check(lat == 1, $sformatf("take result after %0d further cycles, expected 1", lat));
    wait_idle(); got_q.delete(); m_created[20] = 1; m_max[20] = 1; m_val[20] = 0;

    for (int n = 0; n < 800; n++) begin
      int s, r, t;
      s = $urandom_range(0, 7);
      r = $urandom_range(0, 99);
      t = $urandom_range(0, 31);
      if (r < 5)       cmd(0, s, $urandom_range(0, 3), $urandom_range(1, 4));
      else if (r < 7)  cmd(1, s);
      else if (r < 55) begin if (!m_waiting[t]) cmd(2, s, t, $urandom_range(0, 63)); end
      else             cmd(3, s, t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
