// tb_sw_timers: self-checking testbench of the software timer service.
//
// A model in the testbench keeps every timer's period, callback address,
// auto-reload flag, armed state and expiration tick; the expiry reports of
// the block (resumetimer_out with timerID_out, addrTimer_out, expireTime_out
// and timertaskID_out) are collected and compared, in order, with the
// model's. Directed parts: the list of the design description's example
// (current tick 0x6A, expirations 0x7F, 0x90, 0x0A, 0x3F, the last two after
// the tick wraps), auto-reload without drift, stop, change period, delete,
// commands for uncreated timers and the one-cycle report latency. A random
// part runs 400 ticks with mixed commands on 16 timers.
`timescale 1ns/1ps
module tb_sw_timers;
  import rtos_pkg::*;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic createTimer_in, deleteTimer_in, startTimer_in, stopTimer_in, changePeriod_in, autoRLDTimer_in;
  task_id_t timerTaskID_in, timerID, timertaskID_out, timerID_out;
  addr_t addrTimer_in, addrTimer_out;
  tick_t periodTimer_in, tick_in, expireTime_out;
  logic resumetimer_out, busy_out;
  int checks = 0, failures = 0;

  sw_timers #(.NUM_TIMERS(256)) dut (.*);

  // ------------------------------------------------------------- model
  bit    m_created [256], m_active [256], m_rld [256];
  tick_t m_period [256], m_exp [256];
  addr_t m_cb [256];
  int    m_seq [256];
  int    seq = 0;
  typedef struct { int id; addr_t cb; tick_t exp; } ev_t;
  ev_t exp_q [$], got_q [$];

  always @(posedge aclk) if (resumetimer_out)
    got_q.push_back('{int'(timerID_out), addrTimer_out, expireTime_out});

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic idle_inputs();
    {createTimer_in, deleteTimer_in, startTimer_in, stopTimer_in, changePeriod_in} = '0;
  endtask

  task automatic wait_idle();
    @(posedge aclk); #1;
    while (busy_out) begin @(posedge aclk); #1; end
    @(posedge aclk); #1;
  endtask

  function automatic void m_arm(int id, tick_t at);
    m_active[id] = 1; m_exp[id] = at; m_seq[id] = ++seq;
  endfunction

  task automatic cmd(st_op_e op, int id, tick_t period = 0, addr_t cb = 0, bit rld = 0);
    @(negedge aclk);
    timerID = task_id_t'(id); periodTimer_in = period; addrTimer_in = cb; autoRLDTimer_in = rld;
    case (op)
      ST_CREATE: begin createTimer_in = 1;
        m_created[id] = 1; m_active[id] = 0; m_period[id] = period; m_cb[id] = cb; m_rld[id] = rld; end
      ST_DELETE: begin deleteTimer_in = 1; m_created[id] = 0; m_active[id] = 0; end
      ST_STOP:   begin stopTimer_in = 1; m_active[id] = 0; end
      ST_START:  begin startTimer_in = 1; if (m_created[id]) m_arm(id, tick_in + m_period[id]); end
      ST_CHANGE: begin changePeriod_in = 1;
        if (m_created[id]) begin m_period[id] = period; m_arm(id, tick_in + period); end end
      default: ;
    endcase
    @(negedge aclk); idle_inputs();
    wait_idle();
  endtask

  // advance the tick to t and let the block report
  task automatic set_tick(tick_t t);
    int order [$];
    @(negedge aclk);
    tick_in = t;
    for (int i = 0; i < 256; i++) if (m_active[i] && m_exp[i] == t) order.push_back(i);
    order.sort() with (m_seq[item]);
    foreach (order[k]) begin
      int i = order[k];
      exp_q.push_back('{i, m_cb[i], m_exp[i]});
      if (m_rld[i]) m_arm(i, m_exp[i] + m_period[i]);
      else          m_active[i] = 0;
    end
    repeat (2) @(posedge aclk);
    wait_idle();
  endtask

  task automatic compare_events(input string tag);
    check(got_q.size() == exp_q.size(), $sformatf("%s: %0d expiries, expected %0d", tag, got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
      check(got_q[i].id == exp_q[i].id && got_q[i].cb == exp_q[i].cb && got_q[i].exp == exp_q[i].exp,
            $sformatf("%s: expiry %0d is timer %0d at %h, expected timer %0d at %h",
                      tag, i, got_q[i].id, got_q[i].exp, exp_q[i].id, exp_q[i].exp));
    got_q.delete(); exp_q.delete();
  endtask

  int lat;
  initial begin
    idle_inputs();
    timerTaskID_in = 8'd42; timerID = 0; addrTimer_in = 0; periodTimer_in = 0; autoRLDTimer_in = 0;
    tick_in = 32'h6A;
    repeat (2) @(posedge aclk);
    aresetn = 1;
    repeat (2) @(posedge aclk);

    // ---- example list: current tick 0x6A
    cmd(ST_CREATE, 0, 32'h7F - 32'h6A, 32'hC000_0000);
    cmd(ST_CREATE, 1, 32'h90 - 32'h6A, 32'hC000_0001);
    cmd(ST_CREATE, 3, 32'h0A - 32'h6A, 32'hC000_0003);
    cmd(ST_CREATE, 4, 32'h3F - 32'h6A, 32'hC000_0004);
    check(timertaskID_out == 42, "handler task ID sampled on create");
    cmd(ST_START, 3); cmd(ST_START, 0); cmd(ST_START, 4); cmd(ST_START, 1);
    cmd(ST_START, 9);                              // never created: ignored
    set_tick(32'h7F); set_tick(32'h90);
    set_tick(32'hFFFF_FFFF); set_tick(32'h0A); set_tick(32'h3F);
    compare_events("example list");

    // ---- one-cycle report latency
    cmd(ST_CREATE, 7, 5, 32'hC000_0007);
    cmd(ST_START, 7);
    @(negedge aclk); tick_in = tick_in + 5;
    lat = 0;
    do begin @(posedge aclk); #1; lat++; end while (!resumetimer_out && lat < 10);
    check(lat == 1, $sformatf("expiry reported after %0d cycles, expected 1", lat));
    check(timertaskID_out == 42 && timerID_out == 7, "expiry outputs");
    wait_idle(); got_q.delete(); m_active[7] = 0;

    // ---- auto-reload, stop, change period, delete
    tick_in = 32'd1000;
    cmd(ST_CREATE, 5, 4, 32'hC000_0005, 1);
    cmd(ST_START, 5);
    cmd(ST_CREATE, 6, 3, 32'hC000_0006, 1);
    cmd(ST_START, 6);
    for (int t = 1; t <= 12; t++) set_tick(32'd1000 + t);
    cmd(ST_STOP, 6);
    for (int t = 13; t <= 20; t++) set_tick(32'd1000 + t);
    cmd(ST_CHANGE, 5, 2);
    for (int t = 21; t <= 26; t++) set_tick(32'd1000 + t);
    cmd(ST_DELETE, 5);
    cmd(ST_START, 5);                              // deleted: ignored
    for (int t = 27; t <= 32; t++) set_tick(32'd1000 + t);
    compare_events("reload/stop/change/delete");

    // ---- random
    for (int n = 0; n < 400; n++) begin
      int id, r;
      id = $urandom_range(0, 15);
      r  = $urandom_range(0, 99);
      if (r < 15)      cmd(ST_CREATE, id, $urandom_range(1, 12), $urandom(), $urandom_range(0, 1));
      else if (r < 20) cmd(ST_DELETE, id);
      else if (r < 50) cmd(ST_START, id);
      else if (r < 60) cmd(ST_STOP, id);
      else if (r < 70) cmd(ST_CHANGE, id, $urandom_range(1, 12));
      set_tick(tick_in + 1);
    end
    compare_events("random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
