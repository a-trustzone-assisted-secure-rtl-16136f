// tb_hw_scheduler: checks the hardware scheduler on the three-task scenario
// of the design description (task D at priority 0x10, tasks B and A at
// 0x0A): D runs through ticks without interrupts, D blocking hands over to B
// without an interrupt, each later tick alternates B and A with an
// interrupt, ticks with a single top task produce none, a woken D preempts
// with an interrupt, and ticks with no ready change produce none. The test
// bench plays the task manager: it gives the first task of the highest
// priority and the successor of the running task in its ready ring. The
// interrupt must come exactly two clock edges after the tick.
`timescale 1ns/1ps
module tb_hw_scheduler;
  import rtos_pkg::*;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  prio_t    highpriority_in;
  task_id_t highpriorityTask_in, nexttaskID_in, taskIDrun_out;
  addr_t    addrTCBrun_in, addrTCBrun_out;
  logic     tick_in, tick_out;
  int checks = 0, failures = 0, irqs = 0;

  hw_scheduler dut (.*);

  localparam task_id_t A = 8'd1, B = 8'd2, D = 8'd4;
  // ready rings seen by the "task manager"
  logic d_ready, ab_ready;
  always_comb begin
    if (d_ready) begin highpriority_in = 6'h10; highpriorityTask_in = D; end
    else         begin highpriority_in = 6'h0A; highpriorityTask_in = B; end
    unique case (taskIDrun_out)
      A:       nexttaskID_in = B;
      B:       nexttaskID_in = A;
      default: nexttaskID_in = taskIDrun_out;   // D alone at its level
    endcase
    addrTCBrun_in = 32'h8000_0000 | 32'(taskIDrun_out);
  end
  always @(posedge aclk) if (tick_out) irqs++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // one system tick; returns whether an interrupt followed, 2 edges later
  task automatic tick(input task_id_t exp_run, input bit exp_irq, input string what);
    @(negedge aclk); tick_in = 1;
    @(negedge aclk); tick_in = 0;
    check(tick_out == 0, {what, ": no interrupt after one edge"});
    @(negedge aclk);
    check(tick_out == exp_irq, $sformatf("%s: interrupt %0d expected %0d", what, tick_out, exp_irq));
    check(taskIDrun_out == exp_run, $sformatf("%s: running %0d expected %0d", what, taskIDrun_out, exp_run));
    check(addrTCBrun_out == (32'h8000_0000 | 32'(exp_run)), {what, ": TCB address"});
    repeat (3) @(negedge aclk);
  endtask

  task automatic ready_change(input bit d, input task_id_t exp_run, input bit exp_irq, input string what);
    bit seen = 0;
    @(negedge aclk); d_ready = d;
    repeat (3) begin @(negedge aclk); if (tick_out) seen = 1; end
    check(seen == exp_irq, $sformatf("%s: interrupt %0d expected %0d", what, seen, exp_irq));
    check(taskIDrun_out == exp_run, $sformatf("%s: running %0d expected %0d", what, taskIDrun_out, exp_run));
  endtask

  int irq0;
  initial begin
    tick_in = 0; d_ready = 1;
    repeat (2) @(negedge aclk);
    aresetn = 1;
    repeat (4) @(negedge aclk);
    check(taskIDrun_out == D, "D chosen after start");
    irq0 = irqs;
    tick(D, 0, "t1 D alone");
    tick(D, 0, "t2 D alone");
    ready_change(0, B, 0, "D blocks, B takes over without interrupt");
    tick(A, 1, "t3 B->A");
    tick(B, 1, "t4 A->B");
    tick(A, 1, "t5 B->A");
    ready_change(1, D, 1, "D wakes and preempts");
    tick(D, 0, "t6 D alone again");
    check(irqs - irq0 == 4, $sformatf("four interrupts in the scenario, saw %0d", irqs - irq0));
    // tick and priority change in the same cycle: the tick wins and takes the new top task
    @(negedge aclk); tick_in = 1; d_ready = 0;
    @(negedge aclk); tick_in = 0;
    @(negedge aclk);
    check(taskIDrun_out == B, "tick with simultaneous priority drop picks B");
    check(tick_out == 1, "and interrupts, as the tick needs a switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge aclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
