// systick: system tick source and tick counter of the hardware RTOS.
//
// The tick comes from a timer in generate mode: a down counter is loaded with
// load_in and, when it has counted load_in clock cycles, emits a one-cycle
// pulse on tick and reloads, so the tick period is load_in cycles (load_in
// below 1 is treated as 1). The counter runs while enable_in is high; a
// rising edge of enable_in restarts the period. Each tick pulse sets the
// tick_int interrupt flag, which stays high until int_clear_in. A 32-bit
// binary counter counts the tick pulses and gives tick_value, the time base
// of the task manager's Delay List and the software timer service.
//
// Timing: tick_value increments on the clock edge that ends the tick pulse,
// i.e. it shows the new value in the cycle after tick.
//
// The timer with its load register, the tick, tick_value and tick_int
// outputs and the counter clocked by the timer's pulse follow the design
// description, where a vendor timer IP with a bus register interface is used.
// This module keeps only its generate mode, takes load and enable as plain
// inputs and counts the pulses with a clock enable instead of using the
// pulse as a clock; those are this implementation's choices.
module systick
  import rtos_pkg::*;
(
  input  logic  aclk,
  input  logic  aresetn,
  input  logic  enable_in,
  input  tick_t load_in,
  input  logic  int_clear_in,
  output logic  tick,
  output tick_t tick_value,
  output logic  tick_int
);

  tick_t cnt_q;
  logic  en_q;

  always_ff @(posedge aclk or negedge aresetn) begin
    if (!aresetn) begin
      cnt_q      <= '0;
      en_q       <= 1'b0;
      tick       <= 1'b0;
      tick_value <= '0;
      tick_int   <= 1'b0;
    end else begin
      en_q <= enable_in;
      tick <= 1'b0;
      if (enable_in && !en_q) begin
        cnt_q <= (load_in > 1) ? load_in - 1'b1 : '0;
      end else if (enable_in) begin
        if (cnt_q == 0) begin
          tick  <= 1'b1;
          cnt_q <= (load_in > 1) ? load_in - 1'b1 : '0;
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end
      if (tick) tick_value <= tick_value + 1'b1;
      if (tick)              tick_int <= 1'b1;
      else if (int_clear_in) tick_int <= 1'b0;
    end
  end

endmodule
