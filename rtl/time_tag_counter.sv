// time_tag_counter: the two 16-bit time stamping counters of a timing module.
//
// The running counter counts time tag clock events and is cleared by the time
// tag reset; it is free running between resets and wraps at 2^16. The
// latched counter takes a copy of the running count at each system trigger,
// so data acquired on that trigger can be stamped with it. A reset event
// pulses rst_seen, the source of the counter-reset interrupt, and wrap pulses
// when the running count passes from all ones to zero, which the original
// warns against in normal operation.
//
// All inputs are one-cycle pulses in the system clock domain. Reset wins over
// a simultaneous clock event. A trigger in the same cycle as a clock event
// latches the count before the increment; with a reset it latches the count
// before clearing. Reading the original as one running and one trigger-latched
// counter is this design's interpretation; the widths are the original's.
module time_tag_counter
  import timing_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tag_clk,   // count event
  input  logic             tag_rst,   // clear event
  input  logic             trig,      // latch event
  output logic [CNT_W-1:0] running,   // free-running count
  output logic [CNT_W-1:0] latched,   // count at the last trigger
  output logic             rst_seen,  // pulse: counter was reset
  output logic             wrap       // pulse: counter overflowed
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= '0;
      latched  <= '0;
      rst_seen <= 1'b0;
      wrap     <= 1'b0;
    end else begin
      rst_seen <= tag_rst;
      wrap     <= tag_clk && !tag_rst && (running == '1);
      if (trig) latched <= running;
      if (tag_rst)      running <= '0;
      else if (tag_clk) running <= running + 1'b1;
    end
  end
endmodule
