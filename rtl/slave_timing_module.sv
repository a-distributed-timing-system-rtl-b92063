// slave_timing_module: the receiving side of a timing module.
//
// A slave receives the 5 MHz system clock on one fibre and the multiplexed
// system trigger, time tag clock and time tag reset on a second. The
// signal_decoder recovers the events with a local oscillator at OVS times
// the system clock; event_sync re-times them to the rising edge of the
// received clock, two ticks later, so the trigger falls on the same clock
// edge in every slave. The time tag counters stamp each trigger, two
// counter/timer chips provide the 10 user timing outputs gated by the
// trigger, and interrupt_ctrl collects the trigger, counter-reset and channel
// interrupts (channels 1-3 and 6-8). The master module contains the same
// logic, fed from its own output.
//
// Interrupt bit order: 0 trigger, 1 time tag reset, 2-4 channels 1-3,
// 5-7 channels 6-8. trig_out, tag_clk_out and tag_rst_out are one-tick
// pulses in the received clock domain. Host access is by plain
// configuration and status ports; the original's bus interface and register
// map are not part of this design.
module slave_timing_module
  import timing_pkg::*;
#(
  parameter int unsigned OVS = 4
) (
  input  logic               fiber_clk,    // received 5 MHz system clock
  input  logic               fiber_data,   // received multiplexed events
  input  logic               clk_dec,      // local decoder oscillator
  input  logic               rst_n,
  input  chan_cfg_t          cfg [USER_CH],
  input  logic [CHIPS-1:0]   ext_in,       // one external input per chip
  input  logic [N_IRQ-1:0]   irq_enable,
  input  logic [N_IRQ-1:0]   irq_clear,
  output logic [USER_CH-1:0] user_out,
  output logic               trig_out,
  output logic               tag_clk_out,
  output logic               tag_rst_out,
  output logic [CNT_W-1:0]   tag_running,
  output logic [CNT_W-1:0]   tag_latched,
  output logic               tag_wrap,
  output logic [N_IRQ-1:0]   irq_pending,
  output logic               irq,
  output logic               frame_err
);
  tevents_t dec_ev, ev;
  logic     rst_seen;
  logic [CH_PER_CHIP-1:0] chip_irq [CHIPS];
  logic [N_IRQ-1:0] irq_ev;

  signal_decoder #(.OVS(OVS)) u_dec (
    .clk_dec   (clk_dec),
    .rst_n     (rst_n),
    .line_in   (fiber_data),
    .ev_out    (dec_ev),
    .frame_err (frame_err)
  );

  event_sync #(.W(3)) u_sync (
    .clk      (fiber_clk),
    .rst_n    (rst_n),
    .async_in (dec_ev),
    .ev_out   (ev)
  );

  time_tag_counter u_tag (
    .clk      (fiber_clk),
    .rst_n    (rst_n),
    .tag_clk  (ev.tag_clk),
    .tag_rst  (ev.tag_rst),
    .trig     (ev.trig),
    .running  (tag_running),
    .latched  (tag_latched),
    .rst_seen (rst_seen),
    .wrap     (tag_wrap)
  );

  for (genvar c = 0; c < CHIPS; c++) begin : g_chip
    counter_timer_chip #(.IRQ_MASK(5'b00111)) u_chip (
      .clk     (fiber_clk),
      .rst_n   (rst_n),
      .cfg     (cfg[c*CH_PER_CHIP +: CH_PER_CHIP]),
      .trig    (ev.trig),
      .tag_clk (ev.tag_clk),
      .tag_rst (ev.tag_rst),
      .ext_in  (ext_in[c]),
      .out     (user_out[c*CH_PER_CHIP +: CH_PER_CHIP]),
      .irq_ev  (chip_irq[c])
    );
  end

  always_comb begin
    irq_ev             = '0;
    irq_ev[IRQ_TRIG]   = ev.trig;
    irq_ev[IRQ_TAGRST] = rst_seen;
    irq_ev[IRQ_CH0 +: 3]     = chip_irq[0][2:0];
    irq_ev[IRQ_CH0 + 3 +: 3] = chip_irq[1][2:0];
    trig_out    = ev.trig;
    tag_clk_out = ev.tag_clk;
    tag_rst_out = ev.tag_rst;
  end

  interrupt_ctrl #(.N(N_IRQ)) u_irq (
    .clk     (fiber_clk),
    .rst_n   (rst_n),
    .ev      (irq_ev),
    .enable  (irq_enable),
    .clear   (irq_clear),
    .pending (irq_pending),
    .irq     (irq)
  );
endmodule
