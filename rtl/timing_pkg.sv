// timing_pkg: types and constants shared by the distributed timing system.
//
// The system distributes four signals from one master module to many slave
// modules: a 5 MHz system clock on one fibre, and the system trigger, time tag
// clock and time tag reset multiplexed onto a second fibre. The serial frame
// format used on that second fibre is this design's own choice (the frame
// layout is described in signal_encoder.sv); the 16-bit counter widths, the
// 10 user channels per module and the 5 channels per counter/timer chip are
// the figures of the original system.
package timing_pkg;

  // Width of the user timer counters and of the time tag counters.
  localparam int unsigned CNT_W = 16;

  // Channels per counter/timer chip and chips per timing module.
  localparam int unsigned CH_PER_CHIP  = 5;
  localparam int unsigned CHIPS        = 2;
  localparam int unsigned USER_CH      = CH_PER_CHIP * CHIPS;

  // Serial frame on the data fibre: start bit, three event bits, stop bit.
  // Each bit lasts one system clock period.
  localparam int unsigned FRAME_BITS = 5;

  // One bit per multiplexed event; the order is also the order of the data
  // bits in the serial frame.
  typedef struct packed {
    logic tag_rst;   // time tag reset
    logic tag_clk;   // time tag clock
    logic trig;      // system trigger
  } tevents_t;

  // Count sources a user timer channel can select. Each chip sees all
  // distributed timing signals and one external input.
  typedef enum logic [2:0] {
    SRC_SYSCLK  = 3'd0,  // every 5 MHz tick (200 ns resolution)
    SRC_TAGCLK  = 3'd1,  // time tag clock events
    SRC_TAGRST  = 3'd2,  // time tag reset events
    SRC_TRIG    = 3'd3,  // system trigger events
    SRC_EXT     = 3'd4   // the chip's external input (rising edges)
  } count_src_e;

  // Programming of one user timer channel.
  typedef struct packed {
    logic              enable;   // channel armed
    count_src_e        src;      // count source
    logic [CNT_W-1:0]  delay;    // ticks from trigger to pulse start
    logic [CNT_W-1:0]  width;    // pulse width in ticks (0: no pulse)
    logic              sense;    // 1: active high, 0: active low
    logic [7:0]        evnt;     // 0 or 1: every trigger, N: every Nth
  } chan_cfg_t;

  // Interrupt sources of one timing module.
  localparam int unsigned IRQ_TRIG   = 0;  // system trigger
  localparam int unsigned IRQ_TAGRST = 1;  // time tag counter reset
  localparam int unsigned IRQ_CH0    = 2;  // channels 1-3, 6-8 follow
  localparam int unsigned N_IRQ      = 8;

endpackage
