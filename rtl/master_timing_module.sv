// master_timing_module: origin of all timing signals of the system.
//
// The master drives its 5 MHz oscillator onto the clock fibre and generates
// the system trigger, time tag clock and time tag reset with three
// rate_divider instances. The trigger counts system clock ticks; each time
// tag signal counts either system clock ticks or an external input. All
// three are generated on the falling edge of the system clock and
// multiplexed onto the data fibre by signal_encoder, so data edges sit half
// a period away from the rising edges the receivers use; this gives the two
// fibres 100 ns of skew tolerance. The master is also a full timing module:
// its own slave_timing_module receives the data fibre it sends, so its user
// channels and time tags line up with those of every slave.
//
// Periods are in system clock ticks (or external edges). Since each event
// needs a five-bit frame, events of different kinds that coincide are sent
// in one frame and a kind generated faster than one per five ticks is
// merged and flagged on enc_overrun. Parameter widths, the loopback and the
// encoding are this design's choices.
module master_timing_module
  import timing_pkg::*;
#(
  parameter int unsigned DIV_W = 24,
  parameter int unsigned OVS   = 4
) (
  input  logic               clk_5m,          // master oscillator
  input  logic               clk_dec,         // decoder oscillator
  input  logic               rst_n,
  // signal generation
  input  logic               gen_enable,
  input  logic [DIV_W-1:0]   trig_period,
  input  logic [DIV_W-1:0]   tag_clk_period,
  input  logic               tag_clk_src_ext,
  input  logic               ext_tag_clk,
  input  logic [DIV_W-1:0]   tag_rst_period,
  input  logic               tag_rst_src_ext,
  input  logic               ext_tag_rst,
  // fibres to the optical fanout
  output logic               fiber_clk_out,
  output logic               fiber_data_out,
  output logic               enc_overrun,
  // the master's own timing module
  input  chan_cfg_t          cfg [USER_CH],
  input  logic [CHIPS-1:0]   ext_in,
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
  logic     clk_n;
  tevents_t gen_ev;

  // generation and encoding run on the falling edge of the system clock
  always_comb clk_n = ~clk_5m;

  rate_divider #(.W(DIV_W)) u_trig_div (
    .clk (clk_n), .rst_n (rst_n), .enable (gen_enable),
    .src_ext (1'b0), .ext_in (1'b0),
    .period (trig_period), .ev_out (gen_ev.trig)
  );

  rate_divider #(.W(DIV_W)) u_tclk_div (
    .clk (clk_n), .rst_n (rst_n), .enable (gen_enable),
    .src_ext (tag_clk_src_ext), .ext_in (ext_tag_clk),
    .period (tag_clk_period), .ev_out (gen_ev.tag_clk)
  );

  rate_divider #(.W(DIV_W)) u_trst_div (
    .clk (clk_n), .rst_n (rst_n), .enable (gen_enable),
    .src_ext (tag_rst_src_ext), .ext_in (ext_tag_rst),
    .period (tag_rst_period), .ev_out (gen_ev.tag_rst)
  );

  signal_encoder u_enc (
    .clk      (clk_n),
    .rst_n    (rst_n),
    .ev_in    (gen_ev),
    .line_out (fiber_data_out),
    .busy     (),
    .overrun  (enc_overrun)
  );

  always_comb fiber_clk_out = clk_5m;

  slave_timing_module #(.OVS(OVS)) u_local (
    .fiber_clk   (clk_5m),
    .fiber_data  (fiber_data_out),
    .clk_dec     (clk_dec),
    .rst_n       (rst_n),
    .cfg         (cfg),
    .ext_in      (ext_in),
    .irq_enable  (irq_enable),
    .irq_clear   (irq_clear),
    .user_out    (user_out),
    .trig_out    (trig_out),
    .tag_clk_out (tag_clk_out),
    .tag_rst_out (tag_rst_out),
    .tag_running (tag_running),
    .tag_latched (tag_latched),
    .tag_wrap    (tag_wrap),
    .irq_pending (irq_pending),
    .irq         (irq),
    .frame_err   (frame_err)
  );
endmodule
