// timing_system_top: a master timing module and N_SLAVES slave modules.
//
// The system is a star: the master sends the 5 MHz system clock on one fibre
// and the multiplexed trigger, time tag clock and time tag reset on another,
// and optical fanouts copy both fibres to every slave. The fanouts are
// optical parts, so the fibres are ports here: fiber_clk_out/fiber_data_out
// leave the master and fiber_clk_in[i]/fiber_data_in[i] enter slave i; the
// board or testbench connects them, with whatever propagation delay the
// links have (up to 100 ns of skew between a node's two fibres is tolerated).
// Each node, master included, has its own decoder oscillator clk_dec and its
// own user channel programming, external inputs and interrupt lines.
//
// The slave count is this design's default; the original was run with more
// than a dozen nodes.
module timing_system_top
  import timing_pkg::*;
#(
  parameter int unsigned N_SLAVES = 12,
  parameter int unsigned DIV_W    = 24,
  parameter int unsigned OVS      = 4
) (
  input  logic               clk_5m,
  input  logic               rst_n,
  // master signal generation
  input  logic               gen_enable,
  input  logic [DIV_W-1:0]   trig_period,
  input  logic [DIV_W-1:0]   tag_clk_period,
  input  logic               tag_clk_src_ext,
  input  logic               ext_tag_clk,
  input  logic [DIV_W-1:0]   tag_rst_period,
  input  logic               tag_rst_src_ext,
  input  logic               ext_tag_rst,
  output logic               enc_overrun,
  // fibres, to and from the optical fanouts
  output logic               fiber_clk_out,
  output logic               fiber_data_out,
  input  logic               fiber_clk_in  [N_SLAVES],
  input  logic               fiber_data_in [N_SLAVES],
  // per node: index 0 is the master, 1..N_SLAVES the slaves
  input  logic               clk_dec       [N_SLAVES+1],
  input  chan_cfg_t          cfg           [N_SLAVES+1][USER_CH],
  input  logic [CHIPS-1:0]   ext_in        [N_SLAVES+1],
  input  logic [N_IRQ-1:0]   irq_enable    [N_SLAVES+1],
  input  logic [N_IRQ-1:0]   irq_clear     [N_SLAVES+1],
  output logic [USER_CH-1:0] user_out      [N_SLAVES+1],
  output logic               trig_out      [N_SLAVES+1],
  output logic               tag_clk_out   [N_SLAVES+1],
  output logic               tag_rst_out   [N_SLAVES+1],
  output logic [CNT_W-1:0]   tag_running   [N_SLAVES+1],
  output logic [CNT_W-1:0]   tag_latched   [N_SLAVES+1],
  output logic               tag_wrap      [N_SLAVES+1],
  output logic [N_IRQ-1:0]   irq_pending   [N_SLAVES+1],
  output logic               irq           [N_SLAVES+1],
  output logic               frame_err     [N_SLAVES+1]
);
  master_timing_module #(.DIV_W(DIV_W), .OVS(OVS)) u_master (
    .clk_5m          (clk_5m),
    .clk_dec         (clk_dec[0]),
    .rst_n           (rst_n),
    .gen_enable      (gen_enable),
    .trig_period     (trig_period),
    .tag_clk_period  (tag_clk_period),
    .tag_clk_src_ext (tag_clk_src_ext),
    .ext_tag_clk     (ext_tag_clk),
    .tag_rst_period  (tag_rst_period),
    .tag_rst_src_ext (tag_rst_src_ext),
    .ext_tag_rst     (ext_tag_rst),
    .fiber_clk_out   (fiber_clk_out),
    .fiber_data_out  (fiber_data_out),
    .enc_overrun     (enc_overrun),
    .cfg             (cfg[0]),
    .ext_in          (ext_in[0]),
    .irq_enable      (irq_enable[0]),
    .irq_clear       (irq_clear[0]),
    .user_out        (user_out[0]),
    .trig_out        (trig_out[0]),
    .tag_clk_out     (tag_clk_out[0]),
    .tag_rst_out     (tag_rst_out[0]),
    .tag_running     (tag_running[0]),
    .tag_latched     (tag_latched[0]),
    .tag_wrap        (tag_wrap[0]),
    .irq_pending     (irq_pending[0]),
    .irq             (irq[0]),
    .frame_err       (frame_err[0])
  );

  for (genvar i = 0; i < N_SLAVES; i++) begin : g_slave
    slave_timing_module #(.OVS(OVS)) u_slave (
      .fiber_clk   (fiber_clk_in[i]),
      .fiber_data  (fiber_data_in[i]),
      .clk_dec     (clk_dec[i+1]),
      .rst_n       (rst_n),
      .cfg         (cfg[i+1]),
      .ext_in      (ext_in[i+1]),
      .irq_enable  (irq_enable[i+1]),
      .irq_clear   (irq_clear[i+1]),
      .user_out    (user_out[i+1]),
      .trig_out    (trig_out[i+1]),
      .tag_clk_out (tag_clk_out[i+1]),
      .tag_rst_out (tag_rst_out[i+1]),
      .tag_running (tag_running[i+1]),
      .tag_latched (tag_latched[i+1]),
      .tag_wrap    (tag_wrap[i+1]),
      .irq_pending (irq_pending[i+1]),
      .irq         (irq[i+1]),
      .frame_err   (frame_err[i+1])
    );
  end
endmodule
