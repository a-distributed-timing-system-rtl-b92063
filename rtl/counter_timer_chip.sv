// counter_timer_chip: a group of five user timing channels.
//
// Each timing module carries two counter/timer chips of five 16-bit channels.
// All gate inputs of a chip are tied to the system trigger, and every channel
// may count the system clock, the time tag clock, the time tag reset, the
// trigger itself or the chip's external input. This module is the part of
// such a chip that the system uses: five user_timer_channel instances, the
// external input's synchronizer and rising-edge detector, and the per-channel
// interrupt outputs. The original names channels 1-3 and 6-8 (the first three
// of each chip) as the ones able to interrupt; IRQ_MASK selects them here.
//
// Interface: inputs are one-cycle event pulses in the system clock domain,
// except ext_in, which is asynchronous and reaches the channels as a pulse
// three cycles after its rising edge. irq_ev pulses when a channel that may
// interrupt finishes a pulse; enabling and latching happen in interrupt_ctrl.
module counter_timer_chip
  import timing_pkg::*;
#(
  parameter logic [CH_PER_CHIP-1:0] IRQ_MASK = 5'b00111
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  chan_cfg_t              cfg [CH_PER_CHIP],
  input  logic                   trig,      // gate of all channels
  input  logic                   tag_clk,
  input  logic                   tag_rst,
  input  logic                   ext_in,    // external source, asynchronous
  output logic [CH_PER_CHIP-1:0] out,       // timing outputs
  output logic [CH_PER_CHIP-1:0] irq_ev     // end-of-pulse events
);
  logic [2:0] ext_sync;
  logic [4:0] src_ev;
  logic [CH_PER_CHIP-1:0] done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[1:0], ext_in};
  end

  always_comb begin
    src_ev[SRC_SYSCLK] = 1'b1;
    src_ev[SRC_TAGCLK] = tag_clk;
    src_ev[SRC_TAGRST] = tag_rst;
    src_ev[SRC_TRIG]   = trig;
    src_ev[SRC_EXT]    = ext_sync[1] & ~ext_sync[2];
  end

  for (genvar i = 0; i < CH_PER_CHIP; i++) begin : g_ch
    user_timer_channel u_ch (
      .clk       (clk),
      .rst_n     (rst_n),
      .cfg       (cfg[i]),
      .gate      (trig),
      .phase_rst (tag_rst),
      .src_ev    (src_ev),
      .out       (out[i]),
      .active    (),
      .done      (done[i])
    );
  end

  always_comb irq_ev = done & IRQ_MASK;
endmodule
