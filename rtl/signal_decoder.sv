// signal_decoder: recovers the multiplexed timing events from the data fibre.
//
// The decoder runs from its own oscillator, OVS times the system clock
// (20 MHz for OVS = 4), which is not locked to the incoming signal; this is
// why the recovered events carry up to one sample period (50 ns) of jitter,
// the figure the original system quotes for its asynchronous decoder. The
// line passes a two-flop synchronizer. In idle, a high sample is taken as the
// start bit; the three data bits are sampled OVS/2 samples into their bit
// times, i.e. near the bit centres, and the stop bit must be low there or
// frame_err pulses. The frame layout is the one produced by signal_encoder
// (start, trigger, time tag clock, time tag reset, stop).
//
// Timing: ev_out is asserted 3*OVS + OVS/2 samples after the synchronized start
// bit was seen, which is four bit times (plus 0..1 sample of jitter) after
// the start edge on the line, at the end of the last data bit, and it is
// held for OVS samples, one system clock period. As the master sends bit
// edges on falling clock edges, this puts the pulse midway between rising
// system clock edges at the receiver, so a
// rising-edge synchronizer (event_sync) catches it exactly once with margin
// for fibre skew. Oversampling ratio and timing offsets are this design's
// own choices.
module signal_decoder
  import timing_pkg::*;
#(
  parameter int unsigned OVS = 4
) (
  input  logic     clk_dec,    // local sampling clock, OVS x system clock
  input  logic     rst_n,
  input  logic     line_in,    // serial data fibre, asynchronous
  output tevents_t ev_out,     // decoded events, held OVS samples
  output logic     frame_err   // stop bit not low
);
  localparam int unsigned HALF    = OVS / 2;
  localparam int unsigned OUT_AT  = 3 * OVS + HALF;
  localparam int unsigned STOP_AT = 4 * OVS + HALF;
  localparam int unsigned END_AT  = OUT_AT + OVS;
  localparam int unsigned CW      = $clog2(END_AT + 1);

  logic [1:0]    sync;
  logic          active;
  logic [CW-1:0] cnt;
  logic          bit_trig, bit_tclk;

  always_ff @(posedge clk_dec or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[0], line_in};
  end

  always_ff @(posedge clk_dec or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      cnt       <= '0;
      bit_trig  <= 1'b0;
      bit_tclk  <= 1'b0;
      ev_out    <= '0;
      frame_err <= 1'b0;
    end else begin
      frame_err <= 1'b0;
      if (!active) begin
        if (sync[1]) begin
          active <= 1'b1;
          cnt    <= CW'(1);
        end
      end else begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(OVS + HALF))     bit_trig <= sync[1];
        if (cnt == CW'(2 * OVS + HALF)) bit_tclk <= sync[1];
        // the last data bit is sampled as the events are released
        if (cnt == CW'(OUT_AT))
          ev_out <= '{tag_rst: sync[1], tag_clk: bit_tclk, trig: bit_trig};
        if (cnt == CW'(STOP_AT) && sync[1]) frame_err <= 1'b1;
        if (cnt == CW'(END_AT)) begin
          ev_out <= '0;
          active <= 1'b0;
          cnt    <= '0;
        end
      end
    end
  end
endmodule
