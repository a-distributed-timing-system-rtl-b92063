// signal_encoder: multiplexes the three event signals onto the data fibre.
//
// The system trigger, time tag clock and time tag reset share one fibre.
// Each event is carried by a serial frame of five bits, one system clock
// period each: a start bit (1), the trigger, time tag clock and time tag
// reset bits in that order, and a stop bit (0). The line idles low. Events
// that arrive while a frame is on the line are held as pending and go out
// together in the next frame; a second event of the same kind arriving while
// one is still pending is merged and flagged on overrun. Frames therefore
// limit each event rate to one per five clock periods (1 MHz at 5 MHz);
// the frame format is this design's own choice, the original only states
// that the signals are multiplexed and that the decoder limits their rate.
//
// The master runs this module on the falling edge of the system clock, so
// every bit boundary on the line is aligned to a falling clock edge.
// Timing: an event pulse sampled at clock edge k puts the start bit on the
// line from edge k for one period; line_out is a flip-flop output.
module signal_encoder
  import timing_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  tevents_t ev_in,     // one-cycle event pulses
  output logic     line_out,  // serial data fibre
  output logic     busy,      // a frame is on the line
  output logic     overrun    // an event was merged with a pending one
);
  tevents_t   pending, pend_next;
  logic [3:0] shreg;
  logic [2:0] bits_left;

  always_comb begin
    pend_next = pending | ev_in;
    busy      = (bits_left != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= '0;
      shreg     <= '0;
      bits_left <= '0;
      line_out  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      overrun <= |(pending & ev_in);
      if (bits_left == '0) begin
        if (pend_next != '0) begin
          // start bit now; then trig, tag_clk, tag_rst, stop
          line_out  <= 1'b1;
          shreg     <= {1'b0, pend_next.tag_rst, pend_next.tag_clk, pend_next.trig};
          bits_left <= 3'(FRAME_BITS - 1);
          pending   <= '0;
        end else begin
          line_out <= 1'b0;
        end
      end else begin
        line_out  <= shreg[0];
        shreg     <= {1'b0, shreg[3:1]};
        bits_left <= bits_left - 1'b1;
        pending   <= pend_next;
      end
    end
  end
endmodule
