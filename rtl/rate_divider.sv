// rate_divider: programmable rate generator for one master timing signal.
//
// The master generates the system trigger, the time tag clock and the time
// tag reset at programmable rates; the time tag signals may count either the
// 5 MHz system clock or an external source. This module counts source events
// and emits a one-cycle pulse on every PERIOD-th one. With src_ext low every
// clock cycle is a source event; with src_ext high the rising edges of
// ext_in are, after a two-flop synchronizer. PERIOD = 0 stops the output.
//
// Timing: ev_out is registered. With the system clock as source the first
// pulse comes PERIOD cycles after enable rises and then one every PERIOD
// cycles. An external edge reaches the counter three cycles after it arrives.
// The counter width and the enable/period interface are this design's
// choices; the original only says the rates are programmable.
module rate_divider #(
  parameter int unsigned W = 24
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,   // run; low clears the counter
  input  logic         src_ext,  // 0: count clock cycles, 1: count ext_in edges
  input  logic         ext_in,   // external source, asynchronous
  input  logic [W-1:0] period,   // source events per output event
  output logic         ev_out    // one-cycle event pulse
);
  logic [2:0]   ext_sync;
  logic         src_ev;
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[1:0], ext_in};
  end

  always_comb src_ev = src_ext ? (ext_sync[1] & ~ext_sync[2]) : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      ev_out <= 1'b0;
    end else if (!enable || period == '0) begin
      cnt    <= '0;
      ev_out <= 1'b0;
    end else begin
      ev_out <= 1'b0;
      if (src_ev) begin
        if (cnt >= period - 1'b1) begin
          cnt    <= '0;
          ev_out <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
