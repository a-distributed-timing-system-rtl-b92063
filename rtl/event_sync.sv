// event_sync: brings decoded timing events onto the rising system clock edge.
//
// Each slave re-times the system trigger to the rising edge of its received
// 5 MHz clock with a two-stage synchronizer, which delays the trigger by two
// clock ticks (400 ns); this removes the decoder's sampling jitter, so all
// slaves see the trigger on the same clock edge. The same synchronizer is
// used here for the time tag clock and reset so that the time tag counters
// run in the system clock domain (in the original those two signals are used
// unsynchronized and keep the decoder's 50 ns jitter; this is a departure).
//
// Each input must be high for at least one clock period. The output is a
// one-tick pulse for every rising edge of the input, valid in the cycle after
// the second synchronizer stage captured it (two ticks after the first stage
// sampled the input high). Reset clears all stages.
module event_sync #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] async_in,  // levels from another clock domain
  output logic [W-1:0] ev_out     // one-tick pulses, system clock domain
);
  logic [W-1:0] s1, s2, s3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
      s3 <= '0;
    end else begin
      s1 <= async_in;
      s2 <= s1;
      s3 <= s2;
    end
  end

  always_comb ev_out = s2 & ~s3;
endmodule
