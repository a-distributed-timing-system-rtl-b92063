// interrupt_ctrl: interrupt latch and mask of one timing module.
//
// A timing module can interrupt its host on the system trigger, on a time
// tag counter reset and at the end of a pulse on user channels 1-3 and 6-8.
// Every event pulse sets its pending bit; irq is high while any pending bit
// whose enable is set remains. The host clears pending bits by pulsing the
// matching bits of clear (write-one-to-clear). An event in the same cycle as
// its clear keeps the bit set, so no event is lost. The latch-and-clear
// scheme is this design's choice; the original only lists the sources.
//
// Timing: pending and irq follow an event by one cycle.
module interrupt_ctrl #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] ev,       // event pulses
  input  logic [N-1:0] enable,   // interrupt enables
  input  logic [N-1:0] clear,    // write-one-to-clear
  output logic [N-1:0] pending,  // latched events
  output logic         irq       // interrupt request, active high
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= (pending & ~clear) | ev;
  end

  always_comb irq = |(pending & enable);
endmodule
