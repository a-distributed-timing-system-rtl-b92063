// tb_signal_encoder: checks the serial frames on the data fibre.
// Sends single events, coincident events and events that arrive while a
// frame is on the line, and decodes the line sample by sample against the
// expected frame: start 1, trigger, time tag clock, time tag reset, stop 0.
module tb_signal_encoder;
  timeunit 1ns; timeprecision 100ps;
  import timing_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0;
  tevents_t ev_in = '0;
  logic     line_out, busy, overrun;
  int       checks = 0, failures = 0, overruns = 0;

  signal_encoder dut (.*);

  always #100 clk = ~clk;
  always @(posedge clk) if (overrun) overruns++;

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pulse ev for one cycle, then read the frame bits one per cycle
  task automatic pulse(input tevents_t e);
    @(negedge clk); ev_in = e;
    @(negedge clk); ev_in = '0;
  endtask

  task automatic expect_frame(input tevents_t e, input string tag);
    logic [4:0] seen;
    for (int i = 0; i < 5; i++) begin
      seen[i] = line_out;
      @(negedge clk);
    end
    check(seen == {1'b0, e.tag_rst, e.tag_clk, e.trig, 1'b1},
          $sformatf("%s: frame %b, want %b", tag, seen, {1'b0, e.tag_rst, e.tag_clk, e.trig, 1'b1}));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(line_out == 1'b0, "line not idle low");
    for (int v = 1; v < 8; v++) begin
      pulse(tevents_t'(v));
      expect_frame(tevents_t'(v), $sformatf("single %0d", v));
      repeat (3) @(negedge clk);
      check(line_out == 1'b0 && !busy, "line not idle after frame");
    end
    // trigger while a tag clock frame is running: sent in the next frame,
    // right after the stop bit
    @(negedge clk); ev_in = 3'b010;
    @(negedge clk); ev_in = '0;
    @(negedge clk); ev_in = 3'b001;
    @(negedge clk); ev_in = 3'b100;
    @(negedge clk); ev_in = '0;
    // now at bit 3 of the first frame; rewind the reading by checking the rest
    check(line_out == 1'b0, "bit 3 of first frame");
    @(negedge clk);
    check(line_out == 1'b0, "stop bit of first frame");
    @(negedge clk);
    expect_frame(3'b101, "pending pair");
    // two triggers while busy: overrun flagged, one frame sent
    overruns = 0;
    pulse(3'b010);
    @(negedge clk); ev_in = 3'b001;
    @(negedge clk); ev_in = 3'b001;
    @(negedge clk); ev_in = '0;
    @(negedge clk);
    @(negedge clk);
    expect_frame(3'b001, "merged trigger");
    repeat (5) @(negedge clk);
    check(overruns == 1, $sformatf("overrun pulses %0d, want 1", overruns));
    check(line_out == 1'b0, "extra frame after merge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
