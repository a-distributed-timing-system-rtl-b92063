// tb_event_sync: checks the two-stage event synchronizer.
// Raises each input at random phases for one to four clock periods and
// checks that exactly one one-tick pulse comes out per rising edge, after
// the second rising clock edge that follows the input (two ticks, 400 ns).
module tb_event_sync;
  timeunit 1ns; timeprecision 100ps;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [2:0] async_in = '0;
  logic [2:0] ev_out;
  int         checks = 0, failures = 0;

  event_sync #(.W(3)) dut (.*);

  always #100 clk = ~clk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // raise bit b at a random phase; count edges until the pulse, and pulses
  task automatic one(input int b);
    int edges, pulses, first;
    int len;
    len = int'($urandom_range(1, 4));
    #(real'($urandom_range(10, 190)));
    async_in[b] = 1'b1;
    edges = 0; pulses = 0; first = -1;
    fork
      begin #(200.0 * len); async_in[b] = 1'b0; end
      repeat (len + 5) begin
        @(posedge clk); edges++;
        #1;
        if (ev_out[b]) begin pulses++; if (first < 0) first = edges; end
        check(ev_out[2 - b] == 1'b0 || b == 1, "pulse on another bit");
      end
    join
    check(pulses == 1, $sformatf("bit %0d: %0d pulses", b, pulses));
    check(first == 2, $sformatf("bit %0d: pulse after %0d edges, want 2", b, first));
  endtask

  initial begin
    #300 rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 30; i++) one(i % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
