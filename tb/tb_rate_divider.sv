// tb_rate_divider: checks the master rate generator.
// Measures the spacing of output pulses for several periods with the clock
// as source, counts outputs for a known number of external edges, and checks
// that period 0 and enable low stop the output.
module tb_rate_divider;
  timeunit 1ns; timeprecision 100ps;

  logic        clk = 1'b0, rst_n = 1'b0, enable = 1'b0, src_ext = 1'b0, ext_in = 1'b0;
  logic [23:0] period = '0;
  logic        ev_out;
  int          checks = 0, failures = 0;

  rate_divider #(.W(24)) dut (.*);

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

  // count cycles from now until n pulses were seen; return spacing list check
  task automatic measure(input int p);
    int last, cyc, n;
    period = 24'(p);
    enable = 1'b1;
    last = 0; cyc = 0; n = 0;
    while (n < 4) begin
      @(posedge clk); #1;
      cyc++;
      if (ev_out) begin
        if (n == 0) check(cyc == p, $sformatf("first pulse after %0d, want %0d", cyc, p));
        else        check(cyc - last == p, $sformatf("spacing %0d, want %0d", cyc - last, p));
        last = cyc; n++;
      end
      if (cyc > 10 * p + 10) begin check(0, "no pulse"); break; end
    end
    enable = 1'b0;
    @(posedge clk); @(posedge clk); #1;
  endtask

  initial begin
    int cnt;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    measure(1);
    measure(2);
    measure(5);
    measure(37);
    // external source: 12 edges with period 4 give 3 events
    period = 24'd4; src_ext = 1'b1; enable = 1'b1;
    cnt = 0;
    fork
      repeat (12) begin
        ext_in = 1'b1; repeat (3) @(posedge clk);
        ext_in = 1'b0; repeat (3) @(posedge clk);
      end
      repeat (80) begin @(posedge clk); #1; if (ev_out) cnt++; end
    join
    check(cnt == 3, $sformatf("external source gave %0d events, want 3", cnt));
    // period 0 stops the output
    src_ext = 1'b0; period = '0; cnt = 0;
    repeat (50) begin @(posedge clk); #1; if (ev_out) cnt++; end
    check(cnt == 0, "period 0 still produces events");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
