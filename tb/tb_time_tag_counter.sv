// tb_time_tag_counter: checks the running and trigger-latched time tags.
// Drives random time tag clock, reset and trigger pulses, keeps its own
// model count, and compares both counters every cycle; also forces a wrap.
module tb_time_tag_counter;
  timeunit 1ns; timeprecision 100ps;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        tag_clk = 1'b0, tag_rst = 1'b0, trig = 1'b0;
  logic [15:0] running, latched;
  logic        rst_seen, wrap;
  int          checks = 0, failures = 0, n_rst = 0, n_wrap = 0;
  int unsigned m_run = 0, m_lat = 0;
  logic        exp_rst = 0, exp_wrap = 0;

  time_tag_counter dut (.*);

  always #100 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input logic c, input logic r, input logic t);
    @(negedge clk);
    tag_clk = c; tag_rst = r; trig = t;
    @(posedge clk);
    if (t) m_lat = m_run;
    exp_rst  = r;
    exp_wrap = c && !r && m_run == 16'hffff;
    if (r) m_run = 0;
    else if (c) m_run = (m_run + 1) & 16'hffff;
    #1;
    check(running == 16'(m_run), $sformatf("running %0d want %0d", running, m_run));
    check(latched == 16'(m_lat), $sformatf("latched %0d want %0d", latched, m_lat));
    check(rst_seen == exp_rst && wrap == exp_wrap, "rst_seen/wrap");
    if (rst_seen) n_rst++;
    if (wrap) n_wrap++;
  endtask

  initial begin
    #300 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++)
      step(($urandom_range(0, 1) == 1), ($urandom_range(0, 200) == 0), ($urandom_range(0, 20) == 0));
    // run to the wrap without resets
    for (int i = 0; i < 66000; i++) step(1'b1, 1'b0, (i % 1000) == 0);
    check(n_wrap >= 1, "no wrap seen");
    check(n_rst >= 1, "no reset seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
