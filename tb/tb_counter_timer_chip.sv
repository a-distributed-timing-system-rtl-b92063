// tb_counter_timer_chip: checks a group of five channels sharing one gate.
// One trigger starts all five channels, each with its own delay, width and
// sense; their rise and fall cycles are compared with delay + 2 and
// delay + width + 2. A channel counting the external input and one counting
// time tag clocks are checked, and interrupt events must come only from
// the first three channels.
module tb_counter_timer_chip;
  timeunit 1ns; timeprecision 100ps;
  import timing_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  chan_cfg_t  cfg [CH_PER_CHIP];
  logic       trig = 1'b0, tag_clk = 1'b0, tag_rst = 1'b0, ext_in = 1'b0;
  logic [4:0] out, irq_ev;
  int         checks = 0, failures = 0;
  int         rise [5], fall [5], nirq [5];

  counter_timer_chip dut (.*);

  always #100 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // trigger in cycle 0, then record edges of each output relative to sense
  task automatic run(input int cycles, input bit ext_pulses, input bit tclk_pulses);
    foreach (rise[i]) begin rise[i] = -1; fall[i] = -1; nirq[i] = 0; end
    @(negedge clk); trig = 1'b1;
    @(negedge clk); trig = 1'b0;
    for (int c = 1; c < cycles; c++) begin
      ext_in  = ext_pulses && (c % 4 < 2);
      tag_clk = tclk_pulses && (c % 3 == 0);
      for (int i = 0; i < 5; i++) begin
        if ((out[i] == cfg[i].sense) && rise[i] < 0) rise[i] = c;
        if ((out[i] != cfg[i].sense) && rise[i] >= 0 && fall[i] < 0) fall[i] = c;
        if (irq_ev[i]) nirq[i]++;
      end
      @(negedge clk);
    end
    ext_in = 1'b0; tag_clk = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < 5; i++)
      cfg[i] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'(3 * i + 1),
                 width: 16'(i + 2), sense: 1'(i % 2), evnt: 8'd0};
    #300 rst_n = 1'b1;
    run(60, 1'b0, 1'b0);
    for (int i = 0; i < 5; i++) begin
      check(rise[i] == 3 * i + 1 + 2, $sformatf("ch%0d rise %0d", i, rise[i]));
      check(fall[i] == 3 * i + 1 + 2 + i + 2, $sformatf("ch%0d fall %0d", i, fall[i]));
      check(nirq[i] == (i < 3 ? 1 : 0), $sformatf("ch%0d irq events %0d", i, nirq[i]));
    end
    // channel 4 counts external edges (one every 4 cycles), channel 3 time
    // tag clocks (one every 3 cycles)
    cfg[4].src = SRC_EXT;    cfg[4].delay = 16'd2; cfg[4].width = 16'd2;
    cfg[3].src = SRC_TAGCLK; cfg[3].delay = 16'd2; cfg[3].width = 16'd1;
    run(80, 1'b1, 1'b1);
    check(rise[4] > 0 && fall[4] - rise[4] == 8, $sformatf("ext channel width %0d cycles", fall[4] - rise[4]));
    check(rise[3] > 0 && fall[3] - rise[3] == 3, $sformatf("tag clock channel width %0d cycles", fall[3] - rise[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
