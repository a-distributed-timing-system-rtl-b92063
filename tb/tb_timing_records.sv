// tb_timing_records: the example timing records and limits on a 3-node system.
// Programs every node the way software would for the three example records
// of the original system, plus the longest pulse the counters allow, and
// runs four triggers 30 ms apart with a 100 kHz time tag clock:
//   ch 0  simple pulse: 3 us after the trigger, 1 us wide
//   ch 1  referenced pulse: 3 us after ch 0, loaded as 6 us absolute
//   ch 2  same as ch 1 but on every 2nd trigger
//   ch 3  longest delay and width: 65535 ticks each (13.1 ms)
//   ch 5  simple pulse, active low
// Checked at every node: start times relative to that node's trigger
// (2 ticks of channel latency plus the delay), widths, the every-2nd-trigger
// count, and that successive latched time tags differ by 3000 (30 ms at
// 100 kHz).
module tb_timing_records;
  timeunit 1ns; timeprecision 10ps;
  import timing_pkg::*;

  localparam int NS = 2;
  localparam int NN = NS + 1;
  localparam realtime TICK = 200.0;

  logic               clk_5m = 1'b0, rst_n = 1'b0;
  logic               gen_enable = 1'b0;
  logic [23:0]        trig_period = 24'd150_000, tag_clk_period = 24'd50, tag_rst_period = '0;
  logic               tag_clk_src_ext = 1'b0, ext_tag_clk = 1'b0, tag_rst_src_ext = 1'b0, ext_tag_rst = 1'b0;
  logic               enc_overrun, fiber_clk_out, fiber_data_out;
  logic               fiber_clk_in [NS];
  logic               fiber_data_in [NS];
  logic               clk_dec [NN];
  chan_cfg_t          cfg [NN][USER_CH];
  logic [CHIPS-1:0]   ext_in [NN];
  logic [N_IRQ-1:0]   irq_enable [NN];
  logic [N_IRQ-1:0]   irq_clear [NN];
  logic [USER_CH-1:0] user_out [NN];
  logic               trig_out [NN], tag_clk_out [NN], tag_rst_out [NN], tag_wrap [NN];
  logic [CNT_W-1:0]   tag_running [NN], tag_latched [NN];
  logic [N_IRQ-1:0]   irq_pending [NN];
  logic               irq [NN], frame_err [NN];

  int checks = 0, failures = 0;
  int n_trig [NN], n_ch2 [NN];

  timing_system_top #(.N_SLAVES(NS)) dut (.*);

  always #100 clk_5m = ~clk_5m;

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 1.0) && (b - a < 1.0);
  endfunction

  // fibres: slave i gets copies delayed by 50*(i+1) ns on both fibres
  for (genvar i = 0; i < NS; i++) begin : g_fanout
    initial begin
      fiber_clk_in[i]  = 1'b0;
      fiber_data_in[i] = 1'b0;
      #(50.0 * (i + 1));
      forever #100 fiber_clk_in[i] = ~fiber_clk_in[i];
    end
    always @(fiber_data_out) begin
      automatic logic v = fiber_data_out;
      #(50.0 * (i + 1));
      fiber_data_in[i] = v;
    end
  end

  for (genvar n = 0; n < NN; n++) begin : g_node
    realtime t_trig, t0, t1, t2, t3;
    logic [CNT_W-1:0] last_tag;
    initial begin
      clk_dec[n] = 1'b0;
      #(7.0 * n);
      forever #(24.9) clk_dec[n] = ~clk_dec[n];
    end
    always @(posedge trig_out[n]) if (rst_n) begin
      t_trig = $realtime;
      n_trig[n]++;
      #(TICK + 1.0);   // the latch register updates on the next clock edge
      if (n_trig[n] > 1)
        check(16'(tag_latched[n] - last_tag) == 16'd3000,
              $sformatf("node %0d: tags %0d apart, want 3000", n, 16'(tag_latched[n] - last_tag)));
      last_tag = tag_latched[n];
    end
    always @(posedge user_out[n][0]) if (rst_n) begin
      t0 = $realtime;
      check(near(t0 - t_trig, 17 * TICK), $sformatf("node %0d ch0 starts %0.1f ns after trigger", n, t0 - t_trig));
    end
    always @(negedge user_out[n][0]) if (rst_n)
      check(near($realtime - t0, 5 * TICK), $sformatf("node %0d ch0 width %0.1f ns", n, $realtime - t0));
    always @(posedge user_out[n][1]) if (rst_n) begin
      t1 = $realtime;
      check(near(t1 - t0, 3000.0), $sformatf("node %0d ch1 starts %0.1f ns after ch0, want 3 us", n, t1 - t0));
    end
    always @(posedge user_out[n][2]) if (rst_n) begin
      t2 = $realtime;
      n_ch2[n]++;
      check(near(t2 - t_trig, 32 * TICK), $sformatf("node %0d ch2 starts %0.1f ns after trigger", n, t2 - t_trig));
    end
    always @(posedge user_out[n][3]) if (rst_n) begin
      t3 = $realtime;
      check(near(t3 - t_trig, 65537 * TICK), $sformatf("node %0d ch3 starts %0.1f ns after trigger", n, t3 - t_trig));
    end
    always @(negedge user_out[n][3]) if (rst_n && t3 > 0)
      check(near($realtime - t3, 65535 * TICK), $sformatf("node %0d ch3 width %0.1f ns", n, $realtime - t3));
    always @(negedge user_out[n][5]) if (rst_n)
      check(near($realtime - t_trig, 17 * TICK), $sformatf("node %0d ch5 (active low) starts %0.1f ns after trigger", n, $realtime - t_trig));
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      ext_in[n] = '0; irq_enable[n] = '0; irq_clear[n] = '0;
      n_trig[n] = 0; n_ch2[n] = 0;
      for (int c = 0; c < USER_CH; c++)
        cfg[n][c] = '{enable: 1'b0, src: SRC_SYSCLK, delay: '0, width: '0, sense: 1'b1, evnt: 8'd0};
      cfg[n][0] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd15,    width: 16'd5,     sense: 1'b1, evnt: 8'd0};
      cfg[n][1] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd30,    width: 16'd5,     sense: 1'b1, evnt: 8'd0};
      cfg[n][2] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd30,    width: 16'd5,     sense: 1'b1, evnt: 8'd2};
      cfg[n][3] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'hffff, width: 16'hffff, sense: 1'b1, evnt: 8'd0};
      cfg[n][5] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd15,    width: 16'd5,     sense: 1'b0, evnt: 8'd0};
    end
    #1000 rst_n = 1'b1;
    repeat (10) @(negedge clk_5m);
    gen_enable = 1'b1;
    repeat (4 * 150_000 + 200) @(negedge clk_5m);
    for (int n = 0; n < NN; n++) begin
      check(n_trig[n] == 4, $sformatf("node %0d saw %0d triggers", n, n_trig[n]));
      check(n_ch2[n] == 2, $sformatf("node %0d ch2 fired %0d times, want 2", n, n_ch2[n]));
      check(frame_err[n] == 1'b0, "frame error");
    end
    check(!enc_overrun, "overrun at 100 kHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
