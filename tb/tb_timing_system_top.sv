// tb_timing_system_top: the whole timing system, master and 12 slaves.
// The testbench stands in for the optical fanouts: each slave's clock and
// data fibres are copies of the master's with their own propagation delays
// (0-300 ns, with the data fibre up to 80 ns early or 40 ns late against
// the clock fibre), and every node has its own decoder oscillator near
// 20 MHz. It runs the system through several modes and checks that:
//   - every node sees every trigger on the same clock edge, i.e. trigger
//     times minus clock fibre delay agree to within 1 ns;
//   - the trigger-latched time tags agree at every node;
//   - a user channel (3 us delay, 1 us width) fires at the same time on
//     all nodes, and a channel on every 2nd trigger fires half as often;
//   - the trigger, counter-reset and channel interrupts are raised;
//   - an external time tag clock source works, the time tag counter wraps,
//     and a too-fast tag clock is flagged as an overrun;
//   - no node reports a frame error.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_timing_system_top;
  timeunit 1ns; timeprecision 10ps;
  import timing_pkg::*;

  localparam int NS = 12;
  localparam int NN = NS + 1;

  logic               clk_5m = 1'b0, rst_n = 1'b0;
  logic               gen_enable = 1'b0;
  logic [23:0]        trig_period = '0, tag_clk_period = '0, tag_rst_period = '0;
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

  int      checks = 0, failures = 0;
  realtime d_clk [NN], d_dat [NN];
  realtime t_trig [NN], t_ch0 [NN];
  int      n_trig [NN], n_ch0 [NN], n_ch1 [NN], n_wrap [NN], n_ferr [NN];
  int      exp_ch1;
  int      n_ovr = 0, n_sync_checks = 0, n_irq_trig = 0, n_irq_rst = 0, n_irq_ch = 0;

  timing_system_top dut (.*);

  always #100 clk_5m = ~clk_5m;

  // fanout model: each slave's fibres are delayed copies of the master's.
  // The clock copy is a clock of the same period shifted by d_clk; data
  // changes are queued and replayed d_dat later.
  typedef struct { realtime t; logic v; } change_t;
  for (genvar i = 0; i < NS; i++) begin : g_fanout
    change_t q [$];
    initial begin
      d_clk[i+1] = real'($urandom_range(0, 300));
      d_dat[i+1] = d_clk[i+1] + real'($urandom_range(0, 120)) - 80.0;
      if (d_dat[i+1] < 0.0) d_dat[i+1] = 0.0;
      fiber_clk_in[i]  = 1'b0;
      fiber_data_in[i] = 1'b0;
      #(d_clk[i+1]);
      forever #100 fiber_clk_in[i] = ~fiber_clk_in[i];
    end
    always @(fiber_data_out) q.push_back('{$realtime + d_dat[i+1], fiber_data_out});
    initial forever begin
      wait (q.size() > 0);
      #(q[0].t - $realtime);
      fiber_data_in[i] = q[0].v;
      void'(q.pop_front());
    end
  end

  // per-node decoder oscillators and observers
  for (genvar n = 0; n < NN; n++) begin : g_node
    realtime half;
    initial begin
      clk_dec[n] = 1'b0;
      half = 24.85 + 0.025 * real'(n % 5);
      #(real'($urandom_range(0, 49)));
      forever #(half) clk_dec[n] = ~clk_dec[n];
    end
    always @(posedge trig_out[n])   if (rst_n) begin t_trig[n] = $realtime; n_trig[n]++; end
    always @(posedge user_out[n][0]) if (rst_n) begin t_ch0[n] = $realtime; n_ch0[n]++; end
    always @(negedge user_out[n][1]) if (rst_n) n_ch1[n]++;   // active low
    always @(posedge tag_wrap[n])   if (rst_n) n_wrap[n]++;
    always @(posedge frame_err[n])  if (rst_n) n_ferr[n]++;
  end
  always @(posedge clk_5m) if (rst_n && enc_overrun) n_ovr++;

  initial begin
    #400_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // after each trigger at the master: compare all nodes
  initial begin
    forever begin
      @(posedge trig_out[0]);
      #3000;   // every slave has seen it by now
      for (int n = 1; n < NN; n++) begin
        realtime a, b;
        a = t_trig[n] - d_clk[n];
        b = t_trig[0];
        check(a - b < 1.0 && b - a < 1.0,
              $sformatf("node %0d trigger %0.2f ns off the master", n, a - b));
        check(tag_latched[n] == tag_latched[0],
              $sformatf("node %0d latched tag %0d, master %0d", n, tag_latched[n], tag_latched[0]));
      end
      n_sync_checks++;
      for (int n = 0; n < NN; n++) begin
        if (irq_pending[n][IRQ_TRIG])   n_irq_trig++;
        if (irq_pending[n][IRQ_TAGRST]) n_irq_rst++;
        if (irq_pending[n][IRQ_CH0])    n_irq_ch++;
        irq_clear[n] = '1;
      end
      @(negedge clk_5m);
      for (int n = 0; n < NN; n++) irq_clear[n] = '0;
    end
  end

  // channel 0 of every node must start at the same point of its own clock
  initial begin
    forever begin
      @(posedge user_out[0][0]);
      #3000;
      for (int n = 1; n < NN; n++) begin
        realtime a;
        a = (t_ch0[n] - d_clk[n]) - t_ch0[0];
        check(a < 1.0 && a > -1.0, $sformatf("node %0d channel 0 %0.2f ns off", n, a));
      end
    end
  end

  task automatic run_ticks(input int n);
    repeat (n) @(negedge clk_5m);
  endtask

  initial begin
    d_clk[0] = 0.0; d_dat[0] = 0.0;
    for (int n = 0; n < NN; n++) begin
      ext_in[n] = '0;
      irq_enable[n] = '1;
      irq_clear[n] = '0;
      for (int c = 0; c < USER_CH; c++)
        cfg[n][c] = '{enable: 1'b0, src: SRC_SYSCLK, delay: '0, width: '0, sense: 1'b1, evnt: 8'd0};
      // 3 us after the trigger, 1 us wide, every trigger
      cfg[n][0] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd15, width: 16'd5, sense: 1'b1, evnt: 8'd0};
      // same, every 2nd trigger, active low
      cfg[n][1] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd30, width: 16'd5, sense: 1'b0, evnt: 8'd2};
      n_trig[n] = 0; n_ch0[n] = 0; n_ch1[n] = 0; n_wrap[n] = 0; n_ferr[n] = 0;
    end
    #1000 rst_n = 1'b1;
    run_ticks(10);

    // channel 1 takes every 2nd trigger; the time tag reset that comes
    // with every 8th trigger rephases its divider
    exp_ch1 = 0;
    for (int k = 1, div = 0; k <= 40; k++) begin
      int dnow;
      dnow = (k % 8 == 0) ? 0 : div;
      if (dnow == 0) exp_ch1++;
      div = (dnow >= 1) ? 0 : dnow + 1;
    end
    // mode 1: trigger every 500 ticks, tag clock every 10, tag reset every 4000
    trig_period = 24'd500; tag_clk_period = 24'd10; tag_rst_period = 24'd4000;
    gen_enable = 1'b1;
    run_ticks(20_000);
    gen_enable = 1'b0;
    run_ticks(100);
    for (int n = 0; n < NN; n++) begin
      check(n_trig[n] == 40, $sformatf("node %0d saw %0d triggers, want 40", n, n_trig[n]));
      check(n_ch0[n] == 40, $sformatf("node %0d channel 0 fired %0d times, want 40", n, n_ch0[n]));
      check(n_ch1[n] == exp_ch1,
            $sformatf("node %0d channel 1 fired %0d times, want %0d", n, n_ch1[n], exp_ch1));
    end

    // mode 2: external time tag clock (every 3rd external edge)
    tag_clk_src_ext = 1'b1; tag_clk_period = 24'd3; tag_rst_period = '0; trig_period = 24'd300;
    gen_enable = 1'b1;
    for (int i = 0; i < 60; i++) begin
      ext_tag_clk = 1'b1; run_ticks(10);
      ext_tag_clk = 1'b0; run_ticks(10);
    end
    gen_enable = 1'b0;
    run_ticks(50);
    for (int n = 0; n < NN; n++)
      check(tag_running[n] == tag_running[0], $sformatf("node %0d running tag differs", n));

    // mode 3: time tag counter wrap, tag clock every 5 ticks, no reset
    tag_clk_src_ext = 1'b0; tag_clk_period = 24'd5; trig_period = 24'd20000;
    gen_enable = 1'b1;
    run_ticks(5 * 65_600);
    gen_enable = 1'b0;
    run_ticks(50);

    // mode 4: tag clock faster than the line can carry
    tag_clk_period = 24'd3; trig_period = '0;
    gen_enable = 1'b1;
    run_ticks(200);
    gen_enable = 1'b0;
    run_ticks(50);

    for (int n = 0; n < NN; n++) begin
      check(n_wrap[n] >= 1, $sformatf("node %0d time tag counter never wrapped", n));
      check(n_ferr[n] == 0, $sformatf("node %0d frame errors %0d", n, n_ferr[n]));
    end
    $display("mechanisms: trigger-sync checks %0d, trigger irqs %0d, reset irqs %0d, channel irqs %0d, overruns %0d, wraps %0d",
             n_sync_checks, n_irq_trig, n_irq_rst, n_irq_ch, n_ovr, n_wrap[0]);
    check(n_sync_checks > 0, "no trigger compared");
    check(n_irq_trig > 0, "no trigger interrupt");
    check(n_irq_rst > 0, "no counter-reset interrupt");
    check(n_irq_ch > 0, "no channel interrupt");
    check(n_ovr > 0, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
