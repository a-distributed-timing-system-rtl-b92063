// tb_master_timing_module: checks signal generation and multiplexing.
// A small frame reader in the testbench samples the data fibre on rising
// clock edges (mid-bit, since the master changes it on falling edges) and
// counts trigger, time tag clock and time tag reset events. Checked: the
// event counts over a fixed window match the programmed periods, every bit
// edge on the fibre follows a falling clock edge, the time tag clock can
// come from an external input, the master's own receiver sees its triggers
// and time tags, and a too-fast rate is flagged as overrun.
module tb_master_timing_module;
  timeunit 1ns; timeprecision 10ps;
  import timing_pkg::*;

  logic               clk_5m = 1'b0, clk_dec = 1'b0, rst_n = 1'b0;
  logic               gen_enable = 1'b0;
  logic [23:0]        trig_period = '0, tag_clk_period = '0, tag_rst_period = '0;
  logic               tag_clk_src_ext = 1'b0, ext_tag_clk = 1'b0, tag_rst_src_ext = 1'b0, ext_tag_rst = 1'b0;
  logic               fiber_clk_out, fiber_data_out, enc_overrun;
  chan_cfg_t          cfg [USER_CH];
  logic [CHIPS-1:0]   ext_in = '0;
  logic [N_IRQ-1:0]   irq_enable = '0, irq_clear = '0;
  logic [USER_CH-1:0] user_out;
  logic               trig_out, tag_clk_out, tag_rst_out, tag_wrap, irq, frame_err;
  logic [CNT_W-1:0]   tag_running, tag_latched;
  logic [N_IRQ-1:0]   irq_pending;
  int                 checks = 0, failures = 0;
  int                 n_trig = 0, n_tclk = 0, n_trst = 0, n_local_trig = 0, n_ovr = 0, bad_edges = 0;
  int                 bitpos = -1;
  logic [3:0]         fr;

  master_timing_module dut (.*);

  always #100 clk_5m = ~clk_5m;
  always #24.9 clk_dec = ~clk_dec;

  // frame reader
  always @(posedge clk_5m) begin
    if (bitpos < 0) begin
      if (fiber_data_out) begin bitpos = 1; fr = '0; end
    end else begin
      if (bitpos <= 3) fr[bitpos] = fiber_data_out;
      if (bitpos == 4) begin
        if (fiber_data_out) bad_edges++;
        if (fr[1]) n_trig++;
        if (fr[2]) n_tclk++;
        if (fr[3]) n_trst++;
        bitpos = -1;
      end else bitpos++;
    end
    if (rst_n && trig_out) n_local_trig++;
    if (rst_n && enc_overrun) n_ovr++;
  end
  // the fibre may only change right after a falling clock edge
  always @(fiber_data_out) if (rst_n && clk_5m !== 1'b0) bad_edges++;

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

  task automatic clear_counts();
    n_trig = 0; n_tclk = 0; n_trst = 0; n_local_trig = 0; n_ovr = 0;
  endtask

  initial begin
    for (int i = 0; i < USER_CH; i++)
      cfg[i] = '{enable: 1'b0, src: SRC_SYSCLK, delay: '0, width: '0, sense: 1'b1, evnt: 8'd0};
    #300 rst_n = 1'b1;
    // 1 kHz-like scaled rates: trigger every 100 ticks, tag clock every 10,
    // tag reset every 1000; 3000 ticks give 30, 300 and 3 events
    trig_period = 24'd100; tag_clk_period = 24'd10; tag_rst_period = 24'd1000;
    @(negedge clk_5m); gen_enable = 1'b1;
    repeat (3000) @(negedge clk_5m);
    gen_enable = 1'b0;
    repeat (20) @(negedge clk_5m);
    check(n_trig == 30, $sformatf("%0d triggers, want 30", n_trig));
    check(n_tclk == 300, $sformatf("%0d tag clocks, want 300", n_tclk));
    check(n_trst == 3, $sformatf("%0d tag resets, want 3", n_trst));
    check(n_local_trig == 30, $sformatf("local receiver saw %0d triggers", n_local_trig));
    check(bad_edges == 0, "fibre edges not on falling clock edges or bad stop bit");
    check(n_ovr == 0, "unexpected overrun");
    check(frame_err == 1'b0, "local frame error");
    // external time tag clock, every 2nd external edge
    clear_counts();
    tag_clk_src_ext = 1'b1; tag_clk_period = 24'd2; trig_period = '0; tag_rst_period = '0;
    @(negedge clk_5m); gen_enable = 1'b1;
    repeat (20) begin
      ext_tag_clk = 1'b1; repeat (10) @(negedge clk_5m);
      ext_tag_clk = 1'b0; repeat (10) @(negedge clk_5m);
    end
    repeat (20) @(negedge clk_5m);
    gen_enable = 1'b0;
    check(n_tclk == 10, $sformatf("%0d external tag clocks, want 10", n_tclk));
    // too fast: tag clock every 3 ticks cannot fit 5-bit frames
    clear_counts();
    tag_clk_src_ext = 1'b0; tag_clk_period = 24'd3;
    @(negedge clk_5m); gen_enable = 1'b1;
    repeat (300) @(negedge clk_5m);
    gen_enable = 1'b0;
    check(n_ovr > 0, "overrun not flagged");
    check(n_tclk >= 58 && n_tclk <= 60, $sformatf("%0d tag clock frames at full line rate, want 58..60", n_tclk));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
