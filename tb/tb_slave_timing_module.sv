// tb_slave_timing_module: checks a slave end to end from its two fibres.
// The testbench generates the 5 MHz clock and writes frames onto the data
// fibre with bit edges on falling clock edges, as the master does. The
// decoder oscillator runs slightly off 20 MHz with a random phase. Checked:
// the trigger comes out on the same rising clock edge (the sixth after the
// frame start) whatever the decoder phase; the time tag counters count,
// latch at the trigger and clear on reset; a user channel fires at the
// programmed delay after the trigger; the interrupt sources are latched.
module tb_slave_timing_module;
  timeunit 1ns; timeprecision 10ps;
  import timing_pkg::*;

  logic               fiber_clk = 1'b0, fiber_data = 1'b0, clk_dec = 1'b0, rst_n = 1'b0;
  chan_cfg_t          cfg [USER_CH];
  logic [CHIPS-1:0]   ext_in = '0;
  logic [N_IRQ-1:0]   irq_enable = '0, irq_clear = '0;
  logic [USER_CH-1:0] user_out;
  logic               trig_out, tag_clk_out, tag_rst_out, tag_wrap, irq, frame_err;
  logic [CNT_W-1:0]   tag_running, tag_latched;
  logic [N_IRQ-1:0]   irq_pending;
  int                 checks = 0, failures = 0;
  int                 edge_no = 0, trig_edge = -1, out_edge = -1;
  realtime            dec_half = 24.9;

  slave_timing_module #(.OVS(4)) dut (.*);

  always #100 fiber_clk = ~fiber_clk;
  initial begin
    #(real'($urandom_range(0, 49)));
    forever #(dec_half) clk_dec = ~clk_dec;
  end
  always @(posedge fiber_clk) begin
    edge_no++;
    #1;
    if (trig_out && trig_edge < 0) trig_edge = edge_no;
    if (user_out[0] && out_edge < 0) out_edge = edge_no;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one frame starting at a falling clock edge; return its edge number
  task automatic send(input tevents_t e, output int start_edge);
    @(negedge fiber_clk);
    start_edge = edge_no;
    fiber_data = 1'b1;      @(negedge fiber_clk);
    fiber_data = e.trig;    @(negedge fiber_clk);
    fiber_data = e.tag_clk; @(negedge fiber_clk);
    fiber_data = e.tag_rst; @(negedge fiber_clk);
    fiber_data = 1'b0;      @(negedge fiber_clk);
    repeat (3) @(negedge fiber_clk);
  endtask

  initial begin
    int s;
    for (int i = 0; i < USER_CH; i++)
      cfg[i] = '{enable: 1'b0, src: SRC_SYSCLK, delay: '0, width: '0, sense: 1'b1, evnt: 8'd0};
    cfg[0] = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd15, width: 16'd5, sense: 1'b1, evnt: 8'd0};
    irq_enable = 8'b0000_0011;
    #300 rst_n = 1'b1;
    #1000;
    // trigger edge alignment for many decoder phases and small frequency offsets
    for (int i = 0; i < 12; i++) begin
      dec_half = 24.8 + 0.04 * real'(i % 5);
      trig_edge = -1; out_edge = -1;
      send(3'b001, s);
      repeat (25) @(negedge fiber_clk);
      check(trig_edge - s == 6, $sformatf("trigger on edge %0d after frame, want 6", trig_edge - s));
      check(out_edge - trig_edge == 17, $sformatf("channel 0 rises %0d ticks after trigger, want 17", out_edge - trig_edge));
    end
    check(irq && irq_pending[IRQ_TRIG], "trigger interrupt not pending");
    irq_clear = 8'hff; @(negedge fiber_clk); irq_clear = '0;
    @(negedge fiber_clk);
    check(!irq && irq_pending == '0, "interrupts not cleared");
    // time tags: reset, 9 tag clocks, then a trigger latches 9
    send(3'b100, s);
    repeat (4) @(negedge fiber_clk);
    check(tag_running == 0, "running count not cleared");
    check(irq_pending[IRQ_TAGRST], "counter reset interrupt not pending");
    for (int i = 0; i < 9; i++) send(3'b010, s);
    send(3'b001, s);
    repeat (4) @(negedge fiber_clk);
    check(tag_latched == 16'd9, $sformatf("latched tag %0d, want 9", tag_latched));
    // tag clock and trigger in one frame: latch sees the count before it
    send(3'b011, s);
    repeat (4) @(negedge fiber_clk);
    check(tag_latched == 16'd9 && tag_running == 16'd10, "combined frame");
    check(!frame_err, "frame error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
