// tb_user_timer_channel: checks one programmable one-shot channel.
// A reference model counts source ticks since the last accepted trigger
// (output active while delay < ticks <= delay + width) and applies the every
// Nth-trigger divider, which the time tag reset rephases. Random settings,
// triggers, sources and resets are compared every cycle. A directed case
// checks a 3 us delay and 1 us pulse at 200 ns per tick: the pulse starts
// 15 + 2 ticks after the trigger pulse and lasts 5 ticks.
module tb_user_timer_channel;
  timeunit 1ns; timeprecision 100ps;
  import timing_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  chan_cfg_t  cfg;
  logic       gate = 1'b0, phase_rst = 1'b0;
  logic [4:0] src_ev = 5'b00001;
  logic       out, active, done;
  int         checks = 0, failures = 0, n_retrig = 0, n_done = 0, n_skip = 0;

  // reference model state
  bit          m_run = 0;       // a fire happened and the sequence is not over
  int unsigned m_k = 0;         // ticks since the last fire
  int unsigned m_div = 0;
  bit          m_done = 0;

  user_timer_channel dut (.*);

  always #100 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit m_active();
    return m_run && cfg.width != 0 && m_k > cfg.delay && m_k <= cfg.delay + cfg.width;
  endfunction

  // apply inputs for one cycle and update the model at the clock edge
  task automatic step(input logic g, input logic pr, input logic [4:0] sev);
    bit tick, fire;
    int unsigned dnow;
    @(negedge clk);
    gate = g; phase_rst = pr; src_ev = sev;
    #1;
    // outputs in this cycle reflect the model before the edge
    check(active == m_active(), $sformatf("active %0b want %0b (k=%0d)", active, m_active(), m_k));
    check(out == (cfg.sense ? m_active() : !m_active()), "output sense");
    check(done == m_done, "done");
    if (done) n_done++;
    @(posedge clk);
    tick = sev[cfg.src];
    dnow = pr ? 0 : m_div;
    fire = g && (cfg.evnt <= 1 || dnow == 0);
    if (g && cfg.evnt > 1) m_div = (dnow >= cfg.evnt - 1) ? 0 : dnow + 1;
    else if (pr) m_div = 0;
    if (g && !fire) n_skip++;
    m_done = 0;
    if (fire) begin
      if (m_run && m_k <= cfg.delay + cfg.width) n_retrig++;
      m_run = 1; m_k = 0;
    end else if (tick && m_run) begin
      m_k++;
      if (cfg.width != 0 && m_k == cfg.delay + cfg.width + 1) m_done = 1;
      if (m_k > cfg.delay + cfg.width) m_run = 0;
    end
  endtask

  initial begin
    int rise, fall;
    cfg = '{enable: 1'b1, src: SRC_SYSCLK, delay: 16'd15, width: 16'd5,
            sense: 1'b1, evnt: 8'd0};
    #300 rst_n = 1'b1;
    // directed: trigger in cycle 0, watch the output
    rise = -1; fall = -1;
    @(negedge clk); gate = 1'b1;
    @(negedge clk); gate = 1'b0;
    for (int c = 1; c < 40; c++) begin
      if (out && rise < 0) rise = c;
      if (!out && rise >= 0 && fall < 0) fall = c;
      @(negedge clk);
    end
    check(rise == 17, $sformatf("pulse starts %0d ticks after trigger, want 17", rise));
    check(fall - rise == 5, $sformatf("pulse lasts %0d ticks, want 5", fall - rise));
    // random
    for (int blk = 0; blk < 60; blk++) begin
      while (m_run) step(1'b0, 1'b0, 5'b11111);
      step(1'b0, 1'b0, 5'b00001);
      cfg.src   = count_src_e'($urandom_range(0, 4));
      cfg.delay = 16'($urandom_range(0, 12));
      cfg.width = 16'($urandom_range(0, 8));
      cfg.sense = 1'($urandom_range(0, 1));
      cfg.evnt  = 8'($urandom_range(0, 4));
      m_div = 0;
      step(1'b0, 1'b1, 5'b00001);   // rephase the divider
      for (int i = 0; i < 300; i++)
        step(($urandom_range(0, 40) == 0), ($urandom_range(0, 400) == 0),
             {1'($urandom_range(0, 2) == 0), 1'($urandom_range(0, 3) == 0),
              1'($urandom_range(0, 3) == 0), 1'($urandom_range(0, 1) == 0), 1'b1});
    end
    check(n_retrig > 0, "no retrigger exercised");
    check(n_skip > 0, "no divided trigger exercised");
    check(n_done > 0, "no pulse completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
