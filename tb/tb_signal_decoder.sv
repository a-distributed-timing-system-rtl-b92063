// tb_signal_decoder: checks event recovery from the data fibre.
// Builds frames directly on the line (200 ns bits) at random phases to the
// 20 MHz sampling clock, and checks the decoded bits, the position of the
// output pulse (four bit times after the start edge, within one sample
// period of jitter), its length (one bit time) and the stop-bit check.
module tb_signal_decoder;
  timeunit 1ns; timeprecision 100ps;
  import timing_pkg::*;

  localparam realtime BIT = 200.0;

  logic     clk_dec = 1'b0, rst_n = 1'b0, line_in = 1'b0;
  tevents_t ev_out;
  logic     frame_err;
  int       checks = 0, failures = 0, errs = 0;
  realtime  t_rise, t_fall;
  tevents_t got;

  signal_decoder #(.OVS(4)) dut (.*);

  always #25 clk_dec = ~clk_dec;
  always @(posedge clk_dec) if (rst_n && frame_err) errs++;

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

  // drive one frame starting now; stop bit value selectable
  task automatic send(input tevents_t e, input logic stop);
    line_in = 1'b1;      #(BIT);
    line_in = e.trig;    #(BIT);
    line_in = e.tag_clk; #(BIT);
    line_in = e.tag_rst; #(BIT);
    line_in = stop;      #(BIT);
    line_in = 1'b0;
  endtask

  task automatic one_frame(input tevents_t e);
    realtime t0;
    int      phase;
    phase = int'($urandom_range(0, 49));
    #(real'(phase) + 0.5);
    t0 = $realtime;
    t_rise = 0; t_fall = 0; got = '0;
    fork
      send(e, 1'b0);
      begin
        @(ev_out != '0);
        t_rise = $realtime; got = ev_out;
        @(ev_out == '0);
        t_fall = $realtime;
      end
    join
    check(got == e, $sformatf("decoded %b, sent %b", got, e));
    check(t_rise - t0 >= 4.0 * BIT && t_rise - t0 <= 4.0 * BIT + 50.0,
          $sformatf("pulse at %0.1f ns after start", t_rise - t0));
    check(t_fall - t_rise > 199.0 && t_fall - t_rise < 201.0,
          $sformatf("pulse length %0.1f ns", t_fall - t_rise));
    #(300);
  endtask

  initial begin
    #100 rst_n = 1'b1;
    #100;
    for (int i = 0; i < 40; i++) one_frame(tevents_t'(1 + (i % 7)));
    check(errs == 0, "frame error on good frames");
    // back-to-back frames, no gap after the stop bit
    fork
      begin send(3'b001, 1'b0); send(3'b110, 1'b0); end
      begin
        @(ev_out != '0); got = ev_out;
        check(got == 3'b001, "first of back-to-back");
        @(ev_out == '0); @(ev_out != '0); got = ev_out;
        check(got == 3'b110, "second of back-to-back");
      end
    join
    #500;
    // bad stop bit
    errs = 0;
    send(3'b001, 1'b1);
    #1000;
    check(errs == 1, $sformatf("frame errors %0d, want 1", errs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
