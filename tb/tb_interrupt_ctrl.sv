// tb_interrupt_ctrl: checks interrupt latching, masking and clearing.
// Random events, enables and clears are applied against a reference model
// of the pending register; irq must equal any enabled pending bit.
module tb_interrupt_ctrl;
  timeunit 1ns; timeprecision 100ps;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] ev = '0, enable = '0, clear = '0;
  logic [7:0] pending;
  logic       irq;
  logic [7:0] m_pend = '0;
  int         checks = 0, failures = 0, n_irq = 0;

  interrupt_ctrl #(.N(8)) dut (.*);

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

  initial begin
    #300 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ev     = 8'($urandom()) & 8'($urandom()) & 8'($urandom());
      clear  = 8'($urandom()) & 8'($urandom());
      enable = 8'($urandom());
      @(posedge clk);
      m_pend = (m_pend & ~clear) | ev;
      #1;
      check(pending == m_pend, $sformatf("pending %b want %b", pending, m_pend));
      check(irq == |(m_pend & enable), "irq");
      if (irq) n_irq++;
    end
    check(n_irq > 0, "irq never raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
