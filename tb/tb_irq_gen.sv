// Self-checking test of the interrupt generator: events set sticky pending bits, the
// enable mask gates the line, write-one-to-clear, and an event in the clearing cycle wins.
module tb_irq_gen;
  localparam int N = 3;
  logic clk = 0, rst = 1;
  logic [N-1:0] event_i = '0, clr_mask = '0, en_i = '0, pending, enable;
  logic clr_we = 0, en_we = 0, irq;
  int checks = 0, failures = 0;
  logic [N-1:0] m_pend = '0, m_en = '0;
  logic m_irq = 0;

  irq_gen #(.N(N)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // directed: event with line disabled, then enable
    event_i = 3'b001; @(posedge clk); #1 event_i = '0;
    m_pend = 3'b001;
    @(posedge clk); #1;
    check(pending == 3'b001 && !irq, "pending without enable");
    en_we = 1; en_i = 3'b001; @(posedge clk); #1 en_we = 0;
    @(posedge clk); #1;
    check(irq, "irq after enable");
    clr_we = 1; clr_mask = 3'b001; @(posedge clk); #1 clr_we = 0;
    @(posedge clk); #1;
    check(pending == '0 && !irq, "cleared");
    m_pend = '0; m_en = 3'b001;
    // random
    repeat (2000) begin
      event_i  = N'($urandom_range(0, 7)) & N'({$urandom_range(0, 3) == 0, $urandom_range(0, 3) == 0, $urandom_range(0, 3) == 0});
      clr_we   = ($urandom_range(0, 3) == 0);
      clr_mask = N'($urandom);
      en_we    = ($urandom_range(0, 7) == 0);
      en_i     = N'($urandom);
      @(posedge clk); #1;
      m_irq  = |(m_pend & m_en);
      m_pend = (m_pend & ~(clr_we ? clr_mask : '0)) | event_i;
      if (en_we) m_en = en_i;
      check(pending == m_pend, "pending");
      check(enable == m_en, "enable");
      check(irq == m_irq, "irq");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
