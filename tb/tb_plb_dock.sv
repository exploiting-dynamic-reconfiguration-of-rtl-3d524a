// Self-checking test of the 64-bit dock with a 15-entry output FIFO (FAW = 4) so that the
// FIFO fills quickly. The dynamic area is modelled as a register that takes din + 1 on
// each write strobe and flags it valid for one cycle. Checks: CPU writes (full word and each 32-bit half)
// reach the data channel with one strobe each; reads of the read channel and of the
// registers; results captured in the FIFO and popped by the CPU; a DMA transfer that
// needs several fill/drain rounds lands in memory; the FIFO-full and DMA-done interrupts,
// their enable and their clearing; the overflow interrupt; the chain bit of CTRL.
module tb_plb_dock;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam int FAW = 4;
  logic clk = 0, rst = 1;
  logic s_req = 0, s_we = 0, s_ack;
  logic [31:0] s_addr = '0;
  logic [7:0]  s_be = '0;
  logic [63:0] s_wdata = '0, s_rdata;
  logic m_req, m_we, m_ack;
  logic [31:0] m_addr;
  logic [63:0] m_wdata, m_rdata;
  logic [63:0] da_din, da_dout;
  logic da_wr, da_dout_valid, irq;
  logic [1:0] vpipe;
  logic [63:0] res_q = '0;
  int checks = 0, failures = 0, strobes = 0;

  plb_dock #(.BASE(BASE), .FAW(FAW), .SLACK(4), .SETTLE_CYC(8)) dut (.*);
  mem_model #(.MAW(12)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
                               .ack(m_ack), .rdata(m_rdata));
  always #5 clk = !clk;

  // dynamic area model
  always @(posedge clk) begin
    if (rst) vpipe <= '0;
    else     vpipe <= {vpipe[0], da_wr};
    if (da_wr) begin
      strobes++;
      res_q <= da_din + 64'd1;
    end
  end
  assign da_dout = res_q;
  assign da_dout_valid = vpipe[0];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input bit we, input logic [7:0] off, input logic [7:0] be,
                     input logic [63:0] wd, output logic [63:0] rd);
    int cyc = 0;
    s_req = 1; s_we = we; s_addr = BASE | 32'(off); s_be = be; s_wdata = wd;
    do begin @(posedge clk); #1; cyc++; end while (!s_ack && cyc < 20);
    check(cyc == 1, "ack after one cycle");
    rd = s_rdata;
    s_req = 0;
    @(posedge clk); #1;
  endtask

  task automatic wr64(input logic [7:0] off, input logic [63:0] v);
    logic [63:0] rd;
    bus(1, off, 8'hFF, v, rd);
  endtask

  task automatic rd64(input logic [7:0] off, output logic [63:0] v);
    bus(0, off, 8'hFF, '0, v);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v, r;
    int s0, n, t;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // CPU writes and reads of the data channel
    repeat (50) begin
      v = {$urandom, $urandom};
      s0 = strobes;
      wr64(8'h00, v);
      check(da_din == v && strobes == s0 + 1, "64-bit write");
      rd64(8'h00, r);
      check(r == v + 64'd1, "read channel");
    end
    // 32-bit stores: each updates one half and strobes
    wr64(8'h00, 64'h0);
    bus(1, 8'h00, 8'hF0, 64'hAAAA_BBBB_1111_2222, r);
    check(da_din == 64'hAAAA_BBBB_0000_0000, "upper-half store");
    bus(1, 8'h04, 8'h0F, 64'h1111_2222_CCCC_DDDD, r);
    check(da_din == 64'hAAAA_BBBB_CCCC_DDDD, "lower-half store");
    // registers read back
    wr64(8'h10, 64'h100); wr64(8'h18, 64'h4000); wr64(8'h20, 64'd40);
    rd64(8'h10, r); check(r == 64'h100, "SRC");
    rd64(8'h18, r); check(r == 64'h4000, "DST");
    rd64(8'h20, r); check(r == 64'd40, "LEN");
    // capture: CPU-driven results go to the FIFO and can be popped
    wr64(8'h30, 64'h0700);        // enable all interrupts
    wr64(8'h28, 64'h4);           // chain mode bit alone, no start
    rd64(8'h28, r); check(r[3:0] == 4'b0100, "CTRL reads chain bit, idle");
    wr64(8'h28, 64'h2);           // capture on, no start
    for (int i = 0; i < 5; i++) wr64(8'h00, 64'(1000 + i));
    repeat (3) @(posedge clk); #1;
    rd64(8'h28, r); check(r[FAW+3:4] == 5, $sformatf("FIFO count %0d", r[FAW+3:4]));
    for (int i = 0; i < 5; i++) begin
      rd64(8'h08, r); check(r == 64'(1001 + i), $sformatf("CPU pop of FIFO %0d", r));
    end
    rd64(8'h28, r); check(r[FAW+4] == 1'b1, "FIFO empty");
    // fill the FIFO by CPU writes: full interrupt, then overflow interrupt
    for (int i = 0; i < 16; i++) wr64(8'h00, 64'(i));
    repeat (3) @(posedge clk); #1;
    rd64(8'h30, r);
    check(r[1] && r[2], "full and overflow pending");
    check(irq, "interrupt line raised");
    wr64(8'h30, 64'h0707);        // clear all, keep enabled
    repeat (2) @(posedge clk); #1;
    check(!irq, "interrupt cleared");
    // drain-only DMA empties the FIFO into memory
    wr64(8'h18, 64'h6000); wr64(8'h20, 64'd0);
    wr64(8'h28, 64'h3);
    t = 0; while (!irq && t < 1000) begin @(posedge clk); #1; t++; end
    check(irq, "DMA done interrupt (drain-only)");
    for (int i = 0; i < 15; i++) check(u_mem.mem[3072 + i] == 64'(i + 1), $sformatf("drained word %0d", u_mem.mem[3072+i]));
    wr64(8'h30, 64'h0707);
    // block-interleaved DMA: 100 words through the 15-entry FIFO
    n = 100;
    for (int i = 0; i < n; i++) u_mem.mem[32 + i] = {$urandom, $urandom};
    wr64(8'h10, 64'h100); wr64(8'h18, 64'h2000); wr64(8'h20, 64'(n));
    s0 = strobes;
    wr64(8'h28, 64'h3);
    t = 0; while (!irq && t < 20000) begin @(posedge clk); #1; t++; end
    check(irq, "DMA done interrupt");
    check(strobes == s0 + n, "one strobe per DMA word");
    for (int i = 0; i < n; i++)
      check(u_mem.mem[1024 + i] == u_mem.mem[32 + i] + 64'd1, $sformatf("DMA result %0d", i));
    rd64(8'h30, r);
    check(r[0] && !r[2], "done pending, no overflow during DMA");
    wr64(8'h30, 64'h0001);
    repeat (2) @(posedge clk); #1;
    rd64(8'h30, r);
    check(r[0] == 1'b0, "done cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
