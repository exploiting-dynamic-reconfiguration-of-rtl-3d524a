// Self-checking test of the DMA engine with a small output FIFO (31 entries) so that a
// block-interleaved transfer needs several fill/drain rounds. The dynamic area is modelled
// as a pipeline that returns din + 1 three cycles after each write. Checks: every source
// word arrives, in order and transformed, at the destination; the FIFO never overflows;
// several drain rounds happen; a plain transfer without capture; a drain-only transfer; a
// chain of three descriptors whose blocks land at their own destinations with one done.
module tb_dock_dma;
  localparam int FAW = 5, SLACK = 4, SETTLE = 6;
  logic clk = 0, rst = 1;
  logic start = 0, capture = 0, chain = 0, busy, done;
  logic [31:0] src = '0, dst = '0;
  logic [23:0] len = '0;
  logic m_req, m_we, m_ack;
  logic [31:0] m_addr;
  logic [63:0] m_wdata, m_rdata;
  logic dw_valid;
  logic [63:0] dw_data;
  logic [FAW-1:0] f_count;
  logic f_empty, f_full, f_ovf, f_pop;
  logic [63:0] f_rdata;
  logic [63:0] pipe [3];
  logic [2:0] pv;
  logic keep = 1;  // results are queued (the dock's capture bit)
  int checks = 0, failures = 0, rounds = 0, ovf = 0, writes = 0, dones = 0;

  dock_dma #(.FAW(FAW), .SLACK(SLACK), .SETTLE_CYC(SETTLE)) dut (
    .clk, .rst, .start, .src, .dst, .len, .capture, .chain, .busy, .done,
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
    .dw_valid, .dw_data,
    .fifo_count(f_count), .fifo_empty(f_empty), .fifo_rdata(f_rdata), .fifo_pop(f_pop));
  out_fifo #(.DW(64), .AW(FAW)) u_fifo (.clk, .rst, .push(pv[2] && keep), .wdata(pipe[2]), .pop(f_pop),
    .rdata(f_rdata), .count(f_count), .full(f_full), .empty(f_empty), .overflow(f_ovf));
  mem_model #(.MAW(12)) u_mem (.clk, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
                               .ack(m_ack), .rdata(m_rdata));

  always #5 clk = !clk;

  // accelerator model: 3-cycle pipeline, one result per write
  always @(posedge clk) begin
    pipe[0] <= dw_data + 64'd1;
    pipe[1] <= pipe[0];
    pipe[2] <= pipe[1];
    pv      <= {pv[1:0], dw_valid};
    if (dw_valid) writes++;
    if (f_ovf && !rst) ovf++;
    if (done && !rst) dones++;
  end
  // a drain round starts when the engine switches from settling to draining
  logic was_settle = 0;
  always @(posedge clk) begin
    was_settle <= (dut.state == dock_pkg::DMA_SETTLE);
    if (was_settle && dut.state == dock_pkg::DMA_DRAIN) rounds++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [31:0] s, input logic [31:0] d, input int n, input bit cap);
    int t = 0;
    src = s; dst = d; len = 24'(n); capture = cap; start = 1;
    @(posedge clk); #1 start = 0;
    while (!done && t < 100000) begin @(posedge clk); #1; t++; end
    check(done, "transfer completes");
    @(posedge clk); #1;
    check(!busy, "idle after done");
  endtask

  // descriptor at word w: source, destination, length, next
  task automatic desc(input int w, input logic [31:0] s, input logic [31:0] d, input int n,
                      input logic [31:0] nxt);
    u_mem.mem[w]     = 64'(s);
    u_mem.mem[w + 1] = 64'(d);
    u_mem.mem[w + 2] = 64'(n);
    u_mem.mem[w + 3] = 64'(nxt);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    pv = '0;
    for (int i = 0; i < 3; i++) pipe[i] = '0;
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // block-interleaved transfer: 200 words through a 31-entry FIFO
    n = 200;
    for (int i = 0; i < n; i++) u_mem.mem[i] = {$urandom, $urandom};
    run(32'h0, 32'h2000, n, 1);
    for (int i = 0; i < n; i++)
      check(u_mem.mem[1024 + i] == u_mem.mem[i] + 64'd1, $sformatf("word %0d", i));
    check(u_mem.mem[1024 + n] == 64'd0, "nothing written past the end");
    check(rounds >= 200 / 31, $sformatf("fill/drain rounds = %0d", rounds));
    check(ovf == 0, "no FIFO overflow");
    check(writes == n, "one dock write per word");
    // plain transfer: writes only, nothing captured
    writes = 0;
    run(32'h0, 32'h2000, 10, 0);
    check(writes == 10, "plain transfer writes");
    repeat (5) @(posedge clk); #1;
    check(f_count == 10, "plain transfer leaves results queued");
    // drain-only transfer of results already queued
    run(32'h0, 32'h3000, 0, 1);
    check(f_empty, "drain-only leaves FIFO empty");
    for (int i = 0; i < 10; i++)
      check(u_mem.mem[1536 + i] == u_mem.mem[i] + 64'd1, "drain-only moved queued result");
    // scatter-gather: three descriptors at word 2048 (byte 0x4000), four words each
    desc(2048, 32'h000, 32'h5000, 40, 32'h4020);  // words 0..39    -> word 2560
    desc(2052, 32'h320, 32'h5460, 5,  32'h4040);  // words 100..104 -> word 2700
    desc(2056, 32'h4B0, 32'h5780, 60, 32'h0);     // words 150..209 -> word 2800
    dones = 0; writes = 0; rounds = 0;
    chain = 1;
    run(32'h4000, 32'h0, 0, 1);
    chain = 0;
    check(dones == 1, "one done for the whole chain");
    check(writes == 105, "chain: one dock write per word");
    check(rounds >= 3, "chain: each block drained");
    for (int i = 0; i < 40; i++)
      check(u_mem.mem[2560 + i] == u_mem.mem[i] + 64'd1, $sformatf("chain block 0 word %0d", i));
    for (int i = 0; i < 5; i++)
      check(u_mem.mem[2700 + i] == u_mem.mem[100 + i] + 64'd1, $sformatf("chain block 1 word %0d", i));
    for (int i = 0; i < 60; i++)
      check(u_mem.mem[2800 + i] == u_mem.mem[150 + i] + 64'd1, $sformatf("chain block 2 word %0d", i));
    check(u_mem.mem[2600] == 0 && u_mem.mem[2705] == 0 && u_mem.mem[2860] == 0,
          "chain: nothing written past each block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
