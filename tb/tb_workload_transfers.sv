// Workload: the transfer sequences of the published measurements, 1 to 100000 operations of
// write, read and interleaved write/read, on both systems. CPU-controlled transfers are single
// bus accesses. DMA transfers move 64-bit words: writes stream words into the dock, reads
// drain results queued in the output FIFO, and the interleaved case runs block-wise through
// the FIFO. Bus cycles per operation are printed, and for the longer sequences checked against
// the rates the original hardware reached including software: 0.05, 0.04 and 0.09 us per
// 64-bit DMA operation at 100 MHz, i.e. 5, 4 and 9 bus cycles. The brightness accelerator
// (constant +1) is loaded so that each word written produces one checkable result.
module tb_workload_transfers;
  localparam int MAW = 18, MAXLAT = 1;
  import dock_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk32 = 0, rst32 = 1, clk64 = 0, rst64 = 1;
  logic [2:0]  cfg32 = CFG_EMPTY, cfg64 = CFG_EMPTY;
  logic        opb_req = 0, opb_we = 0, opb_ack;
  logic [31:0] opb_addr = '0, opb_wdata = '0, opb_rdata;
  logic        plb_req = 0, plb_we = 0, plb_ack;
  logic [31:0] plb_addr = '0;
  logic [7:0]  plb_be = '0;
  logic [63:0] plb_wdata = '0, plb_rdata;
  logic        dma_req, dma_we, dma_ack, irq64;
  logic [31:0] dma_addr;
  logic [63:0] dma_wdata, dma_rdata;
  int checks = 0, failures = 0;

  dynreconf_top dut (.*);
  mem_model #(.MAW(MAW), .MAXLAT(MAXLAT)) u_mem (.clk(clk64), .req(dma_req), .we(dma_we),
    .addr(dma_addr), .wdata(dma_wdata), .ack(dma_ack), .rdata(dma_rdata));

  always #10 clk32 = !clk32;  // 50 MHz
  always #5  clk64 = !clk64;  // 100 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic plb(input bit we, input logic [7:0] off, input logic [7:0] be,
                     input logic [63:0] wd, output logic [63:0] rd);
    int cyc = 0;
    plb_req = 1; plb_we = we; plb_addr = BASE | 32'(off); plb_be = be; plb_wdata = wd;
    do begin @(posedge clk64); #1; cyc++; end while (!plb_ack && cyc < 20);
    rd = plb_rdata;
    plb_req = 0;
  endtask
  task automatic w64(input logic [7:0] off, input logic [63:0] v);
    logic [63:0] rd;
    plb(1, off, 8'hFF, v, rd);
    @(posedge clk64); #1;
  endtask
  task automatic r64(input logic [7:0] off, output logic [63:0] v);
    plb(0, off, 8'hFF, '0, v);
    @(posedge clk64); #1;
  endtask
  task automatic st32(input logic [31:0] v);
    logic [63:0] rd;
    plb(1, 8'h04, 8'h0F, {32'h0, v}, rd);
    @(posedge clk64); #1;
  endtask
  // run a programmed DMA transfer and return the bus cycles until its done interrupt
  task automatic dma(input logic [31:0] src, input logic [31:0] dst, input int n,
                     input bit capture, output int cycles);
    logic [63:0] r;
    w64(8'h10, 64'(src));
    w64(8'h18, 64'(dst));
    w64(8'h20, 64'(n));
    plb(1, 8'h28, 8'hFF, {62'b0, capture, 1'b1}, r);
    cycles = 0;
    while (!irq64 && cycles < 5000000) begin @(posedge clk64); #1; cycles++; end
    check(irq64, "DMA done interrupt");
    w64(8'h30, 64'h0707);
  endtask
  task automatic reconf64(input cfg_e c);
    cfg64 = c;
    repeat (2) @(posedge clk64); #1;
  endtask

  int opb_cycles = 0;  // clk32 cycles spent in bus accesses so far
  task automatic opb(input bit we, input logic [31:0] wd, output logic [31:0] rd);
    int cyc = 0;
    opb_req = 1; opb_we = we; opb_addr = BASE; opb_wdata = wd;
    do begin @(posedge clk32); #1; cyc++; end while (!opb_ack && cyc < 20);
    rd = opb_rdata;
    opb_req = 0;
    opb_cycles += cyc;
  endtask

  function automatic logic [63:0] plus1(input logic [63:0] v);
    for (int p = 0; p < 8; p++) if (v[8*p +: 8] != 8'hFF) v[8*p +: 8] = v[8*p +: 8] + 8'd1;
    return v;
  endfunction

  initial begin
    repeat (10000000) @(posedge clk64);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int counts [6] = '{1, 10, 100, 1000, 10000, 100000};
    int n, m, cyc, cw, cr, cwr;
    longint t0;
    logic [31:0] r32;
    for (int i = 0; i < 2**MAW; i++) u_mem.mem[i] = 64'(i);
    repeat (3) @(posedge clk64);
    #1 rst32 = 0; rst64 = 0;
    cfg32 = CFG_BRIGHTNESS;
    reconf64(CFG_BRIGHTNESS);
    opb(1, 32'd1, r32);          // brightness constant +1 (32-bit system)
    w64(8'h00, 64'd1);           // brightness constant +1 (64-bit system)
    w64(8'h30, 64'h0100);        // DMA-done interrupt enabled
    $display("   ops | 32-bit CPU cycles/op: w     r   w/r | 64-bit DMA cycles/op: w     r   w/r");
    foreach (counts[k]) begin
      n = counts[k];
      // CPU-controlled, 32-bit system (bus cycles at 50 MHz)
      t0 = opb_cycles; for (int i = 0; i < n; i++) opb(1, 32'(i), r32);
      cw = int'(opb_cycles - t0);
      t0 = opb_cycles; for (int i = 0; i < n; i++) opb(0, '0, r32);
      cr = int'(opb_cycles - t0);
      check(r32 == 32'(plus1(64'(n - 1))), "32-bit result of the last write");
      t0 = opb_cycles;
      for (int i = 0; i < n; i++) begin opb(1, 32'(i), r32); opb(0, '0, r32); end
      cwr = int'(opb_cycles - t0);
      $write("%6d | %25.2f %5.2f %5.2f |", n, real'(cw) / n, real'(cr) / n, real'(cwr) / n);
      // DMA write only
      dma(32'h0, 32'h0, n, 0, cw);
      if (n >= 1000) check(cw <= 5 * n, "DMA write rate");
      // DMA read only: results queued by CPU writes with capture on, then a drain-only transfer
      m = (n > 2000) ? 2000 : n;   // below the FIFO-full interrupt level
      w64(8'h28, 64'h2);
      for (int i = 0; i < m; i++) w64(8'h00, 64'(i));
      dma(32'h0, 32'h1C0000, 0, 1, cr);
      check(u_mem.mem[229376 + m - 1] == plus1(64'(m - 1)), "drained result");
      if (n >= 1000) check(cr <= 4 * m, "DMA read rate");
      // DMA write/read, block-interleaved through the FIFO
      dma(32'h0, 32'h100000, n, 1, cwr);
      for (int i = 0; i < n; i += (n / 10 + 1))
        check(u_mem.mem[131072 + i] == plus1(64'(i)), $sformatf("DMA result %0d", i));
      if (n >= 1000) check(cwr <= 9 * n, "DMA write/read rate");
      $display(" %21.2f %5.2f %5.2f", real'(cw) / n, real'(cr) / m, real'(cwr) / n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
