// End-to-end test of both systems at the default sizes (2047-entry output FIFO).
//
// 32-bit system, CPU-driven over its bus: the pattern matcher scans an image band and
// every result is checked against a direct count; then the area is reconfigured for
// brightness, blending and fade and each is checked with random pixels; then for the key
// hash, checked on one key.
// 64-bit system: SHA-1 of "abc" sent with 32-bit (half-word lane) stores; brightness on
// 3000 64-bit words by block-interleaved DMA, which must stop at the FIFO high mark and
// drain at least twice; CPU-driven capture until the FIFO is full and overflows; a
// drain-only DMA; a scatter-gather DMA over a chain of two descriptors; interrupts raised
// and cleared.
// Each mechanism is counted and a mechanism that never happened counts as a failure.
module tb_dynreconf_top;
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
  // mechanism counters
  int n_strobe32 = 0, n_strobe64 = 0, n_reconf = 0, n_drain = 0, n_highmark = 0;
  int n_full = 0, n_ovf = 0, n_irq = 0, n_pack = 0, n_sha_block = 0, n_desc = 0, n_hash = 0;

  dynreconf_top dut (.*);
  mem_model #(.MAW(14)) u_mem (.clk(clk64), .req(dma_req), .we(dma_we), .addr(dma_addr),
                               .wdata(dma_wdata), .ack(dma_ack), .rdata(dma_rdata));

  always #10 clk32 = !clk32;  // 50 MHz
  always #5  clk64 = !clk64;  // 100 MHz

  // mechanism monitors
  logic was_settle = 0, irq_q = 0;
  always @(posedge clk32) if (!rst32 && dut.c32_wr) n_strobe32++;
  always @(posedge clk64) if (!rst64) begin
    if (dut.c64_wr) n_strobe64++;
    was_settle <= (dut.u_plb_dock.u_dma.state == DMA_SETTLE);
    if (was_settle && dut.u_plb_dock.u_dma.state == DMA_DRAIN) n_drain++;
    if (dut.u_plb_dock.u_dma.state == DMA_PUSH && dut.u_plb_dock.f_count >= 11'(2047 - 16)) n_highmark++;
    if (dut.u_plb_dock.f_full && !dut.u_plb_dock.full_q) n_full++;
    if (dut.u_plb_dock.f_ovf) n_ovf++;
    irq_q <= irq64;
    if (irq64 && !irq_q) n_irq++;
    if (dut.u_da64.g_sha1.u_sha.dout_valid) n_sha_block++;
    if (dut.u_plb_dock.u_dma.state == DMA_DESC && dma_ack && dut.u_plb_dock.u_dma.didx_q == 2'd3)
      n_desc++;
  end
  always @(posedge clk32) if (!rst32 && dut.u_da32.u_bl.dout_valid) n_pack++;
  always @(posedge clk32) if (!rst32 && dut.u_da32.u_kh.dout_valid) n_hash++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- 32-bit system bus access
  task automatic opb(input bit we, input logic [7:0] off, input logic [31:0] wd,
                     output logic [31:0] rd);
    int cyc = 0;
    opb_req = 1; opb_we = we; opb_addr = BASE | 32'(off); opb_wdata = wd;
    do begin @(posedge clk32); #1; cyc++; end while (!opb_ack && cyc < 20);
    check(opb_ack, "32-bit bus ack");
    rd = opb_rdata;
    opb_req = 0;
    @(posedge clk32); #1;
  endtask
  task automatic w32(input logic [31:0] v);
    logic [31:0] rd;
    opb(1, 8'h0, v, rd);
  endtask
  task automatic r32(output logic [31:0] v);
    opb(0, 8'h0, '0, v);
  endtask
  task automatic reconf32(input cfg_e c);
    cfg32 = c; n_reconf++;
    repeat (2) @(posedge clk32); #1;
  endtask

  // ---- 64-bit system bus access
  task automatic plb(input bit we, input logic [7:0] off, input logic [7:0] be,
                     input logic [63:0] wd, output logic [63:0] rd);
    int cyc = 0;
    plb_req = 1; plb_we = we; plb_addr = BASE | 32'(off); plb_be = be; plb_wdata = wd;
    do begin @(posedge clk64); #1; cyc++; end while (!plb_ack && cyc < 20);
    check(plb_ack, "64-bit bus ack");
    rd = plb_rdata;
    plb_req = 0;
    @(posedge clk64); #1;
  endtask
  task automatic w64(input logic [7:0] off, input logic [63:0] v);
    logic [63:0] rd;
    plb(1, off, 8'hFF, v, rd);
  endtask
  task automatic r64(input logic [7:0] off, output logic [63:0] v);
    plb(0, off, 8'hFF, '0, v);
  endtask
  // a 32-bit CPU store into the lower half of the data register
  task automatic st32(input logic [31:0] v);
    logic [63:0] rd;
    plb(1, 8'h04, 8'h0F, {32'h0, v}, rd);
  endtask
  task automatic wait_irq(input int limit);
    int t = 0;
    while (!irq64 && t < limit) begin @(posedge clk64); #1; t++; end
    check(irq64, "interrupt");
  endtask

  // ---- reference models
  function automatic logic [7:0] bright(input logic [7:0] p, input int k);
    int s = int'(p) + k;
    return (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : 8'(s);
  endfunction
  function automatic logic [7:0] fade(input logic [7:0] a, input logic [7:0] b, input int f);
    int prod = (int'(a) - int'(b)) * f;
    int q = (prod >= 0) ? prod / 256 : -((-prod + 255) / 256);
    return 8'(int'(b) + q);
  endfunction

  initial begin
    repeat (400000) @(posedge clk64);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- 32-bit system ----------------
  bit done32 = 0;
  initial begin
    logic [7:0] pat [8];
    logic [7:0] cols [$];
    logic [31:0] r, v, v2;
    int k, f, e;
    repeat (3) @(posedge clk32);
    #1 rst32 = 0;
    // pattern matching over a 64-column band
    reconf32(CFG_PATTERN);
    for (int i = 0; i < 8; i++) begin
      pat[i] = 8'($urandom);
      w32({1'b1, 4'b0, 3'(i), 16'b0, pat[i]});
    end
    for (int c = 0; c < 64; c++) begin
      cols.push_back(8'($urandom));
      w32({24'b0, cols[$]});
      repeat (2) @(posedge clk32); #1;
      r32(r);
      e = 0;
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          if (((cols.size() > j) ? cols[cols.size() - 1 - j][i] : 1'b0) == pat[i][j]) e++;
      check(r == 32'(e), $sformatf("pattern count %0d expected %0d", r, e));
    end
    // brightness
    reconf32(CFG_BRIGHTNESS);
    k = -40;
    w32(32'(k));
    repeat (50) begin
      v = $urandom; w32(v); r32(r);
      for (int p = 0; p < 4; p++) check(r[8*p +: 8] == bright(v[8*p +: 8], k), "32-bit brightness");
    end
    // blending
    reconf32(CFG_BLEND);
    repeat (50) begin
      v = $urandom; v2 = $urandom;
      w32(v); w32(v2); r32(r);
      for (int p = 0; p < 2; p++) begin
        check(r[8*p +: 8] == bright(v[8*p +: 8], int'(v[16 + 8*p +: 8])), "32-bit blend low");
        check(r[16 + 8*p +: 8] == bright(v2[8*p +: 8], int'(v2[16 + 8*p +: 8])), "32-bit blend high");
      end
    end
    // fade
    reconf32(CFG_FADE);
    f = 77;
    w32(32'(f));
    repeat (50) begin
      v = $urandom; v2 = $urandom;
      w32(v); w32(v2); r32(r);
      for (int p = 0; p < 2; p++) begin
        check(r[8*p +: 8] == fade(v[8*p +: 8], v[16 + 8*p +: 8], f), "32-bit fade low");
        check(r[16 + 8*p +: 8] == fade(v2[8*p +: 8], v2[16 + 8*p +: 8], f), "32-bit fade high");
      end
    end
    // key hash of a 36-byte key, k[i] = (37 i + 11) mod 256, initial value 0x12345678; the
    // expected value is a fixed result of the hash's reference C code
    reconf32(CFG_HASH);
    w32(32'd36);
    w32(32'h1234_5678);
    for (int i = 0; i < 9; i++)
      w32({8'((37 * (4*i + 3) + 11) & 255), 8'((37 * (4*i + 2) + 11) & 255),
           8'((37 * (4*i + 1) + 11) & 255), 8'((37 * (4*i) + 11) & 255)});
    r32(r);
    check(r == 32'hC64E6D90, "32-bit key hash");
    done32 = 1;
  end

  // ---------------- 64-bit system ----------------
  initial begin
    logic [31:0] abc [16];
    logic [31:0] h [5];
    logic [63:0] r;
    int k, n;
    for (int i = 0; i < 2**14; i++) u_mem.mem[i] = '0;
    repeat (3) @(posedge clk64);
    #1 rst64 = 0;
    w64(8'h30, 64'h0700);  // enable interrupts
    // SHA-1 of "abc" with 32-bit CPU stores
    cfg64 = CFG_SHA1; n_reconf++;
    repeat (2) @(posedge clk64); #1;
    abc = '{32'h61626380, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h00000018};
    h = '{32'hA9993E36, 32'h4706816A, 32'hBA3E2571, 32'h7850C26C, 32'h9CD0D89D};
    st32(32'h1000_0000);
    for (int i = 0; i < 16; i++) st32(abc[i]);
    repeat (90) @(posedge clk64); #1;
    for (int i = 0; i < 5; i++) begin
      st32(32'h3000_0000 | 32'(i));
      r64(8'h00, r);
      check(r[31:0] == h[i], $sformatf("SHA-1 H%0d", i));
    end
    // brightness by block-interleaved DMA: 3000 words through the 2047-entry FIFO
    cfg64 = CFG_BRIGHTNESS; n_reconf++;
    repeat (2) @(posedge clk64); #1;
    k = 25;
    w64(8'h00, 64'(k));
    n = 3000;
    for (int i = 0; i < n; i++) u_mem.mem[i] = {$urandom, $urandom};
    w64(8'h10, 64'h0);       // source: word 0
    w64(8'h18, 64'h8000);    // destination: word 4096
    w64(8'h20, 64'(n));
    w64(8'h28, 64'h3);       // capture + start
    wait_irq(200000);
    for (int i = 0; i < n; i++)
      for (int p = 0; p < 8; p++)
        if (u_mem.mem[4096 + i][8*p +: 8] != bright(u_mem.mem[i][8*p +: 8], k))
          check(0, $sformatf("DMA brightness word %0d", i));
    check(1, "DMA brightness words");
    check(u_mem.mem[4096 + n] == '0, "DMA wrote nothing past the end");
    r64(8'h30, r);
    check(r[0] && !r[2], "done pending, no overflow");
    w64(8'h30, 64'h0707);
    // CPU-driven capture until the FIFO is full and then overflows
    for (int i = 0; i < 2048; i++) w64(8'h00, 64'(i));
    repeat (3) @(posedge clk64); #1;
    r64(8'h28, r);
    check(r[16] == 1'b1 && r[14:4] == 11'd2047, "FIFO full at 2047");
    check(irq64, "full/overflow interrupt");
    r64(8'h30, r);
    check(r[1] && r[2], "full and overflow pending");
    w64(8'h30, 64'h0707);
    // drain-only DMA to word 8192
    w64(8'h18, 64'h10000);
    w64(8'h20, 64'h0);
    w64(8'h28, 64'h3);
    wait_irq(100000);
    for (int i = 0; i < 2047; i++)
      for (int p = 0; p < 8; p++)
        if (u_mem.mem[8192 + i][8*p +: 8] != bright(8'(i >> (8*p)), k))
          check(0, $sformatf("drained word %0d", i));
    check(1, "drained words");
    r64(8'h28, r);
    check(r[15] == 1'b1, "FIFO empty after drain");
    // scatter-gather: brightness on two blocks, descriptors at words 12000 and 12004
    w64(8'h30, 64'h0707);
    u_mem.mem[12000] = 64'h0;     u_mem.mem[12001] = 64'h13880;  // words 0..99 -> 10000
    u_mem.mem[12002] = 64'd100;   u_mem.mem[12003] = 64'h17720;
    u_mem.mem[12004] = 64'hFA0;   u_mem.mem[12005] = 64'h13EC0;  // words 500..549 -> 10200
    u_mem.mem[12006] = 64'd50;    u_mem.mem[12007] = 64'h0;
    w64(8'h10, 64'h17700);
    w64(8'h28, 64'h7);       // chain + capture + start
    wait_irq(100000);
    for (int i = 0; i < 150; i++) begin
      k = (i < 100) ? i : 400 + i;   // source word of output i
      for (int p = 0; p < 8; p++)
        if (u_mem.mem[10000 + (i < 100 ? i : 100 + i)][8*p +: 8] != bright(u_mem.mem[k][8*p +: 8], 25))
          check(0, $sformatf("chained DMA output %0d", i));
    end
    check(1, "chained DMA words");
    w64(8'h30, 64'h0707);
    wait (done32);
    // every named mechanism must have happened
    check(n_strobe32 > 0, "32-bit write strobes");
    check(n_strobe64 > 0, "64-bit write strobes");
    check(n_reconf >= 6, "reconfigurations");
    check(n_drain >= 2, $sformatf("DMA fill/drain rounds = %0d", n_drain));
    check(n_highmark >= 1, "DMA stopped at the FIFO high mark");
    check(n_full >= 1, "FIFO full");
    check(n_ovf >= 1, "FIFO overflow");
    check(n_irq >= 3, "interrupts");
    check(n_pack >= 1, "packed blend results");
    check(n_sha_block >= 1, "SHA-1 blocks");
    check(n_desc >= 2, "DMA descriptors read");
    check(n_hash >= 1, "key hashes");
    $display("mechanisms: strobe32=%0d strobe64=%0d reconf=%0d drain=%0d highmark=%0d full=%0d ovf=%0d irq=%0d pack=%0d sha=%0d desc=%0d hash=%0d",
             n_strobe32, n_strobe64, n_reconf, n_drain, n_highmark, n_full, n_ovf, n_irq, n_pack, n_sha_block,
             n_desc, n_hash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
