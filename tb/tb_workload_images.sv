// Workload: the image tasks of the published 64-bit measurements on 256 x 256 grayscale
// images (8-bit pixels), run by DMA through the 64-bit dock: brightness adjustment, additive
// blending and the fade effect. Brightness streams the image as it is stored. For blending
// and fading the CPU first combines the two images, four pixels of each per 64-bit word
// (the data preparation step), and the accelerator packs the results of two words into one.
// The same three tasks also run on the 32-bit system with CPU-controlled transfers: one
// store and one load per four pixels for brightness, and for the two-image tasks two stores
// (two pixels of each image per word) and one load per four output pixels. Every output
// pixel is compared with a model. Bus cycles per output pixel are printed.
module tb_workload_images;
  localparam int MAW = 16, MAXLAT = 1;
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

  localparam int NPIX = 256 * 256;
  localparam int NW = NPIX / 8;      // 64-bit words per image
  // memory map in 64-bit words
  localparam int IMG_A = 0, IMG_B = NW, PREP = 2 * NW, OUT = 4 * NW;

  function automatic logic [7:0] bright(input logic [7:0] p, input int k);
    int s = int'(p) + k;
    return (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : 8'(s);
  endfunction
  function automatic logic [7:0] fade(input logic [7:0] a, input logic [7:0] b, input int f);
    int prod = (int'(a) - int'(b)) * f;
    int q = (prod >= 0) ? prod / 256 : -((-prod + 255) / 256);
    return 8'(int'(b) + q);
  endfunction
  function automatic logic [7:0] pix(input int base, input int i);
    return u_mem.mem[base + i / 8][8 * (i % 8) +: 8];
  endfunction

  // data preparation: word j holds pixels 4j..4j+3 of A (low half) and of B (high half)
  task automatic prepare();
    for (int j = 0; j < 2 * NW; j++)
      u_mem.mem[PREP + j] = {u_mem.mem[IMG_B + j / 2][32 * (j % 2) +: 32],
                             u_mem.mem[IMG_A + j / 2][32 * (j % 2) +: 32]};
  endtask

  int opb_cycles = 0;  // clk32 cycles spent in 32-bit bus accesses so far
  task automatic opb(input bit we, input logic [31:0] wd, output logic [31:0] rd);
    int cyc = 0;
    opb_req = 1; opb_we = we; opb_addr = BASE; opb_wdata = wd;
    do begin @(posedge clk32); #1; cyc++; end while (!opb_ack && cyc < 20);
    rd = opb_rdata;
    opb_req = 0;
    opb_cycles += cyc;
  endtask
  task automatic reconf32(input cfg_e c);
    cfg32 = CFG_EMPTY;
    repeat (2) @(posedge clk32); #1;
    cfg32 = c;
    repeat (2) @(posedge clk32); #1;
  endtask
  // 32-bit run of one task (0 brightness, 1 blend, 2 fade); returns wrong pixels and cycles
  task automatic run32(input int task_id, input int konst, output int bad, output int cyc);
    logic [31:0] r, a4, b4;
    logic [7:0]  want;
    int t0, x;
    reconf32(task_id == 0 ? CFG_BRIGHTNESS : task_id == 1 ? CFG_BLEND : CFG_FADE);
    if (task_id != 1) opb(1, 32'(konst), r);
    bad = 0;
    t0 = opb_cycles;
    for (int q = 0; q < NPIX / 4; q++) begin
      a4 = u_mem.mem[IMG_A + q / 2][32 * (q % 2) +: 32];
      b4 = u_mem.mem[IMG_B + q / 2][32 * (q % 2) +: 32];
      if (task_id == 0) opb(1, a4, r);
      else begin
        opb(1, {b4[15:0], a4[15:0]}, r);
        opb(1, {b4[31:16], a4[31:16]}, r);
      end
      opb(0, '0, r);
      for (int p = 0; p < 4; p++) begin
        if (task_id == 0) want = bright(a4[8*p +: 8], konst);
        else if (task_id == 1) begin
          x = int'(a4[8*p +: 8]) + int'(b4[8*p +: 8]);
          want = (x > 255) ? 8'd255 : 8'(x);
        end else want = fade(a4[8*p +: 8], b4[8*p +: 8], konst);
        if (r[8*p +: 8] != want) bad++;
      end
    end
    cyc = opb_cycles - t0;
  endtask

  initial begin
    repeat (6000000) @(posedge clk64);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, bad, x, y, f;
    int fades [3] = '{0, 96, 256};
    logic [7:0] want;
    // image A: gradient with a bright square; image B: diagonal stripes
    for (int i = 0; i < NPIX; i++) begin
      x = i % 256; y = i / 256;
      want = (x >= 96 && x < 160 && y >= 96 && y < 160) ? 8'd250 : 8'(x);
      u_mem.mem[IMG_A + i / 8][8 * (i % 8) +: 8] = want;
      u_mem.mem[IMG_B + i / 8][8 * (i % 8) +: 8] = (((x + y) / 16) % 2 == 1) ? 8'd200 : 8'(y / 4);
    end
    repeat (3) @(posedge clk64);
    #1 rst32 = 0; rst64 = 0;
    w64(8'h30, 64'h0100);

    // brightness adjustment, constant -40
    reconf64(CFG_BRIGHTNESS);
    w64(8'h00, 64'hD8);
    dma(32'(IMG_A * 8), 32'(OUT * 8), NW, 1, cyc);
    bad = 0;
    for (int i = 0; i < NPIX; i++) if (pix(OUT, i) != bright(pix(IMG_A, i), -40)) bad++;
    check(bad == 0, $sformatf("brightness: %0d wrong pixels", bad));
    $display("brightness: %0d output pixels, %0d bus cycles, %.4f cycles (%.4f us) per pixel",
             NPIX, cyc, real'(cyc) / NPIX, real'(cyc) / NPIX / 100.0);

    // additive blending
    prepare();
    reconf64(CFG_BLEND);
    dma(32'(PREP * 8), 32'(OUT * 8), 2 * NW, 1, cyc);
    bad = 0;
    for (int i = 0; i < NPIX; i++) begin
      x = int'(pix(IMG_A, i)) + int'(pix(IMG_B, i));
      want = (x > 255) ? 8'd255 : 8'(x);
      if (pix(OUT, i) != want) bad++;
    end
    check(bad == 0, $sformatf("blend: %0d wrong pixels", bad));
    $display("blend:      %0d output pixels, %0d bus cycles, %.4f cycles (%.4f us) per pixel",
             NPIX, cyc, real'(cyc) / NPIX, real'(cyc) / NPIX / 100.0);

    // fade effect at three points of a fade (F = 0, 96, 256)
    foreach (fades[n]) begin
      f = fades[n];
      reconf64(CFG_EMPTY);   // reloading the same configuration restarts it from reset
      reconf64(CFG_FADE);
      w64(8'h00, 64'(f));
      dma(32'(PREP * 8), 32'(OUT * 8), 2 * NW, 1, cyc);
      bad = 0;
      for (int i = 0; i < NPIX; i++) if (pix(OUT, i) != fade(pix(IMG_A, i), pix(IMG_B, i), f)) bad++;
      check(bad == 0, $sformatf("fade F=%0d: %0d wrong pixels", f, bad));
      $display("fade F=%3d: %0d output pixels, %0d bus cycles, %.4f cycles (%.4f us) per pixel",
               f, NPIX, cyc, real'(cyc) / NPIX, real'(cyc) / NPIX / 100.0);
    end

    // the 32-bit system, CPU-controlled transfers
    foreach (fades[n]) begin
      run32(n, n == 0 ? -40 : 96, bad, cyc);
      check(bad == 0, $sformatf("32-bit task %0d: %0d wrong pixels", n, bad));
      $display("32-bit %s: %0d output pixels, %0d bus cycles, %.2f cycles (%.4f us) per pixel",
               n == 0 ? "brightness" : n == 1 ? "blend" : "fade F=96", NPIX, cyc,
               real'(cyc) / NPIX, real'(cyc) / NPIX / 50.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
