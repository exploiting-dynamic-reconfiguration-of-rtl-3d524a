// Workload: the key hash on keys of 36, 360, 3600, 36000 and 360000 bytes, the sizes of the
// published hash measurements. Each key is sent by CPU transfers on both systems: 32-bit
// bus writes on the 32-bit system, and 32-bit stores into the 64-bit dock on the 64-bit
// system. The hash read back right after the last word is compared with a behavioural
// model of the hash. Bus cycles per key are printed.
module tb_workload_hash;
  localparam int MAW = 4, MAXLAT = 1;
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

  task automatic opb(input bit we, input logic [31:0] wd, output logic [31:0] rd);
    int cyc = 0;
    opb_req = 1; opb_we = we; opb_addr = BASE; opb_wdata = wd;
    do begin @(posedge clk32); #1; cyc++; end while (!opb_ack && cyc < 20);
    rd = opb_rdata;
    opb_req = 0;
  endtask

  function automatic logic [95:0] ref_mix(input logic [31:0] a, input logic [31:0] b,
                                          input logic [31:0] c);
    int sh [9] = '{13, 8, 13, 12, 16, 5, 3, 10, 15};
    for (int r = 0; r < 9; r++) begin
      unique case (r % 3)
        0: begin a = a - b; a = a - c; a = a ^ (c >> sh[r]); end
        1: begin b = b - c; b = b - a; b = b ^ (a << sh[r]); end
        default: begin c = c - a; c = c - b; c = c ^ (b >> sh[r]); end
      endcase
    end
    return {a, b, c};
  endfunction

  function automatic logic [31:0] ref_hash(input byte unsigned k [], input logic [31:0] init);
    logic [31:0] a, b, c;
    int len, p;
    a = 32'h9E3779B9; b = a; c = init;
    len = k.size(); p = 0;
    while (len >= 12) begin
      for (int i = 0; i < 4; i++) begin
        a += 32'(k[p + i]) << (8 * i);
        b += 32'(k[p + 4 + i]) << (8 * i);
        c += 32'(k[p + 8 + i]) << (8 * i);
      end
      {a, b, c} = ref_mix(a, b, c);
      p += 12; len -= 12;
    end
    c += 32'(k.size());
    for (int i = 0; i < len; i++) begin
      if (i < 4)      a += 32'(k[p + i]) << (8 * i);
      else if (i < 8) b += 32'(k[p + i]) << (8 * (i - 4));
      else            c += 32'(k[p + i]) << (8 * (i - 7));
    end
    {a, b, c} = ref_mix(a, b, c);
    return c;
  endfunction

  initial begin
    repeat (5000000) @(posedge clk64);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [5] = '{36, 360, 3600, 36000, 360000};
    byte unsigned k [];
    logic [31:0] w, init, want, r32;
    logic [63:0] r;
    longint t0;
    repeat (3) @(posedge clk64);
    #1 rst32 = 0; rst64 = 0;
    foreach (lens[n]) begin
      k = new[lens[n]];
      foreach (k[i]) k[i] = 8'($urandom);
      init = $urandom;
      want = ref_hash(k, init);
      // 32-bit system
      cfg32 = CFG_EMPTY; repeat (2) @(posedge clk32); #1;
      cfg32 = CFG_HASH;  repeat (2) @(posedge clk32); #1;
      t0 = $time;
      opb(1, 32'(lens[n]), r32);
      opb(1, init, r32);
      for (int i = 0; i < lens[n] / 4; i++) begin
        w = {k[4*i + 3], k[4*i + 2], k[4*i + 1], k[4*i]};
        opb(1, w, r32);
      end
      opb(0, '0, r32);
      check(r32 == want, $sformatf("32-bit system, %0d-byte key", lens[n]));
      $display("32-bit system: %6d-byte key, %7d bus cycles (%.3f ms at 50 MHz)", lens[n],
               ($time - t0) / 20, real'($time - t0) / 1.0e6);
      // 64-bit system
      reconf64(CFG_EMPTY);
      reconf64(CFG_HASH);
      t0 = $time;
      st32(32'(lens[n]));
      st32(init);
      for (int i = 0; i < lens[n] / 4; i++) st32({k[4*i + 3], k[4*i + 2], k[4*i + 1], k[4*i]});
      r64(8'h00, r);
      check(r[31:0] == want, $sformatf("64-bit system, %0d-byte key", lens[n]));
      $display("64-bit system: %6d-byte key, %7d bus cycles (%.3f ms at 100 MHz)", lens[n],
               ($time - t0) / 10, real'($time - t0) / 1.0e6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
