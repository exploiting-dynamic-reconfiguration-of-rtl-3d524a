// Workload: SHA-1 of messages of 64, 640, 6400, 64000 and 640000 bytes on the 64-bit system,
// the sizes of the published SHA-1 measurements. The CPU pads the message, sends each 512-bit
// block as a command word and sixteen 32-bit stores, polls the busy flag, and reads H0..H4
// at the end. The digest is compared with a behavioural SHA-1 model in this testbench, which
// is itself checked first against the standard "abc" test vector. Bus cycles per message
// are printed.
module tb_workload_sha1;
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

  typedef logic [31:0] digest_t [5];

  function automatic logic [31:0] rotl(input logic [31:0] x, input int n);
    return (x << n) | (x >> (32 - n));
  endfunction

  // padded message as 32-bit big-endian words
  function automatic void pad(input byte unsigned msg [], ref logic [31:0] wds []);
    int nb;
    longint bits;
    nb = ((msg.size() + 8) / 64 + 1) * 64;
    bits = longint'(msg.size()) * 8;
    wds = new[nb / 4];
    for (int i = 0; i < nb / 4; i++) wds[i] = '0;
    for (int i = 0; i < msg.size(); i++) wds[i / 4][8 * (3 - i % 4) +: 8] = msg[i];
    wds[msg.size() / 4][8 * (3 - msg.size() % 4) +: 8] = 8'h80;
    wds[nb / 4 - 2] = bits[63:32];
    wds[nb / 4 - 1] = bits[31:0];
  endfunction

  function automatic digest_t sha1_ref(input logic [31:0] wds []);
    digest_t h;
    logic [31:0] w [80];
    logic [31:0] a, b, c, d, e, f, k, tmp;
    h = '{32'h67452301, 32'hEFCDAB89, 32'h98BADCFE, 32'h10325476, 32'hC3D2E1F0};
    for (int blk = 0; blk < wds.size() / 16; blk++) begin
      for (int t = 0; t < 16; t++) w[t] = wds[16 * blk + t];
      for (int t = 16; t < 80; t++) w[t] = rotl(w[t-3] ^ w[t-8] ^ w[t-14] ^ w[t-16], 1);
      a = h[0]; b = h[1]; c = h[2]; d = h[3]; e = h[4];
      for (int t = 0; t < 80; t++) begin
        if (t < 20)      begin f = (b & c) | (~b & d);          k = 32'h5A827999; end
        else if (t < 40) begin f = b ^ c ^ d;                   k = 32'h6ED9EBA1; end
        else if (t < 60) begin f = (b & c) | (b & d) | (c & d); k = 32'h8F1BBCDC; end
        else             begin f = b ^ c ^ d;                   k = 32'hCA62C1D6; end
        tmp = rotl(a, 5) + f + e + k + w[t];
        e = d; d = c; c = rotl(b, 30); b = a; a = tmp;
      end
      h[0] += a; h[1] += b; h[2] += c; h[3] += d; h[4] += e;
    end
    return h;
  endfunction

  initial begin
    repeat (5000000) @(posedge clk64);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sizes [5] = '{64, 640, 6400, 64000, 640000};
    byte unsigned msg [];
    logic [31:0] wds [];
    digest_t ref_h;
    logic [63:0] r;
    longint t0;
    int polls;
    // reference model against the standard test vector
    msg = new[3];
    msg[0] = 8'h61; msg[1] = 8'h62; msg[2] = 8'h63;
    pad(msg, wds);
    ref_h = sha1_ref(wds);
    check(ref_h[0] == 32'hA9993E36 && ref_h[4] == 32'h9CD0D89D, "reference model on \"abc\"");
    repeat (3) @(posedge clk64);
    #1 rst32 = 0; rst64 = 0;
    reconf64(CFG_SHA1);
    foreach (sizes[k]) begin
      msg = new[sizes[k]];
      for (int i = 0; i < sizes[k]; i++) msg[i] = 8'((i * 131 + k * 17 + (i >> 8)) & 255);
      pad(msg, wds);
      ref_h = sha1_ref(wds);
      t0 = $time;
      st32(32'h3000_0005);                                   // read channel shows busy flag
      for (int blk = 0; blk < wds.size() / 16; blk++) begin
        st32(blk == 0 ? 32'h1000_0000 : 32'h2000_0000);
        for (int t = 0; t < 16; t++) st32(wds[16 * blk + t]);
        polls = 0;
        do begin r64(8'h00, r); polls++; end while (r[0] && polls < 200);
        check(!r[0], "engine finished the block");
      end
      for (int i = 0; i < 5; i++) begin
        st32(32'h3000_0000 | 32'(i));
        r64(8'h00, r);
        check(r[31:0] == ref_h[i], $sformatf("%0d bytes: H%0d", sizes[k], i));
      end
      $display("%6d bytes, %4d blocks: %8d bus cycles, %9.2f us at 100 MHz",
               sizes[k], wds.size() / 16, (($time - t0) / 10), real'($time - t0) / 1000.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
