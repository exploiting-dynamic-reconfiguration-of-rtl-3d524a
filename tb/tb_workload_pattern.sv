// Workload: 8x8 pattern matching over a whole 256x256 binary image on the 32-bit system,
// driven over the bus as the CPU would: for every 8-row band the 256 columns are written
// one by one and the match count of every complete window position is read back and
// compared with a count computed here. Larger images only repeat the same work.
module tb_workload_pattern;
  import dock_pkg::*;
  localparam int IW = 256, IH = 256;
  localparam logic [31:0] BASE = 32'h8000_0000;

  logic clk32 = 0, rst32 = 1, clk64 = 0, rst64 = 1;
  logic [2:0]  cfg32 = CFG_EMPTY, cfg64 = CFG_EMPTY;
  logic        opb_req = 0, opb_we = 0, opb_ack;
  logic [31:0] opb_addr = '0, opb_wdata = '0, opb_rdata;
  logic        plb_req = 0, plb_we = 0, plb_ack;
  logic [31:0] plb_addr = '0;
  logic [7:0]  plb_be = '0;
  logic [63:0] plb_wdata = '0, plb_rdata;
  logic        dma_req, dma_we, irq64;
  logic        dma_ack = 0;
  logic [31:0] dma_addr;
  logic [63:0] dma_wdata, dma_rdata = '0;
  int checks = 0, failures = 0;
  logic img [IH][IW];
  logic [7:0] pat [8];

  dynreconf_top dut (.*);
  always #10 clk32 = !clk32;
  always #5  clk64 = !clk64;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic opb(input bit we, input logic [31:0] wd, output logic [31:0] rd);
    int cyc = 0;
    opb_req = 1; opb_we = we; opb_addr = BASE; opb_wdata = wd;
    do begin @(posedge clk32); #1; cyc++; end while (!opb_ack && cyc < 20);
    rd = opb_rdata;
    opb_req = 0;
    @(posedge clk32); #1;
  endtask

  initial begin
    repeat (4000000) @(posedge clk32);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    logic [7:0] col;
    int e, best, best_n;
    longint t0;
    // image: random background with the pattern pasted at a few places
    for (int i = 0; i < 8; i++) pat[i] = 8'($urandom);
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) img[y][x] = 1'($urandom);
    for (int k = 0; k < 4; k++) begin
      int py, px;
      py = $urandom_range(0, IH - 8);
      px = $urandom_range(0, IW - 8);
      for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) img[py + i][px + 7 - j] = pat[i][j];
    end
    repeat (3) @(posedge clk32);
    #1 rst32 = 0;
    cfg32 = CFG_PATTERN;
    repeat (2) @(posedge clk32); #1;
    for (int i = 0; i < 8; i++) opb(1, {1'b1, 4'b0, 3'(i), 16'b0, pat[i]}, r);
    best_n = 0;
    t0 = $time;
    for (int y = 0; y <= IH - 8; y++) begin
      for (int x = 0; x < IW; x++) begin
        for (int i = 0; i < 8; i++) col[i] = img[y + i][x];
        opb(1, {24'b0, col}, r);
        if (x >= 7) begin
          repeat (2) @(posedge clk32); #1;  // the result needs three edges after the strobe
          opb(0, '0, r);
          e = 0;
          for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) if (img[y + i][x - j] == pat[i][j]) e++;
          check(r == 32'(e), $sformatf("window (%0d,%0d): %0d expected %0d", y, x - 7, r, e));
          if (e == 64) best_n++;
        end
      end
    end
    check(best_n >= 4, "every pasted copy of the pattern is found");
    $display("256x256 scan: %0d window positions, %0d full matches, %0d bus cycles",
             (IH - 7) * (IW - 7), best_n, ($time - t0) / 20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
