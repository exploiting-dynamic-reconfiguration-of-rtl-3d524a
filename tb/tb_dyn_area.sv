// Self-checking test of the dynamic area (64-bit, with SHA-1): each configuration in turn
// receives data and its results are checked; the empty configuration reads zero; only the
// selected accelerator sees writes; loading a configuration starts it from reset (the
// brightness constant and the blending pair phase are taken afresh). The key hash is
// checked with a fixed result of the reference C code ("abc", initial value 0).
module tb_dyn_area;
  import dock_pkg::*;
  logic clk = 0, rst = 1;
  logic [2:0] cfg = CFG_EMPTY;
  logic [63:0] din = '0, dout;
  logic wr = 0, dout_valid;
  int checks = 0, failures = 0;

  dyn_area #(.W(64), .HAS_SHA1(1'b1)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic [63:0] v);
    din = v; wr = 1;
    @(posedge clk); #1 wr = 0;
    repeat (3) @(posedge clk); #1;
  endtask

  task automatic load(input cfg_e c);
    cfg = c;
    @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] abc [16];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // empty area
    write(64'h1234);
    check(dout == '0, "empty area reads zero");
    // brightness: constant +16, then pixels
    load(CFG_BRIGHTNESS);
    write(64'd16);
    write(64'h00F8_7F10_FF01_2030);
    check(dout == 64'h10FF_8F20_FF11_3040, "brightness result");
    // switch away and back: constant must be taken again
    load(CFG_BLEND);
    write(64'h0101_0101_0202_0202);  // first of a pair only
    check(dout == '0, "blend waits for the pair");
    load(CFG_BRIGHTNESS);
    write(-64'sd16);                  // constant -16
    write(64'h0010_2030_4050_6070);
    check(dout == 64'h0000_1020_3040_5060, "brightness after reload");
    // blend starts a fresh pair after reload
    load(CFG_BLEND);
    write(64'h0101_0101_0202_0202);
    write(64'hF0F0_F0F0_2020_2020);
    check(dout == 64'hFFFF_FFFF_0303_0303, "blend pair after reload");
    // fade with F = 128 (half way)
    load(CFG_FADE);
    write(64'd128);
    write(64'h0000_0000_C8C8_C8C8);  // A = 200, B = 0
    write(64'h6464_6464_0000_0000);  // A = 0, B = 100
    check(dout == 64'h3232_3232_6464_6464, "fade result");
    // pattern matcher: all-ones pattern, eight all-ones columns
    load(CFG_PATTERN);
    for (int r = 0; r < 8; r++) write(64'(32'h8000_00FF | (r << 24)));
    for (int c = 0; c < 8; c++) write(64'h0000_00FF);
    check(dout == 64'd64, "pattern full match");
    write(64'h0000_0000);
    check(dout == 64'd56, "pattern after one zero column");
    // SHA-1 of "abc"
    load(CFG_SHA1);
    abc = '{32'h61626380, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h00000018};
    write(64'h1000_0000);
    for (int i = 0; i < 16; i++) write(64'(abc[i]));
    repeat (90) @(posedge clk); #1;
    write(64'h3000_0000);
    check(dout == 64'hA9993E36, "SHA-1 H0");
    write(64'h3000_0004);
    check(dout == 64'h9CD0D89D, "SHA-1 H4");
    // key hash of "abc" (initial value 0), upper channel bits ignored
    load(CFG_HASH);
    write(64'hFFFF_FFFF_0000_0003);
    write(64'h0);
    write(64'h5555_5555_0063_6261);
    check(dout == 64'h251E_4793, "key hash of abc");
    // writes while another configuration is loaded leave the SHA-1 state alone
    load(CFG_EMPTY);
    write(64'h1000_0000);
    check(dout == '0, "empty again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
