// Self-checking test of brightness adjustment on both channel widths (32 and 64 bits):
// the signed constant is sent first, then random pixel words; each output pixel is
// compared with the clamped sum, and the one-cycle latency is checked.
module tb_pix_brightness;
  logic clk = 0, rst = 1;
  logic [63:0] din = '0, d64;
  logic [31:0] d32;
  logic wr = 0, v32, v64;
  int checks = 0, failures = 0;

  pix_brightness #(.W(32)) dut32 (.clk, .rst, .din(din[31:0]), .wr, .dout(d32), .dout_valid(v32));
  pix_brightness #(.W(64)) dut64 (.clk, .rst, .din(din), .wr, .dout(d64), .dout_valid(v64));
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] ref_px(input logic [7:0] p, input int k);
    int s = int'(p) + k;
    return (s < 0) ? 8'd0 : (s > 255) ? 8'd255 : 8'(s);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    for (int round = 0; round < 8; round++) begin
      int k;
      k = (round == 0) ? 127 : (round == 1) ? -128 : $urandom_range(0, 255) - 128;
      #1 rst = 1;
      @(posedge clk); #1 rst = 0;
      din = 64'(8'(k)); wr = 1;
      @(posedge clk); #1 wr = 0;
      check(!v32 && !v64, "constant word gives no result");
      repeat (100) begin
        logic [63:0] px;
        px = {$urandom, $urandom};
        din = px; wr = 1;
        @(posedge clk); #1 wr = 0;
        check(v32 && v64, "result one cycle after the word");
        for (int p = 0; p < 8; p++) begin
          check(d64[8*p +: 8] == ref_px(px[8*p +: 8], k), "64-bit pixel");
          if (p < 4) check(d32[8*p +: 8] == ref_px(px[8*p +: 8], k), "32-bit pixel");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
