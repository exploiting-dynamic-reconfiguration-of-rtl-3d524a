// Self-checking test of the fade effect on both channel widths: for several fade factors,
// B + floor((A - B) * F / 256) per pixel, and the packing of two words' results into one output word.
module tb_pix_fade;
  logic clk = 0, rst = 1;
  logic [63:0] din = '0, d64;
  logic [31:0] d32;
  logic wr = 0, v32, v64;
  int checks = 0, failures = 0;

  pix_fade #(.W(32)) dut32 (.clk, .rst, .din(din[31:0]), .wr, .dout(d32), .dout_valid(v32));
  pix_fade #(.W(64)) dut64 (.clk, .rst, .din(din), .wr, .dout(d64), .dout_valid(v64));
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int fq;  // fade factor F of the current round, result = B + floor((A - B) * F / 256)

  function automatic logic [7:0] sat(input logic [7:0] a, input logic [7:0] b);
    int prod = (int'(a) - int'(b)) * fq;
    int q = (prod >= 0) ? prod / 256 : -((-prod + 255) / 256);
    return 8'(int'(b) + q);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] w0, w1;
    repeat (3) @(posedge clk);
    for (int round = 0; round < 6; round++) begin
    fq = (round == 0) ? 0 : (round == 1) ? 256 : (round == 2) ? 128 : $urandom_range(0, 256);
    #1 rst = 1;
    @(posedge clk); #1 rst = 0;
    din = (round == 5) ? 64'd300 : 64'(fq); wr = 1;  // 300 is clamped to 256
    if (round == 5) fq = 256;
    @(posedge clk); #1 wr = 0;
    repeat (60) begin
      w0 = {$urandom, $urandom};
      w1 = {$urandom, $urandom};
      din = w0; wr = 1;
      @(posedge clk); #1 wr = 0;
      check(!v32 && !v64, "no result after the first word of a pair");
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1 din = w1; wr = 1;
      @(posedge clk); #1 wr = 0;
      check(v32 && v64, "result after the second word");
      for (int p = 0; p < 2; p++) begin
        check(d32[8*p +: 8]      == sat(w0[8*p +: 8], w0[16 + 8*p +: 8]), "32-bit low pixel");
        check(d32[16 + 8*p +: 8] == sat(w1[8*p +: 8], w1[16 + 8*p +: 8]), "32-bit high pixel");
      end
      for (int p = 0; p < 4; p++) begin
        check(d64[8*p +: 8]      == sat(w0[8*p +: 8], w0[32 + 8*p +: 8]), "64-bit low pixel");
        check(d64[32 + 8*p +: 8] == sat(w1[8*p +: 8], w1[32 + 8*p +: 8]), "64-bit high pixel");
      end
    end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
