// Self-checking test of additive blending on both channel widths: random pixel pairs,
// saturating sums, and the packing of two words' results into one output word.
module tb_pix_blend;
  logic clk = 0, rst = 1;
  logic [63:0] din = '0, d64;
  logic [31:0] d32;
  logic wr = 0, v32, v64;
  int checks = 0, failures = 0;

  pix_blend #(.W(32)) dut32 (.clk, .rst, .din(din[31:0]), .wr, .dout(d32), .dout_valid(v32));
  pix_blend #(.W(64)) dut64 (.clk, .rst, .din(din), .wr, .dout(d64), .dout_valid(v64));
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] sat(input logic [7:0] a, input logic [7:0] b);
    int s = int'(a) + int'(b);
    return (s > 255) ? 8'd255 : 8'(s);
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
    #1 rst = 0;
    repeat (300) begin
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
