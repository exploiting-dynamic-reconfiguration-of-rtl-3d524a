// Self-checking test of the SHA-1 engine with the standard test messages "abc" (one
// block) and the 56-byte "abcdbcdecdef...nopq" message (two blocks), padded here as the
// software would pad them. Checks the five digest words, the status word, the number of
// busy cycles per block (80 rounds + 1), and that a new message restarts from the
// initial values.
module tb_sha1_core;
  logic clk = 0, rst = 1;
  logic [31:0] din = '0, dout;
  logic wr = 0, dout_valid;
  int checks = 0, failures = 0;

  sha1_core dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic [31:0] v);
    din = v; wr = 1;
    @(posedge clk); #1 wr = 0;
  endtask

  // send one padded block, preceded by its command, and count cycles until done
  task automatic block(input bit first, input logic [31:0] w [16]);
    int cyc = 0;
    write(first ? 32'h1000_0000 : 32'h2000_0000);
    for (int i = 0; i < 16; i++) write(w[i]);
    while (!dout_valid && cyc < 200) begin @(posedge clk); #1; cyc++; end
    check(cyc == 81, $sformatf("block took %0d cycles after its last word", cyc + 1));
  endtask

  task automatic check_digest(input logic [31:0] h [5], input string name);
    for (int i = 0; i < 5; i++) begin
      write(32'h3000_0000 | 32'(i));
      check(dout == h[i], $sformatf("%s H%0d = %h expected %h", name, i, dout, h[i]));
    end
    write(32'h3000_0005);
    check(dout == 32'd0, "status idle");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] b [16];
    logic [31:0] h [5];
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // "abc": one block
    b = '{32'h61626380, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h00000018};
    write(32'h3000_0005);
    block(1, b);
    h = '{32'hA9993E36, 32'h4706816A, 32'hBA3E2571, 32'h7850C26C, 32'h9CD0D89D};
    check_digest(h, "abc");
    // two-block message, restarting from the initial values
    b = '{32'h61626364, 32'h62636465, 32'h63646566, 32'h64656667, 32'h65666768, 32'h66676869,
          32'h6768696A, 32'h68696A6B, 32'h696A6B6C, 32'h6A6B6C6D, 32'h6B6C6D6E, 32'h6C6D6E6F,
          32'h6D6E6F70, 32'h6E6F7071, 32'h80000000, 32'h00000000};
    block(1, b);
    b = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 32'h000001C0};
    block(0, b);
    h = '{32'h84983E44, 32'h1C3BD26E, 32'hBAAE4AA1, 32'hF95129E5, 32'hE54670F1};
    check_digest(h, "abcdbcde...");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
