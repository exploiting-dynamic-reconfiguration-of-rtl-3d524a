// Self-checking test of the 8x8 binary pattern matcher: random patterns and image bands
// are fed column by column and every result is compared with a count computed directly
// from the pattern and the last eight columns. Also checks the two-cycle latency.
module tb_pattern_match;
  logic clk = 0, rst = 1;
  logic [31:0] din = '0, dout;
  logic wr = 0, dout_valid;
  int checks = 0, failures = 0;
  logic [7:0] pat [8];
  logic [7:0] cols [$];

  pattern_match dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected();
    int n = 0;
    for (int r = 0; r < 8; r++)
      for (int j = 0; j < 8; j++) begin
        // pattern bit j of row r matches the column written j columns ago
        logic px = (cols.size() > j) ? cols[cols.size() - 1 - j][r] : 1'b0;
        if (px == pat[r][j]) n++;
      end
    return n;
  endfunction

  task automatic write(input logic [31:0] v);
    din = v; wr = 1;
    @(posedge clk); #1 wr = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_n, lat;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int band = 0; band < 20; band++) begin
      for (int r = 0; r < 8; r++) begin
        pat[r] = (band == 0) ? 8'hFF : 8'($urandom);
        write({1'b1, 4'b0, 3'(r), 16'b0, pat[r]});
      end
      repeat (40 + $urandom_range(0, 30)) begin
        logic [7:0] c;
        c = (band == 0) ? 8'hFF : 8'($urandom);
        cols.push_back(c);
        write({24'b0, c});
        lat = 1;
        while (!dout_valid && lat < 10) begin @(posedge clk); #1; lat++; end
        exp_n = expected();
        check(dout_valid && lat == 3, $sformatf("latency %0d", lat));
        check(dout == 32'(exp_n), $sformatf("count %0d expected %0d", dout, exp_n));
        if ($urandom_range(0, 1) == 1) begin @(posedge clk); #1; end
      end
      if (band == 0) check(dout == 32'd64, "all-ones pattern gives 64");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
