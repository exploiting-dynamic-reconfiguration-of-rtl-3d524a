// Self-checking test of the output FIFO at its full size (2047 x 64): random pushes and
// pops against a queue model, filling to capacity, full/empty flags, the overflow pulse.
module tb_out_fifo;
  localparam int DW = 64, AW = 11, CAP = 2**AW - 1;
  logic clk = 0, rst = 1;
  logic push = 0, pop = 0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [AW-1:0] count;
  logic full, empty, overflow;
  int checks = 0, failures = 0;
  logic [DW-1:0] model [$];

  out_fifo #(.DW(DW), .AW(AW)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit do_push, input bit do_pop);
    push  = do_push;
    pop   = do_pop;
    wdata = {$urandom, $urandom};
    // compare with the model before the edge
    check(count == AW'(model.size()), $sformatf("count %0d vs %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty");
    check(full == (model.size() == CAP), "full");
    if (model.size() > 0) check(rdata == model[0], $sformatf("head data %h vs %h n=%0d", rdata, model[0], model.size()));
    @(posedge clk);
    #1;
    begin
      int n0 = model.size();  // the FIFO acts on its state before the edge
      if (do_push && n0 == CAP) check(overflow, "overflow pulse on push while full");
      if (do_pop && n0 > 0) void'(model.pop_front());
      if (do_push && n0 < CAP) model.push_back(wdata);
    end
    push = 0; pop = 0;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // random mix
    repeat (3000) step($urandom_range(0, 2) != 0, $urandom_range(0, 2) == 0);
    // fill to capacity
    while (model.size() < CAP) step(1, 0);
    check(full, "full at 2047 entries");
    step(1, 0);  // overflow
    step(0, 0);
    check(!overflow, "overflow is one cycle");
    // push and pop while full: only the pop happens (push is dropped while full)
    step(1, 1);
    // drain completely
    while (model.size() > 0) step($urandom_range(0, 3) == 0, 1);
    step(0, 0);
    check(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
