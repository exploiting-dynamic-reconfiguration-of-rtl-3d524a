// Self-checking test of the 32-bit dock: bus writes reach the data channel with a
// one-cycle strobe, reads return the dynamic area's read channel or the stored word, the
// ack timing, and addresses outside the dock's range are not answered. The dynamic area is
// modelled as dout = bit-inverted din.
module tb_opb_dock;
  localparam logic [31:0] BASE = 32'h8000_0000;
  logic clk = 0, rst = 1;
  logic s_req = 0, s_we = 0, s_ack;
  logic [31:0] s_addr = '0, s_wdata = '0, s_rdata, da_din, da_dout;
  logic da_wr;
  int checks = 0, failures = 0, strobes = 0;

  opb_dock #(.BASE(BASE)) dut (.*);
  assign da_dout = ~da_din;
  always #5 clk = !clk;
  always @(posedge clk) if (da_wr) strobes++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(input bit we, input logic [31:0] addr, input logic [31:0] wd,
                     output logic [31:0] rd, output int cycles);
    s_req = 1; s_we = we; s_addr = addr; s_wdata = wd; cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!s_ack && cycles < 20);
    rd = s_rdata;
    s_req = 0;
    @(posedge clk); #1;  // one idle cycle between transfers
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, v;
    int cyc, s0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (200) begin
      v  = $urandom;
      s0 = strobes;
      bus(1, BASE, v, rd, cyc);
      check(cyc == 1, "write ack after one cycle");
      check(!da_wr && da_din == v, "new data on the channel");
      check(strobes == s0 + 1, "one strobe per write");
      bus(0, BASE, '0, rd, cyc);
      check(cyc == 1 && rd == ~v, "read channel");
      bus(0, BASE + 4, '0, rd, cyc);
      check(rd == v, "stored data readback");
      check(da_din == v, "data held between writes");
    end
    // other offset writes do not strobe; out of range is not answered
    s0 = strobes;
    bus(1, BASE + 8, 32'h1234, rd, cyc);
    check(strobes == s0, "no strobe for other offsets");
    bus(1, 32'h4000_0000, 32'h55, rd, cyc);
    check(cyc == 20 && strobes == s0, "no answer outside the range");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
