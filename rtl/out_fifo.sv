// Output FIFO of the 64-bit dock.
//
// Results produced by the dynamic area are queued here until the DMA engine moves them to
// main memory (or the CPU pops them). It is a circular buffer of 2**AW entries with
// read and write pointers of AW bits; one slot always stays empty, so the capacity is
// 2**AW - 1 words. With the default AW = 11 and DW = 64 that is 2047 64-bit values, the
// published capacity, in a 2048 x 64 array (eight 18 kb block RAMs on the target FPGA).
//
// Interface: push/wdata write at the clock edge unless full; pop removes the head unless
// empty; rdata always shows the head (first-word fall-through). A push while full is
// dropped and reported by a one-cycle overflow pulse. count, full and empty are derived
// from the pointers and are valid in the same cycle.
module out_fifo #(
  parameter int DW = 64,
  parameter int AW = 11
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          push,
  input  logic [DW-1:0] wdata,
  input  logic          pop,
  output logic [DW-1:0] rdata,
  output logic [AW-1:0] count,
  output logic          full,
  output logic          empty,
  output logic          overflow
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] wptr, rptr;

  assign count = wptr - rptr;
  assign empty = (count == '0);
  assign full  = (count == '1);
  assign rdata = mem[rptr];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr     <= '0;
      rptr     <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && full;
      if (push && !full) wptr <= wptr + 1'b1;
      if (pop && !empty) rptr <= rptr + 1'b1;
    end
  end
endmodule
