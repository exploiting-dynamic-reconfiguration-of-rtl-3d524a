// Behavioural model of main memory behind the memory controller, for testbenches only.
// 64-bit words, byte addressed (addr[2:0] ignored), 2**MAW words. A request is answered
// after 1..MAXLAT cycles (random) with a one-cycle ack; reads return data with the ack.
module mem_model #(
  parameter int MAW    = 14,
  parameter int MAXLAT = 3
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [63:0] wdata,
  output logic        ack,
  output logic [63:0] rdata
);
  logic [63:0] mem [2**MAW];
  int wait_q = -1;

  initial ack = 1'b0;
  initial rdata = '0;

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (wait_q < 0) wait_q = $urandom_range(0, MAXLAT - 1);
      if (wait_q == 0) begin
        ack <= 1'b1;
        if (we) mem[addr[MAW+2:3]] = wdata;
        else    rdata <= mem[addr[MAW+2:3]];
        wait_q = -1;
      end else begin
        wait_q--;
      end
    end
  end
endmodule
