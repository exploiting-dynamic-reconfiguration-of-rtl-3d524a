// 32-bit dock: the wrapper that joins the dynamic area to the 32-bit on-chip peripheral bus.
//
// It is a bus slave on a fixed address range (BASE, 256 bytes). A write to offset 0
// stores the word in a register that stays on the data channel to the dynamic area until
// the next write, and raises the write strobe to the dynamic area for one cycle; the
// dynamic area may use it as a clock enable for its flip-flops. A read of offset 0 returns
// the dynamic area's read channel; a read of offset 4 returns the stored data word. The
// two offsets are this design's choice; the data register, the strobe and the two
// one-way 32-bit channels are the published organisation.
//
// Timing: a request is held until ack; ack comes one cycle after the request is seen and
// the write takes effect at that edge. da_wr is high in the following cycle, together
// with the new da_din. Requests outside the range are left for other slaves.
module opb_dock #(
  parameter logic [31:0] BASE = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        s_req,
  input  logic        s_we,
  input  logic [31:0] s_addr,
  input  logic [31:0] s_wdata,
  output logic        s_ack,
  output logic [31:0] s_rdata,
  output logic [31:0] da_din,
  output logic        da_wr,
  input  logic [31:0] da_dout
);
  logic hit, acc;

  assign hit = (s_addr[31:8] == BASE[31:8]);
  assign acc = s_req && hit && !s_ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_ack   <= 1'b0;
      s_rdata <= '0;
      da_din  <= '0;
      da_wr   <= 1'b0;
    end else begin
      s_ack <= acc;
      da_wr <= 1'b0;
      if (acc && s_we && s_addr[7:2] == 6'd0) begin
        da_din <= s_wdata;
        da_wr  <= 1'b1;
      end
      if (acc && !s_we)
        s_rdata <= (s_addr[7:2] == 6'd1) ? da_din : da_dout;
    end
  end

  a_ack_pulse: assert property (@(posedge clk) disable iff (rst) s_ack |=> !s_ack);
endmodule
