// Interrupt generator of the 64-bit dock.
//
// Each of N event inputs sets a sticky pending bit. The CPU clears pending bits by writing
// ones (write-one-to-clear) and chooses which bits reach the interrupt line with an enable
// mask. The interrupt output is the registered OR of the enabled pending bits, so it rises
// one cycle after the event that sets it. The event set and the clear/enable scheme are
// this design's choice; only the existence of an interrupt to the CPU is given.
module irq_gen #(
  parameter int N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] event_i,
  input  logic         clr_we,
  input  logic [N-1:0] clr_mask,
  input  logic         en_we,
  input  logic [N-1:0] en_i,
  output logic [N-1:0] pending,
  output logic [N-1:0] enable,
  output logic         irq
);
  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      enable  <= '0;
      irq     <= 1'b0;
    end else begin
      // an event in the same cycle as its clear wins, so no event is lost
      pending <= (pending & ~(clr_we ? clr_mask : '0)) | event_i;
      if (en_we) enable <= en_i;
      irq <= |(pending & enable);
    end
  end
endmodule
