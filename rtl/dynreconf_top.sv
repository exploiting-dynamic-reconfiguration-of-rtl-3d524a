// Top level: the two dynamically reconfigurable FPGA systems, side by side.
//
// Both systems attach a reconfigurable region (dynamic area) to an embedded CPU through a
// wrapper, the dock, which gives the region a bus address range, a data register with a
// write strobe and a read channel. They differ in the bus:
//  * sys32: 32-bit dock on the on-chip peripheral bus; every transfer is a CPU load or
//    store. Its dynamic area holds the pattern matcher, the pixel accelerators and the key hash.
//  * sys64: 64-bit dock on the processor local bus, with a DMA engine (bus master), an
//    output FIFO of 2047 results and an interrupt line. Its larger dynamic area also holds
//    the SHA-1 engine.
// The CPU, bus arbiters, bridge, memory controllers, UART and configuration controller are
// vendor parts and stay outside: their side of each dock is a port here. The bus ports use
// a simple request/acknowledge handshake in place of the vendor bus protocols. The
// configuration currently loaded into each dynamic area (what the configuration controller
// would write through the internal configuration port) is the cfg32/cfg64 input. Each
// system has its own clock and reset (the published systems run their buses at 50 MHz and
// 100 MHz).
module dynreconf_top #(
  parameter logic [31:0] DOCK32_BASE = 32'h8000_0000,
  parameter logic [31:0] DOCK64_BASE = 32'h8000_0000
) (
  // 32-bit system
  input  logic        clk32,
  input  logic        rst32,
  input  logic [2:0]  cfg32,
  input  logic        opb_req,
  input  logic        opb_we,
  input  logic [31:0] opb_addr,
  input  logic [31:0] opb_wdata,
  output logic        opb_ack,
  output logic [31:0] opb_rdata,
  // 64-bit system
  input  logic        clk64,
  input  logic        rst64,
  input  logic [2:0]  cfg64,
  input  logic        plb_req,
  input  logic        plb_we,
  input  logic [31:0] plb_addr,
  input  logic [7:0]  plb_be,
  input  logic [63:0] plb_wdata,
  output logic        plb_ack,
  output logic [63:0] plb_rdata,
  output logic        dma_req,
  output logic        dma_we,
  output logic [31:0] dma_addr,
  output logic [63:0] dma_wdata,
  input  logic        dma_ack,
  input  logic [63:0] dma_rdata,
  output logic        irq64
);
  // 32-bit system
  logic [31:0] c32_din, c32_dout;
  logic        c32_wr, c32_dout_valid;

  opb_dock #(.BASE(DOCK32_BASE)) u_opb_dock (
    .clk(clk32), .rst(rst32),
    .s_req(opb_req), .s_we(opb_we), .s_addr(opb_addr), .s_wdata(opb_wdata),
    .s_ack(opb_ack), .s_rdata(opb_rdata),
    .da_din(c32_din), .da_wr(c32_wr), .da_dout(c32_dout)
  );

  // the 32-bit dock has no FIFO: dout_valid is not used
  dyn_area #(.W(32), .HAS_SHA1(1'b0)) u_da32 (
    .clk(clk32), .rst(rst32), .cfg(cfg32),
    .din(c32_din), .wr(c32_wr), .dout(c32_dout), .dout_valid(c32_dout_valid)
  );

  // 64-bit system
  logic [63:0] c64_din, c64_dout;
  logic        c64_wr, c64_dout_valid;

  plb_dock #(.BASE(DOCK64_BASE)) u_plb_dock (
    .clk(clk64), .rst(rst64),
    .s_req(plb_req), .s_we(plb_we), .s_addr(plb_addr), .s_be(plb_be), .s_wdata(plb_wdata),
    .s_ack(plb_ack), .s_rdata(plb_rdata),
    .m_req(dma_req), .m_we(dma_we), .m_addr(dma_addr), .m_wdata(dma_wdata),
    .m_ack(dma_ack), .m_rdata(dma_rdata),
    .da_din(c64_din), .da_wr(c64_wr), .da_dout(c64_dout), .da_dout_valid(c64_dout_valid),
    .irq(irq64)
  );

  dyn_area #(.W(64), .HAS_SHA1(1'b1)) u_da64 (
    .clk(clk64), .rst(rst64), .cfg(cfg64),
    .din(c64_din), .wr(c64_wr), .dout(c64_dout), .dout_valid(c64_dout_valid)
  );
endmodule
