// Shared constants and types of the dynamic-area docks.
//
// The 64-bit dock decodes a small register file inside its address range. The byte offsets
// below are this design's own choice: the register map of the dock is not published, only
// its capabilities (data channel, DMA, output FIFO, interrupt). The configuration numbers
// select which accelerator occupies the dynamic area; in the FPGA this is decided by the
// partial bitstream loaded through the configuration port.
package dock_pkg;

  // PLB dock register offsets (byte address bits [7:0], 64-bit registers)
  localparam logic [7:0] REG_DATA = 8'h00;  // W: data channel + write strobe, R: read channel
  localparam logic [7:0] REG_FIFO = 8'h08;  // R: pop the output FIFO
  localparam logic [7:0] REG_SRC  = 8'h10;  // DMA source address (bytes)
  localparam logic [7:0] REG_DST  = 8'h18;  // DMA destination address (bytes)
  localparam logic [7:0] REG_LEN  = 8'h20;  // DMA length in 64-bit words
  localparam logic [7:0] REG_CTRL = 8'h28;  // W: bit0 start, bit1 capture; R: status
  localparam logic [7:0] REG_IRQ  = 8'h30;  // R: {enable, pending}; W: bits[7:0] W1C pending, bits[15:8] enable

  // Interrupt sources of the PLB dock
  localparam int IRQ_DMA_DONE  = 0;
  localparam int IRQ_FIFO_FULL = 1;
  localparam int IRQ_FIFO_OVF  = 2;
  localparam int N_IRQ         = 3;

  // Configurations of the dynamic area
  typedef enum logic [2:0] {
    CFG_EMPTY      = 3'd0,
    CFG_PATTERN    = 3'd1,
    CFG_BRIGHTNESS = 3'd2,
    CFG_BLEND      = 3'd3,
    CFG_FADE       = 3'd4,
    CFG_SHA1       = 3'd5,
    CFG_HASH       = 3'd6
  } cfg_e;

  // DMA engine states
  typedef enum logic [2:0] {
    DMA_IDLE,
    DMA_FETCH,
    DMA_PUSH,
    DMA_SETTLE,
    DMA_DRAIN,
    DMA_DONE,
    DMA_DESC    // reading a descriptor of a chained transfer
  } dma_state_e;

  // Pixel arithmetic helpers
  function automatic logic [7:0] sat_u8(input logic signed [10:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
