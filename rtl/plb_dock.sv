// 64-bit dock: the wrapper that joins the dynamic area to the 64-bit processor local bus.
//
// As a bus slave it decodes a fixed address range (BASE, 256 bytes) and holds a small
// register file (offsets in dock_pkg). A write to the data register stores the bytes
// selected by the byte enables in a 64-bit register that stays on the data channel to the
// dynamic area until the next write, and raises the write strobe to the dynamic area for
// one cycle; the dynamic area may use it as a clock enable. A read of the data register
// returns the dynamic area's read channel. A 32-bit CPU store updates one half of the
// register (byte enables 8'hF0 or 8'h0F) and also strobes.
//
// Beyond the 32-bit dock it adds three parts, each its own module: a DMA engine that is
// master on the memory bus (dock_dma), an output FIFO of 2047 64-bit results (out_fifo)
// and an interrupt generator (irq_gen). With capture enabled in the control register every
// result the dynamic area flags with dout_valid is pushed into the FIFO; the CPU may also
// pop it through the FIFO register. Control register bits: 0 start, 1 capture, 2 chain (the
// DMA source register then points to a descriptor chain, see dock_dma).
//
// Slave timing: a request is held until ack; ack comes one cycle after the request is
// seen, and register writes take effect at that same edge. The data strobe to the dynamic
// area is high in the cycle after the write (da_wr together with the new da_din). While
// the DMA engine runs it owns the data channel and CPU writes to the data register are
// acknowledged but dropped.
module plb_dock #(
  parameter logic [31:0] BASE = 32'h8000_0000,
  parameter int          DW   = 64,
  parameter int          FAW  = 11,
  parameter int          LW   = 24,
  parameter int          SLACK      = 16,  // FIFO entries kept free when DMA stops writing
  parameter int          SETTLE_CYC = 16   // cycles waited for in-flight results
) (
  input  logic            clk,
  input  logic            rst,
  // bus slave port
  input  logic            s_req,
  input  logic            s_we,
  input  logic [31:0]     s_addr,
  input  logic [DW/8-1:0] s_be,
  input  logic [DW-1:0]   s_wdata,
  output logic            s_ack,
  output logic [DW-1:0]   s_rdata,
  // bus master port (DMA)
  output logic            m_req,
  output logic            m_we,
  output logic [31:0]     m_addr,
  output logic [DW-1:0]   m_wdata,
  input  logic            m_ack,
  input  logic [DW-1:0]   m_rdata,
  // connection interface to the dynamic area
  output logic [DW-1:0]   da_din,
  output logic            da_wr,
  input  logic [DW-1:0]   da_dout,
  input  logic            da_dout_valid,
  // interrupt to the CPU
  output logic            irq
);
  import dock_pkg::*;

  logic          hit, acc, wr_acc, rd_acc;
  logic [7:0]    off;
  logic [31:0]   src_q, dst_q;
  logic [LW-1:0] len_q;
  logic          cap_q, chain_q;
  logic          start;

  // FIFO wires
  logic [DW-1:0]  f_rdata;
  logic [FAW-1:0] f_count;
  logic           f_full, f_empty, f_ovf, f_pop, dma_pop;
  logic           cpu_pop;
  // DMA wires
  logic           dma_busy, dma_done, dw_valid;
  logic [DW-1:0]  dw_data;
  // interrupt wires
  logic [N_IRQ-1:0] irq_pend, irq_en;
  logic             full_q;

  assign hit    = (s_addr[31:8] == BASE[31:8]);
  assign acc    = s_req && hit && !s_ack;
  assign off    = {s_addr[7:3], 3'b000};
  assign wr_acc = acc && s_we;
  assign rd_acc = acc && !s_we;
  assign start  = wr_acc && off == REG_CTRL && s_be[0] && s_wdata[0] && !dma_busy;
  assign cpu_pop = rd_acc && off == REG_FIFO;
  assign f_pop  = dma_pop || (cpu_pop && !dma_busy);

  // slave response and registers
  always_ff @(posedge clk) begin
    if (rst) begin
      s_ack   <= 1'b0;
      s_rdata <= '0;
      src_q   <= '0;
      dst_q   <= '0;
      len_q   <= '0;
      cap_q   <= 1'b0;
      chain_q <= 1'b0;
    end else begin
      s_ack <= acc;
      if (wr_acc) begin
        unique case (off)
          REG_SRC:  src_q <= s_wdata[31:0];
          REG_DST:  dst_q <= s_wdata[31:0];
          REG_LEN:  len_q <= s_wdata[LW-1:0];
          REG_CTRL: if (s_be[0]) {chain_q, cap_q} <= s_wdata[2:1];
          default: ;
        endcase
      end
      if (rd_acc) begin
        unique case (off)
          REG_DATA: s_rdata <= da_dout;
          REG_FIFO: s_rdata <= f_rdata;
          REG_SRC:  s_rdata <= DW'(src_q);
          REG_DST:  s_rdata <= DW'(dst_q);
          REG_LEN:  s_rdata <= DW'(len_q);
          REG_CTRL: s_rdata <= DW'({f_full, f_empty, f_count, 1'b0, chain_q, cap_q, dma_busy});
          REG_IRQ:  s_rdata <= DW'({irq_en, 5'b0, irq_pend});
          default:  s_rdata <= '0;
        endcase
      end
    end
  end

  // data channel register and write strobe
  always_ff @(posedge clk) begin
    if (rst) begin
      da_din <= '0;
      da_wr  <= 1'b0;
    end else begin
      da_wr <= 1'b0;
      if (dma_busy) begin
        if (dw_valid) begin
          da_din <= dw_data;
          da_wr  <= 1'b1;
        end
      end else if (wr_acc && off == REG_DATA) begin
        for (int b = 0; b < DW/8; b++)
          if (s_be[b]) da_din[8*b +: 8] <= s_wdata[8*b +: 8];
        da_wr <= 1'b1;
      end
    end
  end

  out_fifo #(.DW(DW), .AW(FAW)) u_fifo (
    .clk, .rst,
    .push(da_dout_valid && cap_q), .wdata(da_dout),
    .pop(f_pop), .rdata(f_rdata), .count(f_count),
    .full(f_full), .empty(f_empty), .overflow(f_ovf)
  );

  dock_dma #(.AW(32), .DW(DW), .LW(LW), .FAW(FAW), .SLACK(SLACK), .SETTLE_CYC(SETTLE_CYC)) u_dma (
    .clk, .rst,
    .start, .src(src_q), .dst(dst_q), .len(len_q),
    .capture(s_wdata[1]),  // sampled with start, from the same control write
    .chain(s_wdata[2]),
    .busy(dma_busy), .done(dma_done),
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
    .dw_valid, .dw_data,
    .fifo_count(f_count), .fifo_empty(f_empty), .fifo_rdata(f_rdata), .fifo_pop(dma_pop)
  );

  // FIFO-full event on the rising edge of full
  always_ff @(posedge clk) begin
    if (rst) full_q <= 1'b0;
    else     full_q <= f_full;
  end

  irq_gen #(.N(N_IRQ)) u_irq (
    .clk, .rst,
    .event_i({f_ovf, f_full && !full_q, dma_done}),
    .clr_we(wr_acc && off == REG_IRQ), .clr_mask(s_wdata[N_IRQ-1:0]),
    .en_we(wr_acc && off == REG_IRQ), .en_i(s_wdata[8 +: N_IRQ]),
    .pending(irq_pend), .enable(irq_en), .irq
  );

  a_ack_pulse: assert property (@(posedge clk) disable iff (rst) s_ack |=> !s_ack);
endmodule
