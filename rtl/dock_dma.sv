// DMA engine of the 64-bit dock.
//
// Moves 64-bit words between main memory and the dynamic area without the CPU. A transfer
// is programmed with a source address, a destination address and a length in words, then
// started. The engine reads each source word from memory and writes it into the dock's
// data channel (one write strobe to the dynamic area per word). With capture enabled the
// results the dynamic area produces are collected in the output FIFO, and the engine works
// block-interleaved: it stops writing when the FIFO is nearly full or the source is used
// up, waits SETTLE_CYC cycles so that results still in the accelerator's pipeline reach
// the FIFO, then empties the FIFO to the destination, and repeats until all source words
// have been sent and the FIFO is empty. A transfer of length 0 with capture only empties
// the FIFO (a pure read transfer). The done pulse feeds the interrupt generator.
//
// Scatter-gather: with chain set at start, src is instead the byte address of the first of a
// chain of descriptors, each four 64-bit words in memory: source address, destination
// address, length in words, and the address of the next descriptor (0 ends the chain). The
// engine reads a descriptor, runs its block as above (the FIFO is emptied to that block's
// destination before the next descriptor is read), and raises done once at the end of the
// chain. The original controller was generated by the vendor tools and is only named as a
// scatter-gather engine; the descriptor format here is this design's own.
//
// Writing stops at FIFO_CAP - SLACK entries rather than at the last free entry so that
// results of words already written still find room; this assumes an accelerator returns
// at most one result per word written and lags by fewer than SLACK words.
//
// Memory port: req/we/addr/wdata held until a one-cycle ack; read data arrives with ack.
module dock_dma #(
  parameter int AW         = 32,
  parameter int DW         = 64,
  parameter int LW         = 24,   // width of the length register (words)
  parameter int FAW        = 11,   // FIFO pointer width
  parameter int SLACK      = 16,
  parameter int SETTLE_CYC = 16
) (
  input  logic           clk,
  input  logic           rst,
  // programming
  input  logic           start,
  input  logic [AW-1:0]  src,
  input  logic [AW-1:0]  dst,
  input  logic [LW-1:0]  len,
  input  logic           capture,
  input  logic           chain,    // src points to a descriptor chain
  output logic           busy,
  output logic           done,
  // memory master port
  output logic           m_req,
  output logic           m_we,
  output logic [AW-1:0]  m_addr,
  output logic [DW-1:0]  m_wdata,
  input  logic           m_ack,
  input  logic [DW-1:0]  m_rdata,
  // dock data channel
  output logic           dw_valid,
  output logic [DW-1:0]  dw_data,
  // output FIFO
  input  logic [FAW-1:0] fifo_count,
  input  logic           fifo_empty,
  input  logic [DW-1:0]  fifo_rdata,
  output logic           fifo_pop
);
  import dock_pkg::*;

  localparam int BYTES = DW / 8;
  localparam logic [FAW-1:0] HIGH_MARK = FAW'((2**FAW - 1) - SLACK);

  dma_state_e    state;
  logic [AW-1:0] src_q, dst_q;
  logic [LW-1:0] left_q;
  logic          cap_q;
  logic          chain_q;
  logic [AW-1:0] desc_q;    // current, then (after its last word) next descriptor address
  logic [1:0]    didx_q;    // descriptor word being read
  dma_state_e    last_st;   // where a finished block goes: next descriptor or done
  logic [DW-1:0] word_q;
  logic [$clog2(SETTLE_CYC+1)-1:0] settle_q;

  assign busy     = (state != DMA_IDLE);
  assign m_req    = (state == DMA_FETCH) || (state == DMA_DESC) ||
                    (state == DMA_DRAIN && !fifo_empty);
  assign m_we     = (state == DMA_DRAIN);
  assign m_addr   = (state == DMA_DRAIN) ? dst_q :
                    (state == DMA_DESC)  ? desc_q + AW'(BYTES) * AW'(didx_q) : src_q;
  assign last_st  = (chain_q && desc_q != '0) ? DMA_DESC : DMA_DONE;
  assign m_wdata  = fifo_rdata;
  assign dw_valid = (state == DMA_PUSH);
  assign dw_data  = word_q;
  assign fifo_pop = (state == DMA_DRAIN) && m_ack;
  assign done     = (state == DMA_DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= DMA_IDLE;
      src_q    <= '0;
      dst_q    <= '0;
      left_q   <= '0;
      cap_q    <= 1'b0;
      chain_q  <= 1'b0;
      desc_q   <= '0;
      didx_q   <= '0;
      word_q   <= '0;
      settle_q <= '0;
    end else begin
      unique case (state)
        DMA_IDLE: if (start) begin
          src_q  <= src;
          dst_q  <= dst;
          left_q <= len;
          cap_q  <= capture;
          chain_q <= chain;
          desc_q <= src;
          didx_q <= '0;
          if (chain)        state <= DMA_DESC;
          else if (len != '0) state <= DMA_FETCH;
          else if (capture) state <= DMA_DRAIN;
          else              state <= DMA_DONE;
        end
        DMA_DESC: if (m_ack) begin
          didx_q <= didx_q + 1'b1;
          unique case (didx_q)
            2'd0: src_q  <= m_rdata[AW-1:0];
            2'd1: dst_q  <= m_rdata[AW-1:0];
            2'd2: left_q <= m_rdata[LW-1:0];
            2'd3: begin
              desc_q <= m_rdata[AW-1:0];
              if (left_q != '0) state <= DMA_FETCH;
              else if (cap_q)   state <= DMA_DRAIN;
              else if (m_rdata[AW-1:0] != '0) state <= DMA_DESC;
              else              state <= DMA_DONE;
            end
            default: ;
          endcase
        end
        DMA_FETCH: if (m_ack) begin
          word_q <= m_rdata;
          src_q  <= src_q + AW'(BYTES);
          left_q <= left_q - 1'b1;
          state  <= DMA_PUSH;
        end
        DMA_PUSH: begin
          if (left_q == '0 || (cap_q && fifo_count >= HIGH_MARK)) begin
            settle_q <= '0;
            state    <= cap_q ? DMA_SETTLE : last_st;
          end else begin
            state <= DMA_FETCH;
          end
        end
        DMA_SETTLE: begin
          settle_q <= settle_q + 1'b1;
          if (settle_q == ($bits(settle_q))'(SETTLE_CYC)) state <= DMA_DRAIN;
        end
        DMA_DRAIN: begin
          if (m_ack) dst_q <= dst_q + AW'(BYTES);
          if (fifo_empty || (m_ack && fifo_count == FAW'(1)))
            state <= (left_q == '0) ? last_st : DMA_FETCH;
        end
        DMA_DONE: state <= DMA_IDLE;
        default:  state <= DMA_IDLE;
      endcase
    end
  end

  if (SLACK < 1 || SLACK >= 2**FAW - 1) begin : g_bad_slack
    $error("SLACK must leave room in the FIFO");
  end

  // memory handshake: a request stays up, with stable address, until it is acknowledged
  a_req_stable: assert property (@(posedge clk) disable iff (rst)
    m_req && !m_ack |=> m_req && $stable(m_addr) && $stable(m_we));
endmodule
