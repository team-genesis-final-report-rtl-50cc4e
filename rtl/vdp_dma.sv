// vdp_dma: the video processor's DMA engine for memory-to-video transfers.
// On start it asks for the 68k bus (req_bus) and, once granted, reads len
// words (len = 0 means 65536) starting at word address src from the main bus
// (game ROM or work RAM), one read at a time, and hands each word to the
// video processor's write path (wr, wdata), which stores it at the current
// video-memory address and steps that address. When done it drops req_bus
// and busy.
// The transfer sources and the bus take-over are the document's; the
// one-read-at-a-time handshake is this design's. VRAM fill and copy modes of
// the original chip are not built.
// Timing: one word per (bus read latency + 1) clocks; busy rises the clock
// after start and falls on the same edge that raises the last wr. m_req is a
// one-clock request; the bus holds the read until it returns m_ack.
module vdp_dma (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [22:0] src,      // word address
  input  logic [15:0] len,      // words, 0 = 65536
  output logic        busy,
  output logic        req_bus,
  input  logic        gnt,
  output logic        m_req,
  output logic [22:0] m_addr,
  input  logic [15:0] m_rdata,
  input  logic        m_ack,
  output logic        wr,
  output logic [15:0] wdata
);
  typedef enum logic [1:0] {D_IDLE, D_WAIT_GNT, D_READ, D_WAIT_ACK} dma_state_e;
  dma_state_e  state;
  logic [16:0] remain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= D_IDLE;
      remain <= '0;
      m_addr <= '0;
      m_req  <= 1'b0;
      wr     <= 1'b0;
      wdata  <= '0;
    end else begin
      wr    <= 1'b0;
      m_req <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          state  <= D_WAIT_GNT;
          m_addr <= src;
          remain <= (len == 16'd0) ? 17'h10000 : {1'b0, len};
        end
        D_WAIT_GNT: if (gnt) state <= D_READ;
        D_READ: begin
          m_req <= 1'b1;
          state <= D_WAIT_ACK;
        end
        D_WAIT_ACK: if (m_ack) begin
          wr     <= 1'b1;
          wdata  <= m_rdata;
          m_addr <= m_addr + 1'b1;
          remain <= remain - 1'b1;
          state  <= (remain == 17'd1) ? D_IDLE : D_READ;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign busy    = (state != D_IDLE);
  assign req_bus = busy;

`ifndef SYNTHESIS
  a_read_needs_grant: assert property (@(posedge clk) disable iff (!rst_n) m_req |-> gnt);
`endif
endmodule
