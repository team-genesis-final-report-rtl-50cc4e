// vdp_ctrl: host side of the video processor: the data and control ports,
// the register file and the write path into video RAM, color RAM and
// vertical scroll RAM.
// Ports (byte offset in the VDP area): $0/$2 data, $4/$6 control, $8-$E
// H/V counter (read only).
// Control port writes: a word 10rr_rrrr_dddd_dddd writes d to register r
// (24 registers). Any other word starts a two-word command: the first gives
// access code bits 1:0 (bits 15:14) and address bits 13:0, the second access
// code bits 5:2 (bits 7:4) and address bits 15:14 (bits 1:0). Code bit 5 with
// DMA enabled (register 1 bit 4) and register 23 bit 7 clear starts a DMA
// from 68k memory: source word address {reg23[6:0], reg22, reg21}, length
// {reg20, reg19} words.
// Data port writes (and DMA words) go to VRAM (code 0001), CRAM (0011) or
// VSRAM (0101) at the current address, which then advances by register 15.
// Data port reads with code 0000 return the VRAM word (after 2 clocks).
// Control port read returns status: bit 9 FIFO empty (always 1), bit 3
// vertical blank, bit 2 horizontal blank, bit 1 DMA busy; it also cancels a
// half-written command.
// The ports, register count, memories and DMA source are the console's (the
// command-word layout is the original chip's, not the document's). CRAM and
// VSRAM reads, DMA fill and copy are not built.
// Timing: a host request is acknowledged (ack) one clock later, two for reads
// of the data port. CRAM words 0000BBB0GGG0RRR0 are stored as {B,G,R}.
module vdp_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  // host port
  input  logic        req,
  input  logic        we,
  input  logic [4:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        ack,
  // registers
  output logic [7:0]  regs [24],
  // DMA
  output logic        dma_start,
  output logic [22:0] dma_src,
  output logic [15:0] dma_len,
  input  logic        dma_wr,
  input  logic [15:0] dma_wdata,
  input  logic        dma_busy,
  // raster state
  input  logic        vblank,
  input  logic        hblank,
  input  logic [8:0]  h,
  input  logic [8:0]  v,
  // memories
  output logic [14:0] vram_addr,
  output logic        vram_we,
  output logic [1:0]  vram_be,
  output logic [15:0] vram_wdata,
  input  logic [15:0] vram_rdata,
  output logic        cram_we,
  output logic [5:0]  cram_addr,
  output logic [8:0]  cram_wdata,
  output logic        vsram_we,
  output logic [5:0]  vsram_addr,
  output logic [9:0]  vsram_wdata
);
  logic [5:0]  code;
  logic [15:0] vaddr;
  logic        pending;
  logic [1:0]  rd_wait;

  assign dma_src = {regs[23][6:0], regs[22], regs[21]};
  assign dma_len = {regs[20], regs[19]};

  // one write into video memory, from the data port or from DMA
  logic        mem_wr;
  logic [15:0] mem_data;
  assign mem_wr   = dma_wr || (req && we && addr[4:2] == 3'd0);
  assign mem_data = dma_wr ? dma_wdata : wdata;

  always_comb begin
    vram_addr   = vaddr[15:1];
    vram_be     = 2'b11;
    vram_wdata  = mem_data;
    vram_we     = mem_wr && code[3:0] == 4'b0001;
    cram_we     = mem_wr && code[3:0] == 4'b0011;
    cram_addr   = vaddr[6:1];
    cram_wdata  = {mem_data[11:9], mem_data[7:5], mem_data[3:1]};
    vsram_we    = mem_wr && code[3:0] == 4'b0101;
    vsram_addr  = vaddr[6:1];
    vsram_wdata = mem_data[9:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 24; i++) regs[i] <= '0;
      code      <= '0;
      vaddr     <= '0;
      pending   <= 1'b0;
      ack       <= 1'b0;
      rdata     <= '0;
      rd_wait   <= '0;
      dma_start <= 1'b0;
    end else begin
      ack       <= 1'b0;
      dma_start <= 1'b0;
      if (mem_wr) vaddr <= vaddr + {8'd0, regs[15]};
      if (rd_wait != 0) begin
        rd_wait <= rd_wait - 1'b1;
        if (rd_wait == 2'd1) begin
          rdata <= vram_rdata;
          ack   <= 1'b1;
          vaddr <= vaddr + {8'd0, regs[15]};
        end
      end else if (req) begin
        unique case (addr[4:2])
          3'd0: begin                  // data port
            pending <= 1'b0;
            if (we) ack <= 1'b1;
            else if (code[3:0] == 4'b0000) rd_wait <= 2'd2;
            else begin
              rdata <= '0;
              ack   <= 1'b1;
            end
          end
          3'd1: begin                  // control port
            ack <= 1'b1;
            if (we) begin
              if (pending) begin
                pending     <= 1'b0;
                code[5:2]   <= wdata[7:4];
                vaddr[15:14] <= wdata[1:0];
                if (wdata[7] && regs[1][4] && !regs[23][7]) dma_start <= 1'b1;
              end else if (wdata[15:14] == 2'b10) begin
                if (wdata[12:8] < 5'd24) regs[wdata[12:8]] <= wdata[7:0];
              end else begin
                pending      <= 1'b1;
                code[1:0]    <= wdata[15:14];
                vaddr[13:0]  <= wdata[13:0];
              end
            end else begin
              pending <= 1'b0;
              rdata   <= {6'd0, 1'b1, 5'd0, vblank, hblank, dma_busy, 1'b0};
            end
          end
          default: begin               // H/V counter
            ack   <= 1'b1;
            rdata <= {v[7:0], h[8:1]};
          end
        endcase
      end
    end
  end
endmodule
