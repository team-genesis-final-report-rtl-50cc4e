// vram: 64 KB video RAM, 32K x 16-bit words, dual port.
// Port A (processor/DMA side) reads and writes with byte enables. On a write
// its read data does not change ("no change" mode): a word being written
// never appears on the output in the same cycle, so a reader sharing the port
// keeps the last value it read. Port B is the renderer's read-only port.
// Timing: synchronous reads, data one clock after the address.
// Size and the hold-on-write behaviour follow the console as built here; the
// split into a read/write port and a renderer port is this design's choice.
module vram #(
  parameter int unsigned WORDS = 32768
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic                     a_we,
  input  logic [1:0]               a_be,
  input  logic [15:0]              a_wdata,
  output logic [15:0]              a_rdata,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  output logic [15:0]              b_rdata
);
  logic [15:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_we) begin
      if (a_be[1]) mem[a_addr][15:8] <= a_wdata[15:8];
      if (a_be[0]) mem[a_addr][7:0]  <= a_wdata[7:0];
    end else begin
      a_rdata <= mem[a_addr];
    end
    b_rdata <= mem[b_addr];
  end
endmodule
