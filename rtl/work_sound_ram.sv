// work_sound_ram: one 72 KB block RAM holding both the 68k's 64 KB work RAM
// and the Z80's 8 KB sound RAM, as the console is built here (the original
// keeps them in separate chips). Words 0..32767 are work RAM; words
// 32768..36863 are sound RAM.
// Port A (68k side): 16-bit words, byte enables be[1] = upper (even) byte,
// be[0] = lower (odd) byte, 68k big-endian order.
// Port B (Z80 side): 8-bit bytes of the sound RAM; an even byte address is the
// upper half of a word. A single write strobe per port (R/W style).
// Timing: synchronous, read data one clock after the address; a write also
// returns the old word on that port. If both ports write the same byte on one
// edge, port B wins. The word split and port B priority are this design's.
module work_sound_ram #(
  parameter int unsigned WORK_WORDS  = 32768, // 64 KB
  parameter int unsigned SOUND_BYTES = 8192   // 8 KB
) (
  input  logic                           clk,
  // port A: work RAM
  input  logic [$clog2(WORK_WORDS)-1:0]  a_addr,
  input  logic                           a_we,
  input  logic [1:0]                     a_be,
  input  logic [15:0]                    a_wdata,
  output logic [15:0]                    a_rdata,
  // port B: sound RAM
  input  logic [$clog2(SOUND_BYTES)-1:0] b_addr,
  input  logic                           b_we,
  input  logic [7:0]                     b_wdata,
  output logic [7:0]                     b_rdata
);
  localparam int unsigned WORDS = WORK_WORDS + SOUND_BYTES / 2;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [15:0] mem [WORDS];
  logic [AW-1:0] a_word, b_word;
  logic          b_lo_q;

  assign a_word = AW'(a_addr);
  assign b_word = AW'(WORK_WORDS) + AW'(b_addr >> 1);

  always_ff @(posedge clk) begin
    if (a_we && a_be[1]) mem[a_word][15:8] <= a_wdata[15:8];
    if (a_we && a_be[0]) mem[a_word][7:0]  <= a_wdata[7:0];
    if (b_we && !b_addr[0]) mem[b_word][15:8] <= b_wdata;
    if (b_we &&  b_addr[0]) mem[b_word][7:0]  <= b_wdata;
    a_rdata <= mem[a_word];
    b_lo_q  <= b_addr[0];
  end

  logic [15:0] b_word_q;
  always_ff @(posedge clk) b_word_q <= mem[b_word];
  assign b_rdata = b_lo_q ? b_word_q[7:0] : b_word_q[15:8];
endmodule
