// z80_bus_decode: Z80-side address decoder and the bank register that lets
// the Z80 reach any 32 KB bank of the 68k space through $8000-$FFFF.
//   $0000-$1FFF sound RAM   $4000-$4003 YM2612 (A0, D0, A1, D1)
//   $6000 bank register     $7F11 PSG      $8000-$FFFF 68k bank window
// Everything else decodes to RZ_NONE. The map is the console's. The bank
// register is 9 bits (68k address bits 23..15); each write to $6000 shifts
// data bit 0 in at the top, so nine writes load a full bank number. That
// serial loading, and a bank of 0 after reset, are this design's choices.
// Timing: decode is combinational; the bank register updates on the clock
// edge on which bank_we (a write strobe qualified by region==RZ_BANK) is high.
module z80_bus_decode
  import genesis_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        wr,        // write strobe for this cycle
  input  logic [7:0]  wdata,
  output z80_region_e region,
  output logic [23:0] m68k_addr, // 68k byte address when region == RZ_M68K
  output logic [8:0]  bank
);
  always_comb begin
    region = RZ_NONE;
    if (addr[15:13] == 3'b000)          region = RZ_SRAM;
    else if (addr[15:2] == 14'h1000)    region = RZ_YM;    // $4000-$4003
    else if (addr == 16'h6000)          region = RZ_BANK;
    else if (addr == 16'h7F11)          region = RZ_PSG;
    else if (addr[15])                  region = RZ_M68K;
  end

  assign m68k_addr = {bank, addr[14:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          bank <= '0;
    else if (wr && region == RZ_BANK)    bank <= {wdata[0], bank[8:1]};
  end
endmodule
