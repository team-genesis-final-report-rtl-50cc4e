// genesis_pkg: types and address constants shared by the console blocks.
// The 68k and Z80 address maps follow the console's memory map: the 68k sees
// cartridge ROM, the Z80 window, I/O, control registers, the VDP and work RAM
// in a 24-bit space; the Z80 sees sound RAM, the FM chip, the bank register,
// the PSG and a 32 KB window into the 68k space in a 16-bit space.
package genesis_pkg;

  // Target selected by a 68k-side address
  typedef enum logic [2:0] {
    R68_NONE = 3'd0,  // reserved or prohibited area
    R68_ROM  = 3'd1,  // $000000-$3FFFFF game ROM (cartridge or flash)
    R68_Z80  = 3'd2,  // $A00000-$A0FFFF Z80 address space
    R68_IO   = 3'd3,  // $A10000-$A10FFF controller I/O
    R68_CTRL = 3'd4,  // $A11000-$A11FFF Z80 bus request / reset control
    R68_VDP  = 3'd5,  // $C00000-$DFFFFF video processor ports
    R68_WRAM = 3'd6   // $FF0000-$FFFFFF work RAM
  } m68k_region_e;

  // Target selected by a Z80-side address
  typedef enum logic [2:0] {
    RZ_NONE = 3'd0,   // reserved or prohibited
    RZ_SRAM = 3'd1,   // $0000-$1FFF sound RAM
    RZ_YM   = 3'd2,   // $4000-$4003 YM2612 address/data ports
    RZ_BANK = 3'd3,   // $6000 bank register
    RZ_PSG  = 3'd4,   // $7F11 PSG
    RZ_M68K = 3'd5    // $8000-$FFFF window into the 68k space
  } z80_region_e;

  // Buttons of a 3-button pad, 1 = pressed
  typedef struct packed {
    logic up;
    logic down;
    logic left;
    logic right;
    logic a;
    logic b;
    logic c;
    logic start;
  } pad_buttons_t;

  // Pad pins as the console reads them (active low): pins 1,2,3,4,6,9
  typedef struct packed {
    logic p9;
    logic p6;
    logic p4;
    logic p3;
    logic p2;
    logic p1;
  } pad_pins_t;

endpackage
