// m68k_addr_decode: decodes a 24-bit 68k-side byte address into the target
// module of the console memory map. Purely combinational.
//   $000000-$3FFFFF ROM      $A00000-$A0FFFF Z80 space  $A10000-$A10FFF I/O
//   $A11000-$A11FFF control  $C00000-$DFFFFF VDP        $FF0000-$FFFFFF work RAM
// All other addresses (Sega-reserved areas, $E00000-$FEFFFF) decode to
// R68_NONE. The map is the console's; treating $E00000-$FEFFFF as prohibited
// rather than mirrored follows the map as drawn. $A12000-$AFFFFF is reserved.
// Interface: addr in, region out, offset out (address relative to the region).
module m68k_addr_decode
  import genesis_pkg::*;
(
  input  logic [23:0]  addr,
  output m68k_region_e region,
  output logic [21:0]  offset
);
  always_comb begin
    region = R68_NONE;
    offset = addr[21:0];
    if (addr[23:22] == 2'b00)              region = R68_ROM;
    else if (addr[23:16] == 8'hA0)         region = R68_Z80;
    else if (addr[23:12] == 12'hA10)       region = R68_IO;
    else if (addr[23:12] == 12'hA11)       region = R68_CTRL;
    else if (addr[23:21] == 3'b110)        region = R68_VDP;
    else if (addr[23:16] == 8'hFF)         region = R68_WRAM;
    if (region == R68_Z80 || region == R68_WRAM) offset = {6'd0, addr[15:0]};
    else if (region == R68_IO || region == R68_CTRL) offset = {10'd0, addr[11:0]};
    else if (region == R68_VDP) offset = {1'b0, addr[20:0]};
  end
endmodule
