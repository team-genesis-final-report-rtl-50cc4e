// genesis_top: the console. Two processor buses, each with its own address
// map, join every block:
//
//  * Main (68k) bus, 24-bit byte addresses, 16-bit data. Its master is the
//    68k, or, when bus_arbiter has taken the bus from the 68k (cpu_br /
//    cpu_bg), the VDP's DMA engine or the Z80's bank window. Targets, chosen
//    by m68k_addr_decode: game ROM (game_rom_if: cartridge or flash), work
//    RAM, the VDP ports, controller I/O, the bus control registers, and the
//    whole Z80 space at $A00000 when the 68k holds the Z80 bus.
//  * Z80 bus, 16-bit addresses, 8-bit data. Its master is the Z80, or the
//    68k once the Z80 has given up its bus. Targets, chosen by
//    z80_bus_decode: sound RAM, the YM2612, the bank register, the PSG and
//    the 32 KB bank window into the main bus.
//
// The two CPU cores are not part of this design: their buses are ports. A bus
// cycle on either port is a one-clock request (cpu_req / z80_req) answered
// by a one-clock acknowledge (cpu_ack / z80_ack, the DTACK / WAIT role) some
// clocks later; the master must not start another cycle before it. The 68k
// must not start a cycle while cpu_bg is granted. A byte cycle on the odd
// lane (cpu_be = 01) addresses the odd byte; this matters for the 8-bit
// Z80 space, where each byte is its own register.
// Sound: the YM2612 (14-bit) and PSG (11-bit) outputs are mixed and sampled
// at 48 kHz as 16-bit PCM for the codec. Video: the VDP's 4-bit RGB goes out
// as 8-bit RGB with syncs for the DVI transmitter. Player 1 is a real pad on
// pad1_*; player 2's buttons come from a PS/2 keyboard through pad_mux.
// All logic runs on the 54 MHz clock; clk_enables gives the slower rates as
// enables (cpu_en and z80_en are outputs for the CPU cores).
// The block set and connections follow the console as the document builds it
// on an FPGA; the bus handshake on the CPU ports is this design's.
module genesis_top
  import genesis_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // 68k bus
  input  logic               cpu_req,
  input  logic               cpu_we,
  input  logic [23:1]        cpu_addr,
  input  logic [1:0]         cpu_be,     // {UDS, LDS}
  input  logic [15:0]        cpu_wdata,
  output logic [15:0]        cpu_rdata,
  output logic               cpu_ack,
  output logic               cpu_br,
  input  logic               cpu_bg,
  output logic               cpu_en,
  output logic               vint,
  // Z80 bus
  input  logic               z80_req,
  input  logic               z80_we,
  input  logic [15:0]        z80_addr,
  input  logic [7:0]         z80_wdata,
  output logic [7:0]         z80_rdata,
  output logic               z80_ack,
  output logic               z80_busreq,
  input  logic               z80_busack,
  output logic               z80_reset,
  output logic               z80_en,
  // game ROM sources
  input  logic               sel_flash,
  output logic [22:0]        cart_addr,
  input  logic [15:0]        cart_data,
  output logic               cart_ce_n,
  output logic               cart_oe_n,
  output logic [21:0]        flash_addr,
  input  logic [15:0]        flash_data,
  output logic               flash_ce_n,
  output logic               flash_oe_n,
  // controllers
  input  pad_pins_t          pad1_pins,
  output logic               pad1_select,
  input  logic               ps2_clk,
  input  logic               ps2_data,
  // video
  output logic [7:0]         dvi_r,
  output logic [7:0]         dvi_g,
  output logic [7:0]         dvi_b,
  output logic               dvi_hsync,
  output logic               dvi_vsync,
  output logic               dvi_de,
  // audio
  output logic signed [15:0] pcm,
  output logic               pcm_valid
);
  // ---------------------------------------------------------------- clocks
  logic psg_en, fm_en, fm_smp_en, pcm_en;
  clk_enables u_clk (
    .clk, .rst_n, .cpu_en, .z80_en, .psg_en, .fm_en, .fm_smp_en, .pcm_en
  );

  // ---------------------------------------------------------------- arbiter
  logic dma_bus_req, gnt_dma, gnt_zbank, zbank_req, zbus_gnt_68k;
  logic ctrl_we;
  logic [15:0] ctrl_rdata;
  logic [21:0] mb_off;

  // main-bus master signals
  logic        mb_req, mb_we, mb_ack;
  logic [23:0] mb_addr;
  logic [1:0]  mb_be;
  logic [15:0] mb_wdata, mb_rdata;
  m68k_region_e mb_region, mb_region_q;

  bus_arbiter u_arb (
    .clk, .rst_n, .dma_req(dma_bus_req), .zbank_req, .gnt_dma, .gnt_zbank,
    .m68k_br(cpu_br), .m68k_bg(cpu_bg),
    .ctrl_we, .ctrl_addr(mb_off[11:0]), .ctrl_wdata(mb_wdata), .ctrl_rdata,
    .z80_busreq, .z80_busack, .z80_reset, .zbus_gnt_68k
  );

  // DMA master and Z80 bank-window master
  logic        dma_m_req;
  logic [22:0] dma_m_addr;
  logic        zb_mreq, zb_we;
  logic [23:0] zb_addr;
  logic [7:0]  zb_wdata;

  always_comb begin
    if (gnt_dma) begin
      mb_req = dma_m_req;  mb_we = 1'b0;  mb_addr = {dma_m_addr, 1'b0};
      mb_be  = 2'b11;      mb_wdata = '0;
    end else if (gnt_zbank) begin
      mb_req = zb_mreq;    mb_we = zb_we; mb_addr = zb_addr;
      mb_be  = zb_addr[0] ? 2'b01 : 2'b10;
      mb_wdata = {zb_wdata, zb_wdata};
    end else begin
      mb_req = cpu_req;    mb_we = cpu_we; mb_addr = {cpu_addr, cpu_be == 2'b01};
      mb_be  = cpu_be;     mb_wdata = cpu_wdata;
    end
  end

  m68k_addr_decode u_mdec (.addr(mb_addr), .region(mb_region), .offset(mb_off));

  // ---------------------------------------------------------------- main-bus targets
  logic [15:0] rom_rdata, wram_rdata, vdp_rdata, hold_rdata;
  logic        rom_ack, vdp_ack, simple_ack;
  logic [7:0]  io_rdata;
  logic        zw_ack;
  logic [7:0]  zs_rdata;

  game_rom_if u_rom (
    .clk, .rst_n, .sel_flash, .req(mb_req && mb_region == R68_ROM), .addr(mb_addr[23:1]),
    .rdata(rom_rdata), .ack(rom_ack),
    .cart_addr, .cart_data, .cart_ce_n, .cart_oe_n,
    .flash_addr, .flash_data, .flash_ce_n, .flash_oe_n
  );

  // sound RAM port (Z80 side), defined below
  logic [12:0] sram_addr;
  logic        sram_we;
  logic [7:0]  sram_wdata, sram_rdata;

  work_sound_ram u_ram (
    .clk,
    .a_addr(mb_off[15:1]), .a_we(mb_req && mb_we && mb_region == R68_WRAM),
    .a_be(mb_be), .a_wdata(mb_wdata), .a_rdata(wram_rdata),
    .b_addr(sram_addr), .b_we(sram_we), .b_wdata(sram_wdata), .b_rdata(sram_rdata)
  );

  logic [3:0] vr, vg, vb;
  logic       vhs, vvs, vde;
  vdp u_vdp (
    .clk, .rst_n, .req(mb_req && mb_region == R68_VDP), .we(mb_we), .addr(mb_off[4:0]),
    .wdata(mb_wdata), .rdata(vdp_rdata), .ack(vdp_ack),
    .dma_bus_req, .dma_bus_gnt(gnt_dma),
    .m_req(dma_m_req), .m_addr(dma_m_addr), .m_rdata(mb_rdata), .m_ack(mb_ack && gnt_dma),
    .r(vr), .g(vg), .b(vb), .hsync(vhs), .vsync(vvs), .de(vde), .vint
  );

  dvi_out u_dvi (
    .clk, .rst_n, .r_in(vr), .g_in(vg), .b_in(vb), .hsync_in(vhs), .vsync_in(vvs), .de_in(vde),
    .r_out(dvi_r), .g_out(dvi_g), .b_out(dvi_b),
    .hsync_out(dvi_hsync), .vsync_out(dvi_vsync), .de_out(dvi_de)
  );

  // controllers
  pad_buttons_t kbd_btn;
  pad_pins_t    pad2_pins;
  logic         pad2_select;
  ps2_keyboard u_kbd (
    .clk, .rst_n, .ps2_clk, .ps2_data, .rx_byte(), .rx_valid(), .rx_error(), .btn(kbd_btn)
  );
  pad_mux u_pad2 (.btn(kbd_btn), .select(pad2_select), .pins(pad2_pins));
  io_ports u_io (
    .clk, .rst_n, .addr(mb_off[11:0]), .we(mb_req && mb_we && mb_region == R68_IO && mb_be[0]),
    .wdata(mb_wdata[7:0]), .rdata(io_rdata),
    .pins1(pad1_pins), .pins2(pad2_pins), .select1(pad1_select), .select2(pad2_select)
  );

  assign ctrl_we = mb_req && mb_we && mb_region == R68_CTRL;

  // one-clock targets: work RAM, I/O, control, unmapped, Z80 space not held
  logic z80win_go;
  assign z80win_go = mb_req && mb_region == R68_Z80 && zbus_gnt_68k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      simple_ack  <= 1'b0;
      mb_region_q <= R68_NONE;
      hold_rdata  <= '0;
    end else begin
      simple_ack <= mb_req && (mb_region inside {R68_WRAM, R68_IO, R68_CTRL, R68_NONE} ||
                               (mb_region == R68_Z80 && !zbus_gnt_68k));
      if (mb_req) begin
        mb_region_q <= mb_region;
        unique case (mb_region)
          R68_IO:   hold_rdata <= {io_rdata, io_rdata};
          R68_CTRL: hold_rdata <= ctrl_rdata;
          default:  hold_rdata <= 16'hFFFF;
        endcase
      end
    end
  end

  always_comb begin
    unique case (mb_region_q)
      R68_ROM:  mb_rdata = rom_rdata;
      R68_WRAM: mb_rdata = wram_rdata;
      R68_VDP:  mb_rdata = vdp_rdata;
      R68_Z80:  mb_rdata = zbus_gnt_68k ? {zs_rdata, zs_rdata} : 16'hFFFF;
      default:  mb_rdata = hold_rdata;
    endcase
  end

  assign mb_ack    = rom_ack | vdp_ack | simple_ack | zw_ack;
  assign cpu_ack   = mb_ack && !gnt_dma && !gnt_zbank;
  assign cpu_rdata = mb_rdata;

  // ---------------------------------------------------------------- Z80 bus
  logic        zs_req, zs_we, zs_ack;
  logic [15:0] zs_addr;
  logic [7:0]  zs_wdata;
  z80_region_e zs_region, zs_region_q;
  logic [23:0] zs_m68k_addr;

  always_comb begin
    if (zbus_gnt_68k) begin
      zs_req   = z80win_go;
      zs_we    = mb_we;
      zs_addr  = mb_addr[15:0];
      zs_wdata = mb_addr[0] ? mb_wdata[7:0] : mb_wdata[15:8];
    end else begin
      zs_req   = z80_req;
      zs_we    = z80_we;
      zs_addr  = z80_addr;
      zs_wdata = z80_wdata;
    end
  end

  z80_bus_decode u_zdec (
    .clk, .rst_n, .addr(zs_addr), .wr(zs_req && zs_we), .wdata(zs_wdata),
    .region(zs_region), .m68k_addr(zs_m68k_addr), .bank()
  );

  assign sram_addr  = zs_addr[12:0];
  assign sram_we    = zs_req && zs_we && zs_region == RZ_SRAM;
  assign sram_wdata = zs_wdata;

  logic [7:0]         ym_rdata;
  logic signed [13:0] ym_out;
  logic signed [10:0] psg_out;
  ym2612 u_ym (
    .clk, .rst_n, .smp_en(fm_smp_en), .we(zs_req && zs_we && zs_region == RZ_YM),
    .addr(zs_addr[1:0]), .wdata(zs_wdata), .rdata(ym_rdata), .out(ym_out), .out_valid()
  );
  psg_sn76489 u_psg (
    .clk, .rst_n, .en(psg_en), .we(zs_req && zs_we && zs_region == RZ_PSG),
    .wdata(zs_wdata), .out(psg_out)
  );
  audio_mixer u_mix (
    .clk, .rst_n, .fm_in(ym_out), .psg_in(psg_out), .pcm_en, .pcm_out(pcm), .pcm_valid
  );

  // Z80-side responses
  logic       zsimple_ack, zb_busy, zb_issued, zb_done;
  logic [7:0] zhold, zb_rdata;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zsimple_ack <= 1'b0;
      zs_region_q <= RZ_NONE;
      zhold       <= '0;
      zb_busy     <= 1'b0;
      zb_issued   <= 1'b0;
      zb_done     <= 1'b0;
      zb_we       <= 1'b0;
      zb_addr     <= '0;
      zb_wdata    <= '0;
      zb_rdata    <= '0;
    end else begin
      zb_done     <= 1'b0;
      zsimple_ack <= zs_req && !(zs_region == RZ_M68K && !zbus_gnt_68k);
      if (zs_req) begin
        zs_region_q <= zs_region;
        zhold <= (zs_region == RZ_YM) ? ym_rdata : 8'hFF;
      end
      // bank window: borrow the main bus for one cycle
      if (zs_req && zs_region == RZ_M68K && !zbus_gnt_68k) begin
        zb_busy  <= 1'b1;
        zb_we    <= zs_we;
        zb_addr  <= zs_m68k_addr;
        zb_wdata <= zs_wdata;
      end else if (zb_busy && gnt_zbank && !zb_issued) begin
        zb_issued <= 1'b1;
      end else if (zb_busy && zb_issued && mb_ack) begin
        zb_busy   <= 1'b0;
        zb_issued <= 1'b0;
        zb_done   <= 1'b1;
        zb_rdata  <= zb_addr[0] ? mb_rdata[7:0] : mb_rdata[15:8];
      end
    end
  end
  assign zbank_req = zb_busy;
  assign zb_mreq   = zb_busy && gnt_zbank && !zb_issued;

  always_comb begin
    unique case (zs_region_q)
      RZ_SRAM: zs_rdata = sram_rdata;
      RZ_M68K: zs_rdata = zbus_gnt_68k ? zhold : zb_rdata;
      default: zs_rdata = zhold;
    endcase
  end

  assign zs_ack    = zsimple_ack || zb_done;
  assign zw_ack    = zs_ack && zbus_gnt_68k && mb_region_q == R68_Z80;
  assign z80_ack   = zs_ack && !zbus_gnt_68k;
  assign z80_rdata = zs_rdata;
endmodule
