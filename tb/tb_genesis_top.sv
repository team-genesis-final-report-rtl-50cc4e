// tb_genesis_top: end-to-end test of the whole console at its default sizes
// and rates (no parameter overrides). The bench plays the parts that are not
// in the design: a 68k and a Z80 as bus-functional models (one request, wait
// for the acknowledge; the 68k gives up its bus on BR with BG, the Z80 on
// BUSREQ with BUSACK), a cartridge and a flash chip as ROM models whose
// words are a function of the address (the flash stores them byte-swapped),
// a 3-button pad on port 1 and a PS/2 keyboard on port 2.
// Scenario: ROM reads from both sources; work RAM; Z80 reset release and bus
// request through the control registers; 68k writes into sound RAM through
// the $A00000 window and the Z80 reads them back; YM2612 programming through
// the window, timer A flag read back, an FM note on the PCM output; PSG tone
// from the Z80; Z80 reads and writes through the bank window into ROM and
// work RAM (the arbiter takes the 68k bus); VDP set-up, two DMA transfers from
// ROM to VRAM while the 68k stalls, VRAM read-back, and three checked frames on
// the DVI output: display off (background only), display on (a plane), and
// shadow on; pad reads with both Select levels, keyboard make and break.
// Every mechanism is counted; one that never happened is a failure.
module tb_genesis_top
  import genesis_pkg::*;
;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cpu_req = 0, cpu_we = 0, cpu_ack, cpu_br, cpu_bg = 0, cpu_en, vint;
  logic [23:1] cpu_addr = 0;
  logic [1:0] cpu_be = 0;
  logic [15:0] cpu_wdata = 0, cpu_rdata;
  logic z80_req = 0, z80_we = 0, z80_ack, z80_busreq, z80_busack = 0, z80_reset, z80_en;
  logic [15:0] z80_addr = 0;
  logic [7:0] z80_wdata = 0, z80_rdata;
  logic sel_flash = 0;
  logic [22:0] cart_addr;
  logic [15:0] cart_data, flash_data;
  logic cart_ce_n, cart_oe_n, flash_ce_n, flash_oe_n;
  logic [21:0] flash_addr;
  pad_pins_t pad1_pins;
  logic pad1_select;
  logic ps2_clk = 1, ps2_data = 1;
  logic [7:0] dvi_r, dvi_g, dvi_b;
  logic dvi_hsync, dvi_vsync, dvi_de;
  logic signed [15:0] pcm;
  logic pcm_valid;

  genesis_top dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", m); end
  endtask

  // ---------------------------------------------------------------- ROM models
  function automatic logic [15:0] rom_word(logic [22:0] wa);
    if (wa >= 23'h8000 && wa < 23'h8400) return 16'h0001;   // name entries
    if (wa >= 23'h8400 && wa < 23'h8410) return 16'h0000;   // empty pattern
    return 16'(wa * 16'h2F1B) ^ 16'hA55A;
  endfunction
  function automatic logic [15:0] flash_word(logic [22:0] wa);
    return 16'(wa * 16'h1D87) ^ 16'h3C3C;
  endfunction
  assign cart_data  = cart_ce_n ? 16'h0000 : rom_word(cart_addr);
  assign flash_data = flash_ce_n ? 16'h0000 : {flash_word(23'(flash_addr))[7:0], flash_word(23'(flash_addr))[15:8]};

  // ---------------------------------------------------------------- 68k model
  int n_stall = 0, n_bg = 0;
  bit cpu_busy = 0;
  always @(posedge clk) begin
    if (!cpu_br) cpu_bg <= 0;
    else if (!cpu_bg && !cpu_busy) begin cpu_bg <= 1; n_bg++; end
  end
  task automatic cpu_cycle(input bit w, input logic [23:0] a, input logic [1:0] be,
                           input logic [15:0] d, output logic [15:0] q);
    int n;
    @(negedge clk);
    if (cpu_bg || cpu_br) begin
      n_stall++;
      while (cpu_bg || cpu_br) @(negedge clk);
    end
    cpu_busy = 1;
    cpu_req = 1; cpu_we = w; cpu_addr = a[23:1]; cpu_be = be; cpu_wdata = d;
    @(negedge clk); cpu_req = 0;
    n = 0;
    while (!cpu_ack && n < 200) begin @(negedge clk); n++; end
    if (n >= 200) begin failures++; $display("FAIL 68k cycle at %h never acknowledged", a); end
    q = cpu_rdata;
    cpu_busy = 0;
  endtask
  logic [15:0] junk;
  task automatic wr16(input logic [23:0] a, input logic [15:0] d);
    cpu_cycle(1, a, 2'b11, d, junk);
  endtask
  task automatic rd16(input logic [23:0] a, output logic [15:0] q);
    cpu_cycle(0, a, 2'b11, 0, q);
  endtask
  task automatic wr8(input logic [23:0] a, input logic [7:0] d);
    cpu_cycle(1, a, a[0] ? 2'b01 : 2'b10, {d, d}, junk);
  endtask
  task automatic rd8(input logic [23:0] a, output logic [7:0] q);
    logic [15:0] w;
    cpu_cycle(0, a, a[0] ? 2'b01 : 2'b10, 0, w);
    q = a[0] ? w[7:0] : w[15:8];
  endtask

  // ---------------------------------------------------------------- Z80 model
  bit z80_busy = 0;
  int n_busack = 0;
  always @(posedge clk) begin
    if (!z80_busreq) z80_busack <= 0;
    else if (!z80_busack && !z80_busy) begin z80_busack <= 1; n_busack++; end
  end
  task automatic z80_cycle(input bit w, input logic [15:0] a, input logic [7:0] d, output logic [7:0] q);
    int n;
    @(negedge clk);
    while (z80_busack || z80_busreq || z80_reset) @(negedge clk);
    z80_busy = 1;
    z80_req = 1; z80_we = w; z80_addr = a; z80_wdata = d;
    @(negedge clk); z80_req = 0;
    n = 0;
    while (!z80_ack && n < 400) begin @(negedge clk); n++; end
    if (n >= 400) begin failures++; $display("FAIL Z80 cycle at %h never acknowledged", a); end
    q = z80_rdata;
    z80_busy = 0;
  endtask
  logic [7:0] zjunk;
  task automatic zwr(input logic [15:0] a, input logic [7:0] d);
    z80_cycle(1, a, d, zjunk);
  endtask
  task automatic zbank(input logic [8:0] bank);
    for (int i = 0; i < 9; i++) zwr(16'h6000, {7'd0, bank[i]});
  endtask

  // ---------------------------------------------------------------- pad 1 model
  pad_buttons_t pad1_btn;
  always_comb begin
    pad1_pins.p1 = !pad1_btn.up;
    pad1_pins.p2 = !pad1_btn.down;
    pad1_pins.p3 = pad1_select ? !pad1_btn.left  : 1'b0;
    pad1_pins.p4 = pad1_select ? !pad1_btn.right : 1'b0;
    pad1_pins.p6 = pad1_select ? !pad1_btn.b     : !pad1_btn.a;
    pad1_pins.p9 = pad1_select ? !pad1_btn.c     : !pad1_btn.start;
  end

  // ---------------------------------------------------------------- PS/2 keyboard model
  task automatic ps2_send(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (40) @(negedge clk);
      ps2_clk = 0;
      repeat (40) @(negedge clk);
      ps2_clk = 1;
    end
    repeat (200) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- video monitor
  bit vid_check = 0;
  logic [7:0] exp_r, exp_g, exp_b;
  int frame_px = 0, vid_bad = 0;
  always @(posedge clk) if (rst_n && vid_check && dvi_de) begin
    frame_px++;
    checks++;
    if ({dvi_r, dvi_g, dvi_b} !== {exp_r, exp_g, exp_b}) begin
      failures++; vid_bad++;
      if (vid_bad < 5) $display("FAIL pixel %h%h%h expected %h%h%h", dvi_r, dvi_g, dvi_b, exp_r, exp_g, exp_b);
    end
  end
  // the monitor counts clocks with de; each pixel lasts 10 clocks
  task automatic check_frame(input logic [8:0] c, input bit shadow, input string what);
    logic [3:0] r4, g4, b4;
    r4 = shadow ? {1'b0, c[2:0]} : {c[2:0], 1'b0};
    g4 = shadow ? {1'b0, c[5:3]} : {c[5:3], 1'b0};
    b4 = shadow ? {1'b0, c[8:6]} : {c[8:6], 1'b0};
    exp_r = {r4, 4'h0}; exp_g = {g4, 4'h0}; exp_b = {b4, 4'h0};
    @(posedge dvi_vsync);
    frame_px = 0;
    vid_check = 1;
    @(posedge dvi_vsync);
    vid_check = 0;
    chk(frame_px == 256 * 224 * 10, $sformatf("%s: %0d pixel clocks", what, frame_px));
  endtask

  // ---------------------------------------------------------------- audio monitor
  int pcm_n = 0, pcm_big = 0, pcm_pos = 0, pcm_neg = 0;
  always @(posedge clk) if (rst_n && pcm_valid) begin
    pcm_n++;
    if (pcm > 16'sd2000 || pcm < -16'sd2000) pcm_big++;
    if (pcm > 0) pcm_pos++;
    if (pcm < 0) pcm_neg++;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_cart = 0, n_flash = 0, n_wram = 0, n_zreset = 0, n_zbusreq = 0, n_window = 0;
  int n_zsram = 0, n_ym_timer = 0, n_fm = 0, n_psg = 0, n_bank_rd = 0, n_bank_wr = 0;
  int n_dma = 0, n_vram_rd = 0, n_disp_off = 0, n_disp_on = 0, n_shadow = 0;
  int n_pad = 0, n_kbd = 0, n_vint = 0, n_unmapped = 0;
  always @(posedge clk) if (rst_n && vint) n_vint++;

  function automatic logic [7:0] pad_read(pad_buttons_t bt, bit s);
    if (s) return {1'b0, s, !bt.c, !bt.b, !bt.right, !bt.left, !bt.down, !bt.up};
    return {1'b0, s, !bt.start, !bt.a, 1'b0, 1'b0, !bt.down, !bt.up};
  endfunction

  initial begin
    logic [15:0] q;
    logic [7:0] b8;
    pad1_btn = '0;
    repeat (5) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // ---- game ROM: cartridge, then flash
    for (int i = 0; i < 8; i++) begin
      logic [23:0] a;
      a = {2'b00, 21'($urandom), 1'b0};
      rd16(a, q);
      chk(q == rom_word(a[23:1]), "cartridge word");
      n_cart++;
    end
    sel_flash = 1;
    for (int i = 0; i < 8; i++) begin
      logic [23:0] a;
      a = {2'b00, 21'($urandom), 1'b0};
      rd16(a, q);
      chk(q == flash_word(a[23:1]), $sformatf("flash word %h: %h", a, q));
      n_flash++;
    end
    sel_flash = 0;

    // ---- work RAM, with byte writes
    wr16(24'hFF0100, 16'h1234);
    wr8(24'hFF0101, 8'hAB);
    rd16(24'hFF0100, q);
    chk(q == 16'h12AB, "work RAM byte lane");
    wr16(24'hFFFFFE, 16'hBEEF);
    rd16(24'hFFFFFE, q);
    chk(q == 16'hBEEF, "work RAM top");
    n_wram += 2;
    rd16(24'hE00000, q);           // unmapped area answers all ones
    chk(q == 16'hFFFF, "unmapped read");
    n_unmapped++;

    // ---- Z80 reset release and bus request
    chk(z80_reset == 1'b1, "Z80 held in reset after power-up");
    wr16(24'hA11200, 16'h0100);
    chk(z80_reset == 1'b0, "Z80 reset released");
    n_zreset++;
    wr16(24'hA11100, 16'h0100);
    begin
      int n;
      n = 0;
      do begin rd16(24'hA11100, q); n++; end while (q[8] && n < 50);
      chk(!q[8], "Z80 bus granted to 68k");
      n_zbusreq++;
    end
    // 68k writes sound RAM through the window
    for (int i = 0; i < 16; i++) wr8(24'hA00100 + 24'(i), 8'(i * 7 + 3));
    rd8(24'hA00105, b8);
    chk(b8 == 8'(5 * 7 + 3), "68k reads back sound RAM");
    n_window++;
    // YM2612 timer A through the window
    wr8(24'hA04000, 8'h24); wr8(24'hA04001, 8'hFF);
    wr8(24'hA04000, 8'h25); wr8(24'hA04001, 8'h03);
    wr8(24'hA04000, 8'h27); wr8(24'hA04001, 8'h05);
    repeat (3000) @(negedge clk);
    rd8(24'hA04000, b8);
    chk(b8[0], "YM2612 timer A flag seen by 68k");
    if (b8[0]) n_ym_timer++;
    wr8(24'hA04000, 8'h27); wr8(24'hA04001, 8'h10);
    rd8(24'hA04000, b8);
    chk(!b8[0], "timer A flag reset");
    // an FM note: channel 1, algorithm 7, operator 1 only
    wr8(24'hA04000, 8'hB0); wr8(24'hA04001, 8'h07);
    wr8(24'hA04000, 8'hB4); wr8(24'hA04001, 8'hC0);
    wr8(24'hA04000, 8'h30); wr8(24'hA04001, 8'h01);
    wr8(24'hA04000, 8'h40); wr8(24'hA04001, 8'h00);
    wr8(24'hA04000, 8'h50); wr8(24'hA04001, 8'h1F);
    wr8(24'hA04000, 8'h80); wr8(24'hA04001, 8'h0F);
    wr8(24'hA04000, 8'hA4); wr8(24'hA04001, 8'h22);
    wr8(24'hA04000, 8'hA0); wr8(24'hA04001, 8'h69);
    wr8(24'hA04000, 8'h28); wr8(24'hA04001, 8'h10);
    wr16(24'hA11100, 16'h0000);    // give the bus back to the Z80
    pcm_big = 0; pcm_n = 0;
    repeat (60000) @(negedge clk);
    chk(pcm_n >= 50, $sformatf("PCM samples %0d", pcm_n));
    chk(pcm_big > 10, $sformatf("FM note on the PCM output (%0d loud samples)", pcm_big));
    if (pcm_big > 10) n_fm++;
    // the Z80 reads what the 68k wrote, then keys the note off
    z80_cycle(0, 16'h0105, 0, b8);
    chk(b8 == 8'(5 * 7 + 3), "Z80 reads sound RAM");
    n_zsram++;
    zwr(16'h4000, 8'h28); zwr(16'h4001, 8'h00);
    repeat (60000) @(negedge clk);
    // PSG square wave from the Z80
    zwr(16'h7F11, 8'h8E); zwr(16'h7F11, 8'h01);   // tone 0 = 0x1E
    zwr(16'h7F11, 8'h90);                          // full volume
    pcm_pos = 0; pcm_neg = 0;
    repeat (60000) @(negedge clk);
    chk(pcm_pos > 5 && pcm_neg > 5, $sformatf("PSG square wave (%0d/%0d)", pcm_pos, pcm_neg));
    if (pcm_pos > 5 && pcm_neg > 5) n_psg++;
    zwr(16'h7F11, 8'h9F);
    // Z80 bank window: read cartridge ROM at bank 5, then write work RAM
    zbank(9'd5);
    for (int i = 0; i < 4; i++) begin
      logic [15:0] za;
      logic [23:0] ma;
      za = 16'h8000 | 16'($urandom_range(0, 16'h7FFF));
      ma = {9'd5, za[14:0]};
      z80_cycle(0, za, 0, b8);
      q = rom_word(ma[23:1]);
      chk(b8 == (ma[0] ? q[7:0] : q[15:8]), "Z80 bank window reads ROM");
      n_bank_rd++;
    end
    zbank(9'h1FF);                 // $FF8000-$FFFFFF
    zwr(16'h8203, 8'h5C);
    zwr(16'h8202, 8'hC5);
    rd16(24'hFF8202, q);
    chk(q == 16'hC55C, $sformatf("Z80 bank write into work RAM: %h", q));
    n_bank_wr++;

    // ---- VDP set-up: display off, DMA on, A and B at $C000, 32x32, increment 2
    wr16(24'hC00004, 16'h8114);
    wr16(24'hC00004, 16'h8230);
    wr16(24'hC00004, 16'h8406);
    wr16(24'hC00004, 16'h8705);
    wr16(24'hC00004, 16'h8C00);
    wr16(24'hC00004, 16'h8F02);
    wr16(24'hC00004, 16'h9000);
    // CRAM: entries 1 and 5
    wr16(24'hC00004, 16'hC002); wr16(24'hC00004, 16'h0000);
    wr16(24'hC00000, 16'h0E2C);
    wr16(24'hC00004, 16'hC00A); wr16(24'hC00004, 16'h0000);
    wr16(24'hC00000, 16'h0A46);
    // pattern 1 from the 68k
    wr16(24'hC00004, 16'h4020); wr16(24'hC00004, 16'h0000);
    for (int i = 0; i < 16; i++) wr16(24'hC00000, 16'h1111);
    // DMA 1: name table (1024 words of $0001) from ROM $010000
    wr16(24'hC00004, 16'h9300); wr16(24'hC00004, 16'h9404);
    wr16(24'hC00004, 16'h9500); wr16(24'hC00004, 16'h9680); wr16(24'hC00004, 16'h9700);
    wr16(24'hC00004, 16'h4000); wr16(24'hC00004, 16'h0083);
    begin
      int n, st;
      st = n_stall;
      n = 0;
      do begin rd16(24'hC00004, q); n++; end while (q[1] && n < 100);
      chk(!q[1], "DMA 1 done");
      chk(n_stall > st, "68k stalled during DMA");
      n_dma++;
    end
    // DMA 2: empty pattern 0 from ROM $010800
    wr16(24'hC00004, 16'h9310); wr16(24'hC00004, 16'h9400);
    wr16(24'hC00004, 16'h9500); wr16(24'hC00004, 16'h9684);
    wr16(24'hC00004, 16'h4000); wr16(24'hC00004, 16'h0080);
    do rd16(24'hC00004, q); while (q[1]);
    n_dma++;
    // read back part of the name table
    wr16(24'hC00004, 16'h0000); wr16(24'hC00004, 16'h0003);
    for (int i = 0; i < 4; i++) begin
      rd16(24'hC00000, q);
      chk(q == 16'h0001, $sformatf("name table word %0d = %h", i, q));
      n_vram_rd++;
    end
    // scroll: clear both horizontal scroll words ($FC00) and both VSRAM entries
    wr16(24'hC00004, 16'h8D3F);
    wr16(24'hC00004, 16'h7C00); wr16(24'hC00004, 16'h0003);
    wr16(24'hC00000, 16'h0000); wr16(24'hC00000, 16'h0000);
    wr16(24'hC00004, 16'h4000); wr16(24'hC00004, 16'h0010);
    wr16(24'hC00000, 16'h0000); wr16(24'hC00000, 16'h0000);

    // ---- frames
    check_frame(9'({3'b101, 3'b010, 3'b011}), 0, "display off");   // CRAM 5 = $0A46
    n_disp_off++;
    wr16(24'hC00004, 16'h8174);
    @(posedge dvi_vsync);
    check_frame(9'({3'b111, 3'b001, 3'b110}), 0, "display on");    // CRAM 1 = $0E2C
    n_disp_on++;
    wr16(24'hC00004, 16'h8C08);
    @(posedge dvi_vsync);
    check_frame(9'({3'b111, 3'b001, 3'b110}), 1, "shadow");
    n_shadow++;

    // ---- controllers
    wr8(24'hA10009, 8'h40);        // port 1 Select is an output
    wr8(24'hA1000B, 8'h40);        // port 2 Select is an output
    for (int i = 0; i < 8; i++) begin
      bit s;
      s = i[0];
      pad1_btn = pad_buttons_t'($urandom);
      wr8(24'hA10003, {1'b0, s, 6'd0});
      chk(pad1_select == s, "pad 1 Select pin");
      rd8(24'hA10003, b8);
      chk(b8 == pad_read(pad1_btn, s), $sformatf("pad 1 read %h expected %h", b8, pad_read(pad1_btn, s)));
      n_pad++;
    end
    ps2_send(8'h1A);               // Z pressed: button A
    ps2_send(8'hE0); ps2_send(8'h74); // right arrow pressed
    wr8(24'hA10005, 8'h00);
    rd8(24'hA10005, b8);
    chk(b8 == pad_read(8'b0000_1000, 0), $sformatf("keyboard A pressed: %h", b8));
    wr8(24'hA10005, 8'h40);
    rd8(24'hA10005, b8);
    chk(b8 == pad_read(8'b0001_0000, 1), $sformatf("keyboard right pressed: %h", b8));
    ps2_send(8'hF0); ps2_send(8'h1A);
    ps2_send(8'hE0); ps2_send(8'hF0); ps2_send(8'h74);
    rd8(24'hA10005, b8);
    chk(b8 == pad_read(8'h00, 1), "keyboard keys released");
    wr8(24'hA10005, 8'h00);
    rd8(24'hA10005, b8);
    chk(b8 == pad_read(8'h00, 0), "keyboard A released");
    n_kbd++;
    rd8(24'hA10001, b8);
    chk(b8 == 8'hA0, "version register");

    // ---- every mechanism happened
    chk(n_cart > 0, "cartridge reads");
    chk(n_flash > 0, "flash reads");
    chk(n_wram > 0, "work RAM");
    chk(n_unmapped > 0, "unmapped access");
    chk(n_zreset > 0, "Z80 reset control");
    chk(n_zbusreq > 0 && n_busack > 0, "Z80 bus request");
    chk(n_window > 0, "68k window into Z80 space");
    chk(n_zsram > 0, "Z80 sound RAM");
    chk(n_ym_timer > 0, "YM2612 timer overflow");
    chk(n_fm > 0, "FM note");
    chk(n_psg > 0, "PSG tone");
    chk(n_bank_rd > 0, "bank window read");
    chk(n_bank_wr > 0, "bank window write");
    chk(n_bg > 2, "68k bus grants");
    chk(n_stall > 0, "68k stalls");
    chk(n_dma >= 2, "DMA transfers");
    chk(n_vram_rd > 0, "VRAM read-back");
    chk(n_disp_off > 0 && n_disp_on > 0, "display switched off and on");
    chk(n_shadow > 0, "shadow mode");
    chk(n_vint > 0, "vertical interrupt");
    chk(n_pad > 0, "pad multiplexing");
    chk(n_kbd > 0, "keyboard as pad");
    $display("mechanisms: cart=%0d flash=%0d bg=%0d stall=%0d busack=%0d dma=%0d bank_rd=%0d bank_wr=%0d vint=%0d pcm=%0d",
             n_cart, n_flash, n_bg, n_stall, n_busack, n_dma, n_bank_rd, n_bank_wr, n_vint, pcm_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
