// tb_vdp: drives the video processor through its host port the way game code
// would, and checks whole frames of video output against a pixel model kept
// by the bench.
// Set-up: registers, all 64 color RAM entries (random), the vertical scroll
// entries and horizontal scroll words (random), random name tables for planes
// A and B (patterns 0-2) and the window (patterns 0-47), all with random
// palette, priority and flips, patterns 1 and 3-47 and
// a random sprite list (random sizes, flips, priorities, positions partly off
// screen, patterns 1-47, linked in random order) through the data port;
// pattern 2 is loaded by a DMA transfer from a modelled 68k bus that grants
// after a random delay and answers reads after a random latency.
// Checks: VRAM read-back through the data port, the status word (DMA busy,
// vertical blank), the H/V counter, then eight full frames compared pixel by
// pixel with planes and sprites: normal, with shadow/highlight on (so sprite
// colors 14 and 15 of palette 3 act as operators), with the display disabled
// (background color only), with per-line and with per-cell horizontal
// scrolling, with per-column vertical scrolling, and two frames with the
// window plane over plane A (right part or top rows, then left part or
// bottom rows, the latter with shadow/highlight on and the left 8 pixels
// masked to the background color); one vertical interrupt
// per frame; sync pulse counts. The block runs at its full-size pixel rate.
module tb_vdp;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req = 0, we = 0, ack;
  logic [4:0] addr = 0;
  logic [15:0] wdata = 0, rdata;
  logic dma_bus_req, dma_bus_gnt = 0, m_req, m_ack = 0;
  logic [22:0] m_addr;
  logic [15:0] m_rdata = 0;
  logic [3:0] r, g, b;
  logic hsync, vsync, de, vint;
  vdp dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s", m); end
  endtask

  // ---- 68k bus model for DMA: source words at word address a = f(a)
  function automatic logic [15:0] src_word(logic [22:0] a);
    return 16'(a * 16'h3B1D) ^ 16'h9E37;
  endfunction
  int dma_reads = 0;
  always @(posedge clk) begin
    if (!dma_bus_req) dma_bus_gnt <= 0;
    else if (!dma_bus_gnt && $urandom_range(0, 7) == 0) dma_bus_gnt <= 1;
  end
  initial forever begin
    @(posedge clk);
    m_ack <= 0;
    if (m_req) begin
      automatic logic [22:0] a = m_addr;
      dma_reads++;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      m_ack <= 1; m_rdata <= src_word(a);
    end
  end

  // ---- host port
  task automatic host(input bit w, input logic [4:0] a, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d;
    @(negedge clk); req = 0;
    while (!ack) @(negedge clk);
    q = rdata;
  endtask
  logic [15:0] junk;
  logic [7:0]  regs_m [24];
  logic [15:0] vram_m [32768];
  logic [8:0]  cram_m [64];
  logic [9:0]  vs_m [40];
  task automatic wreg(input int n, input logic [7:0] v);
    host(1, 5'h4, 16'h8000 | 16'(n << 8) | v, junk);
    regs_m[n] = v;
  endtask
  task automatic cmd(input logic [5:0] code, input logic [15:0] a);
    host(1, 5'h4, {code[1:0], a[13:0]}, junk);
    host(1, 5'h4, {8'd0, code[5:2], 2'b00, a[15:14]}, junk);
  endtask
  task automatic data_w(input logic [15:0] d);
    host(1, 5'h0, d, junk);
  endtask

  // ---- pixel model (m_hmode: register 11 bits 1:0)
  int m_hmode = 0;
  bit m_vcol = 0;                // register 11 bit 2
  int m_wh = 0, m_wv = 0;        // registers 17 and 18
  bit m_lcb = 0;                 // register 0 bit 5: left 8 pixels masked
  function automatic logic [6:0] plane_pix(int x, int y, bit p);
    int hs, vs, xx, yy, nt, row, col;
    logic [15:0] e, w;
    bit wl;
    wl = (m_wv & 128) ? (y / 8 >= (m_wv & 31)) : (y / 8 < (m_wv & 31));
    if (!p && (wl || ((m_wh & 128) ? (x / 16 >= (m_wh & 31)) : (x / 16 < (m_wh & 31))))) begin
      // window plane at word $5800, 32 cells wide, no scrolling
      e = vram_m[16'h5800 + ((y >> 3) & 31) * 32 + (x >> 3)];
      row = e[12] ? 7 - (y & 7) : (y & 7);
      col = e[11] ? 7 - (x & 7) : (x & 7);
      w = vram_m[e[10:0] * 16 + row * 2 + col / 4];
      return {e[15:13], 4'((w >> (12 - 4 * (col % 4))) & 15)};
    end
    hs = vram_m[16'h7800 + (m_hmode == 3 ? 2 * y : m_hmode == 2 ? 16 * (y / 8) : 0) + p];
    hs = hs & 10'h3FF;
    vs = m_vcol ? vs_m[2 * (((x + ((-hs) & 7)) >> 3) >> 1) + p] : vs_m[p];
    xx = (x - hs) & 255;
    yy = (y + vs) & 255;
    nt = p ? 'h7000 : 'h6000;
    e = vram_m[nt + (yy >> 3) * 32 + (xx >> 3)];
    row = e[12] ? 7 - (yy & 7) : (yy & 7);
    col = e[11] ? 7 - (xx & 7) : (xx & 7);
    w = vram_m[e[10:0] * 16 + row * 2 + col / 4];
    return {e[15:13], 4'((w >> (12 - 4 * (col % 4))) & 15)};
  endfunction
  // sprite list at word $7C00 (register 5 = $7C): first opaque pixel of the
  // first sprite along the links that covers (x, y)
  function automatic logic [6:0] sprite_pix(int x, int y);
    int n, ent, ypos, xpos, wsz, hsz, r, rf, off, c, j, cx, jj, pn;
    logic [15:0] at, w;
    ent = 0;
    for (n = 0; n < 80; n++) begin
      ypos = vram_m[16'h7C00 + 4 * ent] & 10'h3FF;
      wsz = (vram_m[16'h7C00 + 4 * ent + 1] >> 10) & 3;
      hsz = (vram_m[16'h7C00 + 4 * ent + 1] >> 8) & 3;
      at = vram_m[16'h7C00 + 4 * ent + 2];
      xpos = vram_m[16'h7C00 + 4 * ent + 3] & 9'h1FF;
      r = (y + 128 - ypos) & 11'h7FF;
      off = (x + 128 - xpos) & 10'h3FF;
      if (r < 8 * (hsz + 1) && off < 8 * (wsz + 1)) begin
        rf = at[12] ? 8 * (hsz + 1) - 1 - r : r;
        c = off >> 3; j = off & 7;
        cx = at[11] ? wsz - c : c;
        jj = at[11] ? 7 - j : j;
        pn = (at[10:0] + cx * (hsz + 1) + (rf >> 3)) & 11'h7FF;
        w = vram_m[pn * 16 + (rf & 7) * 2 + jj / 4];
        w = (w >> (12 - 4 * (jj % 4))) & 15;
        if (w[3:0] != 0) return {at[15:13], w[3:0]};
      end
      ent = vram_m[16'h7C00 + 4 * ent + 1] & 7'h7F;
      if (ent == 0) break;
    end
    return 7'd0;
  endfunction
  function automatic logic [11:0] expect_rgb(int x, int y, bit shadow_on, bit disp);
    logic [6:0] a, bb, sp;
    logic [5:0] ci;
    logic [8:0] c;
    bit oper, sop, shi, dark;
    int sh;
    a = plane_pix(x, y, 0);
    bb = plane_pix(x, y, 1);
    sp = sprite_pix(x, y);
    oper = shadow_on && sp[5:1] == 5'b11111;
    sop = sp[3:0] != 0 && !oper;
    shi = sop && sp[6];
    dark = !a[6] && !bb[6] && !shi;
    if (!disp || (m_lcb && x < 8)) ci = regs_m[7][5:0];
    else if (shi) ci = sp[5:0];
    else if (a[6] && a[3:0] != 0) ci = a[5:0];
    else if (bb[6] && bb[3:0] != 0) ci = bb[5:0];
    else if (sop) ci = sp[5:0];
    else if (a[3:0] != 0) ci = a[5:0];
    else if (bb[3:0] != 0) ci = bb[5:0];
    else ci = regs_m[7][5:0];
    if (!disp || (m_lcb && x < 8) || !shadow_on) sh = 0;
    else if (oper && sp[0]) sh = 1;
    else if (oper) sh = dark ? 0 : 2;
    else sh = dark ? 1 : 0;
    c = cram_m[ci];
    if (sh == 1) return {1'b0, c[2:0], 1'b0, c[5:3], 1'b0, c[8:6]};
    if (sh == 2) return {1'b0, c[2:0], 1'b0, c[5:3], 1'b0, c[8:6]} + 12'h777;
    return {c[2:0], 1'b0, c[5:3], 1'b0, c[8:6], 1'b0};
  endfunction

  // ---- video monitor: pixel position from de / vsync
  bit checking = 0, m_shadow = 0, m_disp = 1;
  int sprite_pixels = 0, oper_pixels = 0;
  int px = 0, py = -1, frame_pixels = 0, frame_bad = 0, vints = 0, vsyncs = 0, hsyncs = 0;
  logic de_q = 0, vs_q = 0, hs_q = 0;
  always @(negedge clk) if (rst_n) begin
    if (vint) vints++;
    if (vsync && !vs_q) vsyncs++;
    if (hsync && !hs_q) hsyncs++;
    vs_q = vsync; hs_q = hsync;
  end
  // sample the outputs once per pixel (just after each strobe edge)
  always @(posedge clk) if (rst_n && dut.pix_en) begin
    #1;
    if (vsync) py = -1;
    if (de && !de_q) begin py++; px = 0; end
    de_q = de;
    if (de && checking && py >= 0 && py < 224) begin
      logic [11:0] e;
      e = expect_rgb(px, py, m_shadow, m_disp);
      frame_pixels++;
      begin
        logic [6:0] sp;
        sp = sprite_pix(px, py);
        if (sp[3:0] != 0 && m_disp) sprite_pixels++;
        if (sp[5:1] == 5'b11111 && m_shadow && m_disp) oper_pixels++;
      end
      checks++;
      if ({r, g, b} !== e) begin
        failures++; frame_bad++;
        if (frame_bad < 6) $display("FAIL pixel (%0d,%0d) got %h expected %h a=%h b=%h", px, py, {r, g, b}, e, plane_pix(px, py, 0), plane_pix(px, py, 1));
      end
    end
    if (de) px++;
  end

  task automatic wait_vsync;
    @(posedge vsync);
    @(negedge clk);
  endtask

  initial begin
    logic [15:0] q;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32768; i++) vram_m[i] = 16'hxxxx;
    // registers: display off, 224 lines, DMA on, A at $C000, B at $E000,
    // scroll table at $F000, 32x32 planes, increment 2
    wreg(1, 8'h14);
    wreg(2, 8'h30);
    wreg(4, 8'h07);
    wreg(7, 8'h05);
    wreg(12, 8'h00);
    wreg(13, 8'h3C);
    wreg(15, 8'h02);
    wreg(16, 8'h00);
    wreg(3, 8'h2C);
    // color RAM
    cmd(6'b000011, 16'h0000);
    for (int i = 0; i < 64; i++) begin
      logic [15:0] c;
      c = 16'($urandom) & 16'h0EEE;
      data_w(c);
      cram_m[i] = {c[11:9], c[7:5], c[3:1]};
    end
    // vertical scroll
    cmd(6'b000101, 16'h0000);
    for (int i = 0; i < 40; i++) begin
      vs_m[i] = 10'($urandom);
      data_w({6'd0, vs_m[i]});
    end
    // horizontal scroll words and name tables
    cmd(6'b000001, 16'hF000);
    for (int i = 0; i < 448; i++) begin
      vram_m[16'h7800 + i] = 16'($urandom_range(0, 1023));
      data_w(vram_m[16'h7800 + i]);
    end
    for (int t = 0; t < 3; t++) begin
      cmd(6'b000001, t == 2 ? 16'hB000 : t ? 16'hE000 : 16'hC000);
      for (int i = 0; i < 1024; i++) begin
        logic [15:0] e;
        e = 16'($urandom) & 16'hF800;
        e[5:0] = 6'($urandom_range(0, t == 2 ? 47 : 2));
        vram_m[(t == 2 ? 16'h5800 : t ? 16'h7000 : 16'h6000) + i] = e;
        data_w(e);
      end
    end
    // patterns 0 (empty) and 1 (random), then 3-47 (random)
    cmd(6'b000001, 16'h0000);
    for (int i = 0; i < 32; i++) begin
      vram_m[i] = (i < 16) ? 16'h0000 : 16'($urandom);
      data_w(vram_m[i]);
    end
    cmd(6'b000001, 16'h0060);
    for (int i = 48; i < 768; i++) begin
      vram_m[i] = 16'($urandom);
      data_w(vram_m[i]);
    end
    // sprite list: 14 sprites, linked from entry 0 in random order
    wreg(5, 8'h7C);
    begin
      int ord [14];
      for (int i = 0; i < 14; i++) ord[i] = i;
      for (int i = 13; i > 1; i--) begin
        int k, t;
        k = $urandom_range(1, i);
        t = ord[i]; ord[i] = ord[k]; ord[k] = t;
      end
      for (int i = 0; i < 14; i++) begin
        int e;
        e = ord[i];
        vram_m[16'h7C00 + 4 * e]     = 16'($urandom_range(96, 128 + 230));
        vram_m[16'h7C00 + 4 * e + 1] = {4'd0, 4'($urandom), 1'b0, (i == 13) ? 7'd0 : 7'(ord[i + 1])};
        vram_m[16'h7C00 + 4 * e + 2] = (16'($urandom) & 16'hF800) | 16'($urandom_range(3, 31));
        vram_m[16'h7C00 + 4 * e + 3] = 16'($urandom_range(96, 128 + 262));
      end
      cmd(6'b000001, 16'hF800);
      for (int i = 0; i < 56; i++) data_w(vram_m[16'h7C00 + i]);
    end
    // pattern 2 by DMA: 16 words from 68k word address $012345
    wreg(19, 8'd16); wreg(20, 8'd0);
    wreg(21, 8'h45); wreg(22, 8'h23); wreg(23, 8'h01);
    for (int i = 0; i < 16; i++) vram_m[32 + i] = src_word(23'h012345 + 23'(i));
    cmd(6'b100001, 16'h0040);
    host(0, 5'h4, 0, q);
    chk(q[1] == 1'b1, "status shows DMA busy");
    chk(q[9] == 1'b1, "status FIFO empty bit");
    begin
      int n;
      n = 0;
      do begin host(0, 5'h4, 0, q); n++; end while (q[1] && n < 1000);
      chk(!q[1], "DMA finished");
    end
    chk(dma_reads == 16, $sformatf("DMA made %0d reads", dma_reads));
    // read back VRAM through the data port
    cmd(6'b000000, 16'h0040);
    for (int i = 0; i < 16; i++) begin
      host(0, 5'h0, 0, q);
      chk(q == vram_m[32 + i], $sformatf("VRAM read-back %0d: %h vs %h", i, q, vram_m[32 + i]));
    end
    cmd(6'b000000, 16'hC000);
    for (int i = 0; i < 8; i++) begin
      host(0, 5'h0, 0, q);
      chk(q == vram_m[16'h6000 + i], "name table read-back");
    end
    // display on with vertical interrupt; check three frames
    wreg(1, 8'h74);
    wait_vsync;
    host(0, 5'h4, 0, q);
    chk(q[3] == 1'b1, "vblank in status during vsync");
    host(0, 5'h8, 0, q);
    chk(q[15:8] >= 8'd224, $sformatf("V counter %0d in blank", q[15:8]));
    // frame 1: normal
    checking = 1;
    vints = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, $sformatf("frame 1 had %0d pixels", frame_pixels));
    chk(vints == 1, $sformatf("vint count %0d", vints));
    // frame 2: shadow/highlight on
    wreg(12, 8'h08);
    m_shadow = 1; frame_pixels = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, "frame 2 pixels");
    // frame 3: display disabled -> background color only
    wreg(12, 8'h00); m_shadow = 0;
    wreg(1, 8'h34); m_disp = 0;
    wreg(7, 8'h2A); frame_pixels = 0;
    hsyncs = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, "frame 3 pixels");
    chk(hsyncs == 262, $sformatf("hsync pulses per frame %0d", hsyncs));
    chk(vints == 3, "one vint per frame");
    // frames 4 and 5: per-line and per-cell horizontal scrolling
    wreg(1, 8'h74); m_disp = 1;
    wreg(11, 8'h03); m_hmode = 3; frame_pixels = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, "frame 4 pixels");
    wreg(11, 8'h02); m_hmode = 2; frame_pixels = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, "frame 5 pixels");
    // frame 6: per-column vertical scrolling with per-line horizontal scrolling
    wreg(11, 8'h07); m_hmode = 3; m_vcol = 1; frame_pixels = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, "frame 6 pixels");
    // frames 7 and 8: window plane (right of x = 80 or top 3 rows; then left
    // of x = 96 or from row 26 down)
    wreg(11, 8'h00); m_hmode = 0; m_vcol = 0;
    wreg(17, 8'h85); m_wh = 'h85;
    wreg(18, 8'h03); m_wv = 'h03; frame_pixels = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, "frame 7 pixels");
    wreg(17, 8'h06); m_wh = 'h06;
    wreg(18, 8'h9A); m_wv = 'h9A;
    wreg(0, 8'h20); m_lcb = 1;
    wreg(12, 8'h08); m_shadow = 1; frame_pixels = 0;
    wait_vsync;
    chk(frame_pixels == 256 * 224, "frame 8 pixels");
    chk(sprite_pixels > 2000, $sformatf("sprite pixels shown: %0d", sprite_pixels));
    chk(oper_pixels > 10, $sformatf("shadow/highlight operator pixels: %0d", oper_pixels));
    $display("sprite pixels %0d, operator pixels %0d", sprite_pixels, oper_pixels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
