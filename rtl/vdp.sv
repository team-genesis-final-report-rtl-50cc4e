// vdp: the video processor. It owns the 64 KB video RAM, the 64 x 9-bit color
// RAM and the 40 x 10-bit vertical scroll RAM, takes commands from the 68k
// through its data and control ports, runs DMA transfers from 68k memory,
// and draws a 256-pixel-wide picture of 224 or 192 lines.
// Picture: while line v is shown, vdp_render draws line v+1 of planes A and B
// into the other half of a double line buffer, and vdp_sprites then draws the
// sprites of line v+1 into its own buffer over the same VRAM read port. Each
// displayed pixel takes the first opaque (color index not 0) of:
// high-priority sprite, high-priority A, high-priority B, sprite, A, B; if
// none is opaque, the background color (register 7). With shadow/highlight
// on (register 12 bit 3), pixels where no plane and no drawn sprite has
// priority are shadowed; sprite colors 14 and 15 of palette 3 become
// operators that are not drawn but raise one step (shadow to normal, normal
// to highlight) or shadow the pixel beneath. With the display off
// (register 1 bit 6, taken only at the start of a line) the whole line shows
// the background color; with register 0 bit 5 set the leftmost 8 pixels of
// every line do. The chosen 6-bit color RAM index is looked up and converted
// by vdp_color.
// Registers used here: 0 (bit 5 left-column mask), 1 (bit 6 display on,
// bit 5 vertical interrupt enable, bit 4 DMA enable, bit 2: 1 = 224 lines,
// 0 = 192 lines), 2, 3, 4, 5, 7, 11, 12, 13, 15, 16, 17, 18, 19-23.
// Interface: host port as in vdp_ctrl; a bus-master port for DMA (with bus
// request/grant); 4-bit RGB, syncs and data enable; vint pulses for one clock
// at the start of vertical blank when enabled.
// Horizontal scrolling may be per screen, per 8-line row or per line, and
// vertical scrolling per screen or per 2-cell column (register 11). The
// window plane (registers 3, 17, 18) replaces plane A where it is shown.
// Timing: pixel strobe every PIX_DIV clocks (5.4 MHz from 54 MHz); video
// outputs are registered on the pixel strobe, one pixel after the counters.
module vdp #(
  parameter int unsigned PIX_DIV = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // host port
  input  logic        req,
  input  logic        we,
  input  logic [4:0]  addr,
  input  logic [15:0] wdata,
  output logic [15:0] rdata,
  output logic        ack,
  // DMA bus master
  output logic        dma_bus_req,
  input  logic        dma_bus_gnt,
  output logic        m_req,
  output logic [22:0] m_addr,
  input  logic [15:0] m_rdata,
  input  logic        m_ack,
  // video
  output logic [3:0]  r,
  output logic [3:0]  g,
  output logic [3:0]  b,
  output logic        hsync,
  output logic        vsync,
  output logic        de,
  output logic        vint
);
  // pixel strobe
  logic [7:0] pdiv;
  logic       pix_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pdiv <= '0;
    else        pdiv <= (32'(pdiv) == PIX_DIV - 1) ? '0 : pdiv + 1'b1;
  end
  assign pix_en = (32'(pdiv) == PIX_DIV - 1);

  logic [7:0] regs [24];

  // raster timing
  logic [8:0] h, v;
  logic t_hs, t_vs, hblank, vblank, t_de, line_start, frame_start, disp_en, v28;
  vdp_timing u_timing (
    .clk, .rst_n, .pix_en, .v28_in(regs[1][2]), .disp_en_in(regs[1][6]),
    .h, .v, .hsync(t_hs), .vsync(t_vs), .hblank, .vblank, .de(t_de),
    .line_start, .frame_start, .disp_en, .v28
  );

  // host side
  logic        dma_start, dma_wr, dma_busy;
  logic [22:0] dma_src;
  logic [15:0] dma_len, dma_wdata;
  logic [14:0] va_addr;
  logic        va_we;
  logic [1:0]  va_be;
  logic [15:0] va_wdata, va_rdata;
  logic        cram_we, vsram_we;
  logic [5:0]  cram_waddr, vsram_waddr;
  logic [8:0]  cram_wdata;
  logic [9:0]  vsram_wdata;

  vdp_ctrl u_ctrl (
    .clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .ack, .regs,
    .dma_start, .dma_src, .dma_len, .dma_wr, .dma_wdata, .dma_busy,
    .vblank, .hblank, .h, .v,
    .vram_addr(va_addr), .vram_we(va_we), .vram_be(va_be), .vram_wdata(va_wdata),
    .vram_rdata(va_rdata),
    .cram_we, .cram_addr(cram_waddr), .cram_wdata,
    .vsram_we, .vsram_addr(vsram_waddr), .vsram_wdata
  );

  vdp_dma u_dma (
    .clk, .rst_n, .start(dma_start), .src(dma_src), .len(dma_len), .busy(dma_busy),
    .req_bus(dma_bus_req), .gnt(dma_bus_gnt),
    .m_req, .m_addr, .m_rdata, .m_ack, .wr(dma_wr), .wdata(dma_wdata)
  );

  // memories
  logic [14:0] vb_addr;
  logic [15:0] vb_rdata;
  vram u_vram (
    .clk, .a_addr(va_addr), .a_we(va_we), .a_be(va_be), .a_wdata(va_wdata),
    .a_rdata(va_rdata), .b_addr(vb_addr), .b_rdata(vb_rdata)
  );

  logic [5:0] cram_raddr, vs_raddr;
  logic [8:0] cram_rdata;
  logic [9:0] vs_rdata;
  vdp_ram #(.DEPTH(64), .WIDTH(9)) u_cram (
    .clk, .we(cram_we), .waddr(cram_waddr), .wdata(cram_wdata),
    .raddr(cram_raddr), .rdata(cram_rdata)
  );
  vdp_ram #(.DEPTH(40), .WIDTH(10)) u_vsram (
    .clk, .we(vsram_we), .waddr(vsram_waddr), .wdata(vsram_wdata),
    .raddr(vs_raddr), .rdata(vs_rdata)
  );

  // line renderer and double line buffer
  logic       lb_we, lb_plane, lb_buf;
  logic [7:0] lb_x;
  logic [6:0] lb_data;
  logic [6:0] lb_a [512];
  logic [6:0] lb_b [512];
  logic [8:0] next_line;
  assign next_line = (v == 9'd261) ? 9'd0 : v + 1'b1;

  logic [14:0] rn_vaddr, sp_vaddr;
  logic        rn_done, sp_busy;
  vdp_render u_render (
    .clk, .rst_n, .start(pix_en && line_start), .line(next_line), .buf_sel(next_line[0]),
    .reg_nt_a(regs[2]), .reg_nt_b(regs[4]), .reg_hs(regs[13]), .reg_mode3(regs[11]), .reg_size(regs[16]),
    .reg_win(regs[3]), .reg_wh(regs[17]), .reg_wv(regs[18]),
    .vaddr(rn_vaddr), .vdata(vb_rdata), .vs_addr(vs_raddr), .vs_data(vs_rdata),
    .lb_we, .lb_plane, .lb_buf, .lb_x, .lb_data, .done(rn_done)
  );

  // the sprite pass follows the plane pass on the same VRAM read port
  logic [6:0] ps;
  vdp_sprites u_sprites (
    .clk, .rst_n, .start(rn_done), .stop(pix_en && line_start), .line(next_line), .buf_sel(next_line[0]),
    .reg_sat(regs[5][6:0]), .busy(sp_busy), .vaddr(sp_vaddr), .vdata(vb_rdata),
    .disp_buf(v[0]), .disp_x(h[7:0]), .disp_pix(ps)
  );
  assign vb_addr = sp_busy ? sp_vaddr : rn_vaddr;

  always_ff @(posedge clk) begin
    if (lb_we && !lb_plane) lb_a[{lb_buf, lb_x}] <= lb_data;
    if (lb_we &&  lb_plane) lb_b[{lb_buf, lb_x}] <= lb_data;
  end

  // priority and color selection for the pixel at (h, v)
  logic [6:0] pa, pb;
  logic       a_op, b_op, s_oper, s_op, s_hi, dark, bg_only;
  logic [1:0] shade;
  assign pa   = lb_a[{v[0], h[7:0]}];
  assign pb   = lb_b[{v[0], h[7:0]}];
  assign a_op = pa[3:0] != 4'd0;
  assign b_op = pb[3:0] != 4'd0;
  // with shadow/highlight on, sprite colors 14 and 15 of palette 3 are
  // operators: they are not drawn but highlight or shadow what lies beneath
  assign s_oper = regs[12][3] && ps[5:1] == 5'b11111;
  assign s_op   = ps[3:0] != 4'd0 && !s_oper;
  assign s_hi   = s_op && ps[6];
  assign dark   = !pa[6] && !pb[6] && !s_hi;
  // display off, or the left 8 pixels masked (register 0 bit 5)
  assign bg_only = !disp_en || (regs[0][5] && h[8:3] == 6'd0);

  always_comb begin
    if (bg_only)               cram_raddr = regs[7][5:0];
    else if (s_hi)             cram_raddr = ps[5:0];
    else if (pa[6] && a_op)    cram_raddr = pa[5:0];
    else if (pb[6] && b_op)    cram_raddr = pb[5:0];
    else if (s_op)             cram_raddr = ps[5:0];
    else if (a_op)             cram_raddr = pa[5:0];
    else if (b_op)             cram_raddr = pb[5:0];
    else                       cram_raddr = regs[7][5:0];
    if (bg_only || !regs[12][3])   shade = 2'd0;
    else if (s_oper && ps[0])      shade = 2'd1;
    else if (s_oper)               shade = dark ? 2'd0 : 2'd2;
    else                           shade = dark ? 2'd1 : 2'd0;
  end

  logic [3:0] cr, cg, cb;
  logic [1:0] shade_q;
  always_ff @(posedge clk) shade_q <= shade;
  vdp_color u_color (
    .color(cram_rdata), .shade(shade_q), .blank(!t_de), .r(cr), .g(cg), .b(cb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r, g, b} <= '0;
      {hsync, vsync, de} <= '0;
      vint <= 1'b0;
    end else begin
      vint <= pix_en && regs[1][5] && line_start && (v == (v28 ? 9'd224 : 9'd192));
      if (pix_en) begin
        r <= cr;
        g <= cg;
        b <= cb;
        hsync <= t_hs;
        vsync <= t_vs;
        de    <= t_de;
      end
    end
  end
endmodule
