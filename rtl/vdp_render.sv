// vdp_render: draws the two background planes (A and B) of one line into a
// line buffer, a line ahead of the display.
// Each plane is a map of 8x8-pixel cells (32, 64 or 128 cells wide and high,
// register 16) whose name-table entries give priority (bit 15), palette
// (14:13), vertical and horizontal flip (12, 11) and pattern number (10:0).
// A pattern row is 8 pixels of 4 bits, packed in two VRAM words, leftmost
// pixel in the top nibble. Each plane scrolls as a whole: horizontally by the
// words of the scroll table (plane A, then B) at register 13, and vertically
// by VSRAM entries 0 (A) and 1 (B). Register 11 bits 1:0 pick the scroll-table
// entry: 00 one pair for the whole screen, 10 one pair per 8-line cell row,
// 11 one pair per line (table word 2n and 2n+1 for line n). Register 11 bit 2
// switches vertical scrolling to one VSRAM pair per 2-cell column: cell k
// of the fetch (the first cell may be cut by the fine scroll) uses entries
// 2*(k/2) (A) and 2*(k/2)+1 (B).
// For each plane the renderer walks 33 cell columns (the first may be cut by
// the fine scroll), reading the name entry and the two pattern words, then
// writes eight line-buffer entries {priority, palette, color index}, one per
// clock, for those that fall on screen.
// Window: when any of the line is inside the window, a third pass fetches 32
// unscrolled cells from the window name table (register 3 bits 5:1, 32 cells
// wide) and overwrites plane A's buffer where the window is shown: the whole
// line if it is above (register 18 bit 7 = 0) or at/below (bit 7 = 1) cell
// row WVP (bits 4:0), otherwise the pixels left of (register 17 bit 7 = 0)
// or at/right of (bit 7 = 1) pixel 16 x WHP (bits 4:0).
// Background planes, priorities, flips and whole-screen scrolling are the
// document's features; the memory layout is the original chip's; the fetch
// order is this design's. Per-line and per-cell horizontal scrolling follow
// the document's "partial screen scrolling", as does per-column vertical
// scrolling. The window plane is the original chip's. Sprites are drawn by
// vdp_sprites.
// Timing: start begins a line; done pulses after about 1220 clocks, or about
// 1650 with the window pass. The VRAM
// and VSRAM read ports have one clock of latency.
module vdp_render (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [8:0]  line,
  input  logic        buf_sel,
  input  logic [7:0]  reg_nt_a,     // register 2
  input  logic [7:0]  reg_nt_b,     // register 4
  input  logic [7:0]  reg_hs,       // register 13
  input  logic [7:0]  reg_mode3,    // register 11: bits 1:0 horizontal scroll mode
  input  logic [7:0]  reg_size,     // register 16
  input  logic [7:0]  reg_win,      // register 3: window name table
  input  logic [7:0]  reg_wh,       // register 17: window horizontal position
  input  logic [7:0]  reg_wv,       // register 18: window vertical position
  output logic [14:0] vaddr,
  input  logic [15:0] vdata,
  output logic [5:0]  vs_addr,
  input  logic [9:0]  vs_data,
  output logic        lb_we,
  output logic        lb_plane,     // 0 = A, 1 = B
  output logic        lb_buf,
  output logic [7:0]  lb_x,
  output logic [6:0]  lb_data,
  output logic        done
);
  typedef enum logic [3:0] {
    S_IDLE, S_HSA_W, S_HSA_D, S_HSB_W, S_HSB_D, S_VS_W, S_NM_A, S_NM_W, S_NM_D,
    S_P0_W, S_P0_D, S_P1_W, S_P1_D, S_PIX
  } rstate_e;
  rstate_e state;

  logic [8:0]  ln;
  logic        bsel;
  logic [9:0]  hs_a, hs_b, vs_a, vs_b;
  logic        plane;
  logic        win;             // window pass (written into plane A's buffer)
  logic        win_line, win_any, in_win;
  logic [5:0]  k;
  logic [2:0]  j;
  logic [15:0] entry;
  logic [31:0] pat;

  // per-plane geometry
  logic [9:0]  hs, vs, neg_hs, yy;
  logic [14:0] nt_base, hs_base, hs_line;
  logic [2:0]  wlog;            // log2 of plane width in cells
  logic [6:0]  wmask, hmask;
  logic [6:0]  cell_y, cell_x;
  logic [2:0]  row;
  logic [10:0] sx;              // screen x of the current pixel (signed)
  logic [2:0]  jj;
  logic [5:0]  k_next;
  assign k_next = k + 6'd1;

  always_comb begin
    // window: whole lines above/below row WVP (register 18), else the cells
    // left/right of column 2 x WHP (register 17)
    win_line = reg_wv[7] ? ({1'b0, ln[8:3]} >= {2'b00, reg_wv[4:0]})
                         : ({1'b0, ln[8:3]} <  {2'b00, reg_wv[4:0]});
    win_any  = win_line || (reg_wh[7] ? reg_wh[4:0] < 5'd16 : reg_wh[4:0] != 5'd0);
    hs      = plane ? hs_b : hs_a;
    // vertical scroll: one value per plane, or per 2-cell column (register 11 bit 2)
    vs      = reg_mode3[2] ? vs_data : (plane ? vs_b : vs_a);
    neg_hs  = 10'd0 - hs;
    yy      = {1'b0, ln} + vs;
    nt_base = plane ? {reg_nt_b[2:0], 12'd0} : {reg_nt_a[5:3], 12'd0};
    hs_base = {reg_hs[5:0], 9'd0};
    // scroll-table entry for this line: whole screen, per 8-line cell, or per line
    unique case (reg_mode3[1:0])
      2'b10:   hs_line = hs_base + {5'd0, line[8:3], 4'd0};
      2'b11:   hs_line = hs_base + {5'd0, line, 1'b0};
      default: hs_line = hs_base;
    endcase
    unique case (reg_size[1:0])
      2'b01:   begin wlog = 3'd6; wmask = 7'h3F; end
      2'b11:   begin wlog = 3'd7; wmask = 7'h7F; end
      default: begin wlog = 3'd5; wmask = 7'h1F; end
    endcase
    unique case (reg_size[5:4])
      2'b01:   hmask = 7'h3F;
      2'b11:   hmask = 7'h7F;
      default: hmask = 7'h1F;
    endcase
    cell_y = yy[9:3] & hmask;
    cell_x = (neg_hs[9:3] + 7'(k)) & wmask;
    sx     = {2'b00, k, 3'b000} + 11'(j) - 11'(neg_hs[2:0]);
    if (win) begin
      // the window does not scroll and is 32 cells wide
      yy      = {1'b0, ln};
      nt_base = {reg_win[5:1], 10'd0};
      wlog    = 3'd5;
      cell_y  = {2'b00, yy[7:3]};
      cell_x  = {2'b00, k[4:0]};
      sx      = {2'b00, k, 3'b000} + 11'(j);
    end
    row    = entry[12] ? ~yy[2:0] : yy[2:0];
    jj     = entry[11] ? ~j : j;
    in_win = win_line || (reg_wh[7] ? ({1'b0, sx[7:4]} >= reg_wh[4:0])
                                    : ({1'b0, sx[7:4]} <  reg_wh[4:0]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      ln      <= '0;
      bsel    <= 1'b0;
      {hs_a, hs_b, vs_a, vs_b} <= '0;
      plane   <= 1'b0;
      win     <= 1'b0;
      k       <= '0;
      j       <= '0;
      entry   <= '0;
      pat     <= '0;
      vaddr   <= '0;
      vs_addr <= '0;
      lb_we   <= 1'b0;
      lb_plane <= 1'b0;
      lb_buf  <= 1'b0;
      lb_x    <= '0;
      lb_data <= '0;
      done    <= 1'b0;
    end else begin
      lb_we <= 1'b0;
      done  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ln      <= line;
          bsel    <= buf_sel;
          win     <= 1'b0;
          vaddr   <= hs_line;
          vs_addr <= 6'd0;
          state   <= S_HSA_W;
        end
        S_HSA_W: state <= S_HSA_D;
        S_HSA_D: begin
          hs_a    <= vdata[9:0];
          vs_a    <= vs_data;
          vaddr   <= vaddr + 15'd1;
          vs_addr <= 6'd1;
          state   <= S_HSB_W;
        end
        S_HSB_W: state <= S_HSB_D;
        S_HSB_D: begin
          hs_b  <= vdata[9:0];
          vs_b  <= vs_data;
          plane   <= 1'b0;
          k       <= '0;
          vs_addr <= 6'd0;             // column 0 of plane A
          state   <= S_VS_W;
        end
        S_VS_W: state <= S_NM_A;       // VSRAM read for this column
        S_NM_A: begin
          vaddr <= nt_base + ((15'(cell_y) << wlog) | 15'(cell_x));
          state <= S_NM_W;
        end
        S_NM_W: state <= S_NM_D;
        S_NM_D: begin
          entry <= vdata;
          state <= S_P0_W;
        end
        S_P0_W: begin
          vaddr <= {entry[10:0], row, 1'b0};
          state <= S_P0_D;
        end
        S_P0_D: state <= S_P1_W;
        S_P1_W: begin
          pat[31:16] <= vdata;
          vaddr      <= vaddr + 15'd1;
          state      <= S_P1_D;
        end
        S_P1_D: state <= S_PIX;
        S_PIX: begin
          if (j == 3'd0) pat[15:0] <= vdata;
          if (!sx[10] && !sx[9] && !sx[8] && (!win || in_win)) begin
            lb_we    <= 1'b1;
            lb_plane <= plane;
            lb_buf   <= bsel;
            lb_x     <= sx[7:0];
            lb_data  <= {entry[15:13], (j == 3'd0) ? (jj[2] ? vdata[15 - 4*jj[1:0] -: 4] : pat[31 - 4*jj[1:0] -: 4])
                                                   : (jj[2] ? pat[15 - 4*jj[1:0] -: 4]  : pat[31 - 4*jj[1:0] -: 4])};
          end
          j <= j + 1'b1;
          if (j == 3'd7) begin
            // VSRAM entry for the next cell's 2-cell column
            vs_addr <= (k == 6'd32) ? 6'd1 : {k_next[5:1], plane};
            if (k == (win ? 6'd31 : 6'd32)) begin
              k <= '0;
              if (win || (plane && !win_any)) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end else if (plane) begin
                plane <= 1'b0;
                win   <= 1'b1;
                state <= S_VS_W;
              end else begin
                plane <= 1'b1;
                state <= S_VS_W;
              end
            end else begin
              k     <= k + 1'b1;
              state <= S_VS_W;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
