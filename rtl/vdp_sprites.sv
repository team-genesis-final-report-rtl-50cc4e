// vdp_sprites: draws the sprite layer of one line into a sprite line buffer,
// a line ahead of the display, after vdp_render has finished the planes.
// The sprite attribute table (word address {register 5 bits 6:0, 8'h00})
// holds 4-word entries: word 0 bits 9:0 y position (screen y + 128); word 1
// bits 11:10 width - 1 and bits 9:8 height - 1 in cells, bits 6:0 link to the
// next entry; word 2 priority (15), palette (14:13), vertical and horizontal
// flip (12, 11), first pattern (10:0); word 3 bits 8:0 x position (screen
// x + 128). The list is walked from entry 0 along the links until a link of 0
// or MAX_SPRITES entries. For each sprite that covers the line, each of its
// cell columns is fetched (patterns are numbered down the columns, so cell
// (cx, cy) is pattern + cx * height + cy) and its opaque pixels are written
// to the line buffer where no earlier sprite has drawn: earlier entries in the
// list win.
// Display side: disp_pix returns {priority, palette, color} of the sprite at
// (disp_buf, disp_x), with color 0 where no sprite drew.
// The sprite layer and its priority bit are the document's; the table format
// and the list order are the original chip's. The per-line sprite limit and
// collision flag of the original chip are not built.
// Timing: start begins a line; each listed sprite costs 6 clocks, a sprite on
// the line 2 more and each of its cell columns 13 more. stop ends the pass at
// once (the next line begins), so sprites that do not fit in the line time
// are dropped, which stands in for the original chip's per-line limit. The
// VRAM read port has one clock of latency.
module vdp_sprites #(
  parameter int unsigned MAX_SPRITES = 80
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        stop,
  input  logic [8:0]  line,
  input  logic        buf_sel,
  input  logic [6:0]  reg_sat,      // register 5 bits 6:0
  output logic        busy,
  output logic [14:0] vaddr,
  input  logic [15:0] vdata,
  input  logic        disp_buf,
  input  logic [7:0]  disp_x,
  output logic [6:0]  disp_pix
);
  typedef enum logic [3:0] {
    P_IDLE, P_Y_W, P_Y_D, P_SZ_W, P_SZ_D, P_AT_W, P_AT_D, P_X_W, P_X_D,
    P_CELL, P_P0_W, P_P0_D, P_P1_W, P_P1_D, P_PIX
  } sstate_e;
  sstate_e state;

  logic [6:0]  lb   [512];
  logic [255:0] taken [2];

  logic [8:0]  ln;
  logic        bsel;
  logic [6:0]  count;
  logic [14:0] ent;
  logic [9:0]  ypos;
  logic [1:0]  wsz, hsz;
  logic [6:0]  link;
  logic [15:0] attr;
  logic [8:0]  xpos;
  logic [1:0]  c;
  logic [2:0]  j;
  logic [31:0] pat;

  logic [10:0] r_raw;           // line - top of sprite
  logic [4:0]  r, r_f;          // row within the sprite, and after vertical flip
  logic [1:0]  cx;
  logic [10:0] pnum;
  logic [9:0]  sx;
  logic [2:0]  jj;
  logic [3:0]  pixv;
  logic        on_line;

  always_comb begin
    r_raw   = {2'b00, ln} + 11'd128 - {1'b0, ypos};
    on_line = (r_raw[10:5] == 6'd0) && (r_raw[4:3] <= hsz);
    r       = r_raw[4:0];
    r_f     = attr[12] ? ({hsz, 3'b111} - r) : r;
    cx      = attr[11] ? wsz - c : c;
    pnum    = attr[10:0] + 11'(cx) * (11'(hsz) + 11'd1) + 11'(r_f[4:3]);
    sx      = {1'b0, xpos} + {5'd0, c, 3'b000} + 10'(j) - 10'd128;
    jj      = attr[11] ? ~j : j;
    pixv    = pat[31 - 4 * jj -: 4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= P_IDLE;
      ln    <= '0;
      bsel  <= 1'b0;
      count <= '0;
      ent   <= '0;
      ypos  <= '0;
      wsz   <= '0;
      hsz   <= '0;
      link  <= '0;
      attr  <= '0;
      xpos  <= '0;
      c     <= '0;
      j     <= '0;
      pat   <= '0;
      vaddr <= '0;
      taken <= '{default: '0};
    end else if (stop) begin
      state <= P_IDLE;
    end else begin
      unique case (state)
        P_IDLE: if (start) begin
          ln    <= line;
          bsel  <= buf_sel;
          taken[buf_sel] <= '0;
          count <= '0;
          ent   <= {reg_sat, 8'd0};
          vaddr <= {reg_sat, 8'd0};
          state <= P_Y_W;
        end
        P_Y_W: state <= P_Y_D;
        P_Y_D: begin
          ypos  <= vdata[9:0];
          vaddr <= ent + 15'd1;
          state <= P_SZ_W;
        end
        P_SZ_W: state <= P_SZ_D;
        P_SZ_D: begin
          wsz   <= vdata[11:10];
          hsz   <= vdata[9:8];
          link  <= vdata[6:0];
          vaddr <= ent + 15'd2;
          state <= P_AT_W;
        end
        P_AT_W: state <= P_AT_D;
        P_AT_D: begin
          // hsz is now known: skip a sprite that misses the line
          if (!on_line) begin
            count <= count + 1'b1;
            if (link == 7'd0 || 32'(count) + 1 >= MAX_SPRITES) state <= P_IDLE;
            else begin
              ent   <= {reg_sat, 8'd0} + {6'd0, link, 2'b00};
              vaddr <= {reg_sat, 8'd0} + {6'd0, link, 2'b00};
              state <= P_Y_W;
            end
          end else begin
            attr  <= vdata;
            vaddr <= ent + 15'd3;
            state <= P_X_W;
          end
        end
        P_X_W: state <= P_X_D;
        P_X_D: begin
          xpos  <= vdata[8:0];
          c     <= '0;
          state <= P_CELL;
        end
        P_CELL: begin
          vaddr <= {pnum, r_f[2:0], 1'b0};
          state <= P_P0_W;
        end
        P_P0_W: state <= P_P0_D;
        P_P0_D: begin
          pat[31:16] <= vdata;
          vaddr      <= vaddr + 15'd1;
          state      <= P_P1_W;
        end
        P_P1_W: state <= P_P1_D;
        P_P1_D: begin
          pat[15:0] <= vdata;
          j         <= '0;
          state     <= P_PIX;
        end
        P_PIX: begin
          if (sx[9:8] == 2'b00 && pixv != 4'd0 && !taken[bsel][sx[7:0]]) begin
            lb[{bsel, sx[7:0]}] <= {attr[15:13], pixv};
            taken[bsel][sx[7:0]] <= 1'b1;
          end
          j <= j + 1'b1;
          if (j == 3'd7) begin
            if (c != wsz) begin
              c     <= c + 1'b1;
              state <= P_CELL;
            end else begin
              count <= count + 1'b1;
              if (link == 7'd0 || 32'(count) + 1 >= MAX_SPRITES) state <= P_IDLE;
              else begin
                ent   <= {reg_sat, 8'd0} + {6'd0, link, 2'b00};
                vaddr <= {reg_sat, 8'd0} + {6'd0, link, 2'b00};
                state <= P_Y_W;
              end
            end
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  assign busy     = (state != P_IDLE);
  assign disp_pix = taken[disp_buf][disp_x] ? lb[{disp_buf, disp_x}] : 7'd0;
endmodule
