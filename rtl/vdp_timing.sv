// vdp_timing: raster timing of the video processor. A pixel counter (h) and a
// line counter (v) advance on each pixel strobe pix_en. Each line has
// H_ACTIVE visible pixels out of H_TOTAL; each frame has 224 or 192 visible
// lines (v28 = 1 or 0) out of V_TOTAL. hsync and vsync are high during their
// pulses; de is high on visible pixels. The mode is taken at the start of a
// frame. The display enable (disp_en_in) is latched only at the start of a
// line, so a register write in the middle of a line cannot start the picture
// part-way across it; disp_en is the latched value.
// The 256-pixel width, 192/224-line modes and the line-start latching follow
// the document; the totals and sync positions are NTSC-like values chosen
// here (342 x 262).
// Timing: all outputs are registered and change on clocks where pix_en is
// high. line_start / frame_start are high for the pixel h = 0 / h = 0, v = 0.
module vdp_timing #(
  parameter int unsigned H_ACTIVE = 256,
  parameter int unsigned H_TOTAL  = 342,
  parameter int unsigned HS_START = 270,
  parameter int unsigned HS_LEN   = 26,
  parameter int unsigned V_TOTAL  = 262,
  parameter int unsigned VS_START = 240,
  parameter int unsigned VS_LEN   = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_en,
  input  logic       v28_in,
  input  logic       disp_en_in,
  output logic [8:0] h,
  output logic [8:0] v,
  output logic       hsync,
  output logic       vsync,
  output logic       hblank,
  output logic       vblank,
  output logic       de,
  output logic       line_start,
  output logic       frame_start,
  output logic       disp_en,
  output logic       v28
);
  logic [8:0] v_active;
  assign v_active = v28 ? 9'd224 : 9'd192;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h <= '0;
      v <= '0;
      disp_en <= 1'b0;
      v28     <= 1'b1;
    end else if (pix_en) begin
      if (32'(h) == H_TOTAL - 1) begin
        h <= '0;
        disp_en <= disp_en_in;
        if (32'(v) == V_TOTAL - 1) begin
          v   <= '0;
          v28 <= v28_in;
        end else v <= v + 1'b1;
      end else h <= h + 1'b1;
    end
  end

  assign hblank      = (32'(h) >= H_ACTIVE);
  assign vblank      = (v >= v_active);
  assign de          = !hblank && !vblank;
  assign hsync       = (32'(h) >= HS_START) && (32'(h) < HS_START + HS_LEN);
  assign vsync       = (32'(v) >= VS_START) && (32'(v) < VS_START + VS_LEN);
  assign line_start  = (h == 9'd0);
  assign frame_start = (h == 9'd0) && (v == 9'd0);
endmodule
