// vdp_color: turns a 9-bit color RAM entry (3 bits each of blue, green, red,
// {b, g, r}) into the 4-bit-per-component color sent to the display, with
// the shadow and highlight effects:
//   normal    : 2c        (0..14)
//   shadow    : c         (half brightness, 0..7)
//   highlight : c + 7     (half brightness raised by half scale, 7..14)
// When blank is high the output is black. The effects are the console's; the
// exact 4-bit values are this design's. Purely combinational.
module vdp_color (
  input  logic [8:0] color,
  input  logic [1:0] shade,    // 0 normal, 1 shadow, 2 highlight
  input  logic       blank,
  output logic [3:0] r,
  output logic [3:0] g,
  output logic [3:0] b
);
  function automatic logic [3:0] comp(input logic [2:0] c, input logic [1:0] s);
    unique case (s)
      2'd1:    return {1'b0, c};
      2'd2:    return {1'b0, c} + 4'd7;
      default: return {c, 1'b0};
    endcase
  endfunction

  always_comb begin
    if (blank) {r, g, b} = '0;
    else begin
      r = comp(color[2:0], shade);
      g = comp(color[5:3], shade);
      b = comp(color[8:6], shade);
    end
  end
endmodule
