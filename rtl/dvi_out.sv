// dvi_out: output register stage toward the DVI transmitter. The video
// processor produces 4 bits per color; the transmitter takes 8, so each
// component is multiplied by 16 (shifted left four places, low bits zero).
// Syncs and data enable are registered alongside so all pins change together.
// Timing: one clock of latency on every output.
module dvi_out (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] r_in,
  input  logic [3:0] g_in,
  input  logic [3:0] b_in,
  input  logic       hsync_in,
  input  logic       vsync_in,
  input  logic       de_in,
  output logic [7:0] r_out,
  output logic [7:0] g_out,
  output logic [7:0] b_out,
  output logic       hsync_out,
  output logic       vsync_out,
  output logic       de_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {r_out, g_out, b_out} <= '0;
      {hsync_out, vsync_out, de_out} <= '0;
    end else begin
      r_out <= de_in ? {r_in, 4'h0} : 8'h00;
      g_out <= de_in ? {g_in, 4'h0} : 8'h00;
      b_out <= de_in ? {b_in, 4'h0} : 8'h00;
      hsync_out <= hsync_in;
      vsync_out <= vsync_in;
      de_out    <= de_in;
    end
  end
endmodule
