// ym_lfo: the FM synthesizer's low-frequency oscillator.
// A 7-bit counter steps once every PERIOD[freq] samples while the LFO is
// enabled (register $22 bit 3, frequency in bits 2:0) and is held at 0 while
// it is disabled. From the counter it makes:
//   am: a triangle 0, 2, .. 126, .. 2 (one cycle per 128 steps), an
//       attenuation in the envelope's 0.094 dB units;
//   pm: a signed triangle 0 .. 8 .. 0 .. -8 .. 0 (one cycle per 128 steps).
// The periods are the original chip's: at 53.267 kHz they give 3.98, 5.56,
// 6.02, 6.37, 6.88, 9.63, 48.1 and 72.2 Hz. The document names the LFO only;
// the triangle shapes and their sizes are this design's.
// Timing: smp_en is the sample strobe; outputs are registered and change on
// the clock after a strobe that steps the counter.
module ym_lfo (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              smp_en,
  input  logic              en,
  input  logic [2:0]        freq,
  output logic [6:0]        am,
  output logic signed [4:0] pm
);
  localparam logic [6:0] PERIOD [8] = '{7'd108, 7'd77, 7'd71, 7'd67, 7'd62, 7'd44, 7'd8, 7'd5};

  logic [6:0] div, cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
      cnt <= '0;
    end else if (smp_en) begin
      if (!en) begin
        div <= '0;
        cnt <= '0;
      end else if (div >= PERIOD[freq] - 7'd1) begin
        div <= '0;
        cnt <= cnt + 1'b1;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  logic [3:0] tri_pm;
  always_comb begin
    am = {cnt[6] ? ~cnt[5:0] : cnt[5:0], 1'b0};
    tri_pm = cnt[5] ? 4'd8 - {1'b0, cnt[4:2]} : {1'b0, cnt[4:2]};
    pm = cnt[6] ? -$signed({1'b0, tri_pm}) : $signed({1'b0, tri_pm});
  end
endmodule
