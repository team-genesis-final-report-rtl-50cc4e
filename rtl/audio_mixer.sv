// audio_mixer: joins the two sound chips and hands 16-bit samples to the
// codec. The FM chip's 14-bit signed output and the PSG's 11-bit signed output
// are added and saturated to 14 bits. The sum is taken every clock and latched
// on pcm_en (48 kHz); the chips run at their own rates, unsynchronised to it.
// The latched 14-bit value becomes 16 bits by shifting left two places and
// filling the two new low bits with the sign bit.
// Saturation (rather than wrap) is this design's choice.
// Timing: pcm_out and pcm_valid change on the clock edge where pcm_en is high.
module audio_mixer (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [13:0] fm_in,
  input  logic signed [10:0] psg_in,
  input  logic               pcm_en,
  output logic signed [15:0] pcm_out,
  output logic               pcm_valid
);
  logic signed [14:0] sum;
  logic signed [13:0] sat;

  always_comb begin
    sum = 15'(fm_in) + 15'(psg_in);
    if (sum > 15'sd8191)       sat = 14'sd8191;
    else if (sum < -15'sd8192) sat = -14'sd8192;
    else                       sat = sum[13:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pcm_out   <= '0;
      pcm_valid <= 1'b0;
    end else begin
      pcm_valid <= pcm_en;
      if (pcm_en) pcm_out <= {sat, sat[13], sat[13]};
    end
  end
endmodule
