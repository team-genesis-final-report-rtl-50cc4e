// ym_op: output of one FM operator for one sample,
//   out = A * sin(2*pi*phase/1024),
// computed in the logarithmic domain as the chip does: a quarter-wave table
// gives -log2(sin) (4.8 fixed point) for the phase folded into 0..255, the
// envelope attenuation (10 bits, 1/256 of a power of two each after the
// shift by 2) is added, and a power table turns the sum back into a linear
// magnitude: pow[frac] >> int. Bit 9 of the phase gives the sign.
// Tables (256 entries each, in ym_logsin.hex and ym_pow.hex):
//   logsin[i] = round(-log2(sin((i + 0.5) / 256 * pi/2)) * 256)
//   pow[i]    = round(1024 * 2^((255 - i) / 256))
// Output range about +-8180 (14-bit signed). Phase modulation is applied by
// the caller, which adds the modulator's output to the phase.
// The log-sine and power tables and the quarter-wave storage are the
// document's; the table widths are this design's. Purely combinational.
module ym_op (
  input  logic [9:0]         phase,
  input  logic [9:0]         att,
  output logic signed [13:0] out
);
  logic [11:0] logsin [256];
  logic [10:0] powtab [256];

  initial begin
    $readmemh("rtl/ym_logsin.hex", logsin);
    $readmemh("rtl/ym_pow.hex", powtab);
  end

  logic [7:0]  q;
  logic [12:0] tot;
  logic [12:0] mag;

  always_comb begin
    q   = phase[8] ? ~phase[7:0] : phase[7:0];
    tot = 13'(logsin[q]) + {1'b0, att, 2'b00};
    mag = (tot[12:8] > 5'd12) ? 13'd0 : 13'({powtab[tot[7:0]], 2'b00} >> tot[12:8]);
    out = phase[9] ? -$signed({1'b0, mag}) : $signed({1'b0, mag});
  end
endmodule
