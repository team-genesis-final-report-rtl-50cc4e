// ym_pg: phase generator step of one FM operator. The operator's phase is a
// 20-bit counter advanced once per output sample by the increment computed
// here; its top 10 bits index the sine table. The increment comes from four
// settings: frequency number and octave give the base step
// (fnum << block) / 2; detune nudges it up or down by an amount that grows
// with the key code; multiple scales it (x1/2 for mul = 0, xmul otherwise).
// The key code, {block, fnum[10], a fnum[10:7] rounding bit}, also drives the
// envelope's rate scaling.
// The four settings and the counter are the document's; the detune amount is
// this design's approximation, kc*{0,4,8,11}/16, of the chip's detune table.
// Purely combinational.
module ym_pg (
  input  logic [10:0] fnum,
  input  logic [2:0]  block,
  input  logic [2:0]  dt,
  input  logic [3:0]  mul,
  output logic [19:0] inc,
  output logic [4:0]  kc
);
  logic [16:0] base, based;
  logic [8:0]  dtv;
  logic [3:0]  k;

  always_comb begin
    kc   = {block, fnum[10],
            (fnum[10] & (fnum[9] | fnum[8] | fnum[7])) | (!fnum[10] & fnum[9] & fnum[8] & fnum[7])};
    base = 17'(({7'd0, fnum} << block) >> 1);
    unique case (dt[1:0])
      2'd0: k = 4'd0;
      2'd1: k = 4'd4;
      2'd2: k = 4'd8;
      default: k = 4'd11;
    endcase
    dtv   = 9'((kc * k) >> 4);
    based = dt[2] ? base - 17'(dtv) : base + 17'(dtv);
    if (mul == 4'd0) inc = 20'(based >> 1);
    else             inc = 20'(based * mul);
  end
endmodule
