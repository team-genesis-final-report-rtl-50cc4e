// psg_sn76489: programmable sound generator with three square-wave tone
// channels and one noise channel, each with a 4-bit attenuation.
//
// Writes (one byte per we): a byte with bit 7 set latches a channel (bits 6:5)
// and a register type (bit 4: 1 = attenuation, 0 = tone/noise) and loads
// bits 3:0 into it; a byte with bit 7 clear loads the latched register:
// bits 5:0 become the upper six bits of a 10-bit tone period, or bits 3:0
// become the attenuation or noise control.
// Tones: on each en tick a 10-bit counter counts down; at zero it reloads the
// period and the channel's output flips. Noise: a 16-bit LFSR shifts on each
// rising edge of the noise clock, whose half-period is 16, 32 or 64 ticks or
// follows tone channel 2 (control bits 1:0 = 3). Control bit 2 picks white
// noise (feedback = bit0 xor bit3) or periodic noise (feedback = bit0);
// writing the noise control reloads the LFSR with 0x8000. Output = LFSR bit 0.
// Mixing: each channel adds +amp or -amp, where amp comes from a 16-entry
// table of 2 dB steps from 255 down to silent (attenuation 15). Four channels
// give an 11-bit signed sum.
// The channel set, white/periodic LFSR noise, the LUT and the 11-bit output
// are the document's; the register protocol, LFSR taps, table values and
// rates are those of the original chip, which the document does not spell out.
// Timing: en is the chip's tick (input clock / 16); out is registered.
module psg_sn76489 (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               we,
  input  logic [7:0]         wdata,
  output logic signed [10:0] out
);
  logic [9:0]  tone   [3];
  logic [9:0]  cnt    [3];
  logic [2:0]  tone_q;
  logic [3:0]  att    [4];
  logic [2:0]  nctrl;
  logic [1:0]  lch;
  logic        ltype;
  logic [9:0]  ncnt;
  logic        nclk;
  logic [15:0] lfsr;
  logic        nreset;

  // attenuation table: round(255 * 10^(-2*i/20)), i = 15 silent
  function automatic logic [7:0] amp(input logic [3:0] a);
    unique case (a)
      4'd0: return 8'd255;  4'd1: return 8'd203;  4'd2: return 8'd161;  4'd3: return 8'd128;
      4'd4: return 8'd102;  4'd5: return 8'd81;   4'd6: return 8'd64;   4'd7: return 8'd51;
      4'd8: return 8'd40;   4'd9: return 8'd32;   4'd10: return 8'd26;  4'd11: return 8'd20;
      4'd12: return 8'd16;  4'd13: return 8'd13;  4'd14: return 8'd10;  default: return 8'd0;
    endcase
  endfunction

  // register writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) tone[i] <= '0;
      for (int i = 0; i < 4; i++) att[i] <= 4'hF;
      nctrl  <= '0;
      lch    <= '0;
      ltype  <= 1'b0;
      nreset <= 1'b0;
    end else begin
      nreset <= 1'b0;
      if (we) begin
        if (wdata[7]) begin
          lch   <= wdata[6:5];
          ltype <= wdata[4];
          if (wdata[4]) att[wdata[6:5]] <= wdata[3:0];
          else if (wdata[6:5] == 2'd3) begin
            nctrl  <= wdata[2:0];
            nreset <= 1'b1;
          end else tone[wdata[6:5]][3:0] <= wdata[3:0];
        end else begin
          if (ltype) att[lch] <= wdata[3:0];
          else if (lch == 2'd3) begin
            nctrl  <= wdata[2:0];
            nreset <= 1'b1;
          end else tone[lch][9:4] <= wdata[5:0];
        end
      end
    end
  end

  // tone and noise counters
  logic [9:0] nperiod;
  always_comb begin
    unique case (nctrl[1:0])
      2'd0: nperiod = 10'h010;
      2'd1: nperiod = 10'h020;
      2'd2: nperiod = 10'h040;
      default: nperiod = tone[2];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) cnt[i] <= '0;
      tone_q <= '0;
      ncnt   <= '0;
      nclk   <= 1'b0;
      lfsr   <= 16'h8000;
    end else begin
      if (nreset) lfsr <= 16'h8000;
      else if (en) begin
        for (int i = 0; i < 3; i++) begin
          if (cnt[i] <= 10'd1) begin
            cnt[i]    <= tone[i];
            tone_q[i] <= (tone[i] <= 10'd1) ? 1'b1 : !tone_q[i];
          end else cnt[i] <= cnt[i] - 1'b1;
        end
        if (ncnt <= 10'd1) begin
          ncnt <= nperiod;
          nclk <= !nclk;
          if (!nclk)
            lfsr <= {nctrl[2] ? (lfsr[0] ^ lfsr[3]) : lfsr[0], lfsr[15:1]};
        end else ncnt <= ncnt - 1'b1;
      end
    end
  end

  // mix
  logic signed [10:0] sum;
  always_comb begin
    sum = '0;
    for (int i = 0; i < 3; i++)
      sum = tone_q[i] ? sum + 11'(amp(att[i])) : sum - 11'(amp(att[i]));
    sum = lfsr[0] ? sum + 11'(amp(att[3])) : sum - 11'(amp(att[3]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else        out <= sum;
  end
endmodule
