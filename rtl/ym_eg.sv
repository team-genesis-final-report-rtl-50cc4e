// ym_eg: attack-decay-sustain-release envelope of one FM operator.
// The envelope is an attenuation att (10 bits, 0 = full volume, 1023 = silent,
// about 0.094 dB per step, 96 dB in all). Key on starts ATTACK from the current
// attenuation, which falls exponentially (each step removes att*inc/16 + 1)
// towards 0; then DECAY raises it linearly at the D1R rate until it reaches
// the sustain level SL; SUSTAIN keeps raising it at the D2R rate; key off at
// any time enters RELEASE, which raises it at the RR rate up to silence.
// Output: att plus the total level (TL * 8), clamped to 1023.
// Rates: a 5-bit rate R becomes 2R + key scale (kc >> (3 - rs)), clamped to
// 63, or 0 if R = 0 (RR is 4 bits and becomes 2RR + 1 first). Rate r steps the
// envelope when eg_cnt's low (11 - r/4) bits are zero, by 1; rates 48 and
// above step on every tick by 2^(r/4 - 11). Attack at rate 62 or more is
// instant.
// The four stages, rates, TL and SL are the document's; the step rule and the
// exponential attack formula are this design's simplification of the chip.
// Timing: step is the envelope tick (one clock wide); key changes take effect
// on the next clock edge whatever step is; kon_pulse is high for one clock
// after a key-on edge.
module ym_eg
  import ym_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  input  logic [11:0]  eg_cnt,
  input  logic         key_on,
  input  logic [4:0]   kc,
  input  logic [1:0]   rs,
  input  logic [4:0]   ar,
  input  logic [4:0]   d1r,
  input  logic [4:0]   d2r,
  input  logic [3:0]   rr,
  input  logic [3:0]   sl,
  input  logic [6:0]   tl,
  output logic [9:0]   att_out,
  output ym_eg_state_e state,
  output logic         kon_pulse
);
  logic [9:0] att;
  logic       key_q;

  function automatic logic [5:0] eff_rate(input logic [4:0] r, input logic [4:0] kcode,
                                          input logic [1:0] scale);
    logic [6:0] t;
    if (r == 5'd0) return 6'd0;
    t = 7'({r, 1'b0}) + 7'(kcode >> (2'd3 - scale));
    return (t > 7'd63) ? 6'd63 : t[5:0];
  endfunction

  logic [5:0]  rate;
  logic        do_step;
  logic [4:0]  inc;
  logic [10:0] mask;
  logic [9:0]  sl_att;

  always_comb begin
    unique case (state)
      EG_ATTACK:  rate = eff_rate(ar, kc, rs);
      EG_DECAY:   rate = eff_rate(d1r, kc, rs);
      EG_SUSTAIN: rate = eff_rate(d2r, kc, rs);
      default:    rate = eff_rate({rr, 1'b1}, kc, rs);
    endcase
    if (rate < 6'd48) begin
      mask = 11'((12'd1 << (6'd11 - {2'b0, rate[5:2]})) - 12'd1);
      inc  = 5'd1;
    end else begin
      mask = '0;
      inc  = 5'(5'd1 << (rate[5:2] - 4'd11));
    end
    do_step = step && (rate != 6'd0) && ((eg_cnt[10:0] & mask) == 11'd0);
    sl_att  = (sl == 4'hF) ? 10'h3E0 : {1'b0, sl, 5'd0};
  end

  logic [14:0] att_x_inc;
  logic [10:0] dec, up;
  assign att_x_inc = att * inc;
  assign dec       = 11'(att_x_inc >> 4) + 11'd1;
  assign up        = {1'b0, att} + 11'(inc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      att       <= 10'h3FF;
      state     <= EG_RELEASE;
      key_q     <= 1'b0;
      kon_pulse <= 1'b0;
    end else begin
      key_q     <= key_on;
      kon_pulse <= key_on && !key_q;
      if (key_on && !key_q) begin
        state <= EG_ATTACK;
        if (eff_rate(ar, kc, rs) >= 6'd62) att <= '0;
      end else if (!key_on && key_q) begin
        state <= EG_RELEASE;
      end else begin
        unique case (state)
          EG_ATTACK: begin
            if (att == 10'd0) state <= EG_DECAY;
            else if (rate >= 6'd62) att <= '0;
            else if (do_step) att <= (dec >= {1'b0, att}) ? 10'd0 : att - dec[9:0];
          end
          EG_DECAY: begin
            if (att >= sl_att) state <= EG_SUSTAIN;
            else if (do_step) att <= (up > 11'h3FF) ? 10'h3FF : up[9:0];
          end
          EG_SUSTAIN, EG_RELEASE: begin
            if (do_step) att <= (up > 11'h3FF) ? 10'h3FF : up[9:0];
          end
          default: state <= EG_RELEASE;
        endcase
      end
    end
  end

  logic [10:0] total;
  assign total   = {1'b0, att} + {1'b0, tl, 3'd0};
  assign att_out = (total > 11'h3FF) ? 10'h3FF : total[9:0];
endmodule
