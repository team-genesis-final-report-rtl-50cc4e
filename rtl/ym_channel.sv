// ym_channel: one FM channel of four operators (op1..op4).
// On each sample strobe (smp_en) the channel computes its operators one per
// clock in the order op1, op2, op3, op4, so every modulator is ready before
// the operator it feeds. Each operator's phase is its 20-bit phase counter's
// top 10 bits plus a modulation term; the counter then advances by the
// phase generator's increment. The algorithm (alg, 0..7) says which
// operators modulate which and which are carriers:
//   0: 1>2>3>4          1: (1+2)>3>4        2: (1+(2>3))>4     3: ((1>2)+3)>4
//   4: (1>2)+(3>4)      5: 1>2, 1>3, 1>4 (2,3,4 out)   6: (1>2)+3+4   7: 1+2+3+4
// A modulator's 14-bit output enters the phase halved (a 10-bit phase wraps).
// Op1 may modulate itself: the sum of its last two outputs, shifted right by
// 10 - fb (fb = 0 switches it off). Carrier outputs are added and clamped to
// 14 bits. A key-on edge restarts that operator's phase at 0, and op1's
// key-on also clears its feedback history. Operators with AM set take
// am_att more attenuation (clamped to silence).
// The operators, the 8 algorithms and the self feedback are the document's;
// the operator order, the phase scaling of modulation and the feedback shift
// follow the original chip and are not given in the document.
// Timing: out and out_valid change 5 clocks after smp_en. smp_en must be at
// least 5 clocks apart. The envelopes step on eg_step.
module ym_channel
  import ym_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                smp_en,
  input  logic                eg_step,
  input  logic [11:0]         eg_cnt,
  input  logic [2:0]          alg,
  input  logic [2:0]          fb,
  input  ym_op_cfg_t [3:0]    cfg,      // index 0 = op1 ... 3 = op4
  input  logic [3:0]          key_on,   // bit 0 = op1 ... bit 3 = op4
  input  logic [6:0]          am_att,   // LFO attenuation for operators with AM on
  output logic signed [13:0]  out,
  output logic                out_valid
);
  logic [19:0]        inc    [4];
  logic [4:0]         kc     [4];
  logic [9:0]         att    [4];
  logic [9:0]         att_m  [4];   // with the LFO attenuation added
  logic [3:0]         kon_pulse;
  logic [19:0]        phase  [4];
  logic signed [13:0] opo    [4];   // outputs of this sample
  logic signed [13:0] fb1, fb0;     // op1's last two outputs
  logic [2:0]         slot;         // 0..3 computing, 4 = summing, 7 = idle

  for (genvar i = 0; i < 4; i++) begin : g_op
    ym_pg u_pg (
      .fnum(cfg[i].fnum), .block(cfg[i].block), .dt(cfg[i].dt), .mul(cfg[i].mul),
      .inc(inc[i]), .kc(kc[i])
    );
    ym_eg u_eg (
      .clk, .rst_n, .step(eg_step), .eg_cnt, .key_on(key_on[i]), .kc(kc[i]),
      .rs(cfg[i].rs), .ar(cfg[i].ar), .d1r(cfg[i].d1r), .d2r(cfg[i].d2r),
      .rr(cfg[i].rr), .sl(cfg[i].sl), .tl(cfg[i].tl),
      .att_out(att[i]), .state(), .kon_pulse(kon_pulse[i])
    );
    logic [10:0] att_sum;
    assign att_sum  = {1'b0, att[i]} + (cfg[i].am ? 11'(am_att) : 11'd0);
    assign att_m[i] = att_sum[10] ? 10'd1023 : att_sum[9:0];
  end

  // modulation input of the operator in the current slot
  logic signed [15:0] modsum;
  logic [9:0]         modp;
  logic [1:0]         cur;
  assign cur = slot[1:0];

  always_comb begin
    modsum = '0;
    unique case (cur)
      2'd0: modsum = (fb == 3'd0) ? 16'sd0 : (16'(fb0) + 16'(fb1)) >>> (4'd10 - {1'b0, fb});
      2'd1: if (alg inside {3'd0, 3'd3, 3'd4, 3'd5, 3'd6}) modsum = 16'(opo[0]);
      2'd2: begin
        unique case (alg)
          3'd0, 3'd2: modsum = 16'(opo[1]);
          3'd1:       modsum = 16'(opo[0]) + 16'(opo[1]);
          3'd5:       modsum = 16'(opo[0]);
          default:    modsum = '0;
        endcase
      end
      default: begin
        unique case (alg)
          3'd0, 3'd1, 3'd4: modsum = 16'(opo[2]);
          3'd2:             modsum = 16'(opo[0]) + 16'(opo[2]);
          3'd3:             modsum = 16'(opo[1]) + 16'(opo[2]);
          3'd5:             modsum = 16'(opo[0]);
          default:          modsum = '0;
        endcase
      end
    endcase
    // op1 feedback is already in phase units; modulators are halved
    modp = (cur == 2'd0) ? modsum[9:0] : modsum[10:1];
  end

  logic signed [13:0] op_out;
  ym_op u_op (
    .phase(phase[cur][19:10] + modp),
    .att  (att_m[cur]),
    .out  (op_out)
  );

  // carrier sum
  logic signed [15:0] csum;
  always_comb begin
    unique case (alg)
      3'd0, 3'd1, 3'd2, 3'd3: csum = 16'(opo[3]);
      3'd4:                   csum = 16'(opo[1]) + 16'(opo[3]);
      3'd5, 3'd6:             csum = 16'(opo[1]) + 16'(opo[2]) + 16'(opo[3]);
      default:                csum = 16'(opo[0]) + 16'(opo[1]) + 16'(opo[2]) + 16'(opo[3]);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot      <= 3'd7;
      out       <= '0;
      out_valid <= 1'b0;
      fb0       <= '0;
      fb1       <= '0;
      for (int i = 0; i < 4; i++) begin
        phase[i] <= '0;
        opo[i]   <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (smp_en) slot <= 3'd0;
      else if (slot < 3'd4) begin
        opo[cur]   <= op_out;
        phase[cur] <= phase[cur] + inc[cur];
        if (cur == 2'd0) begin
          fb1 <= fb0;
          fb0 <= op_out;
        end
        slot <= slot + 1'b1;
      end else if (slot == 3'd4) begin
        out       <= (csum > 16'sd8191) ? 14'sd8191 : (csum < -16'sd8192) ? -14'sd8192 : csum[13:0];
        out_valid <= 1'b1;
        slot      <= 3'd7;
      end
      for (int i = 0; i < 4; i++)
        if (kon_pulse[i]) phase[i] <= '0;
      if (kon_pulse[0]) begin
        fb0 <= '0;
        fb1 <= '0;
      end
    end
  end
endmodule
