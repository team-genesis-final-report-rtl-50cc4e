// ym2612: six-channel FM synthesizer.
//
// Host interface: four byte ports, A0/D0 (part I, channels 1-3 and global
// registers) and A1/D1 (part II, channels 4-6). The host writes a register
// number to an address port, then the value to the matching data port.
// Reading any port returns the status: bit 1 = timer B overflow, bit 0 =
// timer A overflow; writes complete at once, so the busy bit (7) is 0.
// Registers (the original chip's map, which the document does not list):
//   $24/$25 timer A (10 bits)  $26 timer B  $27 ch3 mode, timer control
//   $28 key on/off (bits 7:4 = op4..op1, bits 2:0 = channel 0-2, 4-6)
//   $2A DAC sample (8-bit unsigned)  $2B bit 7 DAC enable (replaces ch 6)
//   $22 LFO enable (bit 3) and frequency (bits 2:0)
//   $30-$9F per operator: DT/MUL, TL, RS/AR, AM/D1R, D2R, SL/RR, SSG-EG;
//          low 2 bits = channel, bits 3:2 = operator in the order 1,3,2,4
//   $A0-$A2 / $A4-$A6 frequency number low / block and high bits; the high
//          byte is held until the low byte is written
//   $A8-$AE channel 3 per-operator frequencies (special mode)
//   $B0-$B2 feedback and algorithm   $B4-$B6 left/right enable, AMS, PMS
// Datapath: six ym_channel instances run in parallel, each working through
// its four operators on each sample strobe; their outputs are summed and
// clamped to a 14-bit signed sample. A channel with both L and R off is
// left out. With the DAC on, channel 6 plays the DAC sample, (dac - 128) << 6.
// Envelopes step every third sample; timer A counts samples, timer B counts
// 16-sample units; their overflow flags are set when enabled in $27.
// LFO ($22, ym_lfo): its amplitude triangle (0..126) is shifted right by
// 8, 3, 1 or 0 for AMS 0-3 and added to the attenuation of operators with AM
// set ($60-$6F bit 7). Its pitch triangle p (-8..8) changes the frequency
// number by fnum * p * PMD[PMS] / 65536, where PMD = 0, 16, 32, 47, 66, 95,
// 189, 379 gives peak deviations of about 0, 3.4, 6.7, 10, 14, 20, 40 and
// 80 cents; the result is clamped to 0..2047.
// Not built: the SSG-EG envelope mode ($90-$9F are stored only).
// Timing: smp_en is the 53 kHz sample strobe (one per 24 operator slots of
// the chip); out and out_valid update 6 clocks after it.
module ym2612
  import ym_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               smp_en,
  input  logic               we,
  input  logic [1:0]         addr,
  input  logic [7:0]         wdata,
  output logic [7:0]         rdata,
  output logic signed [13:0] out,
  output logic               out_valid
);
  // register file
  logic [7:0]  reg_addr;
  logic        reg_part;
  ym_op_cfg_t [3:0] opcfg [6];
  logic [10:0] fnum  [6];
  logic [2:0]  block [6];
  logic [5:0]  fhi_latch;          // block and fnum high waiting for the low byte
  logic [10:0] c3_fnum  [3];       // ch3 special: op1, op2, op3
  logic [2:0]  c3_block [3];
  logic [5:0]  c3_latch;
  logic [2:0]  alg [6];
  logic [2:0]  fb  [6];
  logic [7:0]  lr_ams [6];
  logic [7:0]  ssg [6][4];
  logic [3:0]  key [6];
  logic [1:0]  ch3_mode;
  logic [9:0]  ta_val;
  logic [7:0]  tb_val;
  logic [3:0]  lfo_reg;            // $22: enable, frequency
  logic [5:0]  tctl;               // enable B, enable A, load B, load A (bits 3:0)
  logic [7:0]  dac;
  logic        dac_en;
  logic        flag_a, flag_b;

  // operator slot in register order 1,3,2,4 -> operator index
  function automatic logic [1:0] slot2op(input logic [1:0] s);
    unique case (s)
      2'd0: return 2'd0;
      2'd1: return 2'd2;
      2'd2: return 2'd1;
      default: return 2'd3;
    endcase
  endfunction

  logic [2:0] wch;   // channel addressed by the current register, 0..5
  logic [1:0] wop;
  assign wch = reg_part ? 3'd3 + {1'b0, reg_addr[1:0]} : {1'b0, reg_addr[1:0]};
  assign wop = slot2op(reg_addr[3:2]);

  logic [3:0] tb_sub;
  logic [9:0] ta_cnt;
  logic [7:0] tb_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_addr  <= '0;
      reg_part  <= 1'b0;
      fhi_latch <= '0;
      c3_latch  <= '0;
      ch3_mode  <= '0;
      ta_val    <= '0;
      tb_val    <= '0;
      tctl      <= '0;
      lfo_reg   <= '0;
      dac       <= 8'h80;
      dac_en    <= 1'b0;
      flag_a    <= 1'b0;
      flag_b    <= 1'b0;
      ta_cnt    <= '0;
      tb_cnt    <= '0;
      tb_sub    <= '0;
      for (int c = 0; c < 6; c++) begin
        opcfg[c]  <= '0;
        fnum[c]   <= '0;
        block[c]  <= '0;
        alg[c]    <= '0;
        fb[c]     <= '0;
        lr_ams[c] <= '0;
        key[c]    <= '0;
        for (int o = 0; o < 4; o++) ssg[c][o] <= '0;
      end
      for (int o = 0; o < 3; o++) begin
        c3_fnum[o]  <= '0;
        c3_block[o] <= '0;
      end
    end else begin
      // timers, stepped once per sample
      if (smp_en) begin
        if (tctl[0]) begin
          if (ta_cnt == 10'h3FF) begin
            ta_cnt <= ta_val;
            if (tctl[2]) flag_a <= 1'b1;
          end else ta_cnt <= ta_cnt + 1'b1;
        end
        tb_sub <= tb_sub + 1'b1;
        if (tb_sub == 4'hF && tctl[1]) begin
          if (tb_cnt == 8'hFF) begin
            tb_cnt <= tb_val;
            if (tctl[3]) flag_b <= 1'b1;
          end else tb_cnt <= tb_cnt + 1'b1;
        end
      end
      if (we && !addr[0]) begin
        reg_addr <= wdata;
        reg_part <= addr[1];
      end else if (we && addr[0]) begin
        if (!reg_part && reg_addr < 8'h30) begin
          unique case (reg_addr)
            8'h22: lfo_reg     <= wdata[3:0];
            8'h24: ta_val[9:2] <= wdata;
            8'h25: ta_val[1:0] <= wdata[1:0];
            8'h26: tb_val      <= wdata;
            8'h27: begin
              ch3_mode <= wdata[7:6];
              if (wdata[0] && !tctl[0]) ta_cnt <= ta_val;
              if (wdata[1] && !tctl[1]) tb_cnt <= tb_val;
              tctl <= {2'b00, wdata[3:0]};
              if (wdata[4]) flag_a <= 1'b0;
              if (wdata[5]) flag_b <= 1'b0;
            end
            8'h28: if (wdata[1:0] != 2'd3)
                     key[wdata[2] ? 3'd3 + {1'b0, wdata[1:0]} : {1'b0, wdata[1:0]}] <= wdata[7:4];
            8'h2A: dac    <= wdata;
            8'h2B: dac_en <= wdata[7];
            default: ;
          endcase
        end else if (reg_addr >= 8'h30 && reg_addr < 8'hA0 && reg_addr[1:0] != 2'd3) begin
          unique case (reg_addr[7:4])
            4'h3: begin opcfg[wch][wop].dt <= wdata[6:4]; opcfg[wch][wop].mul <= wdata[3:0]; end
            4'h4: opcfg[wch][wop].tl <= wdata[6:0];
            4'h5: begin opcfg[wch][wop].rs <= wdata[7:6]; opcfg[wch][wop].ar <= wdata[4:0]; end
            4'h6: begin opcfg[wch][wop].am <= wdata[7]; opcfg[wch][wop].d1r <= wdata[4:0]; end
            4'h7: opcfg[wch][wop].d2r <= wdata[4:0];
            4'h8: begin opcfg[wch][wop].sl <= wdata[7:4]; opcfg[wch][wop].rr <= wdata[3:0]; end
            default: ssg[wch][wop] <= wdata;
          endcase
        end else if (reg_addr[1:0] != 2'd3) begin
          unique case (reg_addr[7:2])
            6'b1010_00: begin  // $A0-$A2
              fnum[wch]  <= {fhi_latch[2:0], wdata};
              block[wch] <= fhi_latch[5:3];
            end
            6'b1010_01: fhi_latch <= wdata[5:0];   // $A4-$A6
            6'b1010_10: if (!reg_part) begin       // $A8-$AA
              // $A8 = op3, $A9 = op1, $AA = op2
              unique case (reg_addr[1:0])
                2'd0: begin c3_fnum[2] <= {c3_latch[2:0], wdata}; c3_block[2] <= c3_latch[5:3]; end
                2'd1: begin c3_fnum[0] <= {c3_latch[2:0], wdata}; c3_block[0] <= c3_latch[5:3]; end
                default: begin c3_fnum[1] <= {c3_latch[2:0], wdata}; c3_block[1] <= c3_latch[5:3]; end
              endcase
            end
            6'b1010_11: if (!reg_part) c3_latch <= wdata[5:0];  // $AC-$AE
            6'b1011_00: begin fb[wch] <= wdata[5:3]; alg[wch] <= wdata[2:0]; end
            6'b1011_01: lr_ams[wch] <= wdata;
            default: ;
          endcase
        end
      end
    end
  end

  assign rdata = {6'd0, flag_b, flag_a};

  // envelope tick every third sample
  logic [1:0]  eg_div;
  logic [11:0] eg_cnt;
  logic        eg_step;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eg_div  <= '0;
      eg_cnt  <= '0;
      eg_step <= 1'b0;
    end else begin
      eg_step <= 1'b0;
      if (smp_en) begin
        eg_div <= (eg_div == 2'd2) ? 2'd0 : eg_div + 1'b1;
        if (eg_div == 2'd2) begin
          eg_step <= 1'b1;
          eg_cnt  <= eg_cnt + 1'b1;
        end
      end
    end
  end

  // low-frequency oscillator
  logic [6:0]        lfo_am;
  logic signed [4:0] lfo_pm;
  ym_lfo u_lfo (
    .clk, .rst_n, .smp_en, .en(lfo_reg[3]), .freq(lfo_reg[2:0]), .am(lfo_am), .pm(lfo_pm)
  );
  localparam logic [3:0] AMS_SHIFT [4] = '{4'd8, 4'd3, 4'd1, 4'd0};
  localparam logic [8:0] PMD [8] = '{9'd0, 9'd16, 9'd32, 9'd47, 9'd66, 9'd95, 9'd189, 9'd379};
  function automatic logic [10:0] fnum_pm(input logic [10:0] f, input logic signed [4:0] p,
                                          input logic [2:0] pms);
    logic signed [25:0] d;
    logic signed [13:0] n;
    d = $signed({1'b0, f}) * p * $signed({1'b0, PMD[pms]});
    n = $signed({3'b000, f}) + 14'(d >>> 16);
    return (n < 0) ? 11'd0 : (n > 14'sd2047) ? 11'd2047 : n[10:0];
  endfunction

  // channels
  logic signed [13:0] chout [6];
  logic [5:0]         chvalid;
  for (genvar c = 0; c < 6; c++) begin : g_ch
    ym_op_cfg_t [3:0] cfg;
    always_comb begin
      for (int o = 0; o < 4; o++) begin
        cfg[o]       = opcfg[c][o];
        cfg[o].fnum  = fnum_pm(fnum[c], lfo_pm, lr_ams[c][2:0]);
        cfg[o].block = block[c];
        if (c == 2 && ch3_mode != 2'b00 && o < 3) begin
          cfg[o].fnum  = fnum_pm(c3_fnum[o], lfo_pm, lr_ams[c][2:0]);
          cfg[o].block = c3_block[o];
        end
      end
    end
    ym_channel u_ch (
      .clk, .rst_n, .smp_en, .eg_step, .eg_cnt,
      .alg(alg[c]), .fb(fb[c]), .cfg, .key_on(key[c]),
      .am_att(7'(lfo_am >> AMS_SHIFT[lr_ams[c][5:4]])),
      .out(chout[c]), .out_valid(chvalid[c])
    );
  end

  // mix
  logic signed [16:0] mix;
  always_comb begin
    mix = '0;
    for (int c = 0; c < 6; c++) begin
      if (c == 5 && dac_en)
        mix = mix + 17'($signed({~dac[7], dac[6:0]}) * 64);
      else if (lr_ams[c][7:6] != 2'b00)
        mix = mix + 17'(chout[c]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= chvalid[0];
      if (chvalid[0])
        out <= (mix > 17'sd8191) ? 14'sd8191 : (mix < -17'sd8192) ? -14'sd8192 : mix[13:0];
    end
  end
endmodule
