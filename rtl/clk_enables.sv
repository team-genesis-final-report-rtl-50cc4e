// clk_enables: derives the console's timing from the 54 MHz global clock as
// one-cycle clock-enable strobes (the whole design runs on the one clock).
//   cpu_en    54 MHz / 7            = 7.71 MHz  68k clock
//   z80_en    54 MHz / 15           = 3.6 MHz   Z80 clock
//   psg_en    z80_en / 16           = 225 kHz   PSG counter tick
//   fm_en     cpu_en / 6            = 1.29 MHz  FM operator-slot tick
//   fm_smp_en fm_en / 24            = 53.6 kHz  FM sample (one per 24 slots)
//   pcm_en    54 MHz / 1125         = 48 kHz    output sample for the codec
// The 54 MHz clock and the divide-by-7 for the 68k follow the document; the
// other ratios are this design's, chosen to land on the rates it names
// (3.58 MHz, 1.28 MHz, 53 kHz, 48 kHz) as closely as whole numbers allow.
module clk_enables #(
  parameter int unsigned DIV_CPU = 7,
  parameter int unsigned DIV_Z80 = 15,
  parameter int unsigned DIV_PSG = 16,
  parameter int unsigned DIV_FM  = 6,
  parameter int unsigned FM_SLOTS = 24,
  parameter int unsigned DIV_PCM = 1125
) (
  input  logic clk,
  input  logic rst_n,
  output logic cpu_en,
  output logic z80_en,
  output logic psg_en,
  output logic fm_en,
  output logic fm_smp_en,
  output logic pcm_en
);
  logic [7:0]  c_cpu, c_z80, c_psg, c_fm, c_slot;
  logic [11:0] c_pcm;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {c_cpu, c_z80, c_psg, c_fm, c_slot} <= '0;
      c_pcm <= '0;
      {cpu_en, z80_en, psg_en, fm_en, fm_smp_en, pcm_en} <= '0;
    end else begin
      cpu_en    <= (32'(c_cpu) == DIV_CPU - 1);
      z80_en    <= (32'(c_z80) == DIV_Z80 - 1);
      pcm_en    <= (32'(c_pcm) == DIV_PCM - 1);
      psg_en    <= (32'(c_z80) == DIV_Z80 - 1) && (32'(c_psg) == DIV_PSG - 1);
      fm_en     <= (32'(c_cpu) == DIV_CPU - 1) && (32'(c_fm) == DIV_FM - 1);
      fm_smp_en <= (32'(c_cpu) == DIV_CPU - 1) && (32'(c_fm) == DIV_FM - 1) &&
                   (32'(c_slot) == FM_SLOTS - 1);
      c_cpu <= (32'(c_cpu) == DIV_CPU - 1) ? '0 : c_cpu + 1'b1;
      c_z80 <= (32'(c_z80) == DIV_Z80 - 1) ? '0 : c_z80 + 1'b1;
      c_pcm <= (32'(c_pcm) == DIV_PCM - 1) ? '0 : c_pcm + 1'b1;
      if (32'(c_z80) == DIV_Z80 - 1)
        c_psg <= (32'(c_psg) == DIV_PSG - 1) ? '0 : c_psg + 1'b1;
      if (32'(c_cpu) == DIV_CPU - 1) begin
        c_fm <= (32'(c_fm) == DIV_FM - 1) ? '0 : c_fm + 1'b1;
        if (32'(c_fm) == DIV_FM - 1)
          c_slot <= (32'(c_slot) == FM_SLOTS - 1) ? '0 : c_slot + 1'b1;
      end
    end
  end
endmodule
