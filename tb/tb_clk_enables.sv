// tb_clk_enables: counts each enable over a whole number of periods and
// checks the exact spacing between consecutive strobes of each enable.
module tb_clk_enables;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cpu_en, z80_en, psg_en, fm_en, fm_smp_en, pcm_en;
  clk_enables dut (.*);
  int n_cpu, n_z80, n_psg, n_fm, n_smp, n_pcm;
  int last_cpu, last_smp, cyc;
  int bad_cpu_gap, bad_smp_gap;
  // spacing of the other strobes: z80, psg, fm, pcm
  int last_o [4], n_o [4], bad_o [4];
  localparam int GAP [4] = '{15, 240, 42, 1125};

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (cpu_en) begin
      if (n_cpu > 0 && cyc - last_cpu != 7) bad_cpu_gap++;
      n_cpu++; last_cpu = cyc;
    end
    if (fm_smp_en) begin
      if (n_smp > 0 && cyc - last_smp != 1008) bad_smp_gap++;
      n_smp++; last_smp = cyc;
    end
    n_z80 += z80_en; n_psg += psg_en; n_fm += fm_en; n_pcm += pcm_en;
    foreach (GAP[i]) if ({pcm_en, fm_en, psg_en, z80_en}[i]) begin
      if (n_o[i] > 0 && cyc - last_o[i] != GAP[i]) bad_o[i]++;
      n_o[i]++; last_o[i] = cyc;
    end
  end

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (1008 * 1125 + 2) @(posedge clk);   // 21 ms of 54 MHz, plus the output register lag
    #1;
    // 1,134,000 clocks
    chk(n_cpu == 162000, $sformatf("cpu %0d", n_cpu));
    chk(n_z80 == 75600, $sformatf("z80 %0d", n_z80));
    chk(n_psg == 4725, $sformatf("psg %0d", n_psg));
    chk(n_fm == 27000, $sformatf("fm %0d", n_fm));
    chk(n_smp == 1125, $sformatf("fm sample %0d", n_smp));
    chk(n_pcm == 1008, $sformatf("pcm %0d", n_pcm));
    chk(bad_cpu_gap == 0, "cpu spacing 7");
    chk(bad_smp_gap == 0, "sample spacing 1008");
    foreach (GAP[i]) chk(bad_o[i] == 0, $sformatf("spacing %0d: %0d bad gaps", GAP[i], bad_o[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
