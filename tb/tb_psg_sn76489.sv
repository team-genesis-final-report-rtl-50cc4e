// tb_psg_sn76489: programs the chip through its latch/data protocol and
// checks, against a cycle model written here, tone periods, attenuation
// levels, white and periodic noise sequences and the summed 11-bit output.
module tb_psg_sn76489;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [7:0] wdata = 0;
  logic signed [10:0] out;
  psg_sn76489 dut (.*);

  // reference model
  int tone [3], cnt [3], att [4], nctrl, ncnt;
  bit tq [3], nclk;
  bit [15:0] lfsr;
  int lch; bit ltype;
  int amp_tab [16] = '{255, 203, 161, 128, 102, 81, 64, 51, 40, 32, 26, 20, 16, 13, 10, 0};

  function automatic int model_out();
    int s = 0;
    for (int i = 0; i < 3; i++) s += tq[i] ? amp_tab[att[i]] : -amp_tab[att[i]];
    s += lfsr[0] ? amp_tab[att[3]] : -amp_tab[att[3]];
    return s;
  endfunction

  task automatic model_write(input logic [7:0] d);
    if (d[7]) begin
      lch = d[6:5]; ltype = d[4];
      if (ltype) att[lch] = d[3:0];
      else if (lch == 3) begin nctrl = d[2:0]; lfsr = 16'h8000; end
      else tone[lch] = (tone[lch] & 'h3F0) | d[3:0];
    end else begin
      if (ltype) att[lch] = d[3:0];
      else if (lch == 3) begin nctrl = d[2:0]; lfsr = 16'h8000; end
      else tone[lch] = (tone[lch] & 'hF) | (int'(d[5:0]) << 4);
    end
  endtask

  task automatic model_tick();
    int np;
    for (int i = 0; i < 3; i++) begin
      if (cnt[i] <= 1) begin cnt[i] = tone[i]; tq[i] = (tone[i] <= 1) ? 1 : !tq[i]; end
      else cnt[i]--;
    end
    np = (nctrl[1:0] == 3) ? tone[2] : (16 << nctrl[1:0]);
    if (ncnt <= 1) begin
      ncnt = np;
      if (!nclk) lfsr = {nctrl[2] ? (lfsr[0] ^ lfsr[3]) : lfsr[0], lfsr[15:1]};
      nclk = !nclk;
    end else ncnt--;
  endtask

  task automatic write(input logic [7:0] d);
    @(negedge clk); wdata = d; we = 1; en = 0;
    @(negedge clk); we = 0;
    model_write(d);
  endtask

  int mism, nonzero;
  task automatic run(input int ticks);
    for (int t = 0; t < ticks; t++) begin
      @(negedge clk); en = 1;
      @(negedge clk); en = 0;
      model_tick();
      @(negedge clk);
      checks++;
      if (int'(out) != model_out()) begin
        mism++; failures++;
        if (mism < 5) $display("FAIL tick %0d out %0d model %0d", t, out, model_out());
      end
      if (out != 0) nonzero++;
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++) att[i] = 15;
    for (int i = 0; i < 3; i++) begin tone[i] = 0; cnt[i] = 0; tq[i] = 0; end
    lfsr = 16'h8000; nctrl = 0; ncnt = 0; nclk = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (out != -11'sd0 && int'(out) != model_out()) failures++;
    // tone 0: period 0x0FE, full volume; tone 1: period 0x23, -6 dB
    write(8'h8E); write(8'h0F); write(8'h90);
    write(8'hA3); write(8'h02); write(8'hB3);
    write(8'hC5); write(8'h01); write(8'hD8);
    run(700);
    // white noise, fastest clock
    write(8'hE4); write(8'hF0);
    run(900);
    // periodic noise driven by tone 2, then latch-and-data volume change
    write(8'hE3); write(8'hF2); write(8'h07);
    run(900);
    checks++;
    if (nonzero < 100) begin failures++; $display("FAIL output mostly silent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
