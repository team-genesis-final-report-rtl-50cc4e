// tb_ym2612: programs the chip only through its address/data ports and
// checks: a single operator (addressed through the 1,3,2,4 slot order and the
// latched frequency high byte) against a sine model, channel muting by the
// L/R bits, the DAC channel, timer A and B overflow flags and their reset,
// channel 3's per-operator frequency mode, and the low-frequency
// oscillator: amplitude modulation (AMS 3, AM bit set) and pitch modulation
// (PMS 7) of one operator, sample by sample against the same sine model with
// a model of the LFO counter added.
module tb_ym2612;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0, we = 0;
  logic [1:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic signed [13:0] out;
  logic out_valid;
  ym2612 dut (.*);

  logic [11:0] ls [256];
  logic [10:0] pw [256];
  initial begin
    $readmemh("rtl/ym_logsin.hex", ls);
    $readmemh("rtl/ym_pow.hex", pw);
  end
  function automatic int op_ref(int p, int a);
    int q, tot, sh, m;
    p = p & 1023;
    q = (p & 256) ? 255 - (p & 255) : (p & 255);
    tot = ls[q] + a * 4;
    sh = tot >> 8;
    m = (sh > 12) ? 0 : ((pw[tot & 255] * 4) >> sh);
    return (p & 512) ? -m : m;
  endfunction

  task automatic wreg(input bit part, input logic [7:0] r, input logic [7:0] v);
    @(negedge clk); addr = {part, 1'b0}; wdata = r; we = 1;
    @(negedge clk); addr = {part, 1'b1}; wdata = v;
    @(negedge clk); we = 0;
  endtask
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask
  // one sample; returns the output
  task automatic sample(output int o);
    @(negedge clk); smp_en = 1;
    @(negedge clk); smp_en = 0;
    while (!out_valid) @(negedge clk);
    o = out;
  endtask
  // run n samples against a single-operator model with increment inc
  task automatic run_sine(input int n, input int inc, input int tl, input string what);
    int ph, o, bad;
    ph = 0; bad = 0;
    for (int s = 0; s < n; s++) begin
      sample(o);
      checks++;
      if (o != op_ref(ph >> 10, tl * 8)) begin
        failures++; bad++;
        if (bad < 4) $display("FAIL %s sample %0d: %0d expected %0d", what, s, o, op_ref(ph >> 10, tl * 8));
      end
      ph = (ph + inc) & 'hFFFFF;
    end
  endtask

  // LFO model (frequency 7: a step every 5 samples)
  int l_div = 0, l_cnt = 0;
  int pmd [8] = '{0, 16, 32, 47, 66, 95, 189, 379};
  task automatic lfo_step(output int am, output int pm);
    int t, q;
    if (l_div >= 4) begin l_div = 0; l_cnt = (l_cnt + 1) % 128; end
    else l_div++;
    am = 2 * ((l_cnt & 64) ? 63 - (l_cnt & 63) : (l_cnt & 63));
    t = (l_cnt >> 2) & 7;
    q = (l_cnt & 32) ? 8 - t : t;
    pm = (l_cnt & 64) ? -q : q;
  endtask
  // one operator (TL 0) with the LFO on: amplitude shift ash (8 = off) and
  // pitch depth pms; frequency f, block blk, multiple mul
  task automatic run_lfo(input int n, input int ash, input int pms, input int f, input int blk,
                         input int mul, input string what);
    int ph, o, bad, am, pm, fm, exp_o;
    ph = 0; bad = 0;
    for (int s = 0; s < n; s++) begin
      sample(o);
      lfo_step(am, pm);
      exp_o = op_ref(ph >> 10, am >> ash);
      checks++;
      if (o != exp_o) begin
        failures++; bad++;
        if (bad < 4) $display("FAIL %s sample %0d: %0d expected %0d (am %0d pm %0d)", what, s, o, exp_o, am, pm);
      end
      fm = f + ((f * pm * pmd[pms]) >>> 16);
      if (fm < 0) fm = 0;
      if (fm > 2047) fm = 2047;
      ph = (ph + (((fm << blk) >> 1) * mul)) & 'hFFFFF;
    end
  endtask

  initial begin
    int o;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // channel 2 (index 1), algorithm 7, only operator 2 sounding.
    // Operator 2 sits at register offset +8.
    wreg(0, 8'hB1, 8'h07);
    wreg(0, 8'hB5, 8'hC0);
    wreg(0, 8'h39, 8'h01);              // DT 0, MUL 1
    wreg(0, 8'h49, 8'h05);              // TL 5
    wreg(0, 8'h59, 8'h1F);              // AR 31
    wreg(0, 8'hA5, 8'h22);              // block 4, fnum high 2
    wreg(0, 8'hA1, 8'h8D);              // fnum low -> 0x28D = 653
    wreg(0, 8'h28, 8'h21);              // key on op2 of channel index 1
    repeat (3) @(negedge clk);
    run_sine(300, (653 << 4) >> 1, 5, "op2 sine");
    // L/R off mutes the channel
    wreg(0, 8'hB5, 8'h00);
    sample(o); sample(o);
    chk(o == 0, "muted by L/R");
    // DAC replaces channel 6
    wreg(0, 8'h2A, 8'hC0);
    wreg(0, 8'h2B, 8'h80);
    sample(o); sample(o);
    chk(o == 4096, $sformatf("DAC 0xC0 -> %0d", o));
    wreg(0, 8'h2A, 8'h20);
    sample(o); sample(o);
    chk(o == -6144, $sformatf("DAC 0x20 -> %0d", o));
    wreg(0, 8'h2B, 8'h00);
    sample(o); sample(o);
    chk(o == 0, "DAC off");
    // timer A = 1020: overflows every 4 samples
    wreg(0, 8'h24, 8'hFF);
    wreg(0, 8'h25, 8'h00);
    wreg(0, 8'h27, 8'h05);
    #1 chk(rdata[0] == 0, "timer A flag clear at start");
    begin
      int n;
      n = 0;
      while (!rdata[0] && n < 20) begin sample(o); n++; end
      chk(n == 4, $sformatf("timer A overflow after %0d samples", n));
    end
    wreg(0, 8'h27, 8'h15);
    #1 chk(rdata[0] == 0, "timer A flag reset");
    // timer B = 255: overflows after 16 samples or fewer (16-sample prescaler)
    wreg(0, 8'h26, 8'hFF);
    wreg(0, 8'h27, 8'h0A);
    begin
      int n;
      n = 0;
      while (!rdata[1] && n < 100) begin sample(o); n++; end
      chk(n >= 1 && n <= 16, $sformatf("timer B overflow after %0d samples", n));
      wreg(0, 8'h27, 8'h20);
      #1 chk(rdata[1] == 0, "timer B flag reset");
      n = 0;
      while (!rdata[1] && n < 100) begin sample(o); n++; end
      chk(n == 0 || n == 100, "timer B stopped");
    end
    // channel 3 special mode: operator 1 takes its frequency from $A9/$AD
    wreg(0, 8'hB2, 8'h07);
    wreg(0, 8'hB6, 8'h80);
    wreg(0, 8'h32, 8'h01);
    wreg(0, 8'h42, 8'h00);
    wreg(0, 8'h52, 8'h1F);
    wreg(0, 8'hA6, 8'h20);
    wreg(0, 8'hA2, 8'h10);              // channel frequency 0x010, block 4
    wreg(0, 8'hAD, 8'h1B);              // op1: block 3, fnum high 3
    wreg(0, 8'hA9, 8'h00);              // -> 0x300
    wreg(0, 8'h27, 8'h40);
    wreg(0, 8'h28, 8'h12);              // key on op1 of channel index 2
    repeat (3) @(negedge clk);
    run_sine(200, (12'h300 << 3) >> 1, 0, "ch3 special op1");
    // part II writes reach channels 4-6: channel index 3 with op4 (+$C)
    wreg(0, 8'h28, 8'h02);              // key off channel index 2
    wreg(0, 8'hB6, 8'h00);
    wreg(1, 8'hB0, 8'h07);
    wreg(1, 8'hB4, 8'h40);
    wreg(1, 8'h3C, 8'h02);              // MUL 2
    wreg(1, 8'h4C, 8'h00);
    wreg(1, 8'h5C, 8'h1F);
    wreg(1, 8'hA4, 8'h19);              // block 3, high 1
    wreg(1, 8'hA0, 8'h40);              // 0x140
    wreg(0, 8'h28, 8'h84);              // key on op4 of channel index 3
    repeat (3) @(negedge clk);
    run_sine(200, ((12'h140 << 3) >> 1) * 2, 0, "part II op4");
    // LFO amplitude modulation: AMS 3 on channel index 3, AM set on op4
    wreg(0, 8'h28, 8'h04);              // key off
    wreg(1, 8'hB4, 8'h70);              // L on, AMS 3, PMS 0
    wreg(1, 8'h6C, 8'h80);              // AM on, D1R 0
    wreg(0, 8'h22, 8'h0F);              // LFO on, frequency 7
    wreg(0, 8'h28, 8'h84);              // key on
    repeat (3) @(negedge clk);
    run_lfo(700, 0, 0, 12'h140, 3, 2, "LFO AM");
    // LFO pitch modulation: PMS 7, AMS 0; the LFO restarts from 0
    wreg(0, 8'h28, 8'h04);
    wreg(0, 8'h22, 8'h00);
    sample(o);
    l_div = 0; l_cnt = 0;
    wreg(1, 8'hB4, 8'h47);              // L on, AMS 0, PMS 7
    wreg(1, 8'hA4, 8'h25);              // block 4, high 5
    wreg(1, 8'hA0, 8'hF0);              // 0x5F0
    wreg(0, 8'h22, 8'h0F);
    wreg(0, 8'h28, 8'h84);
    repeat (3) @(negedge clk);
    run_lfo(700, 8, 7, 12'h5F0, 4, 2, "LFO PM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
