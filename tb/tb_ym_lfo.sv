// tb_ym_lfo: runs the low-frequency oscillator through random enable and
// frequency settings and compares am and pm after every sample strobe with a
// model of the step counter (the original chip's periods of 108, 77, 71, 67,
// 62, 44, 8 and 5 samples) and of the two triangles. It also checks that the
// counter is held at 0 while disabled, that one full cycle at frequency 7
// takes 640 samples, and the triangle peaks (am 126, pm +8 and -8).
// Sample strobes come every 3 to 6 clocks (random).
module tb_ym_lfo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0, en = 0;
  logic [2:0] freq = 0;
  logic [6:0] am;
  logic signed [4:0] pm;
  ym_lfo dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 12) $display("FAIL %s", m); end
  endtask

  int per [8] = '{108, 77, 71, 67, 62, 44, 8, 5};
  int m_div = 0, m_cnt = 0;
  int max_am = 0, max_pm = -99, min_pm = 99;

  task automatic sample;
    int tri_am, q, t, p;
    @(negedge clk); smp_en = 1;
    @(negedge clk); smp_en = 0;
    if (!en) begin m_div = 0; m_cnt = 0; end
    else if (m_div >= per[freq] - 1) begin m_div = 0; m_cnt = (m_cnt + 1) % 128; end
    else m_div++;
    tri_am = (m_cnt & 64) ? 63 - (m_cnt & 63) : (m_cnt & 63);
    t = (m_cnt >> 2) & 7;
    q = (m_cnt & 32) ? 8 - t : t;
    p = (m_cnt & 64) ? -q : q;
    chk(am == 7'(2 * tri_am), $sformatf("am %0d expected %0d (cnt %0d)", am, 2 * tri_am, m_cnt));
    chk(pm == 5'(p), $sformatf("pm %0d expected %0d (cnt %0d)", pm, p, m_cnt));
    if (am > max_am) max_am = am;
    if (pm > max_pm) max_pm = pm;
    if (pm < min_pm) min_pm = pm;
    repeat ($urandom_range(1, 4)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // disabled: held at 0
    for (int i = 0; i < 50; i++) sample();
    chk(am == 0 && pm == 0, "held at zero while disabled");
    // one full cycle at frequency 7 is 128 x 5 samples
    en = 1; freq = 7;
    for (int i = 0; i < 640; i++) sample();
    chk(m_cnt == 0 && am == 0 && pm == 0, "back to the start after 640 samples");
    chk(max_am == 126 && max_pm == 8 && min_pm == -8,
        $sformatf("triangle peaks am %0d pm %0d/%0d", max_am, max_pm, min_pm));
    // random settings
    for (int k = 0; k < 40; k++) begin
      en = ($urandom_range(0, 5) != 0);
      freq = 3'($urandom);
      repeat ($urandom_range(50, 800)) sample();
    end
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
