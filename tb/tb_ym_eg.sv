// tb_ym_eg: drives one envelope through key on, attack, decay to the
// sustain level, sustain and release, checking the stage order, the level
// reached at each stage, the linear step timing of decay, the exponential
// shape of the attack, TL added at the output and the release to silence.
module tb_ym_eg;
  import ym_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic step = 0, key_on = 0;
  logic [11:0] eg_cnt = 0;
  logic [4:0] kc = 0, ar = 0, d1r = 0, d2r = 0;
  logic [1:0] rs = 0;
  logic [3:0] rr = 0, sl = 0;
  logic [6:0] tl = 0;
  logic [9:0] att_out;
  ym_eg_state_e state;
  logic kon_pulse;
  ym_eg dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (att %0d state %0d)", m, att_out, state); end
  endtask
  // one envelope tick
  task automatic tick();
    @(negedge clk); step = 1;
    @(negedge clk); step = 0; eg_cnt = eg_cnt + 1;
  endtask

  int ticks, first_drop, last_drop, prev;
  int kons;
  always @(posedge clk) if (rst_n && kon_pulse) kons++;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(att_out == 10'h3FF && state == EG_RELEASE, "silent after reset");
    // attack rate 15 (rate 30: one step every 16 ticks), decay 20 (rate 40:
    // one step of 1 every 2 ticks) to SL 2 (64), sustain 0, release 15
    ar = 5'd15; d1r = 5'd20; d2r = 5'd0; sl = 4'd2; rr = 4'd15; tl = 7'd0;
    eg_cnt = 0;
    key_on = 1; @(negedge clk); @(negedge clk);
    chk(state == EG_ATTACK && kons == 1, "attack on key on");
    prev = att_out; first_drop = -1; ticks = 0;
    while (state == EG_ATTACK && ticks < 5000) begin
      tick(); ticks++;
      if (att_out != prev) begin
        if (first_drop < 0) first_drop = prev - att_out;
        last_drop = prev - att_out;
        chk(att_out < prev, "attack only falls");
        prev = att_out;
      end
    end
    chk(state == EG_DECAY && att_out == 0, "attack ends at full level");
    chk(first_drop > 8 * last_drop, $sformatf("attack exponential: first %0d last %0d", first_drop, last_drop));
    ticks = 0;
    while (state == EG_DECAY && ticks < 5000) begin tick(); ticks++; end
    chk(state == EG_SUSTAIN, "decay reaches sustain");
    chk(att_out == 10'd64, $sformatf("sustain level %0d", att_out));
    chk(ticks >= 127 && ticks <= 131, $sformatf("decay took %0d ticks, 128 expected", ticks));
    repeat (200) tick();
    chk(att_out == 10'd64, "sustain rate 0 holds");
    tl = 7'd10; #1;
    chk(att_out == 10'd144, "TL adds 8 per step");
    tl = 7'd0;
    key_on = 0; @(negedge clk); @(negedge clk);
    chk(state == EG_RELEASE, "release on key off");
    // RR 15 is rate 2*(2*15+1) = 62: steps of 16 every tick -> (1023-64)/16 ticks
    ticks = 0;
    while (att_out != 10'h3FF && ticks < 40000) begin tick(); ticks++; end
    chk(att_out == 10'h3FF, "release to silence");
    chk(ticks >= 59 && ticks <= 61, $sformatf("release took %0d ticks", ticks));
    // instant attack at the highest rate, key off in the middle of decay
    ar = 5'd31; d1r = 5'd31; sl = 4'd15;
    key_on = 1; @(negedge clk); @(negedge clk);
    chk(att_out == 0, "rate 62+ attack is instant");
    repeat (3) tick();
    chk(state == EG_DECAY && att_out > 0, "fast decay under way");
    key_on = 0; @(negedge clk); @(negedge clk);
    chk(state == EG_RELEASE, "key off from decay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
