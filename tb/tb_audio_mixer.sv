// tb_audio_mixer: sum, saturation to 14 bits and the 14-to-16-bit widening
// (shift by two, sign into the low bits), only on pcm_en.
module tb_audio_mixer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic signed [13:0] fm_in = 0;
  logic signed [10:0] psg_in = 0;
  logic pcm_en = 0;
  logic signed [15:0] pcm_out;
  logic pcm_valid;
  audio_mixer dut (.*);
  int sats;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int s, e;
      logic signed [15:0] prev_out;
      @(negedge clk);
      fm_in = (n % 7 == 0) ? 14'sd8000 : 14'($urandom);
      psg_in = 11'($urandom);
      pcm_en = (n % 3 == 0);
      prev_out = pcm_out;
      s = int'(fm_in) + int'(psg_in);
      if (s > 8191) begin s = 8191; sats++; end
      if (s < -8192) begin s = -8192; sats++; end
      e = s * 4 + ((s < 0) ? 3 : 0);
      @(posedge clk); #1;
      checks++;
      if (pcm_en ? (pcm_out != 16'(e) || !pcm_valid) : (pcm_out != prev_out || pcm_valid)) begin
        failures++; $display("FAIL fm %0d psg %0d out %0d exp %0d", fm_in, psg_in, pcm_out, e);
      end
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
