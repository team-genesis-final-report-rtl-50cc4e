// tb_ym_channel: runs each of the 8 algorithms, with and without op1
// feedback, and compares every output sample with a model of the channel
// written here from the algorithm table (same sine/power tables, integer
// arithmetic). Envelopes are held at full level (instant attack, no decay),
// so each operator's level is its TL. Also checks the 5-clock latency.
module tb_ym_channel;
  import ym_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic smp_en = 0, eg_step = 0;
  logic [11:0] eg_cnt = 0;
  logic [2:0] alg = 0, fb = 0;
  ym_op_cfg_t [3:0] cfg;
  logic [3:0] key_on = 0;
  logic signed [13:0] out;
  logic out_valid;
  logic [6:0] am_att = 0;
  ym_channel dut (.*);

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

  int ph [4], inc [4], o [4], fb0, fb1, tlv [4];
  function automatic int model_sample();
    int m, s;
    for (int i = 0; i < 4; i++) begin
      m = 0;
      if (i == 0) m = (fb == 0) ? 0 : ((fb0 + fb1) >>> (10 - fb));
      else if (i == 1) m = (alg inside {0, 3, 4, 5, 6}) ? o[0] >>> 1 : 0;
      else if (i == 2) m = (alg == 0 || alg == 2) ? o[1] >>> 1 : (alg == 1) ? (o[0] + o[1]) >>> 1 :
                           (alg == 5) ? o[0] >>> 1 : 0;
      else m = (alg inside {0, 1, 4}) ? o[2] >>> 1 : (alg == 2) ? (o[0] + o[2]) >>> 1 :
               (alg == 3) ? (o[1] + o[2]) >>> 1 : (alg == 5) ? o[0] >>> 1 : 0;
      o[i] = op_ref((ph[i] >> 10) + m, tlv[i] * 8);
      ph[i] = (ph[i] + inc[i]) & 'hFFFFF;
      if (i == 0) begin fb1 = fb0; fb0 = o[0]; end
    end
    case (alg)
      0, 1, 2, 3: s = o[3];
      4: s = o[1] + o[3];
      5, 6: s = o[1] + o[2] + o[3];
      default: s = o[0] + o[1] + o[2] + o[3];
    endcase
    return (s > 8191) ? 8191 : (s < -8192) ? -8192 : s;
  endfunction

  int lat_bad, nz;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 8; a++) begin
      for (int f = 0; f < 2; f++) begin
        // set up: fnum/block/mul differ per operator so modulation shows
        key_on = 0;
        repeat (3) @(negedge clk);
        alg = 3'(a); fb = f ? 3'd6 : 3'd0;
        for (int i = 0; i < 4; i++) begin
          cfg[i] = '0;
          cfg[i].fnum = 11'(600 + 37 * i); cfg[i].block = 3'd4; cfg[i].mul = 4'(i + 1);
          cfg[i].ar = 5'd31; cfg[i].tl = 7'(4 * i + a);
          tlv[i] = 4 * i + a;
          inc[i] = ((cfg[i].fnum << 4) >> 1) * (i + 1);
          ph[i] = 0; o[i] = 0;
        end
        fb0 = 0; fb1 = 0;
        // the first sample of a new key-on starts from phase 0 and zero feedback
        key_on = 4'hF;
        repeat (3) @(negedge clk);
        // clear the DUT's stored outputs by construction: model starts at 0
        for (int s = 0; s < 150; s++) begin
          int e, lat;
          @(negedge clk); smp_en = 1;
          @(negedge clk); smp_en = 0;
          lat = 1;
          while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
          if (lat != 6) lat_bad++;   // valid 5 edges after the edge that samples smp_en
          e = model_sample();
          checks++;
          if (int'(out) != e) begin
            failures++;
            if (failures < 8) $display("FAIL alg %0d fb %0d sample %0d out %0d model %0d", a, fb, s, out, e);
          end
          if (out != 0) nz++;
        end
      end
    end
    checks++;
    if (lat_bad != 0) begin failures++; $display("FAIL latency not 5 clocks (%0d)", lat_bad); end
    checks++;
    if (nz < 1000) begin failures++; $display("FAIL output mostly zero"); end
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
