// tb_ym_op: operator output against A * sin(2*pi*(phase + 0.5)/1024) with
// A = 8180 * 2^(-att/64), computed with real arithmetic, for every phase
// and a spread of attenuations.
module tb_ym_op;
  int checks = 0, failures = 0;
  logic [9:0] phase, att;
  logic signed [13:0] out;
  ym_op dut (.*);
  real pi = 3.14159265358979;
  initial begin
    #1;
    for (int a = 0; a < 1024; a += 37) begin
      for (int p = 0; p < 1024; p++) begin
        real e, tol;
        phase = 10'(p); att = 10'(a);
        #1;
        e = 8180.0 * $sin(2.0 * pi * (p + 0.5) / 1024.0) * $pow(2.0, -a / 64.0);
        tol = 2.0 + 0.006 * ((e < 0) ? -e : e);
        checks++;
        if ($itor(out) > e + tol || $itor(out) < e - tol) begin
          failures++;
          if (failures < 10) $display("FAIL phase %0d att %0d out %0d expected %f", p, a, out, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
