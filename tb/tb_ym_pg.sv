// tb_ym_pg: phase increment against the formula ((fnum << block) / 2 +- dt)
// * mul (mul 0 = half), octave doubling, and the key code.
module tb_ym_pg;
  int checks = 0, failures = 0;
  logic [10:0] fnum;
  logic [2:0] block, dt;
  logic [3:0] mul;
  logic [19:0] inc;
  logic [4:0] kc;
  ym_pg dut (.*);

  function automatic int kc_ref(int f, int b);
    int n4;
    n4 = ((f >> 10) & 1) ? (((f >> 7) & 7) != 0) : (((f >> 7) & 7) == 7);
    return b * 4 + ((f >> 10) & 1) * 2 + n4;
  endfunction
  function automatic int inc_ref(int f, int b, int d, int m);
    int base, k, dv;
    base = (f << b) >> 1;
    k = (d & 3) == 0 ? 0 : (d & 3) == 1 ? 4 : (d & 3) == 2 ? 8 : 11;
    dv = (kc_ref(f, b) * k) >> 4;
    base = (d & 4) ? ((base - dv) & 'h1FFFF) : ((base + dv) & 'h1FFFF);
    return (m == 0) ? base >> 1 : (base * m) & 'hFFFFF;
  endfunction

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    // A4-ish note: fnum 653, block 4, no detune, x1 -> 5224
    fnum = 11'd653; block = 3'd4; dt = 0; mul = 4'd1; #1;
    chk(inc == 20'd5224, $sformatf("base step %0d", inc));
    block = 3'd5; #1;
    chk(inc == 20'd10448, "octave up doubles");
    mul = 4'd0; #1;
    chk(inc == 20'd5224, "mul 0 halves");
    mul = 4'd3; #1;
    chk(inc == 20'd31344, "mul 3 triples");
    for (int n = 0; n < 3000; n++) begin
      fnum = 11'($urandom); block = 3'($urandom); dt = 3'($urandom); mul = 4'($urandom);
      #1;
      chk(inc == 20'(inc_ref(fnum, block, dt, mul)), $sformatf("inc f=%0d b=%0d dt=%0d m=%0d", fnum, block, dt, mul));
      chk(kc == 5'(kc_ref(fnum, block)), "key code");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
