// tb_vdp_color: drives all 512 colours in each of the three shading modes and
// with blanking, and compares the 4-bit channels with the expected values:
// normal = 2c, shadow = c, highlight = c + 7, blank = 0.
module tb_vdp_color;
  int checks = 0, failures = 0;
  logic [8:0] color;
  logic [1:0] shade;
  logic blank;
  logic [3:0] r, g, b;
  vdp_color dut (.*);
  function automatic int ex(int c, int s);
    return s == 1 ? c : s == 2 ? c + 7 : 2 * c;
  endfunction
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask
  initial begin
    for (int s = 0; s < 3; s++)
      for (int c = 0; c < 512; c++) begin
        color = 9'(c); shade = 2'(s); blank = 0;
        #1;
        chk(r == 4'(ex(c & 7, s)) && g == 4'(ex((c >> 3) & 7, s)) && b == 4'(ex(c >> 6, s)),
            $sformatf("c=%h s=%0d -> %h %h %h", c, s, r, g, b));
        blank = 1;
        #1 chk({r, g, b} == 0, "blank");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
