// tb_pad_mux: all 256 button combinations under both Select levels against
// the pad's pin table.
module tb_pad_mux;
  import genesis_pkg::*;
  int checks = 0, failures = 0;
  pad_buttons_t btn;
  logic select;
  pad_pins_t pins;
  pad_mux dut (.*);
  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [5:0] exp;   // {p9, p6, p4, p3, p2, p1}
      btn = 8'(i); select = i[8];
      #1;
      if (select) exp = {!btn.c, !btn.b, !btn.right, !btn.left, !btn.down, !btn.up};
      else        exp = {!btn.start, !btn.a, 1'b0, 1'b0, !btn.down, !btn.up};
      checks++;
      if (pins != exp) begin failures++; $display("FAIL %b sel %b pins %b", btn, select, pins); end
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
