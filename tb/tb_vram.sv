// tb_vram: port A read/write with byte enables, the renderer's port B, and
// the rule that port A's read data holds while port A writes.
module tb_vram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [14:0] a_addr = 0, b_addr = 0;
  logic a_we = 0;
  logic [1:0] a_be = 0;
  logic [15:0] a_wdata = 0, a_rdata, b_rdata;
  vram dut (.*);
  logic [15:0] model [256];

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); a_addr = 15'(i); a_we = 1; a_be = 2'b11; a_wdata = 16'($urandom);
      model[i] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int x, y;
      logic [15:0] held;
      x = $urandom_range(0, 255); y = $urandom_range(0, 255);
      @(negedge clk); a_addr = 15'(x); b_addr = 15'(y); a_we = 0;
      @(posedge clk); #1;
      chk(a_rdata == model[x], "port A read");
      chk(b_rdata == model[y], "port B read");
      held = a_rdata;
      // write: port A output must not change
      @(negedge clk); a_we = 1; a_be = 2'($urandom_range(1, 3)); a_wdata = 16'($urandom);
      a_addr = 15'($urandom_range(0, 255));
      @(posedge clk); #1;
      chk(a_rdata == held, "port A holds during write");
      if (a_be[1]) model[a_addr][15:8] = a_wdata[15:8];
      if (a_be[0]) model[a_addr][7:0] = a_wdata[7:0];
      a_we = 0;
    end
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
