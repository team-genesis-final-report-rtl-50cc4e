// tb_z80_bus_decode: checks the Z80 memory map and the serially loaded bank
// register (nine writes of bit 0 to $6000) and the resulting 68k address.
module tb_z80_bus_decode;
  import genesis_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [15:0] addr = 0;
  logic wr = 0;
  logic [7:0] wdata = 0;
  z80_region_e region;
  logic [23:0] m68k_addr;
  logic [8:0] bank;
  z80_bus_decode dut (.clk, .rst_n, .addr, .wr, .wdata, .region, .m68k_addr, .bank);

  function automatic z80_region_e ref_region(input logic [15:0] a);
    if (a < 16'h2000) return RZ_SRAM;
    if (a >= 16'h4000 && a <= 16'h4003) return RZ_YM;
    if (a == 16'h6000) return RZ_BANK;
    if (a == 16'h7F11) return RZ_PSG;
    if (a >= 16'h8000) return RZ_M68K;
    return RZ_NONE;
  endfunction

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      addr = (i < 16) ? 16'(i * 16'h1000 + (i % 3)) : 16'($urandom);
      if (i == 20) addr = 16'h4003;
      if (i == 21) addr = 16'h4004;
      if (i == 22) addr = 16'h7F11;
      if (i == 23) addr = 16'h7F12;
      if (i == 24) addr = 16'h6001;
      #1;
      chk(region == ref_region(addr), $sformatf("region at %h", addr));
    end
    // load bank 0x1A5 (68k address bits 23:15) one bit at a time, LSB first
    for (int t = 0; t < 3; t++) begin
      logic [8:0] val;
      val = (t == 0) ? 9'h1A5 : 9'($urandom);
      for (int i = 0; i < 9; i++) begin
        @(negedge clk);
        addr = 16'h6000; wdata = {7'($urandom), val[i]}; wr = 1;
        @(negedge clk);
        wr = 0;
      end
      addr = 16'h8000 | 16'($urandom);
      #1;
      chk(bank == val, $sformatf("bank %h expected %h", bank, val));
      chk(m68k_addr == {val, addr[14:0]}, "68k window address");
    end
    // writes elsewhere do not move the bank
    begin
      logic [8:0] bank_prev;
      bank_prev = bank;
      @(negedge clk); addr = 16'h6001; wr = 1; wdata = ~{7'd0, bank_prev[8]};
      @(negedge clk); wr = 0;
      chk(bank == bank_prev, "bank stable");
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
