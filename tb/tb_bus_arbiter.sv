// tb_bus_arbiter: 68k bus hand-over (request, grant only after the CPU's
// grant, DMA first, hold until release) and the Z80 bus-request and reset
// registers with their read-back.
module tb_bus_arbiter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dma_req = 0, zbank_req = 0, m68k_bg = 0;
  logic gnt_dma, gnt_zbank, m68k_br;
  logic ctrl_we = 0;
  logic [11:0] ctrl_addr = 0;
  logic [15:0] ctrl_wdata = 0, ctrl_rdata;
  logic z80_busreq, z80_busack = 0, z80_reset, zbus_gnt_68k;
  bus_arbiter dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s @%0t", m, $time); end
  endtask
  task automatic tick(int n = 1); repeat (n) @(negedge clk); endtask

  initial begin
    tick(2); rst_n = 1; tick();
    chk(!m68k_br && !gnt_dma && !gnt_zbank, "idle after reset");
    chk(z80_reset && !z80_busreq, "Z80 held in reset, bus not requested");
    // both ask at once: BR rises, nothing granted until BG
    dma_req = 1; zbank_req = 1; tick();
    chk(m68k_br, "br raised");
    tick(3);
    chk(!gnt_dma && !gnt_zbank, "no grant without bg");
    m68k_bg = 1; tick();
    chk(gnt_dma && !gnt_zbank, "DMA wins");
    tick(5);
    chk(gnt_dma, "DMA grant held");
    dma_req = 0; tick();
    chk(!gnt_dma && !gnt_zbank, "released");
    tick(2);
    chk(gnt_zbank, "Z80 bank window granted next");
    dma_req = 1; tick(3);
    chk(gnt_zbank && !gnt_dma, "no pre-emption");
    zbank_req = 0; dma_req = 0; tick(2);
    chk(!m68k_br, "bus back to 68k");
    m68k_bg = 0;
    // Z80 bus request register
    ctrl_we = 1; ctrl_addr = 12'h200; ctrl_wdata = 16'h0100; tick(); ctrl_we = 0;
    chk(!z80_reset, "reset released");
    ctrl_we = 1; ctrl_addr = 12'h100; ctrl_wdata = 16'h0100; tick(); ctrl_we = 0;
    chk(z80_busreq, "busreq set");
    chk(ctrl_rdata[8] == 1'b1, "not granted yet reads 1");
    z80_busack = 1; #1;
    chk(zbus_gnt_68k && ctrl_rdata[8] == 1'b0, "granted reads 0");
    ctrl_we = 1; ctrl_addr = 12'h100; ctrl_wdata = 16'h0000; tick(); ctrl_we = 0;
    chk(!z80_busreq && !zbus_gnt_68k, "released Z80 bus");
    ctrl_we = 1; ctrl_addr = 12'h200; ctrl_wdata = 16'h0000; tick(); ctrl_we = 0;
    chk(z80_reset, "reset asserted again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
