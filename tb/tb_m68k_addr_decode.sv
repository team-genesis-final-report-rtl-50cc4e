// tb_m68k_addr_decode: checks the 68k memory map at region edges and at
// random addresses against an independent table of the map.
module tb_m68k_addr_decode;
  import genesis_pkg::*;
  int checks = 0, failures = 0;
  logic [23:0] addr;
  m68k_region_e region;
  logic [21:0] offset;
  m68k_addr_decode dut (.addr, .region, .offset);

  function automatic m68k_region_e ref_region(input logic [23:0] a);
    if (a <= 24'h3FFFFF) return R68_ROM;
    if (a >= 24'hA00000 && a <= 24'hA0FFFF) return R68_Z80;
    if (a >= 24'hA10000 && a <= 24'hA10FFF) return R68_IO;
    if (a >= 24'hA11000 && a <= 24'hA11FFF) return R68_CTRL;
    if (a >= 24'hC00000 && a <= 24'hDFFFFF) return R68_VDP;
    if (a >= 24'hFF0000) return R68_WRAM;
    return R68_NONE;
  endfunction

  task automatic try(input logic [23:0] a);
    addr = a;
    #1;
    checks++;
    if (region !== ref_region(a)) begin
      failures++;
      $display("FAIL addr %h region %0d expected %0d", a, region, ref_region(a));
    end
    if (region == R68_WRAM || region == R68_Z80) begin
      checks++;
      if (offset != {6'd0, a[15:0]}) begin failures++; $display("FAIL offset %h", a); end
    end
  endtask

  logic [23:0] edges [] = '{24'h000000, 24'h3FFFFF, 24'h400000, 24'h9FFFFF, 24'hA00000,
    24'hA0FFFF, 24'hA10000, 24'hA10FFF, 24'hA11000, 24'hA11FFF, 24'hA12000, 24'hAFFFFF,
    24'hB00000, 24'hBFFFFF, 24'hC00000, 24'hDFFFFF, 24'hE00000, 24'hFEFFFF, 24'hFF0000,
    24'hFFFFFF, 24'hC00004, 24'hA11100, 24'hA10003};

  initial begin
    foreach (edges[i]) try(edges[i]);
    for (int i = 0; i < 2000; i++) try(24'($urandom));
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
