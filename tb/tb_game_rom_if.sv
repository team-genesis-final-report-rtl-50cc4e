// tb_game_rom_if: reads from a cartridge model and a flash model (which
// stores words byte-swapped), checking source selection, data, byte swap,
// strobes and the wait time of each source.
module tb_game_rom_if;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic sel_flash = 0, req = 0, ack;
  logic [22:0] addr = 0, cart_addr;
  logic [15:0] rdata, cart_data, flash_data;
  logic cart_ce_n, cart_oe_n, flash_ce_n, flash_oe_n;
  logic [21:0] flash_addr;
  game_rom_if #(.CART_WAIT(8), .FLASH_WAIT(6)) dut (.*);

  // device models: contents are a hash of the address
  function automatic logic [15:0] rom_word(input logic [22:0] a);
    return 16'(a * 16'h9E37 + 16'h1234);
  endfunction
  assign cart_data  = (!cart_ce_n && !cart_oe_n) ? rom_word(cart_addr) : 16'hDEAD;
  assign flash_data = (!flash_ce_n && !flash_oe_n) ?
                      {rom_word({1'b0, flash_addr})[7:0], rom_word({1'b0, flash_addr})[15:8]} : 16'hBEEF;

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int lat;
      @(negedge clk);
      sel_flash = $urandom_range(0, 1);
      addr = sel_flash ? {1'b0, 22'($urandom)} : 23'($urandom);
      req = 1;
      @(negedge clk); req = 0;
      lat = 1;
      while (!ack) begin @(negedge clk); lat++; end
      chk(rdata == rom_word(addr), $sformatf("data at %h flash=%0d", addr, sel_flash));
      chk(lat == (sel_flash ? 8 : 10), $sformatf("latency %0d", lat));
      chk(cart_ce_n && flash_ce_n, "strobes released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
