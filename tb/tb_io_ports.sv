// tb_io_ports: Select follows the data register only when the control
// register makes it an output; reads combine written bits and pad pins.
module tb_io_ports;
  import genesis_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [11:0] addr = 0;
  logic we = 0;
  logic [7:0] wdata = 0, rdata;
  pad_pins_t pins1 = '1, pins2 = '1;
  logic select1, select2;
  io_ports dut (.*);

  task automatic wr(input logic [11:0] a, input logic [7:0] d);
    @(negedge clk); addr = a; wdata = d; we = 1;
    @(negedge clk); we = 0;
  endtask
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    addr = 12'h001; #1; chk(rdata == 8'hA0, "version");
    chk(select1 && select2, "select pulled high after reset");
    wr(12'h003, 8'h00);
    chk(select1, "select stays high while an input");
    wr(12'h009, 8'h40);           // TH of port 1 is an output
    chk(!select1, "select low from data register");
    wr(12'h003, 8'h40);
    chk(select1, "select high from data register");
    for (int n = 0; n < 200; n++) begin
      pad_pins_t p;
      p = 6'($urandom);
      pins1 = p; pins2 = ~p;
      addr = 12'h003; #1;
      chk(rdata == {1'b0, 1'b1, p}, "port 1 read");
      addr = 12'h005; #1;
      chk(rdata == {1'b0, 1'b1, ~p}, "port 2 read (select pulled up)");
    end
    wr(12'h00B, 8'h40); wr(12'h005, 8'h00);
    chk(!select2, "port 2 select driven low");
    addr = 12'h00B; #1; chk(rdata == 8'h40, "control 2 read back");
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
