// tb_dvi_out: 4-bit components become x16, syncs and data enable follow one
// clock later, and blanking gives black.
module tb_dvi_out;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] r_in = 0, g_in = 0, b_in = 0;
  logic hsync_in = 0, vsync_in = 0, de_in = 0;
  logic [7:0] r_out, g_out, b_out;
  logic hsync_out, vsync_out, de_out;
  dvi_out dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      {r_in, g_in, b_in} = 12'($urandom);
      {hsync_in, vsync_in, de_in} = 3'($urandom);
      @(posedge clk); #1;
      checks++;
      if (r_out != (de_in ? r_in * 16 : 0) || g_out != (de_in ? g_in * 16 : 0) ||
          b_out != (de_in ? b_in * 16 : 0) || hsync_out != hsync_in ||
          vsync_out != vsync_in || de_out != de_in) begin
        failures++; $display("FAIL %h %h %h", r_out, g_out, b_out);
      end
    end
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
