// tb_work_sound_ram: random word/byte writes on both ports against a
// reference byte array, including byte enables and the shared sound area.
module tb_work_sound_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int WW = 32768, SB = 8192;
  logic [14:0] a_addr = 0;
  logic a_we = 0;
  logic [1:0] a_be = 0;
  logic [15:0] a_wdata = 0, a_rdata;
  logic [12:0] b_addr = 0;
  logic b_we = 0;
  logic [7:0] b_wdata = 0, b_rdata;
  work_sound_ram dut (.*);

  logic [7:0] wref [int];   // work RAM bytes by 68k byte offset
  logic [7:0] sref [int];   // sound RAM bytes

  initial begin
    // fill a window of each memory first so every read is defined
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a_addr = 15'(i); a_we = 1; a_be = 2'b11; a_wdata = 16'($urandom);
      wref[2*i] = a_wdata[15:8]; wref[2*i+1] = a_wdata[7:0];
      b_addr = 13'(i); b_we = 1; b_wdata = 8'($urandom); sref[i] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    for (int n = 0; n < 3000; n++) begin
      int wa, sa;
      wa = $urandom_range(0, 127); sa = $urandom_range(0, 255);
      @(negedge clk);
      a_addr = 15'(wa); a_we = $urandom_range(0, 1); a_be = 2'($urandom_range(1, 3));
      a_wdata = 16'($urandom);
      b_addr = 13'(sa); b_we = $urandom_range(0, 1); b_wdata = 8'($urandom);
      @(posedge clk); #1;
      if (!a_we) begin
        checks++;
        if (a_rdata !== {wref[2*wa], wref[2*wa+1]}) begin
          failures++; $display("FAIL A read %0d: %h", wa, a_rdata);
        end
      end
      if (!b_we) begin
        checks++;
        if (b_rdata !== sref[sa]) begin failures++; $display("FAIL B read %0d", sa); end
      end
      if (a_we && a_be[1]) wref[2*wa] = a_wdata[15:8];
      if (a_we && a_be[0]) wref[2*wa+1] = a_wdata[7:0];
      if (b_we) sref[sa] = b_wdata;
      a_we = 0; b_we = 0;
    end
    // the sound area sits above the work area: top of work RAM is untouched
    @(negedge clk); a_addr = 15'd0; a_we = 0; b_addr = 13'd0; b_we = 1; b_wdata = ~wref[0];
    @(negedge clk); b_we = 0; @(posedge clk); #1;
    checks++;
    if (a_rdata[15:8] !== wref[0]) begin failures++; $display("FAIL ports overlap"); end
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
