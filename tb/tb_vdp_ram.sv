// tb_vdp_ram: the 64 x 9 color RAM and the 40 x 10 scroll RAM shapes:
// writes and reads against a model, and writes past the end ignored.
module tb_vdp_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;
  logic c_we = 0, s_we = 0;
  logic [5:0] c_wa = 0, c_ra = 0, s_wa = 0, s_ra = 0;
  logic [8:0] c_wd = 0, c_rd;
  logic [9:0] s_wd = 0, s_rd;
  vdp_ram #(.DEPTH(64), .WIDTH(9))  cram  (.clk, .we(c_we), .waddr(c_wa), .wdata(c_wd), .raddr(c_ra), .rdata(c_rd));
  vdp_ram #(.DEPTH(40), .WIDTH(10)) vsram (.clk, .we(s_we), .waddr(s_wa), .wdata(s_wd), .raddr(s_ra), .rdata(s_rd));
  logic [8:0] cm [64];
  logic [9:0] sm [40];

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); c_we = 1; c_wa = 6'(i); c_wd = 9'($urandom); cm[i] = c_wd;
      s_we = 1; s_wa = 6'(i); s_wd = 10'($urandom); if (i < 40) sm[i] = s_wd;
    end
    @(negedge clk); c_we = 0; s_we = 0;
    for (int n = 0; n < 2000; n++) begin
      int a, b;
      a = $urandom_range(0, 63); b = $urandom_range(0, 39);
      @(negedge clk);
      c_ra = 6'(a); s_ra = 6'(b);
      c_we = $urandom_range(0, 1); c_wa = 6'($urandom_range(0, 63)); c_wd = 9'($urandom);
      s_we = $urandom_range(0, 1); s_wa = 6'($urandom_range(0, 63)); s_wd = 10'($urandom);
      @(posedge clk); #1;
      checks += 2;
      if (c_rd !== cm[a]) begin failures++; $display("FAIL cram %0d", a); end
      if (s_rd !== sm[b]) begin failures++; $display("FAIL vsram %0d", b); end
      if (c_we) cm[c_wa] = c_wd;
      if (s_we && s_wa < 40) sm[s_wa] = s_wd;
    end
    @(negedge clk); c_we = 0; s_we = 0; s_ra = 6'd45;
    @(posedge clk); #1;
    checks++;
    if (s_rd !== 10'd0) begin failures++; $display("FAIL vsram past end"); end
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
