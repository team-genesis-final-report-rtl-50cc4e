// tb_vdp_dma: runs transfers from a modelled bus that grants after a random
// delay and answers each read after a random latency with a word derived from
// the address. Checks the number, order and data of the written words, that
// no read is made before the grant, that busy falls with the last write, and
// that len = 0 means 65536 words.
module tb_vdp_dma;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [22:0] src = 0;
  logic [15:0] len = 0;
  logic busy, req_bus, gnt = 0, m_req, m_ack = 0, wr;
  logic [22:0] m_addr;
  logic [15:0] m_rdata = 0, wdata;
  vdp_dma dut (.*);
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask
  function automatic logic [15:0] word_at(logic [22:0] a);
    return a[15:0] ^ {a[22:16], 9'h15A};
  endfunction
  // bus model
  always @(posedge clk) begin
    if (!req_bus) gnt <= 0;
    else if (!gnt && $urandom_range(0, 3) == 0) gnt <= 1;
  end
  initial forever begin
    @(posedge clk);
    m_ack <= 0;
    if (m_req) begin
      automatic logic [22:0] a = m_addr;
      chk(gnt, "read only with grant");
      repeat ($urandom_range(0, 4)) @(posedge clk);
      m_ack <= 1; m_rdata <= word_at(a);
    end
  end
  int nwr;
  logic [22:0] exp_a;
  always @(posedge clk) if (rst_n && wr) begin
    chk(wdata == word_at(exp_a), $sformatf("data at %h", exp_a));
    exp_a <= exp_a + 1;
    nwr <= nwr + 1;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      int n;
      n = (t == 5) ? 65536 : $urandom_range(1, 40);
      @(negedge clk);
      src = 23'($urandom); len = 16'(n); start = 1; exp_a = src; nwr = 0;
      @(negedge clk); start = 0;
      chk(busy && req_bus, "busy after start");
      while (busy) begin
        @(negedge clk);
        if (!busy) chk(wr && nwr == n - 1, $sformatf("busy fell with write %0d of %0d", nwr + 1, n));
      end
      @(negedge clk);
      chk(nwr == n, $sformatf("count %0d expected %0d", nwr, n));
      chk(!req_bus, "bus released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
