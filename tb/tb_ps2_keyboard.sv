// tb_ps2_keyboard: sends PS/2 frames (start, 8 data bits LSB first, odd
// parity, stop) for make and break codes of all mapped keys and checks the
// buttons; a frame with bad parity must be flagged and ignored.
module tb_ps2_keyboard;
  import genesis_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ps2_clk = 1, ps2_data = 1;
  logic [7:0] rx_byte;
  logic rx_valid, rx_error;
  pad_buttons_t btn;
  ps2_keyboard #(.TIMEOUT(2000)) dut (.*);
  int n_valid, n_err;
  logic [7:0] last_byte;
  always @(posedge clk) begin
    if (rst_n && rx_valid) begin n_valid++; last_byte = rx_byte; end
    if (rst_n && rx_error) n_err++;
  end

  // one frame; the keyboard clock is ~ 40 system clocks per half period here
  task automatic send(input logic [7:0] b, input bit bad_parity = 0);
    logic [10:0] f;
    f = {1'b1, ~^b ^ bad_parity, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      ps2_data = f[i];
      repeat (20) @(negedge clk);
      ps2_clk = 0;
      repeat (40) @(negedge clk);
      ps2_clk = 1;
      repeat (20) @(negedge clk);
    end
    ps2_data = 1;
    repeat (100) @(negedge clk);
  endtask

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  typedef struct { logic [7:0] code; bit ext; int bitpos; } key_t;
  // bit positions in pad_buttons_t: up=7 down=6 left=5 right=4 a=3 b=2 c=1 start=0
  key_t keys [8] = '{'{8'h1A, 0, 3}, '{8'h22, 0, 2}, '{8'h21, 0, 1}, '{8'h5A, 0, 0},
                     '{8'h75, 1, 7}, '{8'h72, 1, 6}, '{8'h6B, 1, 5}, '{8'h74, 1, 4}};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    send(8'hA5);
    chk(n_valid == 1 && last_byte == 8'hA5, $sformatf("plain byte received n=%0d b=%h err=%0d", n_valid, last_byte, n_err));
    foreach (keys[i]) begin
      if (keys[i].ext) send(8'hE0);
      send(keys[i].code);
      chk(btn == 8'(1 << keys[i].bitpos), $sformatf("press key %h -> %b", keys[i].code, btn));
      if (keys[i].ext) send(8'hE0);
      send(8'hF0);
      send(keys[i].code);
      chk(btn == 8'h00, $sformatf("release key %h", keys[i].code));
    end
    // two keys held together
    send(8'h1A); send(8'hE0); send(8'h6B);
    chk(btn.a && btn.left && !btn.b, "two keys held");
    // bad parity: flagged, ignored
    begin
      int v0;
      v0 = n_valid;
      send(8'h22, 1);
      chk(n_err == 1 && n_valid == v0 && !btn.b, "parity error ignored");
    end
    // a frame cut short is dropped by the time-out, the next one is read
    ps2_data = 0; repeat (20) @(negedge clk); ps2_clk = 0; repeat (40) @(negedge clk); ps2_clk = 1;
    ps2_data = 1; repeat (3000) @(negedge clk);
    send(8'h22);
    chk(btn.b, "recovered after a broken frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
