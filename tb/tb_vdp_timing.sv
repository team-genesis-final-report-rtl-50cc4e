// tb_vdp_timing: runs the raster counters with a pixel strobe every second
// clock over several frames and checks, against counters kept by the bench,
// the h/v positions, blanking, sync pulse widths, the 224/192-line mode taken
// at frame start, and that a display-enable change made mid-line only shows
// from the next line start.
module tb_vdp_timing;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pix_en = 0, v28_in = 1, disp_en_in = 1;
  logic [8:0] h, v;
  logic hsync, vsync, hblank, vblank, de, line_start, frame_start, disp_en, v28;
  vdp_timing dut (.*);
  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask
  always @(posedge clk) pix_en <= rst_n ? ~pix_en : 1'b0;

  int eh = 0, ev = 0, lines_de, frames = 0, hs_len = 0, vs_lines = 0;
  bit emode = 1, eden = 0, want_den = 1;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      lines_de = 0;
      for (int l = 0; l < 262; l++) begin
        for (int p = 0; p < 342; p++) begin
          // wait for a pixel strobe then compare state before it takes effect
          @(negedge clk); while (!pix_en) @(negedge clk);
          if (p == 100) begin
            disp_en_in = $urandom_range(0, 1);
          end
          chk(h == 9'(eh) && v == 9'(ev), $sformatf("pos %0d,%0d vs %0d,%0d", h, v, eh, ev));
          chk(hblank == (eh >= 256), "hblank");
          chk(vblank == (ev >= (emode ? 224 : 192)), "vblank");
          chk(de == (eh < 256 && ev < (emode ? 224 : 192)), "de");
          chk(hsync == (eh >= 270 && eh < 296), "hsync");
          chk(vsync == (ev >= 240 && ev < 243), "vsync");
          chk(line_start == (eh == 0) && frame_start == (eh == 0 && ev == 0), "starts");
          chk(disp_en == eden, "disp_en only changes at line start");
          chk(v28 == emode, "mode");
          if (eh == 341) begin
            eden = disp_en_in;
            if (ev == 261) begin emode = v28_in; end
          end
          if (p == 200 && l == 10) v28_in = (f % 2 == 0) ? 1'b0 : 1'b1;
          eh = (eh + 1) % 342;
          if (eh == 0) ev = (ev + 1) % 262;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
