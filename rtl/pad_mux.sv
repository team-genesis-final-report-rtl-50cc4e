// pad_mux: behaves like a 3-button pad on its DB9 pins, for a player whose
// buttons come from elsewhere (the keyboard). The console drives Select
// (pin 7); the pad answers on pins 1,2,3,4,6,9, active low:
//   Select high: 1=Up 2=Down 3=Left 4=Right 6=B 9=C
//   Select low : 1=Up 2=Down 3=low  4=low   6=A 9=Start
// The pin assignment is the pad's. Pins 3 and 4 reading low while Select is
// low is this design's reading of the real pad (the pin list only gives them
// for Select high). Combinational.
module pad_mux
  import genesis_pkg::*;
(
  input  pad_buttons_t btn,
  input  logic         select,
  output pad_pins_t    pins
);
  always_comb begin
    pins.p1 = !btn.up;
    pins.p2 = !btn.down;
    if (select) begin
      pins.p3 = !btn.left;
      pins.p4 = !btn.right;
      pins.p6 = !btn.b;
      pins.p9 = !btn.c;
    end else begin
      pins.p3 = 1'b0;
      pins.p4 = 1'b0;
      pins.p6 = !btn.a;
      pins.p9 = !btn.start;
    end
  end
endmodule
