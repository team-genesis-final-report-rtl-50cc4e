// ps2_keyboard: turns a PS/2 keyboard into a second 3-button pad.
//
// Receiver: the keyboard drives a clock and a data line, both idle high. A
// frame is 11 bits read on falling clock edges: a low start bit, eight data
// bits LSB first, an odd-parity bit and a high stop bit. Both lines are
// synchronised to clk first; a frame that stops for TIMEOUT clocks is dropped.
// A byte with a bad start, parity or stop bit is flagged (rx_error) and
// ignored. The board only listens; it never drives the lines (no resend
// request is sent).
//
// Decoder: a key press sends its make code; a release sends 0xF0 and then the
// make code. Arrow keys carry an 0xE0 prefix. Key map (make codes are the
// standard set-2 codes): Z=A, X=B, C=C, Enter=Start, and the arrows for the
// directions. The frame format, F0 break prefix and the key-to-button
// assignment follow the document; the code values, the E0 handling and the
// time-out are this design's.
// Timing: rx_valid pulses one clock after the stop bit's falling clock edge
// is seen; btn updates on the same edge.
module ps2_keyboard
  import genesis_pkg::*;
#(
  parameter int unsigned TIMEOUT = 54000   // 1 ms at 54 MHz
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ps2_clk,
  input  logic         ps2_data,
  output logic [7:0]   rx_byte,
  output logic         rx_valid,
  output logic         rx_error,
  output pad_buttons_t btn
);
  logic [2:0]  clk_sync;
  logic [1:0]  dat_sync;
  logic [10:0] shreg;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT+1)-1:0] idle_cnt;
  logic        fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync <= '1;
      dat_sync <= '1;
    end else begin
      clk_sync <= {clk_sync[1:0], ps2_clk};
      dat_sync <= {dat_sync[0], ps2_data};
    end
  end
  assign fall = clk_sync[2] && !clk_sync[1];

  // frame receiver
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg    <= '0;
      nbits    <= '0;
      idle_cnt <= '0;
      rx_byte  <= '0;
      rx_valid <= 1'b0;
      rx_error <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      rx_error <= 1'b0;
      if (fall) begin
        idle_cnt <= '0;
        shreg    <= {dat_sync[1], shreg[10:1]};
        if (nbits == 4'd10) begin
          nbits <= '0;
          // shreg[10:1] holds start..parity; dat_sync[1] is the stop bit
          if (!shreg[1] && dat_sync[1] && ^shreg[10:2]) begin
            rx_byte  <= shreg[9:2];
            rx_valid <= 1'b1;
          end else begin
            rx_error <= 1'b1;
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else if (nbits != 0) begin
        if (32'(idle_cnt) == TIMEOUT) begin
          nbits    <= '0;
          idle_cnt <= '0;
        end else begin
          idle_cnt <= idle_cnt + 1'b1;
        end
      end
    end
  end

  // make/break decoder
  logic brk, ext;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk <= 1'b0;
      ext <= 1'b0;
      btn <= '0;
    end else if (rx_valid) begin
      if (rx_byte == 8'hF0)      brk <= 1'b1;
      else if (rx_byte == 8'hE0) ext <= 1'b1;
      else begin
        brk <= 1'b0;
        ext <= 1'b0;
        if (ext) begin
          unique case (rx_byte)
            8'h75: btn.up    <= !brk;
            8'h72: btn.down  <= !brk;
            8'h6B: btn.left  <= !brk;
            8'h74: btn.right <= !brk;
            8'h5A: btn.start <= !brk;  // keypad Enter
            default: ;
          endcase
        end else begin
          unique case (rx_byte)
            8'h1A: btn.a     <= !brk;  // Z
            8'h22: btn.b     <= !brk;  // X
            8'h21: btn.c     <= !brk;  // C
            8'h5A: btn.start <= !brk;  // Enter
            default: ;
          endcase
        end
      end
    end
  end
endmodule
