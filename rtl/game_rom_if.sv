// game_rom_if: the "game data mux". Game code is read either from a physical
// cartridge through the cartridge reader or from a ROM image in the board's
// flash chip; a switch (sel_flash) picks the source.
// Host side: a word read request (req with word address addr) is answered
// with ack and rdata after the selected device's wait time. Only reads exist.
// Cartridge side: address pins a1..a23 (cart_addr), 16 data pins, active-low
// chip enable (!C_CE) and output enable (!C_OE) as in the cartridge pinout.
// Flash side: 16-bit word address, data, active-low CE/OE. The flash returns
// the two bytes of a 68k word in the opposite order, so they are swapped.
// The source switch and byte swap follow the document; the wait times
// (CART_WAIT, FLASH_WAIT clocks) and the handshake are this design's.
// Timing: ack is high for one clock, CART_WAIT+1 or FLASH_WAIT+1 clocks after
// the clock where req is taken; rdata holds until the next ack.
module game_rom_if #(
  parameter int unsigned CART_WAIT  = 8,
  parameter int unsigned FLASH_WAIT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel_flash,
  input  logic        req,
  input  logic [22:0] addr,        // word address (68k address bits 23..1)
  output logic [15:0] rdata,
  output logic        ack,
  // cartridge reader pins
  output logic [22:0] cart_addr,   // a23..a1
  input  logic [15:0] cart_data,
  output logic        cart_ce_n,
  output logic        cart_oe_n,
  // flash pins
  output logic [21:0] flash_addr,
  input  logic [15:0] flash_data,
  output logic        flash_ce_n,
  output logic        flash_oe_n
);
  logic       busy, src_flash;
  logic [7:0] wait_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      src_flash  <= 1'b0;
      wait_cnt   <= '0;
      ack        <= 1'b0;
      rdata      <= '0;
      cart_addr  <= '0;
      flash_addr <= '0;
      cart_ce_n  <= 1'b1;
      cart_oe_n  <= 1'b1;
      flash_ce_n <= 1'b1;
      flash_oe_n <= 1'b1;
    end else begin
      ack <= 1'b0;
      if (!busy) begin
        if (req) begin
          busy      <= 1'b1;
          src_flash <= sel_flash;
          wait_cnt  <= sel_flash ? 8'(FLASH_WAIT) : 8'(CART_WAIT);
          if (sel_flash) begin
            flash_addr <= addr[21:0];
            flash_ce_n <= 1'b0;
            flash_oe_n <= 1'b0;
          end else begin
            cart_addr <= addr;
            cart_ce_n <= 1'b0;
            cart_oe_n <= 1'b0;
          end
        end
      end else if (wait_cnt != 0) begin
        wait_cnt <= wait_cnt - 1'b1;
      end else begin
        busy       <= 1'b0;
        ack        <= 1'b1;
        rdata      <= src_flash ? {flash_data[7:0], flash_data[15:8]} : cart_data;
        cart_ce_n  <= 1'b1;
        cart_oe_n  <= 1'b1;
        flash_ce_n <= 1'b1;
        flash_oe_n <= 1'b1;
      end
    end
  end
endmodule
