// io_ports: the 68k's view of the two controller ports, in $A10000-$A10FFF.
// Each port has a data register and a direction (control) register; the
// console drives a pad's Select line from bit 6 of the data register when
// bit 6 of the control register makes it an output, and otherwise leaves it
// pulled high. Reading the data register returns bit 7 and the output bits as
// written, and the pad's pins on the input bits:
//   bit 6 = Select (TH), bits 5..0 = pins 9,6,4,3,2,1.
// Registers (byte offsets, read on the odd byte lane): $01 version, $03 data
// 1, $05 data 2, $09 control 1, $0B control 2. The register layout is the
// console's, not given in the document; only the pad multiplexing is.
// Timing: writes on the clock edge with we high; read data is combinational.
module io_ports
  import genesis_pkg::*;
#(
  parameter logic [7:0] VERSION = 8'hA0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] addr,      // byte offset within the I/O area
  input  logic        we,
  input  logic [7:0]  wdata,     // odd (low) byte lane
  output logic [7:0]  rdata,
  input  pad_pins_t   pins1,
  input  pad_pins_t   pins2,
  output logic        select1,
  output logic        select2
);
  logic [7:0] data1, data2, ctrl1, ctrl2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data1 <= 8'h7F;
      data2 <= 8'h7F;
      ctrl1 <= '0;
      ctrl2 <= '0;
    end else if (we) begin
      unique case (addr[4:1])
        4'h1: data1 <= wdata;
        4'h2: data2 <= wdata;
        4'h4: ctrl1 <= wdata;
        4'h5: ctrl2 <= wdata;
        default: ;
      endcase
    end
  end

  assign select1 = ctrl1[6] ? data1[6] : 1'b1;
  assign select2 = ctrl2[6] ? data2[6] : 1'b1;

  function automatic logic [7:0] port_read(input logic [7:0] d, input logic [7:0] c,
                                           input logic sel, input pad_pins_t p);
    logic [7:0] in_bits;
    in_bits = {1'b0, sel, p};
    return (d & c) | (in_bits & ~c) | (d & 8'h80);
  endfunction

  always_comb begin
    unique case (addr[4:1])
      4'h0:    rdata = VERSION;
      4'h1:    rdata = port_read(data1, ctrl1, select1, pins1);
      4'h2:    rdata = port_read(data2, ctrl2, select2, pins2);
      4'h4:    rdata = ctrl1;
      4'h5:    rdata = ctrl2;
      default: rdata = 8'h00;
    endcase
  end
endmodule
