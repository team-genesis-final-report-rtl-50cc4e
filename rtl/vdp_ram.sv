// vdp_ram: small synchronous RAM of the video processor, one write port and
// one read port. Used as the 64 x 9-bit color RAM (palettes) and the
// 40 x 10-bit vertical scroll RAM. Read data appears one clock after the
// address; a write and a read of the same entry on one edge return the old
// value. Addresses at or above DEPTH are ignored on write and read as 0.
module vdp_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 9
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
