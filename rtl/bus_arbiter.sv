// bus_arbiter: decides who drives each of the console's two buses.
//
// 68k bus: the 68k owns it by default. The DMA engine and the Z80 bank window
// (a Z80 access to $8000-$FFFF) may ask for it. The arbiter raises m68k_br,
// waits for the CPU's grant m68k_bg, then grants one requester and holds the
// grant until that requester drops its request; the 68k gets the bus back
// once nobody else wants it. DMA wins over the Z80 when both ask together.
//
// Z80 bus: the Z80 owns it by default. The 68k asks for it by writing 1 to
// bit 8 of the bus-request register ($A11100) and releases it by writing 0;
// reading the register returns bit 8 = 0 once the Z80 has acknowledged
// (z80_busack), 1 otherwise. Bit 8 of $A11200 drives the Z80 reset line
// (0 = hold in reset); reset is held after power-up. Register offsets and
// bit positions are the console's; priority and hold-until-release are this
// design's choices.
// Timing: grants change one clock after the condition that causes them.
module bus_arbiter (
  input  logic        clk,
  input  logic        rst_n,
  // 68k bus
  input  logic        dma_req,
  input  logic        zbank_req,
  output logic        gnt_dma,
  output logic        gnt_zbank,
  output logic        m68k_br,
  input  logic        m68k_bg,
  // control registers in $A11000-$A11FFF
  input  logic        ctrl_we,
  input  logic [11:0] ctrl_addr,
  input  logic [15:0] ctrl_wdata,
  output logic [15:0] ctrl_rdata,
  // Z80 bus
  output logic        z80_busreq,
  input  logic        z80_busack,
  output logic        z80_reset,
  output logic        zbus_gnt_68k
);
  typedef enum logic [1:0] {ARB_IDLE, ARB_WAIT_BG, ARB_OWN} arb_state_e;
  arb_state_e state;
  logic       own_dma;  // 1: current owner is DMA, 0: Z80 bank window

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ARB_IDLE;
      own_dma <= 1'b0;
    end else begin
      unique case (state)
        ARB_IDLE:    if (dma_req || zbank_req) state <= ARB_WAIT_BG;
        ARB_WAIT_BG: begin
          if (!dma_req && !zbank_req) state <= ARB_IDLE;
          else if (m68k_bg) begin
            state   <= ARB_OWN;
            own_dma <= dma_req;
          end
        end
        ARB_OWN:     if (own_dma ? !dma_req : !zbank_req) state <= ARB_IDLE;
        default:     state <= ARB_IDLE;
      endcase
    end
  end

  assign m68k_br   = (state != ARB_IDLE);
  assign gnt_dma   = (state == ARB_OWN) &&  own_dma;
  assign gnt_zbank = (state == ARB_OWN) && !own_dma;

  // Z80 bus request and reset registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z80_busreq <= 1'b0;
      z80_reset  <= 1'b1;
    end else if (ctrl_we) begin
      if (ctrl_addr[11:8] == 4'h1) z80_busreq <= ctrl_wdata[8];
      if (ctrl_addr[11:8] == 4'h2) z80_reset  <= !ctrl_wdata[8];
    end
  end

  assign zbus_gnt_68k = z80_busreq && z80_busack;
  assign ctrl_rdata   = {7'd0, !zbus_gnt_68k, 8'd0};

`ifndef SYNTHESIS
  // a grant only ever goes to one requester
  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) !(gnt_dma && gnt_zbank));
  // the bus is only granted while the 68k has released it
  a_gnt_needs_br: assert property (@(posedge clk) disable iff (!rst_n) (gnt_dma || gnt_zbank) |-> m68k_br);
`endif
endmodule
