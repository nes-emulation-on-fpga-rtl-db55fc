// CPU address decoder and read-data multiplexer of the 2A03.
// Memory map: $0000-$1FFF work RAM (2 KB, mirrored four times), $2000-$3FFF the
// eight PPU registers (mirrored every 8 bytes), $4000-$4013 and $4015/$4017
// APU registers, $4014 OAM DMA, $4016/$4017 controller ports, $4020-$FFFF
// cartridge space. Each device registers its read data on the CPU enable; the
// bus remembers which device was read and selects its data in the next cycle.
// Reads of unmapped addresses return the last value on the bus (a register of
// the previously read value). During OAM DMA the DMA engine owns the bus.
module nes_cpu_bus (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  // bus master (CPU or DMA)
  input  logic [15:0] addr,
  input  logic        we,
  // decoded selects for the current cycle
  output logic        sel_ram,
  output logic        sel_ppu,
  output logic        sel_apu,
  output logic        sel_dma,
  output logic        sel_ctrl,
  output logic        sel_cart,
  // registered read data of the devices
  input  logic [7:0]  ram_rdata,
  input  logic [7:0]  ppu_rdata,
  input  logic [7:0]  apu_rdata,
  input  logic [7:0]  ctrl_rdata,
  input  logic [7:0]  cart_rdata,
  output logic [7:0]  rdata
);
  typedef enum logic [2:0] {R_OPEN, R_RAM, R_PPU, R_APU, R_CTRL, R_CART} rsrc_e;
  rsrc_e      src_q;
  logic [7:0] last_q;

  always_comb begin
    sel_ram  = (addr[15:13] == 3'b000);
    sel_ppu  = (addr[15:13] == 3'b001);
    sel_dma  = (addr == 16'h4014);
    sel_ctrl = (addr == 16'h4016) || (addr == 16'h4017 && !we);
    sel_apu  = (addr[15:5] == 11'h200) && (addr[4:0] <= 5'h13 || addr[4:0] == 5'h15 ||
               (addr[4:0] == 5'h17 && we));
    sel_cart = (addr >= 16'h4020);
  end

  always_ff @(posedge clk) begin
    if (rst) src_q <= R_OPEN;
    else if (ce) begin
      if (we)            src_q <= R_OPEN;
      else if (sel_ram)  src_q <= R_RAM;
      else if (sel_ppu)  src_q <= R_PPU;
      else if (sel_ctrl) src_q <= R_CTRL;
      else if (sel_apu && addr[4:0] == 5'h15) src_q <= R_APU;
      else if (sel_cart) src_q <= R_CART;
      else               src_q <= R_OPEN;
    end
  end

  always_comb begin
    unique case (src_q)
      R_RAM:  rdata = ram_rdata;
      R_PPU:  rdata = ppu_rdata;
      R_APU:  rdata = apu_rdata;
      R_CTRL: rdata = ctrl_rdata;
      R_CART: rdata = cart_rdata;
      default: rdata = last_q;
    endcase
  end

  // previously read value (open bus)
  always_ff @(posedge clk) begin
    if (rst) last_q <= 8'h00;
    else if (ce) last_q <= rdata;
  end
endmodule
