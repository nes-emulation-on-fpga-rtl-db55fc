// PPU nametable RAM: 2 KB, two synchronous ports on the master clock.
// Port A is read by the background renderer, port B is read and written by the
// register interface (PPUDATA). Addresses are PPU addresses $2000-$2FFF (12 low
// bits); the 4 KB nametable space is folded onto 2 KB by the cartridge's
// mirroring: vertical mirroring keeps address bit 10, horizontal keeps bit 11.
// Read data is registered: it is valid in the master cycle after the address.
module ppu_vram #(
  parameter int unsigned BYTES = 2048
) (
  input  logic        clk,
  input  logic        mirror_v,
  input  logic [11:0] addr_a,
  output logic [7:0]  rdata_a,
  input  logic [11:0] addr_b,
  input  logic        we_b,
  input  logic [7:0]  wdata_b,
  output logic [7:0]  rdata_b
);
  localparam int unsigned AW = $clog2(BYTES);
  logic [7:0] mem [0:BYTES-1];

  function automatic logic [AW-1:0] fold(input logic [11:0] a);
    return AW'({mirror_v ? a[10] : a[11], a[9:0]});
  endfunction

  initial for (int i = 0; i < BYTES; i++) mem[i] = 8'h00;

  always_ff @(posedge clk) begin
    rdata_a <= mem[fold(addr_a)];
  end
  always_ff @(posedge clk) begin
    if (we_b) mem[fold(addr_b)] <= wdata_b;
    rdata_b <= mem[fold(addr_b)];
  end
endmodule
