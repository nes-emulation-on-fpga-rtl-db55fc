// Pixel buffer between the PPU and the VGA generator: two 256-entry lines of
// 9-bit pixels, {PPUMASK colour-emphasis bits, 6-bit NES colour}. The PPU writes scanline y into bank y[0] while the VGA
// generator reads the previous scanline from the other bank, so each line is
// handed over whole after it has been rendered. Write on the master clock,
// registered read.
module ppu_linebuf (
  input  logic       clk,
  input  logic       we,
  input  logic       wbank,
  input  logic [7:0] waddr,
  input  logic [8:0] wdata,
  input  logic       rbank,
  input  logic [7:0] raddr,
  output logic [8:0] rdata
);
  logic [8:0] mem [0:511];
  initial for (int i = 0; i < 512; i++) mem[i] = 9'h00F;
  always_ff @(posedge clk) begin
    if (we) mem[{wbank, waddr}] <= wdata;
    rdata <= mem[{rbank, raddr}];
  end
endmodule
