// Palette RAM: 32 six-bit colour entries (4 background and 4 sprite palettes
// of 4 colours). Entries $10/$14/$18/$1C mirror $00/$04/$08/$0C, so the
// sprite palettes share the backdrop colour. One write port (register
// interface) and two combinational read ports (pixel path and PPUDATA reads).
module ppu_palette #(
  parameter int unsigned BYTES = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] waddr,
  input  logic       we,
  input  logic [5:0] wdata,
  input  logic [4:0] raddr_a,
  output logic [5:0] rdata_a,
  input  logic [4:0] raddr_b,
  output logic [5:0] rdata_b
);
  logic [5:0] pal [0:BYTES-1];

  function automatic logic [4:0] fold(input logic [4:0] a);
    return (a[1:0] == 2'b00) ? {1'b0, a[3:0]} : a;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < BYTES; i++) pal[i] <= 6'h0F;
    end else if (we) pal[fold(waddr)] <= wdata;
  end
  assign rdata_a = pal[fold(raddr_a)];
  assign rdata_b = pal[fold(raddr_b)];
endmodule
