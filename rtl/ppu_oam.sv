// Object attribute memory: 256 bytes, 64 sprites of 4 bytes (Y, tile,
// attributes, X). Port A is read by sprite evaluation; port B is read and
// written through OAMADDR/OAMDATA (and by OAM DMA). Synchronous on the master
// clock, read data valid one cycle after the address.
module ppu_oam #(
  parameter int unsigned BYTES = 256
) (
  input  logic                     clk,
  input  logic [$clog2(BYTES)-1:0] addr_a,
  output logic [7:0]               rdata_a,
  input  logic [$clog2(BYTES)-1:0] addr_b,
  input  logic                     we_b,
  input  logic [7:0]               wdata_b,
  output logic [7:0]               rdata_b
);
  logic [7:0] mem [0:BYTES-1];
  initial for (int i = 0; i < BYTES; i++) mem[i] = 8'hFF;
  always_ff @(posedge clk) rdata_a <= mem[addr_a];
  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= wdata_b;
    rdata_b <= mem[addr_b];
  end
endmodule
