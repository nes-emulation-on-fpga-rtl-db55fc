// Clock-enable generator. The whole console runs on the 21.477 MHz master
// clock; the CPU, PPU and VGA advance on enables derived here instead of on
// divided clocks: CPU = master/12 (1.79 MHz), PPU dot = master/4 (5.37 MHz),
// VGA dot = master/2 (twice the PPU rate). `ppu_phase` numbers the four master
// cycles of a PPU dot (0..3); ce_ppu is high in phase 3, the last one, so PPU
// state changes at the end of a dot. The ratios follow the design's clock
// table; the use of enables rather than clocks is this design's choice.
module nes_clkgen #(
  parameter int unsigned CPU_DIV = 12,
  parameter int unsigned PPU_DIV = 4,
  parameter int unsigned VGA_DIV = 2
) (
  input  logic       clk,
  input  logic       rst,
  output logic       ce_cpu,
  output logic       ce_ppu,
  output logic       ce_vga,
  output logic [1:0] ppu_phase
);
  logic [$clog2(CPU_DIV)-1:0] cnt;
  always_ff @(posedge clk) begin
    if (rst) cnt <= '0;
    else cnt <= (cnt == CPU_DIV[$clog2(CPU_DIV)-1:0] - 1'b1) ? '0 : cnt + 1'b1;
  end
  assign ce_cpu    = (cnt == CPU_DIV[$clog2(CPU_DIV)-1:0] - 1'b1);
  assign ce_ppu    = ((32'(cnt) % PPU_DIV) == PPU_DIV - 1);
  assign ce_vga    = ((32'(cnt) % VGA_DIV) == VGA_DIV - 1);
  assign ppu_phase = 2'(32'(cnt) % PPU_DIV);
endmodule
