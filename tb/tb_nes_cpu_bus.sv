// Testbench of the CPU address decoder: checks the device selects over the
// memory map (with mirrors), that read data comes from the device read in the
// previous cycle, and that an unmapped read returns the last bus value.
`include "tb_check.svh"
module tb_nes_cpu_bus;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 1, we = 0;
  logic [15:0] addr = 0;
  logic s_ram, s_ppu, s_apu, s_dma, s_ctrl, s_cart;
  logic [7:0] rd;
  nes_cpu_bus dut (.clk, .rst, .ce, .addr, .we, .sel_ram(s_ram), .sel_ppu(s_ppu), .sel_apu(s_apu),
    .sel_dma(s_dma), .sel_ctrl(s_ctrl), .sel_cart(s_cart), .ram_rdata(8'h11), .ppu_rdata(8'h22),
    .apu_rdata(8'h33), .ctrl_rdata(8'h44), .cart_rdata(8'h55), .rdata(rd));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)
  task automatic sel(input logic [15:0] a, input logic w, input logic [5:0] exp, input string n);
    addr = a; we = w; #1;
    `CHECK({s_ram, s_ppu, s_apu, s_dma, s_ctrl, s_cart} == exp, $sformatf("selects of %s %h", n, a))
  endtask
  task automatic rdchk(input logic [15:0] a, input logic [7:0] exp, input string n);
    addr = a; we = 0;
    @(posedge clk); #1;
    `CHECK(rd == exp, $sformatf("read data of %s: %h", n, rd))
  endtask
  initial begin
    @(posedge clk); rst = 0;
    sel(16'h0000, 0, 6'b100000, "RAM");
    sel(16'h1FFF, 0, 6'b100000, "RAM mirror");
    sel(16'h2002, 0, 6'b010000, "PPU");
    sel(16'h3FFF, 0, 6'b010000, "PPU mirror");
    sel(16'h4000, 1, 6'b001000, "APU pulse");
    sel(16'h4015, 0, 6'b001000, "APU status");
    sel(16'h4014, 1, 6'b000100, "OAM DMA");
    sel(16'h4016, 0, 6'b000010, "pad 1");
    sel(16'h4017, 0, 6'b000010, "pad 2 read");
    sel(16'h4017, 1, 6'b001000, "frame counter write");
    sel(16'h8000, 0, 6'b000001, "cartridge");
    rdchk(16'h0123, 8'h11, "RAM");
    rdchk(16'h2002, 8'h22, "PPU");
    rdchk(16'h4015, 8'h33, "APU");
    rdchk(16'h4016, 8'h44, "pad");
    rdchk(16'hC000, 8'h55, "cart");
    rdchk(16'h4018, 8'h55, "open bus keeps last value");
    `TB_DONE
  end
endmodule
