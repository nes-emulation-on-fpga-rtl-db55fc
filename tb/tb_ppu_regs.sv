// Testbench of the PPU register interface. A CPU-side task performs register
// reads and writes; the test checks PPUADDR loading of v, PPUDATA writes and
// the +1/+32 increment, the one-byte read buffer and direct palette reads,
// PPUSCROLL into t / fine X, the renderer's copy/increment requests, OAMADDR
// and OAMDATA, VBlank set/clear timing, $2002 read side effects and NMI.
`include "tb_check.svh"
module tb_ppu_regs;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce_cpu = 0, ce_ppu = 0;
  logic sel = 0, we = 0; logic [2:0] addr = 0; logic [7:0] wdata = 0, rdata;
  logic [8:0] line = 0, dot = 0;
  logic s0h = 0, sovf = 0, inc_x = 0, inc_y = 0, copy_h = 0, copy_v = 0;
  logic [13:0] mem_addr; logic vram_we, pal_we, oam_we; logic [7:0] mem_wdata;
  logic [7:0] vram_rdata, chr_rdata, oam_rdata, oam_addr, ctrl, mask;
  logic [5:0] pal_rdata; logic [14:0] v; logic [2:0] fine_x; logic nmi;
  ppu_regs dut (.clk, .rst, .ce_cpu, .ce_ppu, .sel, .addr, .we, .wdata, .rdata,
    .line, .dot, .spr0_hit(s0h), .spr_ovf(sovf), .inc_x, .inc_y, .copy_h, .copy_v,
    .mem_addr, .vram_we, .mem_wdata, .vram_rdata, .chr_rdata, .pal_we, .pal_rdata,
    .oam_addr, .oam_we, .oam_rdata, .ctrl, .mask, .v, .fine_x, .nmi);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  // memories seen by the register block: data is a function of the address
  assign vram_rdata = mem_addr[7:0] ^ 8'hA5;
  assign chr_rdata  = mem_addr[7:0] ^ 8'h3C;
  assign pal_rdata  = mem_addr[5:0] ^ 6'h15;
  assign oam_rdata  = oam_addr + 8'd100;
  int n_vram_we = 0, n_pal_we = 0, n_oam_we = 0;
  always @(posedge clk) if (!rst) begin
    n_vram_we += int'(vram_we); n_pal_we += int'(pal_we); n_oam_we += int'(oam_we);
  end

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    sel = 1; we = 1; addr = a; wdata = d; ce_cpu = 1;
    @(posedge clk); #1 sel = 0; we = 0; ce_cpu = 0;
  endtask
  task automatic rd(input logic [2:0] a, output logic [7:0] d);
    sel = 1; we = 0; addr = a; ce_cpu = 1;
    @(posedge clk); #1 sel = 0; ce_cpu = 0; d = rdata;
  endtask
  task automatic ppu_tick(input logic [8:0] l, input logic [8:0] d);
    line = l; dot = d; ce_ppu = 1;
    @(posedge clk); #1 ce_ppu = 0;
  endtask

  initial begin
    logic [7:0] d;
    repeat (2) @(posedge clk); #1 rst = 0;
    // PPUADDR / PPUDATA
    wr(6, 8'h21); wr(6, 8'h08);
    `CHECK(v == 15'h2108, "PPUADDR loads v")
    wr(7, 8'h77);
    `CHECK(n_vram_we == 1 && v == 15'h2109, "PPUDATA write to VRAM, v += 1")
    wr(0, 8'h04);
    wr(7, 8'h78);
    `CHECK(v == 15'h2129, "increment of 32 with PPUCTRL bit 2")
    wr(0, 8'h00);
    // read buffer: first read returns stale buffer, second the data of the first address
    wr(6, 8'h23); wr(6, 8'h40);
    rd(7, d);
    rd(7, d);
    `CHECK(d == (8'h40 ^ 8'hA5), "buffered PPUDATA read returns previous address")
    wr(6, 8'h10); wr(6, 8'h20);
    rd(7, d); rd(7, d);
    `CHECK(d == (8'h20 ^ 8'h3C), "buffered read from pattern memory")
    // palette: written through pal_we, read directly
    wr(6, 8'h3F); wr(6, 8'h05);
    rd(7, d);
    `CHECK(d == {2'b00, 6'h05 ^ 6'h15}, "palette read is not buffered")
    wr(7, 8'h2A);
    `CHECK(n_pal_we == 1 && n_vram_we == 2, "palette write goes to palette only")
    // PPUSCROLL into t and fine X; copies to v
    rd(2, d);                     // reset w
    wr(0, 8'h03);
    wr(5, 8'b10101_011); wr(5, 8'b01010_110);
    `CHECK(fine_x == 3'd3, "fine X from first PPUSCROLL write")
    copy_h = 1; ppu_tick(0, 257); copy_h = 0;
    `CHECK(v[4:0] == 5'b10101 && v[10] == 1'b1, "copy_h moves coarse X and NT bit")
    copy_v = 1; ppu_tick(261, 280); copy_v = 0;
    `CHECK(v[9:5] == 5'b01010 && v[14:12] == 3'b110 && v[11] == 1'b1, "copy_v moves coarse/fine Y")
    // coarse X wrap flips horizontal nametable
    wr(6, 8'h20); wr(6, 8'h1F);
    inc_x = 1; ppu_tick(0, 8); inc_x = 0;
    `CHECK(v == 15'h2400, "coarse X wrap toggles nametable")
    // fine Y overflow at coarse Y 29 wraps and flips vertical nametable
    wr(0, 8'h00); wr(5, 8'h00); wr(5, 8'b11101_111);   // coarse Y 29, fine Y 7
    copy_v = 1; ppu_tick(261, 280); copy_v = 0;
    `CHECK({v[14:11], v[9:5]} == {4'b1110, 5'd29}, "copy_v loads fine Y 7 / coarse Y 29")
    inc_y = 1; ppu_tick(0, 256); inc_y = 0;
    `CHECK({v[14:11], v[9:5]} == {4'b0001, 5'd0}, "Y wrap at row 29 toggles nametable")
    // OAM
    wr(3, 8'h10); wr(4, 8'h55); wr(4, 8'h56);
    `CHECK(oam_addr == 8'h12 && n_oam_we == 2, "OAMDATA writes increment OAMADDR")
    rd(4, d);
    `CHECK(d == 8'h12 + 8'd100, "OAMDATA read")
    // VBlank and NMI
    wr(0, 8'h80);
    ppu_tick(241, 0);
    rd(2, d); `CHECK(d[7] == 0, "no VBlank before line 241 dot 1")
    ppu_tick(241, 1);
    `CHECK(nmi == 1, "NMI at VBlank start with PPUCTRL bit 7")
    s0h = 1; sovf = 1; ppu_tick(241, 2); s0h = 0; sovf = 0;
    wr(5, 8'h00);                 // w = 1
    rd(2, d);
    `CHECK(d[7:5] == 3'b111, "status shows VBlank, sprite-0 hit, overflow")
    `CHECK(nmi == 0, "reading $2002 clears VBlank")
    wr(6, 8'h3F);                 // first write after w reset goes to high byte
    wr(6, 8'h00);
    `CHECK(v == 15'h3F00, "reading $2002 resets the write toggle")
    ppu_tick(241, 1); rd(2, d); ppu_tick(261, 1); rd(2, d);
    `CHECK(d[7:5] == 3'b000, "flags cleared at pre-render line dot 1")
    `TB_DONE
  end
endmodule
