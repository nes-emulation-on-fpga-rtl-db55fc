// NES console on one FPGA clock domain.
// The 2A03 side (6502-compatible CPU, APU, 2 KB work RAM, OAM DMA and the
// controller port) and the PPU side (registers, VRAM, OAM, palette, renderers,
// pixel buffer and VGA generator) run from the 21.477 MHz master clock with
// clock enables: CPU and APU at master/12, PPU at master/4, VGA at master/2.
// The CPU and PPU have separate memory buses; the game (mapper 0) sits in
// block RAM: PRG on the CPU bus, CHR on the PPU bus. After reset, and on each
// press of the load key, the game loader copies the game slot chosen by the
// switches from the board SRAM into those block RAMs while the console is held
// in reset. Interrupts: the PPU's VBlank NMI and the APU frame IRQ.
// Outside parts: the SRAM chip, two NES pads on GPIO, a VGA monitor and the
// board's audio codec, which receives `audio_sample` once per CPU cycle
// (audio_valid).
module nes_top (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  game_sel,
  input  logic        load_key,
  // SRAM
  output logic [19:0] sram_addr,
  input  logic [15:0] sram_dq,
  output logic        sram_oe_n,
  // controllers
  output logic        pad_latch,
  output logic        pad1_clk,
  output logic        pad2_clk,
  input  logic        pad1_data,
  input  logic        pad2_data,
  // VGA
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic        vga_clk,
  // audio to the codec
  output logic [15:0] audio_sample,
  output logic        audio_valid
);
  logic rst, sys_rst, loading;
  logic key_s1, key_s2;
  always_ff @(posedge clk) begin
    rst    <= !rst_n;
    key_s1 <= load_key;
    key_s2 <= key_s1;
  end
  assign sys_rst = rst | loading;

  // ---------------- clock enables ----------------
  logic ce_cpu, ce_ppu, ce_vga;
  logic [1:0] phase;
  nes_clkgen u_clk (.clk, .rst, .ce_cpu, .ce_ppu, .ce_vga, .ppu_phase(phase));

  // ---------------- game loader + cartridge ----------------
  logic        ld_prg_we, ld_chr_we, ld_flags_we;
  logic [14:0] ld_addr;
  logic [7:0]  ld_data;
  logic [1:0]  ld_flags;
  game_loader u_loader (
    .clk, .rst, .game_sel, .load_key(key_s2), .sram_addr, .sram_dq, .sram_oe_n,
    .ld_prg_we, .ld_chr_we, .ld_addr, .ld_data, .ld_flags_we, .ld_flags, .busy(loading)
  );

  logic [15:0] bus_addr;
  logic        bus_we;
  logic [7:0]  bus_wdata, bus_rdata;
  logic [7:0]  cart_rdata;
  logic [12:0] chr_addr_a, chr_addr_b;
  logic [7:0]  chr_rdata_a, chr_rdata_b;
  logic        mirror_v, prg16;
  cart_nrom u_cart (
    .clk, .rst, .ce_cpu, .cpu_addr(bus_addr), .prg_rdata(cart_rdata),
    .chr_addr_a, .chr_rdata_a, .chr_addr_b, .chr_rdata_b,
    .ld_prg_we, .ld_chr_we, .ld_addr, .ld_data, .ld_flags_we, .ld_flags, .mirror_v, .prg16
  );

  // ---------------- CPU and bus masters ----------------
  logic [15:0] cpu_addr, dma_addr;
  logic        cpu_we, dma_we, dma_active, cpu_sync;
  logic [7:0]  cpu_dout;
  logic        nmi, irq;
  cpu_6502 u_cpu (
    .clk, .rst(sys_rst), .ce(ce_cpu), .rdy(!dma_active), .nmi, .irq, .din(bus_rdata),
    .addr(cpu_addr), .we(cpu_we), .dout(cpu_dout), .sync(cpu_sync)
  );

  logic sel_ram, sel_ppu, sel_apu, sel_dma, sel_ctrl, sel_cart;
  assign bus_addr  = dma_active ? dma_addr : cpu_addr;
  assign bus_we    = dma_active ? dma_we : cpu_we;
  assign bus_wdata = dma_active ? bus_rdata : cpu_dout;

  oam_dma u_dma (
    .clk, .rst(sys_rst), .ce(ce_cpu), .wr_4014(!dma_active && sel_dma && cpu_we),
    .wdata(cpu_dout), .active(dma_active), .addr(dma_addr), .we(dma_we)
  );

  logic [7:0] ram_rdata, ppu_rdata, apu_rdata, ctrl_rdata;
  nes_cpu_bus u_bus (
    .clk, .rst(sys_rst), .ce(ce_cpu), .addr(bus_addr), .we(bus_we),
    .sel_ram, .sel_ppu, .sel_apu, .sel_dma, .sel_ctrl, .sel_cart,
    .ram_rdata, .ppu_rdata, .apu_rdata, .ctrl_rdata, .cart_rdata, .rdata(bus_rdata)
  );

  nes_ram #(.AW(11)) u_ram (
    .clk, .ce(ce_cpu), .addr(bus_addr[10:0]), .we(sel_ram && bus_we), .wdata(bus_wdata),
    .rdata(ram_rdata)
  );

  nes_ctrl_if u_pads (
    .clk, .rst(sys_rst), .ce(ce_cpu), .sel(sel_ctrl), .a0(bus_addr[0]), .we(bus_we),
    .wdata(bus_wdata), .rdata(ctrl_rdata), .pad_latch, .pad1_clk, .pad2_clk,
    .pad1_data, .pad2_data
  );

  // ---------------- APU ----------------
  logic [3:0] ch_p1, ch_p2, ch_tri, ch_noise;
  apu_top u_apu (
    .clk, .rst(sys_rst), .ce(ce_cpu), .sel(sel_apu), .addr(bus_addr[4:0]), .we(bus_we),
    .wdata(bus_wdata), .rdata(apu_rdata), .irq, .sample(audio_sample),
    .ch_pulse1(ch_p1), .ch_pulse2(ch_p2), .ch_triangle(ch_tri), .ch_noise(ch_noise)
  );
  assign audio_valid = ce_cpu;

  // ---------------- PPU ----------------
  logic       vblank, frame_odd;
  logic [8:0] ppu_line, ppu_dot;
  ppu_top u_ppu (
    .clk, .rst(sys_rst), .ce_cpu, .ce_ppu, .ce_vga, .phase,
    .cpu_sel(sel_ppu), .cpu_addr(bus_addr[2:0]), .cpu_we(bus_we), .cpu_wdata(bus_wdata),
    .cpu_rdata(ppu_rdata), .nmi,
    .mirror_v, .chr_addr_a, .chr_rdata_a, .chr_addr_b, .chr_rdata_b,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n, .vga_clk, .vblank,
    .line(ppu_line), .dot(ppu_dot), .frame_odd
  );
endmodule
