// End-to-end testbench of the console. A board SRAM model holds one game in
// slot 2: a small 6502 program (16 KB PRG, mirrored) and a CHR table with one
// opaque tile. After reset the loader copies the slot; the program then waits
// for two VBlanks, writes the palette and a nametable tile through $2006/$2007,
// prepares an OAM page in RAM, enables NMI and rendering, starts a pulse tone
// and the APU frame IRQ, and loops reading the controller. The NMI handler
// starts an OAM DMA from page 2; the IRQ handler acknowledges the frame IRQ.
// The testbench counts each mechanism and checks it: game load, frames, NMIs
// taken, OAM DMAs and their CPU stall length, frame IRQs, PPUDATA writes,
// sprite-0 hits, odd-frame dot skips, the controller byte, pixel colours on
// the VGA output, and audio activity.
`include "tb_check.svh"
module tb_nes_top;
  `TB_COUNTERS
  localparam int PROG_LEN = 205;
  localparam logic [7:0] PROG [PROG_LEN] = '{
    8'h78, 8'hD8, 8'hA2, 8'hFF, 8'h9A, 8'h2C, 8'h02, 8'h20, 8'h10, 8'hFB, 8'h2C, 8'h02,
    8'h20, 8'h10, 8'hFB, 8'hA9, 8'h3F, 8'h8D, 8'h06, 8'h20, 8'hA9, 8'h00, 8'h8D, 8'h06,
    8'h20, 8'hA9, 8'h0F, 8'h8D, 8'h07, 8'h20, 8'hA9, 8'h00, 8'h8D, 8'h07, 8'h20, 8'hA9,
    8'h00, 8'h8D, 8'h07, 8'h20, 8'hA9, 8'h30, 8'h8D, 8'h07, 8'h20, 8'hA9, 8'h3F, 8'h8D,
    8'h06, 8'h20, 8'hA9, 8'h13, 8'h8D, 8'h06, 8'h20, 8'hA9, 8'h16, 8'h8D, 8'h07, 8'h20,
    8'hA9, 8'h20, 8'h8D, 8'h06, 8'h20, 8'hA9, 8'h85, 8'h8D, 8'h06, 8'h20, 8'hA9, 8'h01,
    8'h8D, 8'h07, 8'h20, 8'hA9, 8'h1E, 8'h8D, 8'h00, 8'h02, 8'hA9, 8'h01, 8'h8D, 8'h01,
    8'h02, 8'hA9, 8'h00, 8'h8D, 8'h02, 8'h02, 8'hA9, 8'h28, 8'h8D, 8'h03, 8'h02, 8'hA2,
    8'h04, 8'hA9, 8'hF0, 8'h9D, 8'h00, 8'h02, 8'hE8, 8'hD0, 8'hFA, 8'hA9, 8'h00, 8'h8D,
    8'h05, 8'h20, 8'h8D, 8'h05, 8'h20, 8'hA9, 8'h80, 8'h8D, 8'h00, 8'h20, 8'hA9, 8'h1E,
    8'h8D, 8'h01, 8'h20, 8'hA9, 8'h01, 8'h8D, 8'h15, 8'h40, 8'hA9, 8'hBF, 8'h8D, 8'h00,
    8'h40, 8'hA9, 8'hFD, 8'h8D, 8'h02, 8'h40, 8'hA9, 8'h08, 8'h8D, 8'h03, 8'h40, 8'hA9,
    8'h00, 8'h8D, 8'h17, 8'h40, 8'h58, 8'hA9, 8'h01, 8'h8D, 8'h16, 8'h40, 8'hA9, 8'h00,
    8'h8D, 8'h16, 8'h40, 8'hA2, 8'h08, 8'hAD, 8'h16, 8'h40, 8'h4A, 8'h26, 8'h13, 8'hCA,
    8'hD0, 8'hF7, 8'hA5, 8'h13, 8'h85, 8'h14, 8'hE6, 8'h10, 8'h4C, 8'h95, 8'h80, 8'h48,
    8'hA9, 8'h02, 8'h8D, 8'h14, 8'h40, 8'hE6, 8'h11, 8'hA9, 8'h00, 8'h8D, 8'h05, 8'h20,
    8'h8D, 8'h05, 8'h20, 8'h68, 8'h40, 8'h48, 8'hAD, 8'h15, 8'h40, 8'hE6, 8'h12, 8'h68,
    8'h40};
  localparam logic [15:0] VEC [3] = '{16'h80B3, 16'h8000, 16'h80C5};  // NMI, RESET, IRQ
  logic clk = 0, rst_n = 0, load_key = 0;
  logic [3:0] game_sel = 4'd2;
  logic [19:0] sram_addr; logic [15:0] sram_dq; logic sram_oe_n;
  logic pad_latch, pad1_clk, pad2_clk, pad1_data, pad2_data;
  logic [7:0] vga_r, vga_g, vga_b; logic vga_hs, vga_vs, vga_blank_n, vga_sync_n, vga_clk;
  logic [15:0] audio_sample; logic audio_valid;
  nes_top dut (.*);
  nes_pad_model pad1 (.latch(pad_latch), .clk(pad1_clk), .buttons(8'h35), .data(pad1_data));
  nes_pad_model pad2 (.latch(pad_latch), .clk(pad2_clk), .buttons(8'h00), .data(pad2_data));
  always #23 clk = ~clk;                  // 21.477 MHz master clock
  `WATCHDOG(clk, 4000000)

  // ---- board SRAM: slot 2 holds the game, other slots are empty ----
  function automatic logic [7:0] prg_byte(int a);      // a = 0..16383
    if (a < PROG_LEN) return PROG[a];
    if (a >= 16'h3FFA) begin
      logic [15:0] v = VEC[(a - 16'h3FFA) / 2];
      return a[0] ? v[15:8] : v[7:0];
    end
    return 8'hEA;
  endfunction
  function automatic logic [7:0] chr_byte(int a);
    return (a >= 16 && a < 32) ? 8'hFF : 8'h00;        // tile 1 opaque, colour 3
  endfunction
  always_comb begin
    int w;
    w = int'(sram_addr[15:0]);
    sram_dq = 16'h0000;
    if (sram_addr[19:16] == 4'd2) begin
      if (w == 0) sram_dq = 16'h0003;                   // prg16, vertical mirroring
      else if (w >= 16'h0100 && w < 16'h4100)
        sram_dq = {prg_byte(2 * (w - 16'h0100) % 16384 + 1), prg_byte(2 * (w - 16'h0100) % 16384)};
      else if (w >= 16'h4100 && w < 16'h5100)
        sram_dq = {chr_byte(2 * (w - 16'h4100) + 1), chr_byte(2 * (w - 16'h4100))};
    end
  end

  // ---- mechanism counters ----
  int loads = 0, load_cycles = 0, frames = 0, nmis = 0, dmas = 0, dma_bad = 0, dma_len = 0;
  int irqs = 0, ppudata_wr = 0, s0_hits = 0, skips = 0, audio_changes = 0, stall_total = 0;
  int red = 0, white = 0, other = 0;
  int vbl_n = 0, vbl_bad = 0, vbl_len = 0;   // VBlank windows and their CPU-cycle length
  logic vbl_on = 0;
  logic busy_q = 1, dma_q = 0, irq_q = 0, s0_q = 0, census = 0;
  logic [15:0] audio_q = 0;
  always @(posedge clk) begin
    if (dut.loading) load_cycles++;
    if (busy_q && !dut.loading && rst_n) loads++;
    busy_q = dut.loading;
    if (dut.ce_ppu && dut.u_ppu.line == 9'd241 && dut.u_ppu.dot == 9'd1) frames++;
    if (dut.ce_ppu && dut.u_ppu.line == 9'd261 && dut.u_ppu.dot == 9'd339 && dut.u_ppu.frame_odd
        && dut.u_ppu.rendering) skips++;
    if (dut.ce_cpu && dut.u_cpu.state == dut.u_cpu.BRK4 && dut.u_cpu.nmi_sel) nmis++;
    if (dut.ce_ppu && dut.u_ppu.dot == 9'd1 && dut.u_ppu.line == 9'd241) begin vbl_on = 1; vbl_len = 0; end
    if (dut.ce_ppu && dut.u_ppu.dot == 9'd1 && dut.u_ppu.line == 9'd261 && vbl_on) begin
      vbl_on = 0; vbl_n++;
      if (vbl_len < 2273 || vbl_len > 2274) vbl_bad++;
    end
    if (dut.ce_cpu && vbl_on) vbl_len++;
    if (dut.ce_cpu) begin
      if (dut.dma_active) begin dma_len++; stall_total++; end
      if (dma_q && !dut.dma_active) begin dmas++; if (dma_len != 513 && dma_len != 514) dma_bad++; dma_len = 0; end
      dma_q = dut.dma_active;
      if (dut.irq && !irq_q) irqs++;
      irq_q = dut.irq;
      if (dut.u_ppu.u_regs.cpu_wr && dut.u_ppu.u_regs.addr == 3'd7) ppudata_wr++;
    end
    if (dut.ce_ppu) begin
      if (dut.u_ppu.spr0_hit && !s0_q) s0_hits++;
      s0_q = dut.u_ppu.spr0_hit;
    end
    if (audio_valid) begin
      if (audio_sample != audio_q) audio_changes++;
      audio_q = audio_sample;
    end
    if (census && dut.ce_vga && vga_blank_n) begin
      if ({vga_r, vga_g, vga_b} == 24'hF83800) red++;
      else if ({vga_r, vga_g, vga_b} == 24'hFCFCFC) white++;
      else if ({vga_r, vga_g, vga_b} != 24'h000000) other++;
    end
  end

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1;
    wait (loads == 1);
    `CHECK(load_cycles >= 3 * 20480 && load_cycles < 3 * 20480 + 50, $sformatf("game load took %0d cycles", load_cycles))
    `CHECK(dut.u_cart.prg16 && dut.u_cart.mirror_v, "cartridge header flags loaded")
    wait (frames == 6);
    wait (dut.u_ppu.line == 9'd0 && dut.u_ppu.dot == 9'd0);
    wait (dut.u_ppu.line == 9'd1); census = 1;
    wait (dut.u_ppu.line == 9'd0); wait (dut.u_ppu.line == 9'd1); census = 0;
    wait (frames == 8);
    repeat (20000) @(posedge clk);
    $display("mechanisms: loads=%0d frames=%0d nmis=%0d dmas=%0d stall=%0d irqs=%0d ppudata=%0d sprite0=%0d skips=%0d audio_changes=%0d vblanks=%0d",
             loads, frames, nmis, dmas, stall_total, irqs, ppudata_wr, s0_hits, skips, audio_changes, vbl_n);
    $display("pulse1: len %0d period %h enables %b sample %0d", dut.u_apu.u_p1.len, dut.u_apu.u_p1.period, dut.u_apu.enables, dut.u_apu.ch_pulse1);
    `CHECK(nmis >= 5 && nmis <= 6, $sformatf("NMIs taken: %0d", nmis))
    `CHECK(dut.u_ram.mem[16'h11] == 8'(nmis), "NMI handler ran once per NMI")
    `CHECK(dmas == nmis && dma_bad == 0, $sformatf("OAM DMAs: %0d, %0d of wrong length", dmas, dma_bad))
    `CHECK(stall_total >= 513 * dmas && stall_total <= 514 * dmas, "CPU stalled 513/514 cycles per DMA")
    `CHECK(irqs >= 3 && int'(dut.u_ram.mem[16'h12]) == irqs, $sformatf("frame IRQs: %0d, handled %0d", irqs, dut.u_ram.mem[16'h12]))
    `CHECK(ppudata_wr == 6, $sformatf("PPUDATA writes: %0d", ppudata_wr))
    `CHECK(s0_hits >= 4, $sformatf("sprite-0 hits: %0d", s0_hits))
    `CHECK(skips >= 2, $sformatf("odd-frame dot skips: %0d", skips))
    `CHECK(dut.u_ram.mem[16'h14] == 8'hAC, $sformatf("controller byte %h", dut.u_ram.mem[16'h14]))
    `CHECK(dut.u_ram.mem[16'h10] != 0, "main loop running")
    `CHECK(red == 64 && white == 8 && other == 0, $sformatf("VGA census red %0d white %0d other %0d", red, white, other))
    `CHECK(vbl_n >= 5 && vbl_bad == 0, $sformatf("VBlank windows: %0d, %0d not 2273-2274 CPU cycles", vbl_n, vbl_bad))
    `CHECK(audio_changes > 40, $sformatf("audio sample changes: %0d", audio_changes))
    `TB_DONE
  end
endmodule
