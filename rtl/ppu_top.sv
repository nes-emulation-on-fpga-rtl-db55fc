// Picture processing unit.
// Dot timing: 262 scanlines of 341 dots, one dot per PPU enable (master/4);
// lines 0-239 are visible (dots 1-256 carry pixels), 240 is idle, VBlank
// starts at line 241 dot 1 and line 261 is the pre-render line. On odd frames
// with rendering enabled the last dot of the pre-render line is skipped, which
// gives the 89341.5 PPU dots (29780.5 CPU cycles) per frame on average.
// Rendering works pixel by pixel: the background unit fetches the tile data of
// each dot, the sprite unit supplies the sprite pixel for the same x, the
// merger selects one and the palette turns it into a 6-bit colour (masked to
// grey when PPUMASK bit 0 is set) that is written, with the three PPUMASK
// emphasis bits, into the pixel buffer. The VGA generator shows the finished line
// during the next PPU line at twice the dot rate. The pixel path lags the dot
// counter by one dot (pixel x is written at dot x+2); the per-line and
// per-frame cycle counts are those of the original part.
// Memories: 2 KB nametable VRAM, 256-byte OAM and 32-byte palette are inside;
// the 8 KB CHR pattern memory is in the cartridge, reached through two read
// ports (A: background, B: sprites and PPUDATA reads).
module ppu_top #(
  parameter bit VGA_DOUBLE = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce_cpu,
  input  logic        ce_ppu,
  input  logic        ce_vga,
  input  logic [1:0]  phase,
  // CPU bus
  input  logic        cpu_sel,
  input  logic [2:0]  cpu_addr,
  input  logic        cpu_we,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  output logic        nmi,
  // cartridge
  input  logic        mirror_v,
  output logic [12:0] chr_addr_a,
  input  logic [7:0]  chr_rdata_a,
  output logic [12:0] chr_addr_b,
  input  logic [7:0]  chr_rdata_b,
  // VGA
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        vga_blank_n,
  output logic        vga_sync_n,
  output logic        vga_clk,
  output logic        vblank,
  // observation
  output logic [8:0]  line,
  output logic [8:0]  dot,
  output logic        frame_odd
);
  logic [7:0]  ctrl, mask;
  logic [14:0] v;
  logic [2:0]  fine_x;
  logic        rendering;
  assign rendering = mask[3] | mask[4];

  // ---------------- dot / line counters ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      line <= 9'd0; dot <= 9'd0; frame_odd <= 1'b0;
    end else if (ce_ppu) begin
      if (line == 9'd261 && dot == 9'd339 && frame_odd && rendering) begin
        dot <= 9'd0; line <= 9'd0; frame_odd <= 1'b0;
      end else if (dot == 9'd340) begin
        dot <= 9'd0;
        if (line == 9'd261) begin line <= 9'd0; frame_odd <= ~frame_odd; end
        else line <= line + 9'd1;
      end else dot <= dot + 9'd1;
    end
  end

  // ---------------- memories ----------------
  logic [13:0] r_addr;
  logic        r_vram_we, r_pal_we, r_oam_we;
  logic [7:0]  r_wdata, r_oam_addr;
  logic [7:0]  vram_rdata_b, oam_rdata_b, oam_rdata_a;
  logic [5:0]  pal_rdata_b, pal_rdata_a;
  logic [11:0] nt_addr;
  logic [7:0]  nt_rdata;
  logic [7:0]  spr_oam_addr;
  logic        spr_fetching;
  logic [12:0] spr_chr_addr;

  ppu_vram u_vram (
    .clk, .mirror_v, .addr_a(nt_addr), .rdata_a(nt_rdata),
    .addr_b(r_addr[11:0]), .we_b(r_vram_we), .wdata_b(r_wdata), .rdata_b(vram_rdata_b)
  );
  ppu_oam u_oam (
    .clk, .addr_a(spr_oam_addr), .rdata_a(oam_rdata_a),
    .addr_b(r_oam_addr), .we_b(r_oam_we), .wdata_b(r_wdata), .rdata_b(oam_rdata_b)
  );
  logic [4:0] pix_pal_addr;
  ppu_palette u_pal (
    .clk, .rst, .waddr(r_addr[4:0]), .we(r_pal_we), .wdata(r_wdata[5:0]),
    .raddr_a(pix_pal_addr), .rdata_a(pal_rdata_a),
    .raddr_b(r_addr[4:0]), .rdata_b(pal_rdata_b)
  );
  assign chr_addr_b = spr_fetching ? spr_chr_addr : r_addr[12:0];

  // ---------------- registers ----------------
  logic spr0_hit, spr_ovf, inc_x, inc_y, copy_h, copy_v;
  ppu_regs u_regs (
    .clk, .rst, .ce_cpu, .ce_ppu,
    .sel(cpu_sel), .addr(cpu_addr), .we(cpu_we), .wdata(cpu_wdata), .rdata(cpu_rdata),
    .line, .dot, .spr0_hit, .spr_ovf, .inc_x, .inc_y, .copy_h, .copy_v,
    .mem_addr(r_addr), .vram_we(r_vram_we), .mem_wdata(r_wdata),
    .vram_rdata(vram_rdata_b), .chr_rdata(chr_rdata_b),
    .pal_we(r_pal_we), .pal_rdata(pal_rdata_b),
    .oam_addr(r_oam_addr), .oam_we(r_oam_we), .oam_rdata(oam_rdata_b),
    .ctrl, .mask, .v, .fine_x, .nmi
  );

  // ---------------- renderers ----------------
  logic [3:0] bg_pixel, sp_pixel;
  logic       sp_priority, sp_zero, hit;
  logic [7:0] px;             // x of the pixel in the output stage
  logic       px_valid;
  assign px       = 8'(dot - 9'd2);
  assign px_valid = (line < 9'd240) && dot >= 9'd2 && dot <= 9'd257;

  ppu_bg u_bg (
    .clk, .rst, .ce_ppu, .phase, .line, .dot, .rendering, .bg_table(ctrl[4]),
    .v, .fine_x, .nt_addr, .nt_rdata, .pt_addr(chr_addr_a), .pt_rdata(chr_rdata_a),
    .bg_pixel, .inc_x, .inc_y, .copy_h, .copy_v
  );
  ppu_sprite u_spr (
    .clk, .rst, .ce_ppu, .line, .dot, .rendering, .spr_table(ctrl[3]), .spr_16(ctrl[5]),
    .oam_addr(spr_oam_addr), .oam_rdata(oam_rdata_a),
    .fetching(spr_fetching), .chr_addr(spr_chr_addr), .chr_rdata(chr_rdata_b),
    .x(px), .sp_pixel, .sp_priority, .sp_zero, .overflow(spr_ovf)
  );
  ppu_merge u_merge (
    .x(px), .bg_pixel, .sp_pixel, .sp_priority, .sp_zero, .mask,
    .pal_addr(pix_pal_addr), .sprite0_hit(hit)
  );
  assign spr0_hit = ce_ppu && px_valid && hit;

  // ---------------- pixel buffer and VGA ----------------
  logic [5:0] color;
  logic       buf_bank;
  logic [7:0] buf_addr;
  logic [8:0] buf_rdata;
  assign color = mask[0] ? (pal_rdata_a & 6'h30) : pal_rdata_a;

  ppu_linebuf u_buf (
    .clk, .we(ce_ppu && px_valid), .wbank(line[0]), .waddr(px), .wdata({mask[7:5], color}),
    .rbank(buf_bank), .raddr(buf_addr), .rdata(buf_rdata)
  );
  ppu_vga #(.DOUBLE(VGA_DOUBLE)) u_vga (
    .clk, .rst, .ce_vga, .ce_ppu, .row(line), .col(dot),
    .buf_bank, .buf_addr, .buf_rdata,
    .vga_r, .vga_g, .vga_b, .vga_hs, .vga_vs, .vga_blank_n, .vga_sync_n, .vga_clk, .vblank
  );
endmodule
