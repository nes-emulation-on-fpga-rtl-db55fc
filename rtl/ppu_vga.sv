// VGA generator. Runs at twice the PPU dot rate (master/2) and shows each PPU
// scanline on two VGA lines of 341 dots, so the 15.7 kHz NES line rate becomes
// a 31.5 kHz VGA line rate and 262 PPU lines give 524 VGA lines at 60 Hz.
// During PPU line y it displays line y-1 from the pixel buffer: the first VGA
// line of the pair shows the pixels, the second is black (DOUBLE = 0, the
// CRT-like look) or repeats the line (DOUBLE = 1). Dots 0-255 of a VGA line are
// visible; the remaining 85 hold the horizontal blanking and sync. PPU lines
// 240-241 are blank and the vertical sync lies in the PPU lines after them.
// The pixel's 6-bit NES colour is turned into 8-bit R, G, B by a 64-entry
// table (a common approximation of the NES palette). The three PPUMASK
// emphasis bits stored with the pixel (bit 0 red, 1 green, 2 blue) dim each
// of the other two channels to 13/16, an approximation of the NTSC
// attenuation chosen by this design.
// Interface: row/col are the PPU line and dot, ce_vga the VGA dot enable;
// outputs are registered. Porch and sync positions are this design's choice.
module ppu_vga #(
  parameter bit DOUBLE = 1'b0,
  parameter int unsigned H_FP   = 8,    // dots after 256 before hsync
  parameter int unsigned H_SYNC = 40,
  parameter int unsigned V_SYNC_LINE = 250  // PPU line holding the vsync pulse
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce_vga,
  input  logic       ce_ppu,
  input  logic [8:0] row,
  input  logic [8:0] col,
  // pixel buffer read
  output logic       buf_bank,
  output logic [7:0] buf_addr,
  input  logic [8:0] buf_rdata,   // {emphasis, NES colour}
  // VGA pins
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       vga_hs,
  output logic       vga_vs,
  output logic       vga_blank_n,
  output logic       vga_sync_n,
  output logic       vga_clk,
  output logic       vblank
);
  logic [9:0] hx;      // VGA dot within the two-line pair, 0..681
  logic       half;
  logic [8:0] vx;      // dot within the VGA line
  logic       vis;
  logic [8:0] shown;   // PPU line being shown

  always_ff @(posedge clk) begin
    if (rst) hx <= '0;
    else if (ce_ppu && col == 9'd340) hx <= '0;       // resynchronise per PPU line
    else if (ce_vga && hx != 10'd681) hx <= hx + 10'd1;
  end
  assign half  = (hx >= 10'd341);
  assign vx    = half ? 9'(hx - 10'd341) : hx[8:0];
  assign shown = row - 9'd1;
  assign vis   = (row >= 9'd1) && (row <= 9'd240) && (vx < 9'd256) && (!half || DOUBLE);

  assign buf_bank = shown[0];   // only the bank bit of the shown line is needed
  assign buf_addr = vx[7:0];

  function automatic logic [23:0] nes_rgb(input logic [5:0] c);
    unique case (c)
      6'h00: return 24'h7C7C7C; 6'h01: return 24'h0000FC; 6'h02: return 24'h0000BC; 6'h03: return 24'h4428BC;
      6'h04: return 24'h940084; 6'h05: return 24'hA80020; 6'h06: return 24'hA81000; 6'h07: return 24'h881400;
      6'h08: return 24'h503000; 6'h09: return 24'h007800; 6'h0A: return 24'h006800; 6'h0B: return 24'h005800;
      6'h0C: return 24'h004058;
      6'h10: return 24'hBCBCBC; 6'h11: return 24'h0078F8; 6'h12: return 24'h0058F8; 6'h13: return 24'h6844FC;
      6'h14: return 24'hD800CC; 6'h15: return 24'hE40058; 6'h16: return 24'hF83800; 6'h17: return 24'hE45C10;
      6'h18: return 24'hAC7C00; 6'h19: return 24'h00B800; 6'h1A: return 24'h00A800; 6'h1B: return 24'h00A844;
      6'h1C: return 24'h008888;
      6'h20: return 24'hF8F8F8; 6'h21: return 24'h3CBCFC; 6'h22: return 24'h6888FC; 6'h23: return 24'h9878F8;
      6'h24: return 24'hF878F8; 6'h25: return 24'hF85898; 6'h26: return 24'hF87858; 6'h27: return 24'hFCA044;
      6'h28: return 24'hF8B800; 6'h29: return 24'hB8F818; 6'h2A: return 24'h58D854; 6'h2B: return 24'h58F898;
      6'h2C: return 24'h00E8D8; 6'h2D: return 24'h787878;
      6'h30: return 24'hFCFCFC; 6'h31: return 24'hA4E4FC; 6'h32: return 24'hB8B8F8; 6'h33: return 24'hD8B8F8;
      6'h34: return 24'hF8B8F8; 6'h35: return 24'hF8A4C0; 6'h36: return 24'hF0D0B0; 6'h37: return 24'hFCE0A8;
      6'h38: return 24'hF8D878; 6'h39: return 24'hD8F878; 6'h3A: return 24'hB8F8B8; 6'h3B: return 24'hB8F8D8;
      6'h3C: return 24'h00FCFC; 6'h3D: return 24'hF8D8F8;
      default: return 24'h000000;
    endcase
  endfunction

  function automatic logic [7:0] dim(input logic [7:0] v, input logic on);
    logic [11:0] p;
    p = 12'(v) * 12'd13;
    return on ? p[11:4] : v;
  endfunction

  function automatic logic [23:0] emphasise(input logic [23:0] rgb, input logic [2:0] e);
    return {dim(rgb[23:16], e[1] | e[2]), dim(rgb[15:8], e[0] | e[2]), dim(rgb[7:0], e[0] | e[1])};
  endfunction

  logic [23:0] px_rgb;
  assign px_rgb = emphasise(nes_rgb(buf_rdata[5:0]), buf_rdata[8:6]);

  // buffer data arrives one master cycle after the address, i.e. before the
  // next ce_vga, so it is sampled together with the dot's visibility
  always_ff @(posedge clk) begin
    if (rst) begin
      {vga_r, vga_g, vga_b} <= '0; vga_hs <= 1'b1; vga_vs <= 1'b1; vga_blank_n <= 1'b0;
      vga_clk <= 1'b0;
    end else begin
      vga_clk <= ~vga_clk;
      if (ce_vga) begin
        {vga_r, vga_g, vga_b} <= vis ? px_rgb : 24'h000000;
        vga_blank_n <= vis;
        vga_hs <= !(vx >= 9'(256 + H_FP) && vx < 9'(256 + H_FP + H_SYNC));
        vga_vs <= !(row == 9'(V_SYNC_LINE));
      end
    end
  end
  assign vga_sync_n = 1'b0;
  assign vblank     = (row >= 9'd240);
endmodule
