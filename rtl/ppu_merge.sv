// Pixel merger: combines the background and sprite pixels of one screen x.
// Applies the PPUMASK enables (background, sprites) and their left-column
// (x < 8) enables, picks the sprite when it is opaque and either in front of
// the background or the background is transparent, and forms the palette RAM
// address {sprite, palette, colour} (0 = backdrop when both are transparent).
// Sprite-0 hit is flagged when an opaque sprite-0 pixel overlaps an opaque
// background pixel at x != 255. Combinational.
module ppu_merge (
  input  logic [7:0] x,
  input  logic [3:0] bg_pixel,
  input  logic [3:0] sp_pixel,
  input  logic       sp_priority,    // 1: behind background
  input  logic       sp_zero,
  input  logic [7:0] mask,           // PPUMASK
  output logic [4:0] pal_addr,
  output logic       sprite0_hit
);
  logic bg_on, sp_on, bg_opq, sp_opq;
  assign bg_on  = mask[3] && (x >= 8'd8 || mask[1]);
  assign sp_on  = mask[4] && (x >= 8'd8 || mask[2]);
  assign bg_opq = bg_on && bg_pixel[1:0] != 2'b00;
  assign sp_opq = sp_on && sp_pixel[1:0] != 2'b00;

  always_comb begin
    if (sp_opq && (!sp_priority || !bg_opq)) pal_addr = {1'b1, sp_pixel};
    else if (bg_opq)                         pal_addr = {1'b0, bg_pixel};
    else                                     pal_addr = 5'd0;
  end
  assign sprite0_hit = sp_zero && sp_opq && bg_opq && x != 8'd255;
endmodule
