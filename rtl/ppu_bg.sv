// Background pixel unit.
// Works out the background pixel of each visible dot directly from memory
// instead of through the original shift-register pipeline: during the four
// master cycles of dot d (x = d-1) it reads the nametable byte at v, the
// attribute byte, and the two pattern-table bit planes of the tile row given by
// v's fine Y, one read per master cycle (each read's data arrives one cycle
// later). At the start of the next dot it outputs bg_pixel = {palette, colour}
// for x, so the pixel stream lags the dot counter by one dot.
// Scrolling follows the original PPU's use of the shared v register: fine X
// starts at the x register on each line and coarse X is incremented every 8
// pixels; at dot 256 Y is incremented, at dot 257 the horizontal bits are
// copied from t, and on the pre-render line (261) the vertical bits are copied
// during dots 280-304. These requests (inc_x, inc_y, copy_h, copy_v) are
// executed by the register block, and only when rendering is enabled.
module ppu_bg (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce_ppu,
  input  logic [1:0]  phase,
  input  logic [8:0]  line,
  input  logic [8:0]  dot,
  input  logic        rendering,     // background or sprites enabled
  input  logic        bg_table,      // PPUCTRL[4]
  input  logic [14:0] v,
  input  logic [2:0]  fine_x,
  // nametable / attribute reads (VRAM port A)
  output logic [11:0] nt_addr,
  input  logic [7:0]  nt_rdata,
  // pattern reads (CHR port A)
  output logic [12:0] pt_addr,
  input  logic [7:0]  pt_rdata,
  // pixel output, valid from the start of dot d+1 for x = d-1
  output logic [3:0]  bg_pixel,
  output logic        inc_x,
  output logic        inc_y,
  output logic        copy_h,
  output logic        copy_v
);
  logic [7:0] tile, attr, plo;
  logic [2:0] fx;         // fine X of the current pixel
  logic [2:0] fx_px;      // fine X used for the pixel being assembled
  logic [1:0] pal_px;
  logic       fetch_dot;  // this dot renders a visible pixel
  logic       visible_line;

  assign visible_line = (line < 9'd240);
  assign fetch_dot    = visible_line && dot >= 9'd1 && dot <= 9'd256;

  // attribute quadrant of the current coarse position
  logic [1:0] pal_sel;
  always_comb begin
    unique case ({v[6], v[1]})
      2'b00: pal_sel = attr[1:0];
      2'b01: pal_sel = attr[3:2];
      2'b10: pal_sel = attr[5:4];
      default: pal_sel = attr[7:6];
    endcase
  end

  // address sequence within a dot: NT, AT, pattern low, pattern high
  always_comb begin
    // attribute byte of the 32x32 area: $23C0 | NT | (coarse Y/4)<<3 | coarse X/4
    nt_addr = (phase == 2'd1) ? {v[11:10], 4'b1111, v[9:7], v[4:2]} : v[11:0];
    pt_addr = {bg_table, tile, phase == 2'd3, v[14:12]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tile <= '0; attr <= '0; plo <= '0; fx <= '0; fx_px <= '0; pal_px <= '0;
      bg_pixel <= '0;
    end else begin
      unique case (phase)
        2'd1: tile <= nt_rdata;               // NT byte (address of phase 0)
        2'd2: attr <= nt_rdata;               // AT byte (address of phase 1)
        2'd3: plo  <= pt_rdata;               // low plane (address of phase 2)
        default: ;
      endcase
      if (phase == 2'd3) begin
        // end of dot: remember which pixel of the tile this was
        fx_px  <= fx;
        pal_px <= pal_sel;
      end
      // phase 0 of the next dot: high plane is on pt_rdata
      if (phase == 2'd0) begin
        bg_pixel <= {pal_px, pt_rdata[3'd7 - fx_px], plo[3'd7 - fx_px]};
      end
      if (ce_ppu) begin
        if (dot == 9'd0) fx <= fine_x;
        else if (fetch_dot) fx <= fx + 3'd1;
      end
    end
  end

  always_comb begin
    inc_x  = ce_ppu && rendering && fetch_dot && fx == 3'd7;
    inc_y  = ce_ppu && rendering && visible_line && dot == 9'd256;
    copy_h = ce_ppu && rendering && (visible_line || line == 9'd261) && dot == 9'd257;
    copy_v = ce_ppu && rendering && line == 9'd261 && dot >= 9'd280 && dot <= 9'd304;
  end
endmodule
