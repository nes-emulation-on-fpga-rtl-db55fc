// PPU register interface ($2000-$2007, mirrored through $3FFF).
//   $2000 PPUCTRL  nametable base, VRAM increment (+1/+32), sprite and
//                  background pattern tables, sprite size, NMI enable
//   $2001 PPUMASK  greyscale, left-column enables, background/sprite enables,
//                  colour emphasis
//   $2002 PPUSTATUS VBlank, sprite-0 hit, sprite overflow; reading clears
//                  VBlank and the write toggle
//   $2003 OAMADDR, $2004 OAMDATA (write increments OAMADDR)
//   $2005 PPUSCROLL, $2006 PPUADDR (two writes each, shared toggle w)
//   $2007 PPUDATA  VRAM/CHR read through a one-byte buffer (palette reads are
//                  direct), writes to VRAM or palette; v += 1 or 32 after
//                  each access
// Scrolling uses the loopy registers of the original PPU: v (current VRAM
// address), t (temporary address), x (fine X) and w (toggle). v is shared with
// the background renderer, which requests coarse-X and Y increments and
// t-to-v copies through the inc_x / inc_y / copy_h / copy_v inputs; this
// sharing is what makes mid-frame scroll changes work.
// CPU accesses take effect on the CPU enable; read data is registered then.
// VBlank is set at line 241 dot 1 and cleared with the sprite flags at line
// 261 (pre-render) dot 1. nmi = VBlank & PPUCTRL[7].
// Own choices: the corrupting increments of PPUDATA accesses during rendering
// and the $2002 read/VBlank-set race are not modelled.
module ppu_regs (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce_cpu,
  input  logic        ce_ppu,
  // CPU bus
  input  logic        sel,
  input  logic [2:0]  addr,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  // PPU timing and renderer feedback
  input  logic [8:0]  line,
  input  logic [8:0]  dot,
  input  logic        spr0_hit,
  input  logic        spr_ovf,
  input  logic        inc_x,
  input  logic        inc_y,
  input  logic        copy_h,
  input  logic        copy_v,
  // memories
  output logic [13:0] mem_addr,      // = v[13:0]
  output logic        vram_we,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  vram_rdata,
  input  logic [7:0]  chr_rdata,
  output logic        pal_we,
  input  logic [5:0]  pal_rdata,
  output logic [7:0]  oam_addr,
  output logic        oam_we,
  input  logic [7:0]  oam_rdata,
  // state for the renderers
  output logic [7:0]  ctrl,
  output logic [7:0]  mask,
  output logic [14:0] v,
  output logic [2:0]  fine_x,
  output logic        nmi
);
  logic [14:0] t;
  logic        w;
  logic        vblank, s0, ovf;
  logic [7:0]  rbuf;

  logic cpu_wr, cpu_rd;
  assign cpu_wr = ce_cpu && sel && we;
  assign cpu_rd = ce_cpu && sel && !we;

  assign mem_addr  = v[13:0];
  assign mem_wdata = wdata;
  assign vram_we   = cpu_wr && addr == 3'd7 && v[13:12] == 2'b10;
  assign pal_we    = cpu_wr && addr == 3'd7 && v[13:8] == 6'h3F;
  assign oam_we    = cpu_wr && addr == 3'd4;
  assign nmi       = vblank && ctrl[7];

  logic [14:0] v_inc;
  assign v_inc = v + (ctrl[2] ? 15'd32 : 15'd1);

  // coarse X / Y increments of the renderer (loopy scheme)
  function automatic logic [14:0] incx(input logic [14:0] a);
    logic [14:0] r = a;
    if (a[4:0] == 5'd31) begin r[4:0] = 5'd0; r[10] = ~a[10]; end
    else r[4:0] = a[4:0] + 5'd1;
    return r;
  endfunction
  function automatic logic [14:0] incy(input logic [14:0] a);
    logic [14:0] r = a;
    if (a[14:12] != 3'd7) r[14:12] = a[14:12] + 3'd1;
    else begin
      r[14:12] = 3'd0;
      if (a[9:5] == 5'd29) begin r[9:5] = 5'd0; r[11] = ~a[11]; end
      else if (a[9:5] == 5'd31) r[9:5] = 5'd0;
      else r[9:5] = a[9:5] + 5'd1;
    end
    return r;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0; mask <= '0; v <= '0; t <= '0; fine_x <= '0; w <= 1'b0;
      vblank <= 1'b0; s0 <= 1'b0; ovf <= 1'b0; rbuf <= '0; oam_addr <= '0;
      rdata <= '0;
    end else begin
      // ---- PPU-side events ----
      if (ce_ppu) begin
        if (line == 9'd241 && dot == 9'd1) vblank <= 1'b1;
        if (line == 9'd261 && dot == 9'd1) begin vblank <= 1'b0; s0 <= 1'b0; ovf <= 1'b0; end
        if (spr0_hit) s0 <= 1'b1;
        if (spr_ovf)  ovf <= 1'b1;
        if (inc_x)  v <= incx(v);
        if (inc_y)  v <= incy(v);
        if (copy_h) begin v[10] <= t[10]; v[4:0] <= t[4:0]; end
        if (copy_v) begin v[14:11] <= t[14:11]; v[9:5] <= t[9:5]; end
      end
      // ---- CPU writes ----
      if (cpu_wr) begin
        unique case (addr)
          3'd0: begin ctrl <= wdata; t[11:10] <= wdata[1:0]; end
          3'd1: mask <= wdata;
          3'd3: oam_addr <= wdata;
          3'd4: oam_addr <= oam_addr + 8'd1;
          3'd5: begin
            if (!w) begin t[4:0] <= wdata[7:3]; fine_x <= wdata[2:0]; end
            else begin t[14:12] <= wdata[2:0]; t[9:5] <= wdata[7:3]; end
            w <= ~w;
          end
          3'd6: begin
            if (!w) begin t[13:8] <= wdata[5:0]; t[14] <= 1'b0; end
            else begin t[7:0] <= wdata; v <= {t[14:8], wdata}; end
            w <= ~w;
          end
          3'd7: v <= v_inc;
          default: ;
        endcase
      end
      // ---- CPU reads ----
      if (cpu_rd) begin
        unique case (addr)
          3'd2: begin
            rdata  <= {vblank, s0, ovf, 5'b00000};
            vblank <= 1'b0;
            w      <= 1'b0;
          end
          3'd4: rdata <= oam_rdata;
          3'd7: begin
            if (v[13:8] == 6'h3F) rdata <= {2'b00, pal_rdata};
            else                  rdata <= rbuf;
            rbuf <= v[13] ? vram_rdata : chr_rdata;
            v    <= v_inc;
          end
          default: rdata <= 8'h00;
        endcase
      end
    end
  end
endmodule
