// Testbench of the background pixel unit together with the register block
// that owns the scroll registers. Nametable and pattern memories are random
// and respond one master cycle after the address, as the block RAMs do. For
// several scroll positions, nametable selections and pattern tables the test
// renders one frame from the pre-render line and compares every background
// pixel of the visible lines with a reference built from the scroll position
// by plain arithmetic (world coordinate -> nametable, tile, attribute, bit).
`include "tb_check.svh"
module tb_ppu_bg;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce_cpu = 0, ce_ppu;
  logic [1:0] phase = 0;
  logic sel = 0, we = 0; logic [2:0] addr = 0; logic [7:0] wdata = 0, rdata;
  logic [8:0] line = 261, dot = 0;
  logic inc_x, inc_y, copy_h, copy_v;
  logic [13:0] mem_addr; logic vram_we, pal_we, oam_we; logic [7:0] mem_wdata, oam_addr, ctrl, mask;
  logic [14:0] v; logic [2:0] fine_x; logic nmi;
  logic [11:0] nt_addr; logic [12:0] pt_addr; logic [7:0] nt_rdata, pt_rdata;
  logic [3:0] bg_pixel;
  logic [7:0] nt_mem [2048];
  logic [7:0] chr_mem [8192];

  assign ce_ppu = (phase == 2'd3);
  ppu_regs regs (.clk, .rst, .ce_cpu, .ce_ppu, .sel, .addr, .we, .wdata, .rdata,
    .line, .dot, .spr0_hit(1'b0), .spr_ovf(1'b0), .inc_x, .inc_y, .copy_h, .copy_v,
    .mem_addr, .vram_we, .mem_wdata, .vram_rdata(8'h00), .chr_rdata(8'h00), .pal_we,
    .pal_rdata(6'h00), .oam_addr, .oam_we, .oam_rdata(8'h00), .ctrl, .mask, .v, .fine_x, .nmi);
  ppu_bg dut (.clk, .rst, .ce_ppu, .phase, .line, .dot, .rendering(mask[3] | mask[4]),
    .bg_table(ctrl[4]), .v, .fine_x, .nt_addr, .nt_rdata, .pt_addr, .pt_rdata,
    .bg_pixel, .inc_x, .inc_y, .copy_h, .copy_v);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000000)

  always_ff @(posedge clk) begin
    nt_rdata <= nt_mem[{nt_addr[10], nt_addr[9:0]}];   // vertical mirroring
    pt_rdata <= chr_mem[pt_addr];
    if (!rst) begin
      phase <= phase + 2'd1;
      if (ce_ppu) begin
        if (dot == 9'd340) begin dot <= 0; line <= (line == 9'd261) ? 9'd0 : line + 9'd1; end
        else dot <= dot + 9'd1;
      end
    end
  end

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); sel = 1; we = 1; addr = a; wdata = d; ce_cpu = 1;
    @(negedge clk); sel = 0; we = 0; ce_cpu = 0;
  endtask

  function automatic logic [3:0] ref_pixel(int x, int y, int sx, int sy, int nt, int tbl);
    int wx, wy, n, col, row, fy, fx, a, at, tl, sh;
    wx = (sx + 256 * (nt & 1) + x) % 512;
    wy = (sy + 240 * (nt >> 1) + y) % 480;
    n = (wx / 256) + 2 * (wy / 240);
    col = (wx % 256) / 8; row = (wy % 240) / 8; fx = wx % 8; fy = wy % 8;
    a = (n & 1) * 1024;                       // vertical mirroring
    tl = nt_mem[a + row * 32 + col];
    at = nt_mem[a + 960 + (row / 4) * 8 + col / 4];
    sh = ((row & 2) << 1) | (col & 2);
    return {2'((at >> sh) & 3), chr_mem[tbl * 4096 + tl * 16 + fy + 8][7 - fx],
            chr_mem[tbl * 4096 + tl * 16 + fy][7 - fx]};
  endfunction

  int sxs[4] = '{0, 3, 133, 255};
  int sys[4] = '{0, 5, 100, 239};
  int cur_sx, cur_sy, cur_nt, cur_tbl, frame_errs, frame_px;
  logic checking = 0;
  always @(posedge clk) if (checking && ce_ppu && line < 240 && dot >= 2 && dot <= 257) begin
    logic [3:0] e;
    frame_px++;
    e = ref_pixel(int'(dot) - 2, int'(line), cur_sx, cur_sy, cur_nt, cur_tbl);
    if (bg_pixel !== e) begin
      frame_errs++;
      if (frame_errs < 5) $display("mismatch line %0d x %0d: %h expected %h", line, dot - 2, bg_pixel, e);
    end
  end

  initial begin
    foreach (nt_mem[i]) nt_mem[i] = 8'($urandom);
    foreach (chr_mem[i]) chr_mem[i] = 8'($urandom);
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 4; k++) begin
      // wait for the VBlank region, program the scroll
      wait (line == 9'd245);
      cur_sx = sxs[k]; cur_sy = sys[(k + 1) % 4]; cur_nt = k; cur_tbl = k & 1;
      wr(3'd2, 8'h00);
      wr(3'd3, 8'h00);
      rdata = 0;
      wr(3'd0, 8'(cur_tbl << 4 | cur_nt));
      wr(3'd1, 8'h0A);
      sel = 1; we = 0; addr = 3'd2; ce_cpu = 1; @(negedge clk); sel = 0; ce_cpu = 0;
      wr(3'd5, 8'(cur_sx));
      wr(3'd5, 8'(cur_sy));
      wait (line == 9'd0);
      frame_errs = 0; frame_px = 0; checking = 1;
      wait (line == 9'd240);
      checking = 0;
      `CHECK(frame_px == 240 * 256, "all visible pixels compared")
      `CHECK(frame_errs == 0, $sformatf("frame sx=%0d sy=%0d nt=%0d tbl=%0d: %0d pixel mismatches",
             cur_sx, cur_sy, cur_nt, cur_tbl, frame_errs))
    end
    `TB_DONE
  end
endmodule
