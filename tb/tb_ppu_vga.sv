// Testbench of the VGA generator, for both line modes (second VGA line black
// or repeated). A pixel-buffer model returns, one cycle after the address, a
// colour that depends on the address and bank. Over a frame the test checks
// the number and width of horizontal sync pulses (two VGA lines per PPU line),
// the vertical sync width, that every visible run is 256 dots long, the total
// number of visible dots, and the RGB values of known NES colours, with and
// without colour emphasis.
`include "tb_check.svh"
module tb_ppu_vga;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic [1:0] phase = 0;
  logic ce_ppu, ce_vga;
  logic [8:0] row = 0, col = 0;
  assign ce_ppu = (phase == 2'd3);
  assign ce_vga = phase[0];
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000000)
  always_ff @(posedge clk) if (!rst) begin
    phase <= phase + 2'd1;
    if (ce_ppu) begin
      if (col == 9'd340) begin col <= 0; row <= (row == 9'd261) ? 9'd0 : row + 9'd1; end
      else col <= col + 9'd1;
    end
  end
  // colours 0x30 white, 0x0F black, 0x21 light blue, 0x16 red
  localparam logic [5:0]  PAL [4] = '{6'h30, 6'h0F, 6'h21, 6'h16};
  // the buffer model also stores emphasis bits {blue, green, red}; the
  // expected colours below are the plain ones with each channel that another
  // emphasis bit dims scaled by 13/16 and rounded down
  localparam logic [2:0]  EMP [4] = '{3'b000, 3'b001, 3'b110, 3'b010};
  localparam logic [23:0] RGB [4] = '{24'hFCFCFC, 24'h000000, 24'h3098CC, 24'hC93800};

  logic [7:0] r [2], g [2], b [2];
  logic hs [2], vs [2], bl [2], sy [2], vc [2], vb [2];
  logic bank [2]; logic [7:0] baddr [2]; logic [8:0] bdata [2];
  for (genvar d = 0; d < 2; d++) begin : g_dut
    ppu_vga #(.DOUBLE(d)) dut (.clk, .rst, .ce_vga, .ce_ppu, .row, .col,
      .buf_bank(bank[d]), .buf_addr(baddr[d]), .buf_rdata(bdata[d]),
      .vga_r(r[d]), .vga_g(g[d]), .vga_b(b[d]), .vga_hs(hs[d]), .vga_vs(vs[d]),
      .vga_blank_n(bl[d]), .vga_sync_n(sy[d]), .vga_clk(vc[d]), .vblank(vb[d]));
    always_ff @(posedge clk) bdata[d] <= {EMP[2'(baddr[d] + 8'(bank[d]))], PAL[2'(baddr[d] + 8'(bank[d]))]};

    int hs_n, hs_bad, vs_w, vs_n, vis_n, run, run_bad, col_bad, k;
    logic hs_q, vs_q, bl_q, active;
    int hs_w;
    initial begin hs_n = 0; hs_bad = 0; vs_w = 0; vs_n = 0; vis_n = 0; run = 0; run_bad = 0; col_bad = 0;
                  hs_q = 1; vs_q = 1; bl_q = 0; active = 0; hs_w = 0; end
    always @(posedge clk) if (active && ce_vga) begin
      if (!hs[d]) hs_w++;
      if (hs[d] && !hs_q) begin hs_n++; if (hs_w != 40) hs_bad++; hs_w = 0; end
      if (!vs[d]) vs_w++;
      if (vs[d] && !vs_q) vs_n++;
      if (bl[d]) begin
        if (!bl_q) run = 0;
        if ({r[d], g[d], b[d]} != RGB[2'(run + int'(row - 9'd1) % 2)]) col_bad++;
        run++; vis_n++;
      end else if (bl_q && run != 256) run_bad++;
      hs_q = hs[d]; vs_q = vs[d]; bl_q = bl[d];
    end
  end

  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (row == 9'd1 && col == 9'd0);
    g_dut[0].active = 1; g_dut[1].active = 1;
    wait (row == 9'd0); wait (row == 9'd1 && col == 9'd0);
    g_dut[0].active = 0; g_dut[1].active = 0;
    for (int d = 0; d < 2; d++) begin
      int hn, hb, vw, vn, vi, rb, cb;
      if (d == 0) begin hn = g_dut[0].hs_n; hb = g_dut[0].hs_bad; vw = g_dut[0].vs_w; vn = g_dut[0].vs_n; vi = g_dut[0].vis_n; rb = g_dut[0].run_bad; cb = g_dut[0].col_bad; end
      else        begin hn = g_dut[1].hs_n; hb = g_dut[1].hs_bad; vw = g_dut[1].vs_w; vn = g_dut[1].vs_n; vi = g_dut[1].vis_n; rb = g_dut[1].run_bad; cb = g_dut[1].col_bad; end
      `CHECK(hn == 524 && hb == 0, $sformatf("mode %0d: %0d hsync pulses, %0d wrong width", d, hn, hb))
      `CHECK(vn == 1 && vw == 682, $sformatf("mode %0d: vsync %0d pulses, %0d dots", d, vn, vw))
      `CHECK(vi == (d ? 480 : 240) * 256, $sformatf("mode %0d: %0d visible dots", d, vi))
      `CHECK(rb == 0, $sformatf("mode %0d: %0d visible runs not 256 long", d, rb))
      `CHECK(cb == 0, $sformatf("mode %0d: %0d wrong colours", d, cb))
    end
    `CHECK(sy[0] == 1'b0, "composite sync pin unused (low)")
    `TB_DONE
  end
endmodule
