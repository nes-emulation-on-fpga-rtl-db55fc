// Testbench of the complete PPU. The CPU side is driven through the register
// port: the palette, one nametable tile and sprite 0 are written through
// $2006/$2007 and $2003/$2004, then rendering is enabled. A CHR model holds an
// opaque tile. Checks: PPUDATA read-back, one NMI per frame, frame lengths of
// 89342 and 89341 dots on alternating frames (odd-frame dot skip), sprite-0
// hit in $2002, and the exact number of white (background), red (sprite) and
// backdrop pixels seen on the VGA output in a frame.
`include "tb_check.svh"
module tb_ppu_top;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic [3:0] cnt = 0;
  logic ce_cpu, ce_ppu, ce_vga; logic [1:0] phase;
  logic sel = 0, we = 0; logic [2:0] addr = 0; logic [7:0] wdata = 0, rdata;
  logic nmi, vblank, frame_odd, mirror_v = 1;
  logic [12:0] ca, cb; logic [7:0] cda, cdb;
  logic [7:0] vr, vg, vb; logic hs, vs, bln, syn, vclk;
  logic [8:0] line, dot;
  logic [7:0] chr [8192];
  assign ce_cpu = (cnt == 4'd11);
  assign ce_ppu = (cnt[1:0] == 2'd3);
  assign ce_vga = cnt[0];
  assign phase  = cnt[1:0];
  always_ff @(posedge clk) begin
    cnt <= (cnt == 4'd11) ? 4'd0 : cnt + 4'd1;
    cda <= chr[ca]; cdb <= chr[cb];
  end
  ppu_top dut (.clk, .rst, .ce_cpu, .ce_ppu, .ce_vga, .phase, .cpu_sel(sel), .cpu_addr(addr),
    .cpu_we(we), .cpu_wdata(wdata), .cpu_rdata(rdata), .nmi, .mirror_v,
    .chr_addr_a(ca), .chr_rdata_a(cda), .chr_addr_b(cb), .chr_rdata_b(cdb),
    .vga_r(vr), .vga_g(vg), .vga_b(vb), .vga_hs(hs), .vga_vs(vs), .vga_blank_n(bln),
    .vga_sync_n(syn), .vga_clk(vclk), .vblank, .line, .dot, .frame_odd);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000000)

  // CPU cycle access (register sampled on ce_cpu)
  task automatic acc(input logic w, input logic [2:0] a, input logic [7:0] d, output logic [7:0] q);
    @(negedge clk); while (!ce_cpu) @(negedge clk);
    sel = 1; we = w; addr = a; wdata = d;
    @(negedge clk); sel = 0; we = 0; q = rdata;
  endtask
  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    logic [7:0] q; acc(1, a, d, q);
  endtask
  task automatic rd(input logic [2:0] a, output logic [7:0] q);
    acc(0, a, 8'h00, q);
  endtask

  // frame measurement and pixel census
  int nmi_n = 0, dots = 0, len [$];
  int white = 0, red = 0, black = 0, other = 0;
  logic nmi_q = 0, census = 0;
  always @(posedge clk) begin
    if (ce_ppu) dots++;
    if (nmi && !nmi_q) begin nmi_n++; len.push_back(dots); dots = 0; end
    nmi_q = nmi;
    if (census && ce_vga && bln) begin
      if ({vr, vg, vb} == 24'hFCFCFC) white++;
      else if ({vr, vg, vb} == 24'hF83800) red++;
      else if ({vr, vg, vb} == 24'h000000) black++;
      else other++;
    end
  end

  initial begin
    logic [7:0] q;
    foreach (chr[i]) chr[i] = 8'h00;
    for (int i = 16; i < 32; i++) chr[i] = 8'hFF;      // tile 1: colour 3 everywhere
    repeat (3) @(posedge clk); #1 rst = 0;
    // palette: backdrop black, bg colour 3 white, sprite colour 3 red
    wr(6, 8'h3F); wr(6, 8'h00); wr(7, 8'h0F); wr(7, 8'h00); wr(7, 8'h00); wr(7, 8'h30);
    wr(6, 8'h3F); wr(6, 8'h13); wr(7, 8'h16);
    // clear nametable 0 and place tile 1 at row 2 column 4
    wr(6, 8'h20); wr(6, 8'h00);
    for (int i = 0; i < 1024; i++) wr(7, 8'h00);
    wr(6, 8'h20); wr(6, 8'h44); wr(7, 8'h01);
    // read back through the buffer
    wr(6, 8'h20); wr(6, 8'h44); rd(7, q); rd(7, q);
    `CHECK(q == 8'h01, "PPUDATA buffered read-back of the nametable")
    wr(6, 8'h3F); wr(6, 8'h03); rd(7, q);
    `CHECK(q[5:0] == 6'h30, "palette read-back")
    // OAM: sprite 0 at y=15 (line 16), tile 1, in front, x = 36; others off-screen
    wr(3, 8'h00);
    for (int i = 0; i < 64; i++) begin
      if (i == 0) begin wr(4, 8'd15); wr(4, 8'd1); wr(4, 8'h00); wr(4, 8'd36); end
      else begin wr(4, 8'hF0); wr(4, 8'h00); wr(4, 8'h00); wr(4, 8'h00); end
    end
    wr(6, 8'h00); wr(6, 8'h00);
    wr(5, 8'h00); wr(5, 8'h00);
    wr(0, 8'h80);                                    // NMI on, tables at $0000
    wr(1, 8'h1E);                                    // show bg and sprites everywhere
    // let two frames start, then take a census over one full frame
    wait (nmi_n == 2);
    rd(2, q);
    `CHECK(q[6] == 1'b1, "sprite-0 hit flag set during the frame")
    wait (line == 9'd0 && dot == 9'd0);
    wait (line == 9'd1); census = 1;
    wait (line == 9'd0); wait (line == 9'd1); census = 0;
    `CHECK(white == 32 && red == 64 && other == 0 && black == 240 * 256 - 96,
           $sformatf("pixel census white %0d red %0d black %0d other %0d", white, red, black, other))
    wait (nmi_n == 6);
    `CHECK(len[3] + len[4] == 2 * 89342 - 1 && (len[3] == 89341 || len[3] == 89342),
           $sformatf("frame lengths %0d %0d dots", len[3], len[4]))
    wr(1, 8'h00);
    wait (nmi_n == 9);
    `CHECK(len[7] == 89342 && len[8] == 89342, "no dot skip with rendering off")
    `CHECK(nmi_n == 9, "one NMI per frame")
    `TB_DONE
  end
endmodule
