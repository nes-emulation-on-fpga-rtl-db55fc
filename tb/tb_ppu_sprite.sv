// Testbench of the sprite pixel unit. OAM and pattern memory are random models
// with one-cycle read latency. For 8x8 and 8x16 sprites and two pattern
// tables, the PPU dot/line counters are run over a frame and, for every x of
// every visible line, the sprite pixel, priority and sprite-0 outputs are
// compared with a reference that picks the first eight in-range sprites in OAM
// order and the first opaque one at x (flips applied). The overflow pulse is
// compared with the number of lines having more than eight sprites.
`include "tb_check.svh"
module tb_ppu_sprite;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce_ppu;
  logic [1:0] phase = 0;
  logic [8:0] line = 261, dot = 0;
  logic rendering = 1, spr_table = 0, spr_16 = 0;
  logic [7:0] oam_addr, oam_rdata, chr_rdata, x;
  logic [12:0] chr_addr;
  logic fetching, sp_priority, sp_zero, overflow;
  logic [3:0] sp_pixel;
  logic [7:0] oam [256];
  logic [7:0] chr [8192];
  assign ce_ppu = (phase == 2'd3);
  assign x = (dot >= 1 && dot <= 256) ? 8'(dot - 1) : 8'd0;
  ppu_sprite #(.MAX_SPR(8)) dut (.clk, .rst, .ce_ppu, .line, .dot, .rendering, .spr_table, .spr_16,
    .oam_addr, .oam_rdata, .fetching, .chr_addr, .chr_rdata, .x, .sp_pixel, .sp_priority,
    .sp_zero, .overflow);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000000)
  always_ff @(posedge clk) begin
    oam_rdata <= oam[oam_addr];
    chr_rdata <= chr[chr_addr];
    if (!rst) begin
      phase <= phase + 2'd1;
      if (ce_ppu) begin
        if (dot == 9'd340) begin dot <= 0; line <= (line == 9'd261) ? 9'd0 : line + 9'd1; end
        else dot <= dot + 9'd1;
      end
    end
  end

  // reference sprite pixel for (px, ln)
  function automatic logic [5:0] ref_px(int px, int ln);
    int cnt = 0, h = spr_16 ? 16 : 8;
    if (ln == 0) return 6'd0;
    for (int i = 0; i < 64 && cnt < 8; i++) begin
      int y = oam[4 * i], r, off, tbl, tl, b;
      logic [7:0] at;
      if (ln - 1 - y >= 0 && ln - 1 - y < h) begin
        cnt++;
        at = oam[4 * i + 2];
        r = ln - 1 - y; if (at[7]) r = h - 1 - r;
        off = px - oam[4 * i + 3];
        if (off >= 0 && off < 8) begin
          if (at[6]) off = 7 - off;
          tl = oam[4 * i + 1]; tbl = spr_table;
          if (spr_16) begin tbl = tl & 1; tl = (tl & 8'hFE) | (r >> 3); end
          b = {chr[tbl * 4096 + tl * 16 + (r & 7) + 8][7 - off], chr[tbl * 4096 + tl * 16 + (r & 7)][7 - off]};
          if (b != 0) return {i == 0, at[5], at[1:0], 2'(b)};
        end
      end
    end
    return 6'd0;
  endfunction
  function automatic int ovf_lines();
    int n = 0;
    for (int ln = 0; ln < 240; ln++) begin
      int cnt = 0;
      for (int i = 0; i < 64; i++) if (ln - oam[4 * i] >= 0 && ln - oam[4 * i] < (spr_16 ? 16 : 8)) cnt++;
      if (cnt > 8) n++;
    end
    return n;
  endfunction

  int errs, px_checked, ovf_seen, nonzero;
  logic checking = 0;
  always @(posedge clk) if (checking) begin
    if (overflow) ovf_seen++;
    if (ce_ppu && line < 240 && dot >= 1 && dot <= 256) begin
      logic [5:0] e;
      e = ref_px(int'(x), int'(line));
      px_checked++;
      if (e[1:0] != 0) nonzero++;
      if ({sp_zero, sp_priority, sp_pixel} !== e && !(e[1:0] == 0 && sp_pixel[1:0] == 0)) begin
        errs++;
        if (errs < 5) $display("line %0d x %0d: got %b expected %b", line, x, {sp_zero, sp_priority, sp_pixel}, e);
      end
    end
  end

  initial begin
    foreach (chr[i]) chr[i] = 8'($urandom);
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 4; k++) begin
      wait (line == 9'd245);
      spr_16 = k[0]; spr_table = k[1];
      for (int i = 0; i < 64; i++) begin
        // cluster a third of the sprites on a band so that some lines overflow
        oam[4 * i]     = (i % 3 == 0) ? 8'(100 + $urandom_range(0, 6)) : 8'($urandom_range(0, 250));
        oam[4 * i + 1] = 8'($urandom);
        oam[4 * i + 2] = 8'($urandom) & 8'hE3;
        oam[4 * i + 3] = 8'($urandom);
      end
      wait (line == 9'd261);
      errs = 0; px_checked = 0; ovf_seen = 0; nonzero = 0; checking = 1;
      wait (line == 9'd240);
      checking = 0;
      `CHECK(px_checked == 240 * 256 && nonzero > 1000, $sformatf("pixels compared %0d, opaque %0d", px_checked, nonzero))
      `CHECK(errs == 0, $sformatf("mode %0d: %0d sprite pixel mismatches", k, errs))
      `CHECK(ovf_seen == ovf_lines() && ovf_seen > 0, $sformatf("overflow pulses %0d expected %0d", ovf_seen, ovf_lines()))
    end
    `TB_DONE
  end
endmodule
