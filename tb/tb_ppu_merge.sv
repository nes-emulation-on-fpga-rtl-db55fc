// Testbench of the pixel merger: exhaustive over background/sprite colour and
// palette bits, priority, sprite-0 and x near the left edge and 255, for a few
// PPUMASK settings, against the NES priority rules written independently here.
`include "tb_check.svh"
module tb_ppu_merge;
  `TB_COUNTERS
  logic [7:0] x, mask;
  logic [3:0] bg, sp;
  logic pri, s0, hit;
  logic [4:0] pa;
  ppu_merge dut (.x, .bg_pixel(bg), .sp_pixel(sp), .sp_priority(pri), .sp_zero(s0), .mask, .pal_addr(pa), .sprite0_hit(hit));
  logic clk = 0;
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  initial begin
    logic [7:0] masks [4] = '{8'h1E, 8'h18, 8'h08, 8'h10};
    logic [7:0] xs [4] = '{8'd0, 8'd7, 8'd100, 8'd255};
    foreach (masks[m]) foreach (xs[k]) for (int i = 0; i < 1024; i++) begin
      logic bgv, spv; logic [4:0] e; logic eh;
      mask = masks[m]; x = xs[k];
      {bg, sp, pri, s0} = 10'(i);
      #1;
      bgv = mask[3] && (mask[1] || x >= 8) && bg[1:0] != 0;
      spv = mask[4] && (mask[2] || x >= 8) && sp[1:0] != 0;
      if (spv && !(pri && bgv)) e = {1'b1, sp};
      else if (bgv) e = {1'b0, bg};
      else e = 5'd0;
      eh = s0 && spv && bgv && x != 255;
      `CHECK(pa == e && hit == eh, $sformatf("mask %h x %0d bg %h sp %h pri %b s0 %b -> %h/%b", mask, x, bg, sp, pri, s0, pa, hit))
    end
    `TB_DONE
  end
endmodule
