// Testbench of the palette RAM: writes all 32 entries and checks the mirrors
// ($10/$14/$18/$1C alias $00/$04/$08/$0C) and the other entries on both ports.
`include "tb_check.svh"
module tb_ppu_palette;
  `TB_COUNTERS
  logic clk = 0, rst = 1, we = 0;
  logic [4:0] wa = 0, ra = 0, rb = 0;
  logic [5:0] wd = 0, da, db;
  logic [5:0] ref_pal [32];
  ppu_palette dut (.clk, .rst, .waddr(wa), .we, .wdata(wd), .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)
  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 32; i++) begin
      wa = 5'(i); wd = 6'(i * 7 + 3); we = 1;
      @(posedge clk); #1;
      ref_pal[(i[1:0] == 0) ? (i & 15) : i] = 6'(i * 7 + 3);
    end
    we = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i); #1;
      `CHECK(da == ref_pal[(i[1:0] == 0) ? (i & 15) : i], $sformatf("entry %0d", i))
      `CHECK(db == ref_pal[((31 - i) % 4 == 0) ? ((31 - i) & 15) : 31 - i], $sformatf("port b entry %0d", 31 - i))
    end
    ra = 5'h10; #1; `CHECK(da == 6'(16 * 7 + 3), "$10 mirrors $00 (last write wins)")
    `TB_DONE
  end
endmodule
