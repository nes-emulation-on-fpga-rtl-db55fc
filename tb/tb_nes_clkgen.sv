// Testbench of the clock-enable generator: over 1200 master cycles counts the
// CPU, PPU and VGA enables (expect 100, 300, 600), checks that the PPU enable
// falls in phase 3 and that the CPU enable coincides with a PPU enable.
`include "tb_check.svh"
module tb_nes_clkgen;
  `TB_COUNTERS
  logic clk = 0, rst = 1;
  logic ce_cpu, ce_ppu, ce_vga;
  logic [1:0] ph;
  int n_cpu = 0, n_ppu = 0, n_vga = 0, bad_phase = 0, bad_align = 0;
  nes_clkgen dut (.clk, .rst, .ce_cpu, .ce_ppu, .ce_vga, .ppu_phase(ph));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000)
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    repeat (1200) begin
      @(posedge clk); #1;
      if (ce_cpu) n_cpu++;
      if (ce_ppu) n_ppu++;
      if (ce_vga) n_vga++;
      if (ce_ppu && ph != 2'd3) bad_phase++;
      if (ce_cpu && !ce_ppu) bad_align++;
    end
    `CHECK(n_cpu == 100, "CPU enable = master/12")
    `CHECK(n_ppu == 300, "PPU enable = master/4")
    `CHECK(n_vga == 600, "VGA enable = master/2")
    `CHECK(bad_phase == 0, "PPU enable in phase 3")
    `CHECK(bad_align == 0, "CPU enable on a PPU dot boundary")
    `TB_DONE
  end
endmodule
