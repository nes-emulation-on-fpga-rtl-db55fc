// Testbench of the pixel buffer: writes a line into one bank while reading the
// other, and checks that reads return the last line written to that bank.
`include "tb_check.svh"
module tb_ppu_linebuf;
  `TB_COUNTERS
  logic clk = 0, we = 0, wbank = 0, rbank = 1;
  logic [7:0] wa = 0, ra = 0;
  logic [8:0] wd = 0, rd;
  ppu_linebuf dut (.clk, .we, .wbank, .waddr(wa), .wdata(wd), .rbank, .raddr(ra), .rdata(rd));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 20000)
  initial begin
    for (int line = 0; line < 4; line++) begin
      wbank = line[0]; rbank = ~line[0];
      for (int x = 0; x < 256; x++) begin
        we = 1; wa = 8'(x); wd = 9'(x * 3 + line * 37);
        ra = 8'(x);
        @(posedge clk); #1;
        if (line > 0) `CHECK(rd == 9'(x * 3 + (line - 1) * 37), $sformatf("line %0d x %0d", line - 1, x))
      end
    end
    `TB_DONE
  end
endmodule
