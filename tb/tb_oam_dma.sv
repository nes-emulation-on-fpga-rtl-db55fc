// Testbench of the OAM DMA engine: starts transfers on even and odd CPU cycles
// and checks the total length (513 / 514 cycles, counted from the cycle after
// the $4014 write), the 256 source addresses in order from $YY00, that each
// read is followed by a write cycle to $2004, and that both lengths occur.
`include "tb_check.svh"
module tb_oam_dma;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 1, wr = 0;
  logic [7:0] wd = 0;
  logic active, we;
  logic [15:0] addr;
  oam_dma dut (.clk, .rst, .ce, .wr_4014(wr), .wdata(wd), .active, .addr, .we);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)
  // monitor: length and address sequence of the running transfer
  int n = 0, k = 0, errs = 0;
  logic [7:0] page;
  always @(posedge clk) if (active) begin
    n++;
    if (!we && addr != {page, 8'(k)}) errs++;
    if (we) begin if (addr != 16'h2004) errs++; k++; end
  end
  task automatic run(input logic [7:0] pg, output int len);
    @(negedge clk); wd = pg; page = pg; wr = 1; n = 0; k = 0; errs = 0;
    @(negedge clk); wr = 0;
    while (active) @(negedge clk);
    len = n;
    if (k != 256) errs++;
  endtask
  initial begin
    int lens [3];
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 3; i++) begin
      repeat (i + 1) @(negedge clk);
      run(8'(2 + i), lens[i]);
      `CHECK(errs == 0, $sformatf("addresses and writes of DMA %0d", i))
      `CHECK(lens[i] == 513 || lens[i] == 514, $sformatf("DMA %0d length %0d", i, lens[i]))
    end
    `CHECK(lens[0] != lens[1] || lens[1] != lens[2], $sformatf("both parities give 513 and 514 cycles (%0d %0d %0d)", lens[0], lens[1], lens[2]))
    `TB_DONE
  end
endmodule
