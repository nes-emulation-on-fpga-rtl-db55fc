// Testbench of the synchronous RAM: random writes and reads against a
// reference array; read data must appear one enabled cycle after the address
// and nothing may change when the enable is low.
`include "tb_check.svh"
module tb_nes_ram;
  `TB_COUNTERS
  logic clk = 0, ce = 0, we = 0;
  logic [10:0] addr = 0;
  logic [7:0] wd = 0, rd;
  logic [7:0] ref_mem [2048];
  nes_ram #(.AW(11)) dut (.clk, .ce, .addr, .we, .wdata(wd), .rdata(rd));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 0;
    ce = 1;
    for (int i = 0; i < 3000; i++) begin
      addr = 11'($urandom); we = 1'($urandom); wd = 8'($urandom);
      @(posedge clk); #1;
      if (we) ref_mem[addr] = wd;
      else `CHECK(rd == ref_mem[addr], $sformatf("read %h", addr))
    end
    we = 1; ce = 0; addr = 11'h10; wd = 8'hAA;
    @(posedge clk); #1;
    ce = 1; we = 0;
    @(posedge clk); #1;
    `CHECK(rd == ref_mem[11'h10], "no write without enable")
    `TB_DONE
  end
endmodule
