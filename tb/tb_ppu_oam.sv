// Testbench of the OAM: random writes on port B, reads on both ports, against
// a reference array.
`include "tb_check.svh"
module tb_ppu_oam;
  `TB_COUNTERS
  logic clk = 0, we = 0;
  logic [7:0] aa = 0, ab = 0, wd = 0, ra, rb;
  logic [7:0] ref_mem [256];
  ppu_oam dut (.clk, .addr_a(aa), .rdata_a(ra), .addr_b(ab), .we_b(we), .wdata_b(wd), .rdata_b(rb));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 8'hFF;
    for (int i = 0; i < 3000; i++) begin
      ab = 8'($urandom); aa = 8'($urandom); we = 1'($urandom); wd = 8'($urandom);
      @(posedge clk); #1;
      `CHECK(ra == ref_mem[aa], "port A read")
      if (we) ref_mem[ab] = wd; else `CHECK(rb == ref_mem[ab], "port B read")
    end
    `TB_DONE
  end
endmodule
