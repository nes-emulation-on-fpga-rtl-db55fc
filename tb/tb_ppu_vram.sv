// Testbench of the nametable RAM: writes through port B and reads through both
// ports, checking vertical mirroring ($2000=$2800, $2400=$2C00) and
// horizontal mirroring ($2000=$2400, $2800=$2C00) against a reference model.
`include "tb_check.svh"
module tb_ppu_vram;
  `TB_COUNTERS
  logic clk = 0, mv = 1, we = 0;
  logic [11:0] aa = 0, ab = 0;
  logic [7:0] wd = 0, ra, rb;
  logic [7:0] ref_mem [2048];
  ppu_vram dut (.clk, .mirror_v(mv), .addr_a(aa), .rdata_a(ra), .addr_b(ab), .we_b(we), .wdata_b(wd), .rdata_b(rb));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  function automatic int fold(input logic [11:0] a, input logic v);
    return v ? int'({a[10], a[9:0]}) : int'({a[11], a[9:0]});
  endfunction
  initial begin
    foreach (ref_mem[i]) ref_mem[i] = 0;
    for (int m = 0; m < 2; m++) begin
      mv = (m == 0);
      for (int i = 0; i < 2000; i++) begin
        ab = 12'($urandom); aa = 12'($urandom); we = 1'($urandom); wd = 8'($urandom);
        @(posedge clk); #1;
        `CHECK(ra == ref_mem[fold(aa, mv)], $sformatf("port A read %h", aa))
        if (we) ref_mem[fold(ab, mv)] = wd;
        else `CHECK(rb == ref_mem[fold(ab, mv)], $sformatf("port B read %h", ab))
      end
    end
    // explicit mirror pair
    mv = 1; ab = 12'h005; we = 1; wd = 8'h5A; @(posedge clk); #1; we = 0;
    aa = 12'h805; @(posedge clk); #1;
    `CHECK(ra == 8'h5A, "vertical mirroring: $2005 = $2805")
    mv = 0; aa = 12'h405; @(posedge clk); #1;
    `CHECK(ra == 8'h5A, "horizontal mirroring: $2005 = $2405")
    `TB_DONE
  end
endmodule
