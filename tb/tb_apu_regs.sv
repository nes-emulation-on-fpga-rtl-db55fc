// Testbench of the APU register array: random writes to $4000-$4013 (and
// ignored addresses above), checking that the delayed copy and the one-cycle
// write strobes follow a reference one CPU cycle behind the write.
`include "tb_check.svh"
module tb_apu_regs;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 0, sel = 0, we = 0;
  logic [4:0] addr = 0; logic [7:0] wdata = 0;
  logic [7:0] regs_q [20]; logic [19:0] wr_q;
  logic [7:0] ref_r [20], ref_q [20]; logic [19:0] ref_w, ref_wq;
  apu_regs dut (.clk, .rst, .ce, .sel, .addr, .we, .wdata, .regs_q, .wr_q);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  initial begin
    foreach (ref_r[i]) begin ref_r[i] = 0; ref_q[i] = 0; end
    ref_w = 0; ref_wq = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      ce = ($urandom_range(0, 2) == 0); sel = 1'($urandom); we = 1'($urandom);
      addr = 5'($urandom); wdata = 8'($urandom);
      @(posedge clk); #1;
      if (ce) begin
        ref_q = ref_r; ref_wq = ref_w; ref_w = 0;
        if (sel && we && addr < 20) begin ref_r[addr] = wdata; ref_w[addr] = 1'b1; end
      end
      `CHECK(regs_q == ref_q && wr_q == ref_wq, $sformatf("cycle %0d", i))
    end
    `TB_DONE
  end
endmodule
