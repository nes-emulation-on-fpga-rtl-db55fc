// Testbench of the $4015 status register: channel enables from writes, read
// value {frame IRQ, length-counter states} and the IRQ-clear pulse on reads.
`include "tb_check.svh"
module tb_apu_status;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 0, sel = 0, we = 0, firq = 0, clr;
  logic [7:0] wdata = 0, rdata; logic [3:0] la = 0, en;
  apu_status dut (.clk, .rst, .ce, .sel, .we, .wdata, .len_active(la), .frame_irq(firq),
    .enables(en), .rdata, .clr_frame_irq(clr));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 100000)
  initial begin
    logic [3:0] ref_en = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    `CHECK(en == 0, "channels disabled after reset")
    for (int i = 0; i < 500; i++) begin
      ce = 1'($urandom); sel = 1'($urandom); we = 1'($urandom); wdata = 8'($urandom);
      la = 4'($urandom); firq = 1'($urandom);
      #1 `CHECK(clr == (ce && sel && !we), "IRQ clear only on a $4015 read")
      @(posedge clk); #1;
      if (ce && sel && we) ref_en = wdata[3:0];
      if (ce && sel && !we) `CHECK(rdata == {1'b0, firq, 2'b00, la}, "status read value")
      `CHECK(en == ref_en, "enables")
    end
    `TB_DONE
  end
endmodule
