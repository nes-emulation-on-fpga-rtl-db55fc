// Testbench of the frame counter. Counts CPU cycles between quarter- and
// half-frame pulses in the 4-step and 5-step modes, checks the IRQ (set at the
// end of the 4-step sequence, cleared by a $4015 read or the inhibit bit, never
// in 5-step mode) and the immediate clock produced by a 5-step write.
`include "tb_check.svh"
module tb_apu_frame_counter;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 0, wr = 0, clr = 0;
  logic [7:0] wdata = 0; logic q, h, irq;
  apu_frame_counter dut (.clk, .rst, .ce, .wr_4017(wr), .wdata, .clr_irq(clr), .quarter(q), .half(h), .irq);
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000000)
  int cyc = 0, qs [$], hs [$], irq_at = -1;
  always @(posedge clk) if (ce) begin
    if (q) qs.push_back(cyc);
    if (h) hs.push_back(cyc);
    if (irq && irq_at < 0) irq_at = cyc;
    cyc++;
  end
  always @(negedge clk) ce = !ce;     // CPU enable every second clock
  task automatic write4017(input logic [7:0] d);
    @(negedge clk); while (!ce) @(negedge clk);
    wr = 1; wdata = d; @(negedge clk); @(negedge clk); wr = 0;
  endtask
  task automatic run(input int n);
    repeat (2 * n) @(negedge clk);
  endtask
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    write4017(8'h00);
    qs.delete(); hs.delete(); cyc = 0; irq_at = -1;
    run(3 * 29830 + 10);
    `CHECK(qs.size() >= 12 && qs[1] - qs[0] == 7456 && qs[2] - qs[1] == 7458 && qs[3] - qs[2] == 7458
           && qs[4] - qs[3] == 7458, $sformatf("4-step quarter spacing %0d %0d %0d %0d",
           qs[1] - qs[0], qs[2] - qs[1], qs[3] - qs[2], qs[4] - qs[3]))
    `CHECK(hs.size() >= 6 && hs[1] - hs[0] == 14916 && hs[2] - hs[1] == 14914, "4-step half spacing")
    `CHECK(qs[4] - qs[0] == 29830, "4-step sequence length 29830 CPU cycles")
    `CHECK(irq_at >= 0 && irq_at - qs[0] == 29828 - 7457 + 1, $sformatf("IRQ raised at cycle %0d", irq_at))
    @(negedge clk); while (!ce) @(negedge clk);
    clr = 1; @(negedge clk); @(negedge clk); clr = 0;
    run(4);
    `CHECK(!irq, "$4015 read clears the IRQ outside the set window")
    write4017(8'h40); run(29830 + 100);
    `CHECK(!irq, "inhibit prevents the IRQ")
    // 5-step mode: immediate clock and 37282-cycle sequence, no IRQ
    qs.delete(); hs.delete(); irq_at = -1;
    write4017(8'h80);
    `CHECK(qs.size() == 1 && hs.size() == 1, "5-step write clocks quarter and half at once")
    qs.delete(); hs.delete(); cyc = 0;
    run(2 * 37282 + 10);
    `CHECK(qs.size() == 8 && qs[4] - qs[0] == 37282 && qs[3] - qs[2] == 37281 - 22371,
           $sformatf("5-step sequence: %0d quarters", qs.size()))
    `CHECK(hs.size() == 4 && irq_at < 0, "5-step: two halves per sequence, no IRQ")
    `TB_DONE
  end
endmodule
