// Testbench of the complete APU through its CPU register port: channel
// enables and length status in $4015, pulse-1 tone period at the channel
// output, activity of all four channels and of the mixed sample, the frame
// IRQ (raised once per 4-step sequence, shown in $4015 and cleared by reading
// it, suppressed by $4017 bit 6), and silence after disabling all channels.
`include "tb_check.svh"
module tb_apu_top;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 0, sel = 0, we = 0, irq;
  logic [4:0] addr = 0; logic [7:0] wdata = 0, rdata; logic [15:0] sample;
  logic [3:0] cp1, cp2, ctr, cno;
  apu_top dut (.clk, .rst, .ce, .sel, .addr, .we, .wdata, .rdata, .irq, .sample,
    .ch_pulse1(cp1), .ch_pulse2(cp2), .ch_triangle(ctr), .ch_noise(cno));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 2000000)
  always @(posedge clk) ce <= !ce;
  int cyc = 0;
  always @(posedge clk) if (ce) cyc++;
  task automatic acc(input logic w, input logic [4:0] a, input logic [7:0] d, output logic [7:0] q);
    @(negedge clk); while (!ce) @(negedge clk);
    sel = 1; we = w; addr = a; wdata = d;
    @(negedge clk); sel = 0; we = 0; q = rdata; @(negedge clk);
  endtask
  task automatic wr(input logic [4:0] a, input logic [7:0] d);
    logic [7:0] q; acc(1, a, d, q);
  endtask
  task automatic run(input int n); repeat (2 * n) @(negedge clk); endtask
  initial begin
    logic [7:0] q; int act [4]; int distinct; logic [15:0] last;
    int e0, e4, edges; logic p;
    repeat (3) @(posedge clk); #1 rst = 0;
    wr(5'h17, 8'h40);                       // 4-step, IRQ inhibited
    wr(5'h15, 8'h0F);
    wr(5'h00, 8'hBF); wr(5'h01, 8'h00); wr(5'h02, 8'd200); wr(5'h03, 8'h08);
    wr(5'h04, 8'h7F); wr(5'h05, 8'h00); wr(5'h06, 8'd150); wr(5'h07, 8'h08);
    wr(5'h08, 8'hFF); wr(5'h0A, 8'd100); wr(5'h0B, 8'h08);
    wr(5'h0C, 8'h3F); wr(5'h0E, 8'h04); wr(5'h0F, 8'h08);
    run(2);
    acc(0, 5'h15, 8'h00, q);
    `CHECK(q[3:0] == 4'hF, $sformatf("$4015 length status %h", q))
    run(10000);                             // let the triangle's linear counter load
    act = '{0, 0, 0, 0}; distinct = 0; last = 0; edges = 0; p = 0; e0 = 0; e4 = 0;
    for (int i = 0; i < 40000; i++) begin
      @(posedge clk); #1;
      if (ce) continue;
      act[0] += int'(cp1 != 0); act[1] += int'(cp2 != 0); act[2] += int'(ctr != 0); act[3] += int'(cno != 0);
      if (sample != last) distinct++;
      last = sample;
      if (cp1 != 0 && !p) begin if (edges == 0) e0 = cyc; if (edges == 4) e4 = cyc; edges++; end
      p = (cp1 != 0);
    end
    `CHECK(act[0] > 0 && act[1] > 0 && act[2] > 0 && act[3] > 0, "all four channels active")
    `CHECK(distinct > 100, $sformatf("mixed sample changes %0d times", distinct))
    `CHECK(e4 - e0 == 4 * 16 * 201, $sformatf("pulse 1 period %0d CPU cycles", (e4 - e0) / 4))
    // frame IRQ
    wr(5'h17, 8'h00);
    run(29820);
    `CHECK(!irq, "no frame IRQ before the end of the sequence")
    run(20);
    `CHECK(irq, "frame IRQ at the end of the 4-step sequence")
    acc(0, 5'h15, 8'h00, q);
    `CHECK(q[6] && !irq, "$4015 shows and clears the frame IRQ")
    wr(5'h17, 8'h40); run(30000);
    `CHECK(!irq, "inhibit bit prevents the IRQ")
    // disable everything
    wr(5'h15, 8'h00); run(4);
    acc(0, 5'h15, 8'h00, q);
    `CHECK(q[3:0] == 0 && cp1 == 0 && cp2 == 0 && cno == 0, "disabled channels are silent (the triangle holds its level)")
    `TB_DONE
  end
endmodule
