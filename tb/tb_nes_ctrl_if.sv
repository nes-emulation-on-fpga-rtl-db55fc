// Testbench of the controller port with two behavioural NES pads (8-bit
// parallel-in serial-out registers): latches the buttons through $4016,
// reads eight bits from each port and compares them with the buttons held.
`include "tb_check.svh"
module tb_nes_ctrl_if;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 1, sel = 0, a0 = 0, we = 0;
  logic [7:0] wd = 0, rd;
  logic latch, clk1, clk2, d1, d2;
  logic [7:0] btn1 = 8'b1010_0110, btn2 = 8'b0001_1001;  // A is bit 0
  nes_ctrl_if dut (.clk, .rst, .ce, .sel, .a0, .we, .wdata(wd), .rdata(rd),
    .pad_latch(latch), .pad1_clk(clk1), .pad2_clk(clk2), .pad1_data(d1), .pad2_data(d2));
  nes_pad_model p1 (.latch, .clk(clk1), .buttons(btn1), .data(d1));
  nes_pad_model p2 (.latch, .clk(clk2), .buttons(btn2), .data(d2));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 10000)
  task automatic access(input logic port, input logic w, input logic [7:0] d);
    sel = 1; a0 = port; we = w; wd = d;
    @(posedge clk); #1; sel = 0; we = 0;
    @(posedge clk); #1;
  endtask
  initial begin
    @(posedge clk); #1 rst = 0;
    access(0, 1, 8'h01);
    `CHECK(latch, "strobe drives latch")
    access(0, 1, 8'h00);
    for (int i = 0; i < 8; i++) begin
      access(0, 0, 0);
      `CHECK(rd[0] == btn1[i] && rd[7:1] == 7'b0100000, $sformatf("pad 1 bit %0d", i))
      access(1, 0, 0);
      `CHECK(rd[0] == btn2[i], $sformatf("pad 2 bit %0d", i))
    end
    `TB_DONE
  end
endmodule
