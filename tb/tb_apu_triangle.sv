// Testbench of the triangle channel: the 32-step sequence 15..0,0..15, a step
// every T+1 CPU cycles, the linear counter (reload, count-down, control bit)
// and the length counter, which both freeze the sequencer.
`include "tb_check.svh"
module tb_apu_triangle;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 1, quarter = 0, half = 0, enable = 1, w3 = 0;
  logic [7:0] r0 = 0, r2 = 0, r3 = 0; logic [3:0] s; logic la;
  apu_triangle dut (.clk, .rst, .ce, .quarter, .half, .enable, .r0, .r2, .r3, .w3, .sample(s), .len_active(la));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 1000000)
  task automatic cyc(input int n = 1);
    repeat (n) begin @(posedge clk); #1 w3 = 0; quarter = 0; half = 0; end
  endtask
  initial begin
    int T = 20, changes = 0, t_first = -1, t_last = 0, bad = 0;
    logic [3:0] prev, expect_s;
    repeat (2) @(posedge clk); #1 rst = 0;
    r0 = 8'h80 | 8'd10; r2 = 8'(T); r3 = 8'h08; w3 = 1; cyc();
    quarter = 1; cyc();                                 // linear counter reload
    prev = s;
    for (int t = 0; t < 64 * (T + 1) + 5; t++) begin
      cyc();
      if (s != prev) begin
        // sequence 15,14,..,0,0,1,..,15,15,14: a change is either +-1 or none at the turning points
        if (!((s == prev + 4'd1) || (s == prev - 4'd1))) bad++;
        if (t_first < 0) t_first = t;
        t_last = t; changes++;
      end
      prev = s;
    end
    `CHECK(bad == 0, "sample moves by one step")
    `CHECK(changes >= 60 && (t_last - t_first) % (T + 1) == 0, $sformatf("step spacing, %0d changes", changes))
    // 32 steps with two repeats per period -> 30 changes per 32*(T+1) cycles
    `CHECK(changes == 60 || changes == 61, $sformatf("changes in two periods: %0d", changes))
    // linear counter without control bit: stops after 10 quarter frames
    r0 = 8'd10; r3 = 8'h08; w3 = 1; cyc();
    repeat (11) begin quarter = 1; cyc(); cyc(5); end   // reload, then 10 decrements
    prev = s; cyc(200);
    `CHECK(s == prev && dut.lin == 0, "linear counter zero freezes the sequencer")
    r0 = 8'h80 | 8'd10; w3 = 1; cyc(); quarter = 1; cyc();
    prev = s; cyc(200);
    `CHECK(s != prev || dut.step != 0, "reload restarts the sequencer")
    // length counter index 3 = 2 half frames (halt clear)
    r0 = 8'd100; r3 = 8'h18; w3 = 1; cyc(); quarter = 1; cyc();
    `CHECK(la, "length loaded")
    half = 1; cyc(); half = 1; cyc();
    `CHECK(!la, "length counter expires")
    enable = 0; r0 = 8'h80; w3 = 1; cyc();
    `CHECK(!la, "disabled channel does not load the length counter")
    `TB_DONE
  end
endmodule
