// Testbench of the pulse channel, both variants (CHANNEL 1 and 2). Checks the
// waveform period 16*(P+1) CPU cycles and the four duty cycles, constant
// volume and envelope decay, the length counter (load, count-down, halt,
// disable), muting for periods below 8, and the sweep unit's target period
// with the ones'/two's complement difference between the two channels.
`include "tb_check.svh"
module tb_apu_pulse;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 0, apu_cycle = 0, quarter = 0, half = 0, enable = 1;
  logic [7:0] r0 = 0, r1 = 0, r2 = 0, r3 = 0; logic w1 = 0, w2 = 0, w3 = 0;
  logic [3:0] s1, s2; logic la1, la2;
  apu_pulse #(.CHANNEL(1)) d1 (.clk, .rst, .ce, .apu_cycle, .quarter, .half, .enable, .r0, .r1, .r2, .r3,
    .w1, .w2, .w3, .sample(s1), .len_active(la1));
  apu_pulse #(.CHANNEL(2)) d2 (.clk, .rst, .ce, .apu_cycle, .quarter, .half, .enable, .r0, .r1, .r2, .r3,
    .w1, .w2, .w3, .sample(s2), .len_active(la2));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 5000000)
  // one CPU cycle per clock; apu_cycle on every second one
  task automatic cyc(input int n = 1);
    repeat (n) begin ce = 1; @(posedge clk); #1 apu_cycle = !apu_cycle; w1 = 0; w2 = 0; w3 = 0; quarter = 0; half = 0; end
  endtask
  task automatic setup(input logic [7:0] a0, a1, a2, a3);
    r0 = a0; r1 = a1; r2 = a2; r3 = a3; w1 = 1; w2 = 1; w3 = 1; cyc();
  endtask
  task automatic pulse_hq(input logic hf);
    quarter = 1; half = hf; cyc();
  endtask
  // measure the period (rising edges) and high fraction of channel 1 over 4 periods
  task automatic measure(output int per, output int high);
    int edges = 0, t0 = 0, t5 = 0, t = 0; logic q; q = (s1 != 0); high = 0; per = 0;
    while (edges < 5 && t < 200000) begin
      if (s1 != 0 && !q) begin edges++; if (edges == 1) t0 = t; if (edges == 5) t5 = t; end
      if (edges == 5) break;
      if (edges >= 1 && s1 != 0) high++;
      q = (s1 != 0); cyc(); t++;
    end
    per = (t5 - t0) / 4; high = (edges == 5) ? high / 4 : -1;
  endtask
  initial begin
    int per, high;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int d = 0; d < 4; d++) begin
      automatic int P = 40 + 13 * d;
      setup(8'(d << 6 | 8'h3F), 8'h00, 8'(P), 8'h08);   // halt, constant 15, length index 1
      measure(per, high);
      `CHECK(per == 16 * (P + 1), $sformatf("duty %0d period %0d expected %0d", d, per, 16 * (P + 1)))
      `CHECK(high == 2 * (P + 1) * (d == 0 ? 1 : d == 1 ? 2 : d == 2 ? 4 : 6) || high == 2 * (P + 1) * (d == 0 ? 1 : d == 1 ? 2 : d == 2 ? 4 : 6) + 1,
             $sformatf("duty %0d high time %0d", d, high))
    end
    // envelope: decays 15 -> 0 at one step per (V+1) quarter frames, holds at 0 without loop
    setup(8'h82, 8'h00, 8'd100, 8'h08);                 // V = 2, no loop, length index 1 (254)
    pulse_hq(0);
    `CHECK(d1.volume == 15, "envelope restarts at 15")
    for (int i = 0; i < 3 * 15; i++) pulse_hq(0);
    `CHECK(d1.volume == 0, $sformatf("envelope reaches 0 after 45 quarter frames (%0d)", d1.volume))
    repeat (6) pulse_hq(0);
    `CHECK(d1.volume == 0, "envelope stays at 0 without loop")
    // length counter: index 0 = 10 half frames
    setup(8'h9F, 8'h00, 8'd100, 8'h00);
    `CHECK(la1 && la2, "length counter loaded")
    repeat (9) pulse_hq(1);
    `CHECK(la1, "still active after 9 half frames")
    pulse_hq(1);
    `CHECK(!la1 && s1 == 0 && s2 == 0, "silent after 10 half frames")
    setup(8'hBF, 8'h00, 8'd100, 8'h00);                 // halt
    repeat (20) pulse_hq(1);
    `CHECK(la1, "halt keeps the length counter")
    enable = 0; cyc(); enable = 1;
    `CHECK(!la1 && !la2, "disable clears the length counter")
    // mute below period 8
    setup(8'hBF, 8'h00, 8'd7, 8'h08);
    begin int nz = 0; repeat (500) begin nz += int'(s1 != 0); cyc(); end
      `CHECK(nz == 0, "period 7 is muted") end
    // sweep: negate, shift 1, period 0x100: ch1 -> 0x7F, ch2 -> 0x80
    setup(8'hBF, 8'h89, 8'h00, 8'h09);                  // enable, divider 0, negate, shift 1
    pulse_hq(1);
    `CHECK(d1.period == 11'h07F && d2.period == 11'h080,
           $sformatf("negated sweep: %h / %h", d1.period, d2.period))
    setup(8'hBF, 8'h81, 8'h00, 8'h09);                  // add, shift 1
    pulse_hq(1);
    `CHECK(d1.period == 11'h180 && d2.period == 11'h180, "added sweep")
    setup(8'hBF, 8'h81, 8'h00, 8'h0E);                  // 0x600 + 0x300 overflows: muted, no change
    pulse_hq(1);
    `CHECK(d1.period == 11'h600 && d1.mute, "sweep overflow mutes and holds the period")
    `TB_DONE
  end
endmodule
