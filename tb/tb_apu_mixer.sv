// Testbench of the mixer: for all channel values it compares the output with
// the non-linear pulse and tnd formulas scaled to the 16-bit range (within
// 2 LSB), and checks zero output for silence and monotonic response.
`include "tb_check.svh"
module tb_apu_mixer;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 1;
  logic [3:0] p1 = 0, p2 = 0, t = 0, n = 0; logic [6:0] d = 0; logic [15:0] y;
  apu_mixer #(.OUT_BITS(16)) dut (.clk, .rst, .ce, .pulse1(p1), .pulse2(p2), .triangle(t), .noise(n), .dmc(d), .sample(y));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 1000000)
  function automatic real model(int a, int b, int c, int e);
    real full, pu, tn;
    full = 95.52 / (8128.0 / 30.0 + 100.0) + 163.67 / (24329.0 / 202.0 + 100.0);
    pu = (a + b == 0) ? 0.0 : 95.52 / (8128.0 / real'(a + b) + 100.0);
    tn = (3 * c + 2 * e == 0) ? 0.0 : 163.67 / (24329.0 / real'(3 * c + 2 * e) + 100.0);
    return (pu + tn) / full * 65535.0;
  endfunction
  initial begin
    int bad = 0, nonmono = 0; logic [15:0] prev;
    repeat (2) @(posedge clk); #1 rst = 0;
    @(posedge clk); #1;
    `CHECK(y == 0, "silence gives zero")
    for (int i = 0; i < 65536; i += 7) begin
      real m;
      {p1, p2, t, n} = 16'(i);
      @(posedge clk); #1;
      m = model(p1, p2, t, n);
      if (real'(y) < m - 2.0 || real'(y) > m + 2.0) bad++;
    end
    `CHECK(bad == 0, $sformatf("%0d samples off the formula", bad))
    p1 = 0; p2 = 0; t = 0; n = 0; prev = 0;
    for (int i = 1; i < 16; i++) begin p1 = 4'(i); @(posedge clk); #1; if (y <= prev) nonmono++; prev = y; end
    for (int i = 1; i < 16; i++) begin t = 4'(i); @(posedge clk); #1; if (y <= prev) nonmono++; prev = y; end
    `CHECK(nonmono == 0, "output rises with each channel")
    p1 = 15; p2 = 15; t = 15; n = 15; @(posedge clk); #1;
    `CHECK(y > 16'd40000, $sformatf("full scale without DMC is %0d", y))
    `TB_DONE
  end
endmodule
