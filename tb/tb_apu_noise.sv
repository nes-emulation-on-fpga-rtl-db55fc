// Testbench of the noise channel: for several period indices and both modes
// the LFSR is compared, shift by shift, with a reference 15-bit shift register
// (feedback bit 0 xor bit 1, or bit 6 in mode 1), and the spacing of the
// shifts must equal the NTSC period table in CPU cycles. Also checks the output
// (volume when bit 0 is clear) and the length counter.
`include "tb_check.svh"
module tb_apu_noise;
  `TB_COUNTERS
  logic clk = 0, rst = 1, ce = 1, quarter = 0, half = 0, enable = 1, w3 = 0;
  logic [7:0] r0 = 8'h3F, r2 = 0, r3 = 8'h08; logic [3:0] s; logic la;
  apu_noise dut (.clk, .rst, .ce, .quarter, .half, .enable, .r0, .r2, .r3, .w3, .sample(s), .len_active(la));
  always #5 clk = ~clk;
  `WATCHDOG(clk, 3000000)
  int periods [16] = '{4, 8, 16, 32, 64, 96, 128, 160, 202, 254, 380, 508, 762, 1016, 2034, 4068};
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    w3 = 1; @(posedge clk); #1 w3 = 0;
    foreach (periods[k]) if (k % 3 == 0 || k == 15) for (int m = 0; m < 2; m++) begin
      logic [14:0] model, prev;
      automatic int t = 0, last = -1, shifts = 0, bad_seq = 0, bad_gap = 0, bad_out = 0;
      r2 = {m[0], 3'b000, 4'(k)};
      prev = dut.lfsr;
      @(posedge clk); #1;
      while (dut.lfsr == prev) begin @(posedge clk); #1; end  // first shift with the new period
      model = dut.lfsr; prev = model; last = 0;
      while (shifts < 40) begin
        @(posedge clk); #1; t++;
        if (s != (dut.lfsr[0] ? 4'd0 : 4'd15)) bad_out++;
        if (dut.lfsr != prev) begin
          model = {model[0] ^ (m ? model[6] : model[1]), model[14:1]};
          if (dut.lfsr != model) bad_seq++;
          if (t - last != periods[k]) bad_gap++;
          last = t; prev = dut.lfsr; shifts++;
        end
      end
      `CHECK(bad_seq == 0 && bad_gap == 0 && bad_out == 0,
             $sformatf("period %0d mode %0d: seq %0d gap %0d out %0d", k, m, bad_seq, bad_gap, bad_out))
    end
    r0 = 8'h1F; r3 = 8'h00; w3 = 1; @(posedge clk); #1 w3 = 0;   // length 10, not halted
    repeat (10) begin half = 1; @(posedge clk); #1 half = 0; end
    `CHECK(!la && s == 0, "length counter silences the channel")
    `TB_DONE
  end
endmodule
