// APU frame counter. Counts CPU cycles and emits quarter-frame clocks
// (envelopes, triangle linear counter) and half-frame clocks (length counters,
// sweeps). 4-step mode: quarter at cycles 7457, 14913, 22371, 29829, half at
// 14913 and 29829, frame interrupt at 29828-29830 unless inhibited, period
// 29830. 5-step mode: quarter at 7457, 14913, 22371, 37281, half at 14913 and
// 37281, no interrupt, period 37282. A write to $4017 (bit 7 mode, bit 6 IRQ
// inhibit) restarts the sequence, and in 5-step mode clocks both units at
// once; setting the inhibit bit clears the flag. The CPU writes this register
// directly, without the one-cycle register delay, so the interrupt timing is
// exact. Step positions are the NES APU's.
module apu_frame_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       wr_4017,
  input  logic [7:0] wdata,
  input  logic       clr_irq,        // $4015 read
  output logic       quarter,
  output logic       half,
  output logic       irq
);
  logic [15:0] cnt;
  logic        mode5, inhibit;

  always_comb begin
    quarter = 1'b0;
    half    = 1'b0;
    if (ce) begin
      if (wr_4017) begin
        quarter = wdata[7];
        half    = wdata[7];
      end else begin
        unique case (cnt)
          16'd7457:  quarter = 1'b1;
          16'd14913: begin quarter = 1'b1; half = 1'b1; end
          16'd22371: quarter = 1'b1;
          16'd29829: begin quarter = !mode5; half = !mode5; end
          16'd37281: begin quarter = mode5; half = mode5; end
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0; mode5 <= 1'b0; inhibit <= 1'b0; irq <= 1'b0;
    end else if (ce) begin
      if (wr_4017) begin
        cnt     <= '0;
        mode5   <= wdata[7];
        inhibit <= wdata[6];
        if (wdata[6]) irq <= 1'b0;
      end else begin
        if (!mode5 && !inhibit && cnt >= 16'd29828 && cnt <= 16'd29830) irq <= 1'b1;
        else if (clr_irq) irq <= 1'b0;
        if ((!mode5 && cnt == 16'd29830) || (mode5 && cnt == 16'd37282)) cnt <= 16'd1;
        else cnt <= cnt + 16'd1;
      end
    end
  end
endmodule
