// APU pulse (square) channel. Registers r0-r3 are $4000-$4003 (pulse 1) or
// $4004-$4007 (pulse 2):
//   r0: duty[7:6], length halt / envelope loop[5], constant volume[4], V[3:0]
//   r1: sweep enable[7], period[6:4], negate[3], shift[2:0]
//   r2: timer low 8 bits;  r3: length index[7:3], timer high 3 bits
// The 11-bit timer counts down once per APU cycle (every second CPU cycle) and
// steps an 8-step duty sequencer. The envelope sets the volume; the sweep
// unit, clocked on half frames, moves the period towards period +/- (period >>
// shift), where negation is ones' complement on pulse 1 and two's complement
// on pulse 2 (CHANNEL parameter). The channel is muted when the period is
// below 8 or the sweep target exceeds $7FF, or when the length counter (loaded
// from the length table on a write to r3, counted down on half frames unless
// halted) is zero. Output: 4-bit sample.
module apu_pulse
  import apu_pkg::*;
#(
  parameter int unsigned CHANNEL = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,            // CPU cycle
  input  logic       apu_cycle,     // every second CPU cycle
  input  logic       quarter,
  input  logic       half,
  input  logic       enable,
  input  logic [7:0] r0, r1, r2, r3,
  input  logic       w1, w2, w3,    // write strobes of r1..r3
  output logic [3:0] sample,
  output logic       len_active
);
  logic [10:0] period, timer;
  logic [2:0]  step;
  logic [7:0]  len;
  logic [2:0]  sdiv;
  logic        sreload;
  logic [3:0]  volume;
  logic [11:0] change, target;
  logic        mute;

  apu_envelope u_env (
    .clk, .rst, .ce, .quarter, .restart(w3), .loop(r0[5]), .const_vol(r0[4]),
    .v(r0[3:0]), .volume
  );

  always_comb begin
    change = {1'b0, period >> r1[2:0]};
    if (r1[3]) target = {1'b0, period} - change - ((CHANNEL == 1) ? 12'd1 : 12'd0);
    else       target = {1'b0, period} + change;
    mute = (period < 11'd8) || (!r1[3] && target > 12'h7FF);
  end

  logic duty_bit;
  always_comb begin
    unique case (r0[7:6])
      2'd0: duty_bit = (step == 3'd1);
      2'd1: duty_bit = (step == 3'd1) || (step == 3'd2);
      2'd2: duty_bit = (step >= 3'd1) && (step <= 3'd4);
      default: duty_bit = !((step == 3'd1) || (step == 3'd2));
    endcase
  end
  assign sample     = (duty_bit && !mute && len != 8'd0) ? volume : 4'd0;
  assign len_active = (len != 8'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      period <= '0; timer <= '0; step <= '0; len <= '0; sdiv <= '0; sreload <= 1'b0;
    end else if (ce) begin
      if (w2) period[7:0]  <= r2;
      if (w3) begin
        period[10:8] <= r3[2:0];
        step <= 3'd0;
      end
      if (w1) sreload <= 1'b1;
      // timer
      if (apu_cycle) begin
        if (timer == 11'd0) begin
          timer <= period;
          step  <= step - 3'd1;
        end else timer <= timer - 11'd1;
      end
      // sweep and length on half frames
      if (half) begin
        if (sdiv == 3'd0 && r1[7] && r1[2:0] != 3'd0 && !mute) period <= target[10:0];
        if (sdiv == 3'd0 || sreload) begin sdiv <= r1[6:4]; sreload <= 1'b0; end
        else sdiv <= sdiv - 3'd1;
        if (!r0[5] && len != 8'd0) len <= len - 8'd1;
      end
      if (w3 && enable) len <= length_table(r3[7:3]);
      if (!enable) len <= 8'd0;
    end
  end
endmodule
