// APU triangle channel ($4008-$400B).
//   r0 ($4008): control / length halt[7], linear counter reload[6:0]
//   r2, r3: 11-bit timer period, length index r3[7:3]
// The timer counts down every CPU cycle and steps a 32-step sequencer
// (15,14,...,0,0,1,...,15) only while both the linear counter and the length
// counter are non-zero, so a silenced triangle holds its level. The linear
// counter is reloaded on the quarter frame after a write to r3 and counts down
// on other quarter frames; the reload flag is cleared when control is 0.
module apu_triangle
  import apu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       quarter,
  input  logic       half,
  input  logic       enable,
  input  logic [7:0] r0, r2, r3,
  input  logic       w3,
  output logic [3:0] sample,
  output logic       len_active
);
  logic [10:0] timer;
  logic [4:0]  step;
  logic [6:0]  lin;
  logic        lreload;
  logic [7:0]  len;

  assign sample     = step[4] ? step[3:0] : ~step[3:0];
  assign len_active = (len != 8'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      timer <= '0; step <= '0; lin <= '0; lreload <= 1'b0; len <= '0;
    end else if (ce) begin
      if (w3) lreload <= 1'b1;
      if (timer == 11'd0) begin
        timer <= {r3[2:0], r2};
        if (lin != 7'd0 && len != 8'd0) step <= step + 5'd1;
      end else timer <= timer - 11'd1;
      if (quarter) begin
        if (lreload || w3) lin <= r0[6:0];
        else if (lin != 7'd0) lin <= lin - 7'd1;
        if (!r0[7]) lreload <= 1'b0;
      end
      if (half && !r0[7] && len != 8'd0) len <= len - 8'd1;
      if (w3 && enable) len <= length_table(r3[7:3]);
      if (!enable) len <= 8'd0;
    end
  end
endmodule
